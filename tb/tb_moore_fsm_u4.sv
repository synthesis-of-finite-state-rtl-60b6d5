// tb_moore_fsm_u4: end-to-end test of the Moore FSM in four configurations
// of the class-code sources, run side by side on the same stimulus:
//   none : every class read from its interval of the state code (default)
//   B2   : class B2 from the code transformer, B1 and B3 from the intervals
//   B13  : B1 and B3 from the code transformer, B2 from its interval
//   all  : every class from the code transformer
// A reference model written from the state transition graph (by state
// name, not by class) predicts the state and the microoperations. After
// every rising edge each instance must show the predicted state code and,
// in the same cycle, the microoperations of that state. Random Start
// pulses restart the algorithm. The test counts how often each of the 11
// transitions, the Start load, a complete pass a1 -> ... -> a1 (which must
// take 3 clocks), and each class-code source (interval or tau) was used,
// and counts a failure for any that never happened.
module tb_moore_fsm_u4;
  logic       clk;
  logic       start;
  logic [1:3] x;
  logic [1:4] y_none, y_b2, y_b13, y_all;
  logic [1:3] t_none, t_b2, t_b13, t_all;
  int checks = 0, failures = 0;

  // reference tables by state index 1..6
  logic [1:3] code   [1:6] = '{3'b000, 3'b001, 3'b011, 3'b101, 3'b010, 3'b110};
  logic [1:4] mops   [1:6] = '{4'b0000, 4'b1100, 4'b0010, 4'b0001, 4'b0101, 4'b0010};
  int         cls_of [1:6] = '{1, 2, 2, 2, 3, 3};

  // configuration masks, bit i-1 = class B_i via tau
  logic [2:0] cfg [4] = '{3'b000, 3'b010, 3'b101, 3'b111};

  int edge_cnt [1:6][1:6];
  int start_cnt = 0, pass_cnt = 0, src_t [4], src_tau [4];
  int ref_s, prev_s, pass_len;

  moore_fsm_u4                  u_none (.clk, .start, .x, .y(y_none), .t(t_none));
  moore_fsm_u4 #(.PI_C(3'b010)) u_b2   (.clk, .start, .x, .y(y_b2),   .t(t_b2));
  moore_fsm_u4 #(.PI_C(3'b101)) u_b13  (.clk, .start, .x, .y(y_b13),  .t(t_b13));
  moore_fsm_u4 #(.PI_C(3'b111)) u_all  (.clk, .start, .x, .y(y_all),  .t(t_all));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  function automatic int next_of(int s, logic [1:3] xv);
    case (s)
      1:       return xv[1] ? 2 : (xv[2] ? 3 : 4);
      2, 3, 4: return xv[3] ? 5 : 6;
      default: return 1;
    endcase
  endfunction

  task automatic chk(string what, logic [1:3] t, logic [1:4] y);
    checks++;
    if (t !== code[ref_s] || y !== mops[ref_s]) begin
      failures++;
      $display("%0t %s: t=%b y=%b expected a%0d t=%b y=%b",
               $time, what, t, y, ref_s, code[ref_s], mops[ref_s]);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (edge_cnt[a, b]) edge_cnt[a][b] = 0;
    foreach (src_t[c]) begin src_t[c] = 0; src_tau[c] = 0; end
    start = 1'b1;
    x     = '0;
    ref_s = 1;
    pass_len = 0;
    @(posedge clk);
    #1;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      start = (k == 0) || ($urandom_range(0, 49) == 0);
      x     = 3'($urandom);
      // which source each configuration uses to find the current class
      foreach (cfg[c])
        if (cfg[c][cls_of[ref_s]-1]) src_tau[c]++; else src_t[c]++;
      prev_s = ref_s;
      if (start) begin
        ref_s = 1;
        start_cnt++;
        pass_len = 0;
      end else begin
        ref_s = next_of(prev_s, x);
        edge_cnt[prev_s][ref_s]++;
        pass_len++;
        if (ref_s == 1) begin
          checks++;
          if (pass_len != 3) begin
            failures++;
            $display("pass took %0d clocks, expected 3", pass_len);
          end
          pass_cnt++;
          pass_len = 0;
        end
      end
      @(posedge clk);
      #1;
      chk("none", t_none, y_none);
      chk("B2",   t_b2,   y_b2);
      chk("B13",  t_b13,  y_b13);
      chk("all",  t_all,  y_all);
    end

    // every transition of the state transition graph must have been taken
    for (int a = 1; a <= 6; a++)
      for (int b = 1; b <= 6; b++) begin
        bit legal;
        legal = 0;
        for (int xv = 0; xv < 8; xv++) if (next_of(a, 3'(xv)) == b) legal = 1;
        if (legal) begin
          checks++;
          $display("edge a%0d -> a%0d taken %0d times", a, b, edge_cnt[a][b]);
          if (edge_cnt[a][b] == 0) begin failures++; $display("  never taken"); end
        end
      end
    checks++;
    $display("start loads %0d, complete passes %0d", start_cnt, pass_cnt);
    if (start_cnt == 0 || pass_cnt == 0) failures++;
    foreach (cfg[c]) begin
      $display("config %b: class from interval %0d, from tau %0d", cfg[c], src_t[c], src_tau[c]);
      checks++;
      if ((cfg[c] != 3'b111 && src_t[c] == 0) || (cfg[c] != 3'b000 && src_tau[c] == 0))
        failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
