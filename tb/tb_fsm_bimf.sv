// tb_fsm_bimf: self-checking test of the block of input memory functions.
// For every valid state code and every value of x1..x3 it checks the
// next-state code against the state transition graph written out per state:
//   a1 -> a2 if x1, a3 if !x1 x2, a4 if !x1 !x2
//   a2, a3, a4 -> a5 if x3, a6 if !x3
//   a5, a6 -> a1
// Four instances cover the class-code sources: all classes read from the
// state code (tau driven with random junk, it must be ignored), only B2
// from tau, B1 and B3 from tau, and all classes from tau. The tau codes a
// code transformer would produce are given here per state. The instance
// with every class on tau sees a random state code, which it must ignore.
module tb_fsm_bimf;
  logic [1:3] t, x, t_junk;
  logic [1:3] d_none, d_b2, d_b13, d_all;
  logic [0:0] tau_none, tau_b2;
  logic [1:0] tau_b13, tau_all;
  int checks = 0, failures = 0;

  // state index 1..6 -> code
  logic [1:3] code [1:6] = '{3'b000, 3'b001, 3'b011, 3'b101, 3'b010, 3'b110};
  logic       c_b2  [1:6] = '{1'b0, 1'b1, 1'b1, 1'b1, 1'b0, 1'b0};
  logic [1:0] c_b13 [1:6] = '{2'b01, 2'b00, 2'b00, 2'b00, 2'b10, 2'b10};
  logic [1:0] c_all [1:6] = '{2'b00, 2'b01, 2'b01, 2'b01, 2'b10, 2'b10};

  fsm_bimf                    u_none (.t(t), .tau(tau_none), .x(x), .d(d_none));
  fsm_bimf #(.PI_C(3'b010))   u_b2   (.t(t), .tau(tau_b2),   .x(x), .d(d_b2));
  fsm_bimf #(.PI_C(3'b101))   u_b13  (.t(t), .tau(tau_b13),  .x(x), .d(d_b13));
  fsm_bimf #(.PI_C(3'b111))   u_all  (.t(t_junk), .tau(tau_all),  .x(x), .d(d_all));

  function automatic int next_of(int s, logic [1:3] xv);
    case (s)
      1:       return xv[1] ? 2 : (xv[2] ? 3 : 4);
      2, 3, 4: return xv[3] ? 5 : 6;
      default: return 1;
    endcase
  endfunction

  task automatic chk(string what, logic [1:3] got, logic [1:3] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s t=%b x=%b: d=%b expected %b", what, t, x, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 1; s <= 6; s++)
      for (int xv = 0; xv < 8; xv++) begin
        t        = code[s];
        x        = 3'(xv);
        tau_none = 1'($urandom);
        tau_b2   = c_b2[s];
        tau_b13  = c_b13[s];
        tau_all  = c_all[s];
        t_junk   = 3'($urandom);
        #1;
        chk("none", d_none, code[next_of(s, x)]);
        chk("B2",   d_b2,   code[next_of(s, x)]);
        chk("B13",  d_b13,  code[next_of(s, x)]);
        chk("all",  d_all,  code[next_of(s, x)]);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
