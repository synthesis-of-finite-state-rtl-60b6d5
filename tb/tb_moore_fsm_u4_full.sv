// tb_moore_fsm_u4_full: the Moore FSM with every parameter at its default,
// taken through complete runs of the control algorithm. After Start, each
// run goes a1 -> (a2 | a3 | a4) -> (a5 | a6) -> a1 in exactly three clocks;
// the test runs all six paths (x1 / !x1 x2 / !x1 !x2 in a1, then x3 / !x3)
// and checks the state code and the microoperations after every clock
// against values written out here per state.
module tb_moore_fsm_u4_full;
  logic       clk;
  logic       start;
  logic [1:3] x;
  logic [1:4] y;
  logic [1:3] t;
  int checks = 0, failures = 0, runs = 0;

  logic [1:3] code [1:6] = '{3'b000, 3'b001, 3'b011, 3'b101, 3'b010, 3'b110};
  logic [1:4] mops [1:6] = '{4'b0000, 4'b1100, 4'b0010, 4'b0001, 4'b0101, 4'b0010};

  moore_fsm_u4 dut (.clk, .start, .x, .y, .t);

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  task automatic step(logic [1:3] xv, int exp_s);
    @(negedge clk);
    x = xv;
    @(posedge clk);
    #1;
    checks++;
    if (t !== code[exp_s] || y !== mops[exp_s]) begin
      failures++;
      $display("x=%b: t=%b y=%b expected a%0d (t=%b y=%b)", xv, t, y, exp_s,
               code[exp_s], mops[exp_s]);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s2, s3;
    start = 1'b1;
    x     = '0;
    @(posedge clk);
    #1;
    checks++;
    if (t !== 3'b000 || y !== 4'b0000) begin failures++; $display("Start did not load a1"); end
    start = 1'b0;
    for (int p = 0; p < 3; p++)
      for (int q = 0; q < 2; q++) begin
        logic [1:3] x_a1;
        x_a1 = (p == 0) ? 3'b100 : (p == 1) ? 3'b010 : 3'b000;
        s2   = 2 + p;
        s3   = (q != 0) ? 5 : 6;
        step(x_a1 | 3'($urandom_range(0, 1)), s2);         // x3 ignored in a1
        step({2'($urandom), q[0]}, s3);                     // x1, x2 ignored in B2
        step(3'($urandom), 1);                              // B3 returns unconditionally
        runs++;
      end
    $display("complete runs: %0d", runs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
