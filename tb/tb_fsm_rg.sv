// tb_fsm_rg: self-checking test of the state register.
// Drives random next-state codes and random Start pulses and checks, after
// every rising edge, that the register holds the initial-state code 000
// when Start was high and otherwise the code presented on d, one clock late.
module tb_fsm_rg;
  logic       clk;
  logic       start;
  logic [1:3] d, t, expected;
  int checks = 0, failures = 0, starts = 0;

  fsm_rg dut (.clk(clk), .start(start), .d(d), .t(t));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 1'b1;
    d     = 3'b111;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      expected = start ? 3'b000 : d;
      if (start) starts++;
      @(posedge clk);
      #1;
      checks++;
      if (t !== expected) begin
        failures++;
        $display("cycle %0d: t=%b expected %b", k, t, expected);
      end
      start = ($urandom_range(0, 7) == 0);
      d     = 3'($urandom);
    end
    if (starts < 2) begin failures++; $display("start never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
