// fsm_rg: the state register RG of the Moore FSM.
//
// RG holds the code K(a_m) of the current state in R flip-flops. On each
// rising edge of clk it takes the next-state code d from the block of input
// memory functions (D flip-flops: the input memory functions are the next
// code itself). A Start pulse, sampled on the same edge, loads the code of
// the initial state a1 instead and has priority over d. In a PAL-based CPLD
// these flip-flops are the registers of the macrocells that form D1..DR.
//
// Interface: clk, start (active high, synchronous), d[1:R] in, t[1:R] out.
// Timing: t changes one clock after d or start is presented.
// That Start loads a1 and that the flip-flops are of type D follows the
// published structure; a synchronous rather than asynchronous Start is this
// design's choice.
module fsm_rg #(
  parameter int unsigned R = 3,
  parameter logic [1:R] START_CODE = '0
) (
  input  logic       clk,
  input  logic       start,
  input  logic [1:R] d,
  output logic [1:R] t
);

  always_ff @(posedge clk) begin
    if (start) t <= START_CODE;
    else       t <= d;
  end

endmodule
