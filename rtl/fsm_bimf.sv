// fsm_bimf: block of input memory functions (BIMF) of the Moore FSM.
//
// The BIMF forms the next-state code D1..DR from the class of the current
// state and the logic conditions X, Phi = Phi(T, tau, X). It first finds the
// class B_i of the current state from one of two sources:
//  * a class outside Pi_C is one generalized interval of the state code, so
//    it is recognised straight from the register outputs T;
//  * a class in Pi_C is recognised from its code on tau, made by the BCT.
// Then every row of the reduced structure table (one per edge of the block
// transition graph: 6 rows instead of the 11 edges of the state transition
// graph) whose class matches and whose condition conjunction holds ORs the
// code of its next state into D. Exactly one row fires for a valid state.
//
// Interface: t[1:R], tau[TW-1:0], x[1:L] in; d[1:R] out.
// Timing: purely combinational; d is registered by fsm_rg.
// The two code sources and the table follow the published method. How tau
// is numbered in the mixed case is this design's choice (fsm_g1_pkg).
module fsm_bimf
  import fsm_g1_pkg::*;
#(
  parameter class_set_t  PI_C = '0,
  parameter int unsigned TW   = (tau_bits(PI_C) > 0) ? tau_bits(PI_C) : 1
) (
  input  state_code_t   t,
  input  logic [TW-1:0] tau,
  input  cond_t         x,
  output state_code_t   d
);

  logic [1:I] in_class;

  always_comb begin
    for (int unsigned i = 1; i <= I; i++) begin
      if (PI_C[i-1]) in_class[i] = (tau == TW'(class_code(PI_C, i)));
      else           in_class[i] = ((t & CLASS_IV[i].mask) == CLASS_IV[i].value);
    end
  end

  always_comb begin
    d = '0;
    for (int unsigned h = 1; h <= H2; h++)
      if (in_class[RST[h].cls] && ((x & RST[h].xmask) == RST[h].xval))
        d |= K_A[RST[h].nxt];
  end

endmodule
