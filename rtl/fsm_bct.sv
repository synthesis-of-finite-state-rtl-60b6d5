// fsm_bct: block of code transformer (BCT) of the Moore FSM.
//
// The BCT turns the state code T into the code tau of the state's class of
// pseudoequivalent states, for the classes that cannot be recognised from a
// single interval of the state code (the set Pi_C, parameter PI_C). Each
// tau bit is a sum of state conjunctions: tau_r = OR over m of C_rm * A_m,
// with C_rm the r-th bit of the class code of state a_m. Classes outside
// Pi_C give code 0 (mixed structure). When every class is in Pi_C the
// codes are B1=00, B2=01, B3=10, which with the default state codes gives
// tau1 = A5 | A6 and tau2 = A2 | A3 | A4.
//
// Interface: t[1:R] in, tau[TW-1:0] out (TW = R_C, at least 1 bit).
// Timing: purely combinational.
// Parameters: PI_C selects the classes handled here (default all, the
// published code-transformation table). Code numbering for a partial Pi_C
// is this design's choice; see fsm_g1_pkg.
module fsm_bct
  import fsm_g1_pkg::*;
#(
  parameter class_set_t  PI_C = '1,
  parameter int unsigned TW   = (tau_bits(PI_C) > 0) ? tau_bits(PI_C) : 1
) (
  input  state_code_t   t,
  output logic [TW-1:0] tau
);

  always_comb begin
    tau = '0;
    for (int unsigned m = 1; m <= M; m++)
      if (t == K_A[m]) tau |= TW'(class_code(PI_C, CLASS_OF[m]));
  end

endmodule
