// fsm_bmo: block of microoperations (BMO) of the Moore FSM.
//
// Each microoperation is a sum of the state conjunctions of the states that
// issue it: y_n = OR over m of C_nm * A_m, where A_m is the full conjunction
// of T1..TR that equals 1 only for the code K(a_m), and C_nm is 1 when y_n
// belongs to Y(a_m). The codes and Y(a_m) sets come from fsm_g1_pkg. With
// the default codes, y2 = A2 | A5 needs two product terms; a synthesis tool
// is free to merge terms using the unused codes 100 and 111.
//
// Interface: t[1:R] (current state code) in, y[1:N] out.
// Timing: purely combinational; as in any Moore FSM the outputs depend on
// the state only. The equation form follows the published method; the
// table-driven coding is this design's own.
module fsm_bmo
  import fsm_g1_pkg::*;
(
  input  state_code_t t,
  output mo_t         y
);

  always_comb begin
    y = '0;
    for (int unsigned m = 1; m <= M; m++)
      if (t == K_A[m]) y |= Y_A[m];
  end

endmodule
