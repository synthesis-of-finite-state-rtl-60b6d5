// moore_fsm_u4: Moore FSM for the control algorithm G1, built with two
// sources of pseudoequivalent-state class codes.
//
// A Moore FSM's next state depends only on the class of pseudoequivalent
// states of the current state (states whose transitions are identical), so
// the next-state logic can be written per class, with fewer product terms
// than per state. The class is taken from the state register itself where
// the state codes put the whole class into one generalized interval, and
// from a code transformer (BCT) only for the remaining classes (Pi_C).
//
//   x ---------------------+
//                          v
//   +-----+  t   +------+  d  +----+  t
//   | BCT |----->| BIMF |---->| RG |----+--> BMO --> y
//   +-----+ tau  +------+     +----+    |
//      ^            ^                   |
//      +------------+-------------------+
//
// With the default, optimal state codes every class of G1 is one interval,
// Pi_C is empty and no BCT is built: the BIMF reads the class straight from
// T. PI_C can name classes to route through the BCT instead; with all
// classes in Pi_C this is the pure code-transformer structure. Every choice
// of PI_C gives the same cycle-by-cycle behaviour.
//
// Interface: clk; start (synchronous, loads a1 = 000); x[1:3] logic
// conditions, sampled on each rising edge; y[1:4] microoperations of the
// current state (combinational from the register); t[1:3] the state code.
// Timing: one state transition per clock; y is valid in the cycle the state
// is entered. The structure and tables follow the published method and its
// worked example; the synchronous Start and the PI_C option's code
// numbering are this design's choices.
module moore_fsm_u4
  import fsm_g1_pkg::*;
#(
  parameter class_set_t PI_C = '0
) (
  input  logic        clk,
  input  logic        start,
  input  cond_t       x,
  output mo_t         y,
  output state_code_t t
);

  localparam int unsigned TW = (tau_bits(PI_C) > 0) ? tau_bits(PI_C) : 1;

  // Two code sources only pay off when every input memory function still
  // fits one PAL cell: L(D_r) + R + R_C <= S, with S the cell fan-in. G1
  // uses at most L conditions per function; S = 21 is the least fan-in the
  // wide-fan-in cells considered here have (more than 20 inputs).
  localparam int unsigned S_FANIN = 21;
  if (L + R + tau_bits(PI_C) > S_FANIN) begin : g_fanin_check
    $error("L + R + R_C exceeds the PAL cell fan-in");
  end

  // Each microoperation should fit one cell of Q_CELL product terms, so that
  // the microoperation block costs exactly N cells. Checked on the
  // unminimised sums, which bound the minimised ones from above. Q_CELL = 5
  // is the term count of the cells the method was evaluated on.
  localparam int unsigned Q_CELL = 5;
  for (genvar n = 1; n <= N; n++) begin : g_terms_check
    if (y_terms(n) > Q_CELL) begin : g_too_many
      $error("a microoperation needs more product terms than one cell has");
    end
  end

  state_code_t   d;
  logic [TW-1:0] tau;

  generate
    if (PI_C != '0) begin : g_bct
      fsm_bct #(.PI_C(PI_C), .TW(TW)) u_bct (.t(t), .tau(tau));
    end else begin : g_no_bct
      // Pi_C is empty: every class is read from T, tau carries nothing.
      assign tau = '0;
    end
  endgenerate

  fsm_bimf #(.PI_C(PI_C), .TW(TW)) u_bimf (
    .t  (t),
    .tau(tau),
    .x  (x),
    .d  (d)
  );

  fsm_rg #(.R(R), .START_CODE(START_CODE)) u_rg (
    .clk  (clk),
    .start(start),
    .d    (d),
    .t    (t)
  );

  fsm_bmo u_bmo (
    .t(t),
    .y(y)
  );

endmodule
