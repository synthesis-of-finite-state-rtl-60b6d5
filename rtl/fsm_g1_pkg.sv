// fsm_g1_pkg: constants, types and tables of the Moore FSM that runs the
// control algorithm G1, and helper functions for the pseudoequivalent-state
// (PS) class codes.
//
// The control algorithm has M = 6 states a1..a6, L = 3 logic conditions
// x1..x3 and N = 4 microoperations y1..y4. States are held in R = 3 bits,
// R = ceil(log2 M). The states fall into I = 3 classes of pseudoequivalent
// states (states whose outgoing transitions are identical):
//   B1 = {a1}, B2 = {a2, a3, a4}, B3 = {a5, a6}.
// The state codes are the "optimal" ones, chosen so that every class is one
// generalized interval of the 3-cube (T1 T2 T3):
//   a1=000 a2=001 a3=011 a4=101 a5=010 a6=110
//   B1 = *00, B2 = **1, B3 = *10     (codes 100 and 111 are unused)
// The reduced structure table (one row per edge of the block transition
// graph, H2 = 6 rows) is
//   B1 -> x1 a2 | !x1 x2 a3 | !x1 !x2 a4
//   B2 -> x3 a5 | !x3 a6
//   B3 -> a1
// and the microoperations per state are
//   a1: none  a2: y1 y2  a3: y3  a4: y4  a5: y2 y4  a6: y3.
// All of the above follows the published example; only the encoding of the
// tables as SystemVerilog constants is this design's own.
//
// Bit numbering follows the algebra: T[1] is T1 (the leftmost bit of a
// state code), x[1] is x1, y[1] is y1.
//
// Class-code sources. A class bit set in a class_set_t value means the class
// is a member of Pi_C: it is recognised from a code tau produced by the code
// transformer (BCT) instead of from its interval in the state register.
//  * No class in Pi_C (the default for G1): no BCT at all.
//  * Some classes in Pi_C: R_C = ceil(log2(|Pi_C| + 1)) bits; code 0 means
//    "class not in Pi_C", the Pi_C classes get codes 1, 2, ... in index order.
//  * All classes in Pi_C (the pure code-transformer structure): R_1 =
//    ceil(log2 I) bits and class B_i gets code i-1 (B1=00, B2=01, B3=10).
// The numbering of Pi_C classes in the mixed case is this design's choice.
package fsm_g1_pkg;

  localparam int unsigned M  = 6;  // internal states
  localparam int unsigned L  = 3;  // logic conditions
  localparam int unsigned N  = 4;  // microoperations
  localparam int unsigned R  = 3;  // state-code bits, ceil(log2 M)
  localparam int unsigned I  = 3;  // classes of pseudoequivalent states
  localparam int unsigned H2 = 6;  // rows of the reduced structure table

  typedef logic [1:R] state_code_t;   // T1..TR
  typedef logic [1:L] cond_t;         // x1..xL
  typedef logic [1:N] mo_t;           // y1..yN
  typedef logic [I-1:0] class_set_t;  // bit i-1 stands for class B_i

  // A generalized interval: code bits where mask is 1 must equal value.
  typedef struct packed {
    state_code_t mask;
    state_code_t value;
  } interval_t;

  // One row of the reduced structure table: in class cls, when the
  // conditions selected by xmask equal xval, go to state nxt.
  typedef struct packed {
    logic [3:0] cls;
    cond_t      xmask;
    cond_t      xval;
    logic [3:0] nxt;
  } rst_row_t;

  // State codes K(a_m), index m.
  localparam state_code_t K_A [1:M] = '{
    3'b000, 3'b001, 3'b011, 3'b101, 3'b010, 3'b110
  };

  // Microoperations Y(a_m), index m; bit y[n] is y_n.
  localparam mo_t Y_A [1:M] = '{
    4'b0000, 4'b1100, 4'b0010, 4'b0001, 4'b0101, 4'b0010
  };

  // Class index of each state, index m.
  localparam int unsigned CLASS_OF [1:M] = '{1, 2, 2, 2, 3, 3};

  // Interval of each class, index i.
  localparam interval_t CLASS_IV [1:I] = '{
    '{mask: 3'b011, value: 3'b000},   // B1 = *00
    '{mask: 3'b001, value: 3'b001},   // B2 = **1
    '{mask: 3'b011, value: 3'b010}    // B3 = *10
  };

  // Reduced structure table, index h.
  localparam rst_row_t RST [1:H2] = '{
    '{cls: 4'd1, xmask: 3'b100, xval: 3'b100, nxt: 4'd2},  // B1: x1        -> a2
    '{cls: 4'd1, xmask: 3'b110, xval: 3'b010, nxt: 4'd3},  // B1: !x1 x2    -> a3
    '{cls: 4'd1, xmask: 3'b110, xval: 3'b000, nxt: 4'd4},  // B1: !x1 !x2   -> a4
    '{cls: 4'd2, xmask: 3'b001, xval: 3'b001, nxt: 4'd5},  // B2: x3        -> a5
    '{cls: 4'd2, xmask: 3'b001, xval: 3'b000, nxt: 4'd6},  // B2: !x3       -> a6
    '{cls: 4'd3, xmask: 3'b000, xval: 3'b000, nxt: 4'd1}   // B3: 1         -> a1
  };

  // Code of the initial state a1, loaded by Start.
  localparam state_code_t START_CODE = 3'b000;

  function automatic int unsigned popcount(class_set_t s);
    int unsigned c = 0;
    for (int unsigned i = 0; i < I; i++) c += s[i];
    return c;
  endfunction

  // Number of states that issue y_n: the product terms of y_n before any
  // minimisation, so an upper bound of its minimised term count Q(y_n).
  function automatic int unsigned y_terms(int unsigned n);
    int unsigned c = 0;
    for (int unsigned m = 1; m <= M; m++) c += Y_A[m][n];
    return c;
  endfunction

  // Width of tau: 0 when no class needs the code transformer.
  function automatic int unsigned tau_bits(class_set_t pi_c);
    if (pi_c == '0) return 0;
    if (pi_c == '1) return $clog2(I);
    return $clog2(popcount(pi_c) + 1);
  endfunction

  // tau code of class i (1-based); 0 for a class outside Pi_C in the mixed case.
  function automatic int unsigned class_code(class_set_t pi_c, int unsigned i);
    int unsigned rank = 0;
    if (pi_c == '1) return i - 1;
    if (!pi_c[i-1]) return 0;
    for (int unsigned j = 1; j < i; j++) rank += pi_c[j-1];
    return rank + 1;
  endfunction

endpackage
