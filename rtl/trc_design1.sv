// trc_design1: two-pair two-rail checker built from six NPPRG gates.
//
// Checker function:  e1 = x0&y1 | y0&x1,  e2 = x0&x1 | y0&y1.
// If (x0,y0) and (x1,y1) are both complementary, (e1,e2) is 01 or 10; if
// either pair is 00 or 11, (e1,e2) is 00 or 11 and flags the error.
//
// Structure. Four NPPRG gates in the AND configuration (A = D = 0) each form
// one product term on Q = B & C and pass a copy of their C input out on R.
// Every primary input enters exactly one gate on C, and its copy feeds the B
// input of the next gate around a ring y0 -> x1 -> x0 -> y1 -> y0, so each
// signal is used twice without fan-out:
//
//   g1: B = copy of y1, C = y0  ->  y0&y1
//   g2: B = copy of y0, C = x1  ->  y0&x1
//   g3: B = copy of x1, C = x0  ->  x0&x1
//   g4: B = copy of x0, C = y1  ->  x0&y1
//
// Two more gates in the same configuration take the OR on S = B | C:
// g5 gives e2 from g1 and g3, g6 gives e1 from g2 and g4. The ring is not a
// combinational loop: R depends only on C. Gate count (six NPPRG) and the
// placement of the inputs follow the published schematic; which copy output
// (R rather than P, both equal C) and which operand goes to B or C of the OR
// gates are this implementation's choices.
//
// The 14 gate outputs not used are brought out on `garbage`, so that the
// parity of all outputs (e1, e2, garbage) equals the parity of the four
// inputs (all constant inputs are 0). Purely combinational, no clock.
module trc_design1
  import trc_pkg::*;
(
  input  logic                  x0,
  input  logic                  y0,
  input  logic                  x1,
  input  logic                  y1,
  output logic                  e1,
  output logic                  e2,
  output logic [D1_GARBAGE-1:0] garbage
);

  // copies of the primary inputs
  logic y0_c, x1_c, x0_c, y1_c;
  // product terms
  logic t_y0y1, t_y0x1, t_x0x1, t_x0y1;
  // unused outputs
  logic g1_p, g1_s, g2_p, g2_s, g3_p, g3_s, g4_p, g4_s;
  logic g5_p, g5_q, g5_r, g6_p, g6_q, g6_r;

  npprg g1 (.a(1'b0), .b(y1_c), .c(y0), .d(1'b0), .p(g1_p), .q(t_y0y1), .r(y0_c), .s(g1_s));
  npprg g2 (.a(1'b0), .b(y0_c), .c(x1), .d(1'b0), .p(g2_p), .q(t_y0x1), .r(x1_c), .s(g2_s));
  npprg g3 (.a(1'b0), .b(x1_c), .c(x0), .d(1'b0), .p(g3_p), .q(t_x0x1), .r(x0_c), .s(g3_s));
  npprg g4 (.a(1'b0), .b(x0_c), .c(y1), .d(1'b0), .p(g4_p), .q(t_x0y1), .r(y1_c), .s(g4_s));

  npprg g5 (.a(1'b0), .b(t_y0y1), .c(t_x0x1), .d(1'b0), .p(g5_p), .q(g5_q), .r(g5_r), .s(e2));
  npprg g6 (.a(1'b0), .b(t_y0x1), .c(t_x0y1), .d(1'b0), .p(g6_p), .q(g6_q), .r(g6_r), .s(e1));

  assign garbage = {g6_r, g6_q, g6_p, g5_r, g5_q, g5_p,
                    g4_s, g4_p, g3_s, g3_p, g2_s, g2_p, g1_s, g1_p};

endmodule
