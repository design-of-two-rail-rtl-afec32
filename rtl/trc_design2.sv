// trc_design2: two-pair two-rail checker built from two F2G and six NPPRG
// gates.
//
// Checker function:  e1 = x0&y1 | y0&x1,  e2 = x0&x1 | y0&y1.
//
// Structure. Two Feynman double gates with B = C = 0 make three copies each
// of x0 and y0. Four NPPRG gates in the AND configuration (A = D = 0) form the
// product terms on Q = B & C; the two gates that take x1 and y1 on C also
// pass a copy of them out on R for the other two:
//
//   u1 (F2G): x0 -> x0_a, x0_b, (third copy unused)
//   u2 (F2G): y0 -> y0_a, y0_b, (third copy unused)
//   a1: B = x0_a, C = y1         -> x0&y1, copy of y1
//   a2: B = y0_a, C = x1         -> y0&x1, copy of x1
//   a3: B = y0_b, C = copy of y1 -> y0&y1
//   a4: B = x0_b, C = copy of x1 -> x0&x1
//
// Two NPPRG gates in the same configuration take the OR on S = B | C:
// o1 gives e1 from a1 and a2, o2 gives e2 from a3 and a4. Gate count and
// types (two F2G, six NPPRG), the F2G on x0 and y0, and the outputs e1 and
// e2 follow the published schematic; the exact gate pins each copy lands on
// are this implementation's choice.
//
// The 18 gate outputs not used are brought out on `garbage`; the parity of
// all outputs equals the parity of the four inputs. Purely combinational.
module trc_design2
  import trc_pkg::*;
(
  input  logic                  x0,
  input  logic                  y0,
  input  logic                  x1,
  input  logic                  y1,
  output logic                  e1,
  output logic                  e2,
  output logic [D2_GARBAGE-1:0] garbage
);

  logic x0_a, x0_b, x0_g, y0_a, y0_b, y0_g;
  logic y1_c, x1_c;
  logic t_x0y1, t_y0x1, t_y0y1, t_x0x1;
  logic a1_p, a1_s, a2_p, a2_s, a3_p, a3_r, a3_s, a4_p, a4_r, a4_s;
  logic o1_p, o1_q, o1_r, o2_p, o2_q, o2_r;

  f2g u1 (.a(x0), .b(1'b0), .c(1'b0), .p(x0_a), .q(x0_b), .r(x0_g));
  f2g u2 (.a(y0), .b(1'b0), .c(1'b0), .p(y0_a), .q(y0_b), .r(y0_g));

  npprg a1 (.a(1'b0), .b(x0_a), .c(y1),   .d(1'b0), .p(a1_p), .q(t_x0y1), .r(y1_c), .s(a1_s));
  npprg a2 (.a(1'b0), .b(y0_a), .c(x1),   .d(1'b0), .p(a2_p), .q(t_y0x1), .r(x1_c), .s(a2_s));
  npprg a3 (.a(1'b0), .b(y0_b), .c(y1_c), .d(1'b0), .p(a3_p), .q(t_y0y1), .r(a3_r), .s(a3_s));
  npprg a4 (.a(1'b0), .b(x0_b), .c(x1_c), .d(1'b0), .p(a4_p), .q(t_x0x1), .r(a4_r), .s(a4_s));

  npprg o1 (.a(1'b0), .b(t_x0y1), .c(t_y0x1), .d(1'b0), .p(o1_p), .q(o1_q), .r(o1_r), .s(e1));
  npprg o2 (.a(1'b0), .b(t_y0y1), .c(t_x0x1), .d(1'b0), .p(o2_p), .q(o2_q), .r(o2_r), .s(e2));

  assign garbage = {o2_r, o2_q, o2_p, o1_r, o1_q, o1_p,
                    a4_s, a4_r, a4_p, a3_s, a3_r, a3_p,
                    a2_s, a2_p, a1_s, a1_p, y0_g, x0_g};

endmodule
