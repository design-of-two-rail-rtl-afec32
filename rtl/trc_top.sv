// trc_top: two-pair two-rail checkers built from parity preserving
// reversible gates.
//
// The two checker designs are alternatives that compute the same function,
// e1 = x0&y1 | y0&x1 and e2 = x0&x1 | y0&y1; they stand side by side here,
// each with its own ports. In a system, (x0,y0) is the (q,s) output pair of
// one online-testable block and (x1,y1) the (q,s) pair of another; those
// blocks are outside this design and their outputs arrive on d1_in / d2_in.
//   d1_*   checker design 1 (six NPPRG gates)
//   d2_*   checker design 2 (two F2G + six NPPRG gates, shorter paths)
//   gate_* the NPPRG gate in its four constant-input configurations,
//          showing it as a universal logic element
// Every output is a purely combinational function of the inputs.
module trc_top
  import trc_pkg::*;
(
  input  trc_in_t               d1_in,
  output trc_code_t             d1_code,
  output logic [D1_GARBAGE-1:0] d1_garbage,
  input  trc_in_t               d2_in,
  output trc_code_t             d2_code,
  output logic [D2_GARBAGE-1:0] d2_garbage,
  input  logic                  gate_a,
  input  logic                  gate_b,
  output npprg_fn_t             gate_fn,
  output logic [1:0]            gate_garbage
);

  trc_design1 u_design1 (
    .x0(d1_in.x0), .y0(d1_in.y0), .x1(d1_in.x1), .y1(d1_in.y1),
    .e1(d1_code.e1), .e2(d1_code.e2), .garbage(d1_garbage)
  );

  trc_design2 u_design2 (
    .x0(d2_in.x0), .y0(d2_in.y0), .x1(d2_in.x1), .y1(d2_in.y1),
    .e1(d2_code.e1), .e2(d2_code.e2), .garbage(d2_garbage)
  );

  npprg_logic u_logic (
    .a(gate_a), .b(gate_b), .fn(gate_fn), .garbage(gate_garbage)
  );

endmodule
