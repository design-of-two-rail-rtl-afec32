// f2g: Feynman double gate, a 3x3 reversible, parity preserving gate.
//
//   P = A
//   Q = A ^ B
//   R = A ^ C
//
// With B = C = 0 it makes three copies of A, which is how the checkers in
// this design avoid fan-out of a primary input. Purely combinational; the
// equations and the truth table are those of the standard gate.
module f2g (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a;
    q = a ^ b;
    r = a ^ c;
  end

endmodule
