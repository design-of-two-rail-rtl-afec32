// npprg: the new parity preserving reversible gate (NPPRG), a 4x4 gate.
//
//   P = A ^ C ^ D
//   Q = D ^ (B & C)
//   R = C
//   S = D ^ (B | C)
//
// The mapping is a permutation of the 16 input patterns (reversible), and the
// XOR of the four outputs always equals the XOR of the four inputs (parity
// preserving), so a single wrong signal anywhere in a network of such gates
// shows up as a parity mismatch between the network's inputs and outputs.
// The equations are those of the gate's published symbol and agree with its
// 16-row truth table in every row. Purely combinational, no clock; inputs and
// outputs are single bits named after the gate's pins.
module npprg (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);

  always_comb begin
    p = a ^ c ^ d;
    q = d ^ (b & c);
    r = c;
    s = d ^ (b | c);
  end

endmodule
