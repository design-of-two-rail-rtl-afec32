// npprg_logic: the NPPRG gate used as a universal logic element.
//
// Four NPPRG gates, each with two of its inputs tied to constants, deliver
// every basic function of two signals a and b at once:
//
//   gate  inputs (A,B,C,D)  P          Q          R   S
//   u_and (0, a, b, 0)      b          a&b        b   a|b        AND, OR, copies of b
//   u_nnd (0, a, b, 1)      ~b         ~(a&b)     b   ~(a|b)     NAND, NOR, NOT, 1-to-2 decoder
//   u_xor (a, 0, 0, b)      a^b        b          0   b          XOR, copies of b
//   u_xnr (a, 0, 1, b)      ~(a^b)     b          1   ~b         XNOR, NOT, 1-to-2 decoder
//
// The constant inputs are those of the published gate configurations; each
// output value follows from the gate equations. The two constant R outputs of
// the XOR and XNOR configurations are garbage and are brought out on
// `garbage` so that no gate output is left dangling. Purely combinational.
module npprg_logic
  import trc_pkg::*;
(
  input  logic      a,
  input  logic      b,
  output npprg_fn_t fn,
  output logic [1:0] garbage   // {R of XNOR gate (1), R of XOR gate (0)}
);

  logic and_p, and_q, and_r, and_s;
  logic nnd_p, nnd_q, nnd_r, nnd_s;
  logic xor_p, xor_q, xor_r, xor_s;
  logic xnr_p, xnr_q, xnr_r, xnr_s;

  npprg u_and (.a(1'b0), .b(a),    .c(b),    .d(1'b0), .p(and_p), .q(and_q), .r(and_r), .s(and_s));
  npprg u_nnd (.a(1'b0), .b(a),    .c(b),    .d(1'b1), .p(nnd_p), .q(nnd_q), .r(nnd_r), .s(nnd_s));
  npprg u_xor (.a(a),    .b(1'b0), .c(1'b0), .d(b),    .p(xor_p), .q(xor_q), .r(xor_r), .s(xor_s));
  npprg u_xnr (.a(a),    .b(1'b0), .c(1'b1), .d(b),    .p(xnr_p), .q(xnr_q), .r(xnr_r), .s(xnr_s));

  always_comb begin
    fn.and_ab     = and_q;
    fn.or_ab      = and_s;
    fn.dup_b      = {and_r, and_p};
    fn.nand_ab    = nnd_q;
    fn.nor_ab     = nnd_s;
    fn.dec_b      = {nnd_r, nnd_p};
    fn.xor_ab     = xor_p;
    fn.dup_xor_b  = {xor_s, xor_q};
    fn.xnor_ab    = xnr_p;
    fn.dec_xnor_b = {xnr_q, xnr_s};
    garbage       = {xnr_r, xor_r};
  end

endmodule
