// trc_pkg: types and sizes shared by the two-rail checker designs.
//
// A two-pair two-rail checker takes two complementary signal pairs (x0,y0) and
// (x1,y1) and answers with a pair (e1,e2) that is complementary exactly when
// both input pairs are. trc_in_t bundles the four checker inputs and
// trc_code_t the two-bit answer. The garbage widths count the gate outputs of
// each checker that are not used as primary outputs; they follow from the gate
// netlists in trc_design1 and trc_design2. npprg_fn_t bundles the functions
// that the constant-input configurations of the NPPRG gate deliver.
package trc_pkg;

  // Inputs of a two-pair two-rail checker: pair 0 is (x0,y0), pair 1 is (x1,y1).
  typedef struct packed {
    logic x0;
    logic y0;
    logic x1;
    logic y1;
  } trc_in_t;

  // Checker answer. 01 and 10 are code words (no error seen);
  // 00 and 11 flag an error at the checker inputs or in the checker itself.
  typedef struct packed {
    logic e1;
    logic e2;
  } trc_code_t;

  // Unused gate outputs of each checker netlist.
  localparam int unsigned D1_GARBAGE = 14;  // six NPPRG gates
  localparam int unsigned D2_GARBAGE = 18;  // two F2G + six NPPRG gates

  // Functions of two inputs a and b obtained from single NPPRG gates whose
  // remaining inputs are tied to constants.
  typedef struct packed {
    logic       and_ab;     // a & b
    logic       or_ab;      // a | b
    logic [1:0] dup_b;      // two copies of b (AND/OR configuration)
    logic       nand_ab;    // ~(a & b)
    logic       nor_ab;     // ~(a | b)
    logic [1:0] dec_b;      // 1-to-2 decoder of b: {b, ~b} (NAND/NOR configuration)
    logic       xor_ab;     // a ^ b
    logic [1:0] dup_xor_b;  // two copies of b (XOR configuration)
    logic       xnor_ab;    // ~(a ^ b)
    logic [1:0] dec_xnor_b; // 1-to-2 decoder of b: {b, ~b} (XNOR configuration)
  } npprg_fn_t;

  // A checker answer is a code word when its two rails differ.
  function automatic logic is_codeword(trc_code_t c);
    return c.e1 ^ c.e2;
  endfunction

endpackage
