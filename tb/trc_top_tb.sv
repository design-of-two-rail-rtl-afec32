// trc_top_tb: end-to-end test of the checker top level at its default
// configuration (no parameters to set).
//
// Walks all 256 combinations of the two checkers' inputs, driving design 1
// and design 2 independently, one combination per clock cycle, and feeds the
// NPPRG function unit with the low two bits of the step counter. Checks:
//   - each design's (e1,e2) against e1 = x0&y1 | y0&x1, e2 = x0&x1 | y0&y1,
//   - code word out exactly when both input pairs are complementary,
//   - parity of each checker netlist (outputs and garbage against inputs),
//   - design 1 and design 2 agree whenever they see the same inputs,
//   - every gate function of the NPPRG unit.
// It counts how often each kind of checker answer occurred (code word 01,
// code word 10, error 00, error 11, for each design) and counts a failure
// for any kind that never occurred. Watchdog: 10000 cycles.
module trc_top_tb
  import trc_pkg::*;
;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int seen [2][4];   // [design][{e1,e2}]
  int n_agree = 0;

  trc_in_t               d1_in, d2_in;
  trc_code_t             d1_code, d2_code;
  logic [D1_GARBAGE-1:0] d1_garbage;
  logic [D2_GARBAGE-1:0] d2_garbage;
  logic                  gate_a, gate_b;
  npprg_fn_t             gate_fn;
  logic [1:0]            gate_garbage;

  trc_top dut (
    .d1_in(d1_in), .d1_code(d1_code), .d1_garbage(d1_garbage),
    .d2_in(d2_in), .d2_code(d2_code), .d2_garbage(d2_garbage),
    .gate_a(gate_a), .gate_b(gate_b), .gate_fn(gate_fn), .gate_garbage(gate_garbage)
  );

  task automatic check(string what, logic got, logic want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL d1=%b d2=%b a=%b b=%b %s: got %b want %b",
               d1_in, d2_in, gate_a, gate_b, what, got, want);
    end
  endtask

  task automatic check_design(int k, trc_in_t in, trc_code_t code, logic gpar);
    check($sformatf("d%0d e1", k + 1), code.e1, (in.x0 & in.y1) | (in.y0 & in.x1));
    check($sformatf("d%0d e2", k + 1), code.e2, (in.x0 & in.x1) | (in.y0 & in.y1));
    check($sformatf("d%0d code word", k + 1), is_codeword(code),
          (in.x0 ^ in.y0) & (in.x1 ^ in.y1));
    check($sformatf("d%0d parity", k + 1), code.e1 ^ code.e2 ^ gpar,
          in.x0 ^ in.y0 ^ in.x1 ^ in.y1);
    seen[k][code]++;
  endtask

  initial begin
    foreach (seen[i, j]) seen[i][j] = 0;
    for (int i = 0; i < 256; i++) begin
      d1_in  = trc_in_t'(i[3:0]);
      d2_in  = trc_in_t'(i[7:4]);
      gate_a = i[1];
      gate_b = i[0];
      @(posedge clk);
      check_design(0, d1_in, d1_code, ^d1_garbage);
      check_design(1, d2_in, d2_code, ^d2_garbage);
      if (d1_in == d2_in) begin
        n_agree++;
        check("designs agree", d1_code == d2_code, 1'b1);
      end
      check("and",  gate_fn.and_ab,  gate_a & gate_b);
      check("or",   gate_fn.or_ab,   gate_a | gate_b);
      check("nand", gate_fn.nand_ab, ~(gate_a & gate_b));
      check("nor",  gate_fn.nor_ab,  ~(gate_a | gate_b));
      check("xor",  gate_fn.xor_ab,  gate_a ^ gate_b);
      check("xnor", gate_fn.xnor_ab, ~(gate_a ^ gate_b));
      check("copies", &{gate_fn.dup_b, gate_fn.dup_xor_b} | ~|{gate_fn.dup_b, gate_fn.dup_xor_b}, 1'b1);
      check("copy value", gate_fn.dup_b[0], gate_b);
      check("decoder", gate_fn.dec_b == {gate_b, ~gate_b} && gate_fn.dec_xnor_b == {gate_b, ~gate_b}, 1'b1);
      check("gate garbage", gate_garbage == 2'b10, 1'b1);
    end
    for (int k = 0; k < 2; k++) begin
      $display("design %0d: code word 01 x%0d, code word 10 x%0d, error 00 x%0d, error 11 x%0d",
               k + 1, seen[k][1], seen[k][2], seen[k][0], seen[k][3]);
      for (int c = 0; c < 4; c++) check($sformatf("d%0d answer %b occurred", k + 1, 2'(c)), seen[k][c] > 0, 1'b1);
    end
    check("designs compared on 16 shared patterns", n_agree == 16, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
