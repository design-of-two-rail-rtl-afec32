// npprg_logic_tb: checks every function of the NPPRG configuration unit.
//
// For all four values of (a,b), one per clock cycle, the AND, OR, NAND, NOR,
// XOR and XNOR outputs, the copies of b and the two 1-to-2 decoders are
// compared with the Boolean operators of the testbench, and the constant
// garbage outputs with 0 and 1. Watchdog: 1000 cycles.
module npprg_logic_tb
  import trc_pkg::*;
;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic      a, b;
  npprg_fn_t fn;
  logic [1:0] garbage;

  npprg_logic dut (.a(a), .b(b), .fn(fn), .garbage(garbage));

  task automatic expect_bits(string what, logic [1:0] got, logic [1:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL a=%b b=%b %s: got %b want %b", a, b, what, got, want);
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      @(posedge clk);
      expect_bits("and",      {1'b0, fn.and_ab},  {1'b0, a && b});
      expect_bits("or",       {1'b0, fn.or_ab},   {1'b0, a || b});
      expect_bits("nand",     {1'b0, fn.nand_ab}, {1'b0, !(a && b)});
      expect_bits("nor",      {1'b0, fn.nor_ab},  {1'b0, !(a || b)});
      expect_bits("xor",      {1'b0, fn.xor_ab},  {1'b0, a != b});
      expect_bits("xnor",     {1'b0, fn.xnor_ab}, {1'b0, a == b});
      expect_bits("dup_b",      fn.dup_b,      {b, b});
      expect_bits("dup_xor_b",  fn.dup_xor_b,  {b, b});
      expect_bits("dec_b",      fn.dec_b,      {b, !b});
      expect_bits("dec_xnor_b", fn.dec_xnor_b, {b, !b});
      expect_bits("garbage",    garbage,       2'b10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
