// trc_design2_tb: exhaustive check of two-rail checker design 2.
//
// All 16 patterns of (x0,y0,x1,y1) are applied, one per clock cycle. For
// each the testbench checks
//   - e1 = x0&y1 | y0&x1 and e2 = x0&x1 | y0&y1,
//   - the two-rail property: (e1,e2) is a code word (01 or 10) exactly when
//     both input pairs are complementary,
//   - parity preservation of the whole netlist: the XOR of e1, e2 and all
//     garbage outputs equals the XOR of the four inputs (constants are 0).
// It also replays the worked example x0x1 = 11, y0y1 = 00 -> e1=0, e2=1,
// the same inputs with a faulty y0y1 = 10, which must give 11, and the
// published simulation snapshot x0=0, x1=0, y0=1, y1=0 -> e1=0, e2=0.
// The checker is combinational, so outputs are sampled in the same cycle
// the inputs are applied. Watchdog: 1000 cycles.
module trc_design2_tb
  import trc_pkg::*;
;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int n_code = 0;
  int n_error = 0;

  logic x0, y0, x1, y1, e1, e2;
  logic [D2_GARBAGE-1:0] garbage;

  trc_design2 dut (.x0(x0), .y0(y0), .x1(x1), .y1(y1), .e1(e1), .e2(e2), .garbage(garbage));

  task automatic check(string what, logic got, logic want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL x0=%b y0=%b x1=%b y1=%b %s: got %b want %b", x0, y0, x1, y1, what, got, want);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin
      {x0, y0, x1, y1} = 4'(i);
      @(posedge clk);
      check("e1", e1, (x0 & y1) | (y0 & x1));
      check("e2", e2, (x0 & x1) | (y0 & y1));
      check("code word", e1 ^ e2, (x0 ^ y0) & (x1 ^ y1));
      check("parity", ^{e1, e2, garbage}, x0 ^ y0 ^ x1 ^ y1);
      if (e1 ^ e2) n_code++;
      else n_error++;
    end
    // worked example: x0x1 = 11, y0y1 = 00
    {x0, x1, y0, y1} = 4'b1100;
    @(posedge clk);
    check("example e1", e1, 1'b0);
    check("example e2", e2, 1'b1);
    // same example with a fault on the y rails: y0y1 = 10 -> answer 11
    {x0, x1, y0, y1} = 4'b1110;
    @(posedge clk);
    check("fault example e1", e1, 1'b1);
    check("fault example e2", e2, 1'b1);
    // published simulation snapshot: x0=0, x1=0, y0=1, y1=0 -> e1=0, e2=0
    {x0, x1, y0, y1} = 4'b0010;
    @(posedge clk);
    check("snapshot e1", e1, 1'b0);
    check("snapshot e2", e2, 1'b0);
    // both kinds of answer must have been seen: 4 code words, 12 errors
    check("code words seen", n_code == 4, 1'b1);
    check("errors seen", n_error == 12, 1'b1);
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
