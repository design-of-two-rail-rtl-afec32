// f2g_tb: exhaustive check of the Feynman double gate.
//
// Applies all 8 input patterns, one per clock cycle, and compares P,Q,R with
// the gate's truth table typed in below; also checks parity preservation and
// that no output pattern repeats. Watchdog: 1000 cycles.
module f2g_tb;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic a, b, c;
  logic p, q, r;

  f2g dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  // Indexed by {A,B,C}, entry {P,Q,R}.
  logic [2:0] table_pqr [8] = '{
    3'b000, 3'b001, 3'b010, 3'b011, 3'b111, 3'b110, 3'b101, 3'b100
  };

  logic [7:0] seen;

  initial begin
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      @(posedge clk);
      checks++;
      if ({p, q, r} !== table_pqr[i]) begin
        failures++;
        $display("FAIL in=%b out=%b expected=%b", 3'(i), {p, q, r}, table_pqr[i]);
      end
      checks++;
      if ((a ^ b ^ c) !== (p ^ q ^ r)) begin
        failures++;
        $display("FAIL parity in=%b", 3'(i));
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hff) begin
      failures++;
      $display("FAIL not a permutation: %h", seen);
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
