// npprg_tb: exhaustive check of the NPPRG gate.
//
// Applies all 16 input patterns, one per clock cycle, and compares P,Q,R,S
// with the gate's published 16-row truth table, typed in below. It also
// checks the two defining properties: the outputs are a permutation of the
// inputs (no output pattern appears twice) and the XOR of the outputs equals
// the XOR of the inputs. A watchdog ends the run with a failure after 1000
// cycles.
module npprg_tb;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic a, b, c, d;
  logic p, q, r, s;

  npprg dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  // Truth table, indexed by {A,B,C,D}, entry {P,Q,R,S}.
  logic [3:0] table_pqrs [16] = '{
    4'b0000, 4'b1101, 4'b1011, 4'b0110,
    4'b0001, 4'b1100, 4'b1111, 4'b0010,
    4'b1000, 4'b0101, 4'b0011, 4'b1110,
    4'b1001, 4'b0100, 4'b0111, 4'b1010
  };

  logic [15:0] seen;

  initial begin
    seen = '0;
    {a, b, c, d} = 4'b0000;
    for (int i = 0; i < 16; i++) begin
      {a, b, c, d} = 4'(i);
      @(posedge clk);
      checks++;
      if ({p, q, r, s} !== table_pqrs[i]) begin
        failures++;
        $display("FAIL in=%b out=%b expected=%b", 4'(i), {p, q, r, s}, table_pqrs[i]);
      end
      checks++;
      if ((a ^ b ^ c ^ d) !== (p ^ q ^ r ^ s)) begin
        failures++;
        $display("FAIL parity in=%b out=%b", 4'(i), {p, q, r, s});
      end
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("FAIL output %b repeated", {p, q, r, s});
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    checks++;
    if (seen !== 16'hffff) begin
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
