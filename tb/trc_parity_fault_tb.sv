// trc_parity_fault_tb: single-signal fault detection through parity.
//
// Every gate in both checkers preserves parity, so for a fault-free netlist
// the XOR of all its outputs (e1, e2 and the garbage lines) equals the XOR of
// its inputs. If any one internal line is wrong, the gate it feeds passes the
// wrong parity on and the overall parity flips, whatever the logic after it
// does. This testbench forces each internal line of trc_design1 and
// trc_design2 (inside trc_top) to 0 and then to 1, for all 16 input patterns,
// and checks that the parity mismatches exactly when the forced value
// differs from the line's fault-free value. It also counts how many of these
// faults the two-rail outputs alone would reveal (a 00 or 11 answer where a
// code word was due, or a wrong code word). One input pattern per cycle.
// Watchdog: 10000 cycles.
module trc_parity_fault_tb
  import trc_pkg::*;
;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int n_active = 0;      // faults that changed the forced line
  int n_parity = 0;      // ... and were caught by the parity check
  int n_rail = 0;        // ... and changed the (e1,e2) answer

  trc_in_t               d1_in, d2_in;
  trc_code_t             d1_code, d2_code;
  logic [D1_GARBAGE-1:0] d1_garbage;
  logic [D2_GARBAGE-1:0] d2_garbage;
  npprg_fn_t             gate_fn;
  logic [1:0]            gate_garbage;

  trc_top dut (
    .d1_in(d1_in), .d1_code(d1_code), .d1_garbage(d1_garbage),
    .d2_in(d2_in), .d2_code(d2_code), .d2_garbage(d2_garbage),
    .gate_a(1'b0), .gate_b(1'b0), .gate_fn(gate_fn), .gate_garbage(gate_garbage)
  );

  localparam int NLINES = 14;   // 8 internal lines of design 1, 6 of design 2
  logic good;                   // fault-free value of the line under test
  trc_code_t ref_code;

  function automatic trc_code_t rail_ref(trc_in_t in);
    rail_ref.e1 = (in.x0 & in.y1) | (in.y0 & in.x1);
    rail_ref.e2 = (in.x0 & in.x1) | (in.y0 & in.y1);
  endfunction

  // Sample the fault-free value of line k.
  function automatic logic line_value(int k);
    case (k)
      0:  return dut.u_design1.y0_c;
      1:  return dut.u_design1.x1_c;
      2:  return dut.u_design1.x0_c;
      3:  return dut.u_design1.y1_c;
      4:  return dut.u_design1.t_y0y1;
      5:  return dut.u_design1.t_y0x1;
      6:  return dut.u_design1.t_x0x1;
      7:  return dut.u_design1.t_x0y1;
      8:  return dut.u_design2.x0_a;
      9:  return dut.u_design2.y0_b;
      10: return dut.u_design2.y1_c;
      11: return dut.u_design2.x1_c;
      12: return dut.u_design2.t_x0y1;
      default: return dut.u_design2.t_x0x1;
    endcase
  endfunction

  task automatic force_line(int k, logic v);
    case (k)
      0:  force dut.u_design1.y0_c   = v;
      1:  force dut.u_design1.x1_c   = v;
      2:  force dut.u_design1.x0_c   = v;
      3:  force dut.u_design1.y1_c   = v;
      4:  force dut.u_design1.t_y0y1 = v;
      5:  force dut.u_design1.t_y0x1 = v;
      6:  force dut.u_design1.t_x0x1 = v;
      7:  force dut.u_design1.t_x0y1 = v;
      8:  force dut.u_design2.x0_a   = v;
      9:  force dut.u_design2.y0_b   = v;
      10: force dut.u_design2.y1_c   = v;
      11: force dut.u_design2.x1_c   = v;
      12: force dut.u_design2.t_x0y1 = v;
      default: force dut.u_design2.t_x0x1 = v;
    endcase
  endtask

  task automatic release_line(int k);
    case (k)
      0:  release dut.u_design1.y0_c;
      1:  release dut.u_design1.x1_c;
      2:  release dut.u_design1.x0_c;
      3:  release dut.u_design1.y1_c;
      4:  release dut.u_design1.t_y0y1;
      5:  release dut.u_design1.t_y0x1;
      6:  release dut.u_design1.t_x0x1;
      7:  release dut.u_design1.t_x0y1;
      8:  release dut.u_design2.x0_a;
      9:  release dut.u_design2.y0_b;
      10: release dut.u_design2.y1_c;
      11: release dut.u_design2.x1_c;
      12: release dut.u_design2.t_x0y1;
      default: release dut.u_design2.t_x0x1;
    endcase
  endtask

  initial begin
    for (int k = 0; k < NLINES; k++) begin
      for (int v = 0; v < 2; v++) begin
        for (int i = 0; i < 16; i++) begin
          logic in_par, out_par;
          trc_code_t code;
          d1_in = trc_in_t'(i);
          d2_in = trc_in_t'(i);
          #1;
          good = line_value(k);
          ref_code = rail_ref(trc_in_t'(i));
          force_line(k, v[0]);
          @(posedge clk);
          in_par = ^d1_in;
          if (k < 8) begin
            out_par = d1_code.e1 ^ d1_code.e2 ^ (^d1_garbage);
            code = d1_code;
          end else begin
            out_par = d2_code.e1 ^ d2_code.e2 ^ (^d2_garbage);
            code = d2_code;
          end
          checks++;
          if ((out_par != in_par) != (good != v[0])) begin
            failures++;
            $display("FAIL line %0d stuck-at-%0d input %b: parity mismatch %b, line flipped %b",
                     k, v, 4'(i), out_par != in_par, good != v[0]);
          end
          if (good != v[0]) begin
            n_active++;
            if (out_par != in_par) n_parity++;
            if (code != ref_code) n_rail++;
          end
          release_line(k);
          #1;
        end
      end
    end
    $display("active single-line faults %0d, caught by parity %0d, visible on e1/e2 %0d",
             n_active, n_parity, n_rail);
    checks++;
    if (n_active == 0 || n_parity != n_active) failures++;
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
