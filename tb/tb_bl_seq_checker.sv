// tb_bl_seq_checker: self-checking test of the sequential machine's checker.
//
// For every combination of 5 output bits Z, present-state check bits PS_c
// and output check bits Z_c (R = 2), the two-rail output must be valid
// exactly when Z_c equals the complement of (ones in Z + ones encoded by
// PS_c) modulo 4, computed in the testbench. Check bits hold their count
// bit-wise complemented, so PS_c encodes the count 3 - PS_c. An R = 3 instance with 7 outputs is driven with random values.
module tb_bl_seq_checker;

  import bl_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic [4:0] z;
  logic [1:0] ps_c, z_c;
  rail_t      rail;
  logic [6:0] z3;
  logic [2:0] ps_c3, z_c3;
  rail_t      rail3;

  bl_seq_checker #(.NO(5), .R(2)) dut  (.z(z),  .ps_c(ps_c),  .z_c(z_c),  .err_rail(rail));
  bl_seq_checker #(.NO(7), .R(3)) dut3 (.z(z3), .ps_c(ps_c3), .z_c(z_c3), .err_rail(rail3));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    z = '0; ps_c = '0; z_c = '0; z3 = '0; ps_c3 = '0; z_c3 = '0;
    for (int a = 0; a < 32; a++) begin
      for (int p = 0; p < 4; p++) begin
        for (int c = 0; c < 4; c++) begin
          z = 5'(a); ps_c = 2'(p); z_c = 2'(c);
          #1;
          checks++;
          if ((rail.r1 ^ rail.r0) !== (c == 3 - (($countones(z) + 3 - p) % 4))) begin
            failures++;
            $display("FAIL z=%b ps_c=%0d z_c=%0d rail=%b%b", z, p, c, rail.r1, rail.r0);
          end
        end
      end
      @(posedge clk);
    end
    for (int k = 0; k < 3000; k++) begin
      z3 = 7'($urandom); ps_c3 = 3'($urandom);
      // Half of the time a consistent Z_c, otherwise a random one.
      z_c3 = (k % 2 == 0) ? 3'(7 - ($countones(z3) + 7 - ps_c3) % 8) : 3'($urandom);
      #1;
      checks++;
      if ((rail3.r1 ^ rail3.r0) !== (z_c3 == 3'(7 - ($countones(z3) + 7 - ps_c3) % 8))) begin
        failures++;
        $display("FAIL R=3 z=%b ps_c=%0d z_c=%0d", z3, ps_c3, z_c3);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
