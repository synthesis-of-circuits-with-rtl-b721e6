// tb_bl_trc: exhaustive test of the two-rail checker chain.
//
// For a 3-pair and a 1-pair instance, every combination of input rails is
// applied. The output pair must be valid (rails differ) exactly when every
// input pair is valid, as decided in the testbench. A clock paces the test
// and feeds the watchdog.
module tb_bl_trc;

  import bl_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic [2:0] a1, a0;
  rail_t      z;
  logic [0:0] b1, b0;
  rail_t      y;

  bl_trc #(.PAIRS(3)) dut  (.a1(a1), .a0(a0), .z(z));
  bl_trc #(.PAIRS(1)) dut1 (.a1(b1), .a0(b0), .z(y));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a1 = '0; a0 = '0; b1 = '0; b0 = '0;
    for (int v = 0; v < 64; v++) begin
      {a1, a0} = 6'(v);
      {b1, b0} = 2'(v);
      @(posedge clk);
      checks += 2;
      if ((z.r1 ^ z.r0) !== ((a1 ^ a0) == 3'b111)) begin
        failures++;
        $display("FAIL a1=%b a0=%b z=%b%b", a1, a0, z.r1, z.r0);
      end
      if ((y.r1 ^ y.r0) !== (b1[0] ^ b0[0])) begin
        failures++;
        $display("FAIL one pair b1=%b b0=%b", b1, b0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
