// tb_bl_ones_count: self-checking test of the modulo-2**R counter of ones.
//
// An 8-bit, R = 2 instance is driven with every input word and an 11-bit,
// R = 3 instance with random words; each count is compared with a
// population count taken modulo 4 or 8 in the testbench. A clock only paces
// the test and feeds the watchdog.
module tb_bl_ones_count;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic [7:0]  d8;
  logic [1:0]  c8;
  logic [10:0] d11;
  logic [2:0]  c11;

  bl_ones_count #(.N(8),  .R(2)) dut8  (.data(d8),  .count(c8));
  bl_ones_count #(.N(11), .R(3)) dut11 (.data(d11), .count(c11));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d8  = '0;
    d11 = '0;
    for (int v = 0; v < 256; v++) begin
      d8 = 8'(v);
      @(posedge clk);
      checks++;
      if (c8 !== 2'($countones(d8) % 4)) begin
        failures++;
        $display("FAIL N=8 data=%b chk=%0d expected %0d", d8, c8, $countones(d8) % 4);
      end
    end
    for (int k = 0; k < 2000; k++) begin
      d11 = 11'($urandom);
      @(posedge clk);
      checks++;
      if (c11 !== 3'($countones(d11) % 8)) begin
        failures++;
        $display("FAIL N=11 data=%b chk=%0d expected %0d", d11, c11, $countones(d11) % 8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
