// tb_bl_state_reg: self-checking test of the state flip-flops.
//
// A 3-bit register with reset state 3'b101 (two ones, so the check bits
// reset to the complement of 2, 2'b01). The test checks the reset values, then
// random next-state words and check bits captured one per rising edge, and a
// second reset in mid-run.
module tb_bl_state_reg;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic       rst_n;
  logic [2:0] ns, ps;
  logic [1:0] ns_c, ps_c;

  bl_state_reg #(.NSB(3), .R(2), .RESET_STATE(3'b101)) dut (
    .clk(clk), .rst_n(rst_n), .ns(ns), .ns_c(ns_c), .ps(ps), .ps_c(ps_c)
  );

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_state(input logic [2:0] s, input logic [1:0] c, input string what);
    checks++;
    if (ps !== s || ps_c !== c) begin
      failures++;
      $display("FAIL %s: ps=%b ps_c=%b expected %b %b", what, ps, ps_c, s, c);
    end
  endtask

  initial begin
    logic [2:0] s;
    logic [1:0] c;
    ns = 3'b010; ns_c = 2'b10;
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    #1;
    expect_state(3'b101, 2'b01, "reset");
    @(posedge clk); #1;
    expect_state(3'b101, 2'b01, "held in reset");
    rst_n = 1'b1;
    for (int k = 0; k < 200; k++) begin
      s = 3'($urandom); c = 2'($urandom);
      ns = s; ns_c = c;
      @(posedge clk); #1;
      expect_state(s, c, "capture");
      if (k == 100) begin
        rst_n = 1'b0; #1;
        expect_state(3'b101, 2'b01, "asynchronous reset");
        @(negedge clk);
        rst_n = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
