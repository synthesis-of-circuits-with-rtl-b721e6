// tb_bl_ns_logic: self-checking test of the next-state logic.
//
// With a testbench table (2 inputs, 2 state bits, R = 2), every {x, ps} is
// applied; ns must equal the table row and ns_c the complemented count of
// ones of ns modulo 4.
module tb_bl_ns_logic;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  // Rows 15..0 ({x, ps}), 2 bits each.
  localparam logic [31:0] TBL = 32'b11_01_00_10_01_11_10_00_00_01_11_11_10_00_01_10;

  logic [1:0] x, ps, ns, ns_c;

  bl_ns_logic #(.NI(2), .NSB(2), .R(2), .NS_TABLE(TBL)) dut (
    .x(x), .ps(ps), .ns(ns), .ns_c(ns_c)
  );

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] row;
    x = '0; ps = '0;
    for (int v = 0; v < 16; v++) begin
      {x, ps} = 4'(v);
      @(posedge clk);
      row = TBL[v*2 +: 2];
      checks += 2;
      if (ns !== row) begin
        failures++;
        $display("FAIL x=%0d ps=%0d ns=%b expected %b", x, ps, ns, row);
      end
      if (ns_c !== 2'(3 - $countones(row) % 4)) begin
        failures++;
        $display("FAIL x=%0d ps=%0d ns_c=%b", x, ps, ns_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
