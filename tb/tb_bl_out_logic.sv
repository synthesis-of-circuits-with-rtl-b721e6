// tb_bl_out_logic: self-checking test of the output logic.
//
// With a testbench table (2 inputs, 2 state bits, 3 outputs, R = 2), every
// {x, ps} is applied; z must equal the table row and z_c the complemented
// count, modulo 4, of the ones in z and in ps together.
module tb_bl_out_logic;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  // Rows 15..0 ({x, ps}), 3 bits each.
  localparam logic [47:0] TBL = {24'b111_010_001_100_000_011_110_101,
                                 24'b011_111_000_001_010_100_110_101};

  logic [1:0] x, ps, z_c;
  logic [2:0] z;

  bl_out_logic #(.NI(2), .NSB(2), .NO(3), .R(2), .Z_TABLE(TBL)) dut (
    .x(x), .ps(ps), .z(z), .z_c(z_c)
  );

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] row;
    x = '0; ps = '0;
    for (int v = 0; v < 16; v++) begin
      {x, ps} = 4'(v);
      @(posedge clk);
      row = TBL[v*3 +: 3];
      checks += 2;
      if (z !== row) begin
        failures++;
        $display("FAIL x=%0d ps=%0d z=%b expected %b", x, ps, z, row);
      end
      if (z_c !== 2'(3 - ($countones(row) + $countones(ps)) % 4)) begin
        failures++;
        $display("FAIL x=%0d ps=%0d z_c=%b", x, ps, z_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
