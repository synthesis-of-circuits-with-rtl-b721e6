// tb_bl_comb_logic: self-checking test of the table-defined functional
// circuit and its check-bit functions.
//
// The testbench gives the block a truth table of its own (3 inputs,
// 6 outputs, R = 2) and, for every input, compares y with that table row and
// c with the complemented count of ones of the row modulo 4.
module tb_bl_comb_logic;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  // Rows 7..0 of the truth table, 6 bits each.
  localparam logic [47:0] TBL = {6'b111111, 6'b101010, 6'b000000, 6'b110001,
                                 6'b011100, 6'b100000, 6'b001111, 6'b010011};

  logic [2:0] x;
  logic [5:0] y;
  logic [1:0] c;

  bl_comb_logic #(.NI(3), .NO(6), .R(2), .TABLE(TBL)) dut (.x(x), .y(y), .c(c));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] row;
    x = '0;
    for (int v = 0; v < 8; v++) begin
      x = 3'(v);
      @(posedge clk);
      row = TBL[v*6 +: 6];
      checks += 2;
      if (y !== row) begin
        failures++;
        $display("FAIL x=%0d y=%b expected %b", v, y, row);
      end
      if (c !== 2'(3 - $countones(row) % 4)) begin
        failures++;
        $display("FAIL x=%0d c=%b expected %0d", v, c, 3 - $countones(row) % 4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
