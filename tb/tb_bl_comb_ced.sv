// tb_bl_comb_ced: self-checking test of the self-checking combinational
// circuit, with injected errors.
//
// The block runs at its default size (5 inputs, 28 outputs, R = 2) with a
// truth table generated by the testbench. For every input vector:
//   - fault-free: y and c must match the table and its complemented count of
//     ones modulo 4, and the two-rail output must be valid;
//   - y is forced to carry a unidirectional error of one bit, of two bits,
//     and of one output bit plus one check bit in the same direction, and c
//     to carry a one-bit error: each must be flagged in the same evaluation;
//   - a unidirectional error of four output bits, beyond what the code
//     guarantees, gives a code word and must pass unflagged.
module tb_bl_comb_ced;

  import bl_pkg::*;

  localparam int NI = 5;
  localparam int NO = 28;

  // Testbench truth table from a linear congruential sequence.
  function automatic logic [(2**NI)*NO-1:0] make_table();
    logic [(2**NI)*NO-1:0] t;
    logic [31:0] s;
    s = 32'd12345;
    for (int i = 0; i < 2**NI; i++) begin
      s = s * 32'd1664525 + 32'd1013904223;
      t[i*NO +: NO] = s[31 -: NO];
    end
    return t;
  endfunction

  localparam logic [(2**NI)*NO-1:0] TBL = make_table();

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;
  int flagged  = 0;

  logic [NI-1:0] x;
  logic [NO-1:0] y, bad_y;
  logic [1:0]    c, bad_c;
  rail_t         rail;

  bl_comb_ced #(.NI(NI), .NO(NO), .R(2), .TABLE(TBL)) dut (
    .x(x), .y(y), .c(c), .err_rail(rail)
  );

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_ok(input logic ok, input string what);
    checks++;
    if ((rail.r1 ^ rail.r0) !== ok) begin
      failures++;
      $display("FAIL x=%0d %s: y=%h c=%b rail=%b%b", x, what, y, c, rail.r1, rail.r0);
    end
    if (!ok && !(rail.r1 ^ rail.r0)) flagged++;
  endtask

  // Flip up to n bits of w that hold value v (a unidirectional error).
  function automatic logic [NO-1:0] flip(logic [NO-1:0] w, logic v, int n, int start);
    int done = 0;
    for (int k = 0; k < NO; k++) begin
      int b = (start + k) % NO;
      if (done < n && w[b] == v) begin
        w[b] = ~v;
        done++;
      end
    end
    return w;
  endfunction

  initial begin
    logic [NO-1:0] row;
    logic          v;
    x = '0;
    for (int i = 0; i < 2**NI; i++) begin
      x = NI'(i);
      @(posedge clk);
      row = TBL[i*NO +: NO];
      checks += 2;
      if (y !== row) begin
        failures++;
        $display("FAIL x=%0d y=%h expected %h", i, y, row);
      end
      if (c !== 2'(3 - $countones(row) % 4)) begin
        failures++;
        $display("FAIL x=%0d c=%b", i, c);
      end
      expect_ok(1'b1, "fault-free");

      v = 1'($urandom);
      // One-bit and two-bit unidirectional errors on the outputs.
      for (int n = 1; n <= 2; n++) begin
        bad_y = flip(row, v, n, int'($urandom % NO));
        force dut.u_logic.y = bad_y;
        #1 expect_ok(1'b0, "output error");
        release dut.u_logic.y;
        #1;
      end
      // One output bit and one check bit in the same direction.
      if (c[0] == v) begin
        bad_y = flip(row, v, 1, int'($urandom % NO));
        bad_c = c;
        bad_c[0] = ~v;
        force dut.u_logic.y = bad_y;
        force dut.u_logic.c = bad_c;
        #1 expect_ok(1'b0, "output and check bit error");
        release dut.u_logic.y;
        release dut.u_logic.c;
        #1;
      end
      // A check bit alone.
      bad_c = c ^ 2'b10;
      force dut.u_logic.c = bad_c;
      #1 expect_ok(1'b0, "check bit error");
      release dut.u_logic.c;
      #1;
      // Four 1 -> 0 errors: beyond t = 2, a code word again.
      if ($countones(row) >= 4) begin
        bad_y = flip(row, 1'b1, 4, 0);
        force dut.u_logic.y = bad_y;
        #1 expect_ok(1'b1, "four-bit error is a code word");
        release dut.u_logic.y;
        #1;
      end
    end
    $display("injected errors flagged: %0d", flagged);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
