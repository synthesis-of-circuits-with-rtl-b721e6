// tb_bl_ced_top: end-to-end test of both CED designs at their default sizes.
//
// The top is instantiated with every parameter at its default: the
// combinational circuit with 5 inputs and 28 outputs, the sequential machine
// with 3 inputs, 5 outputs and 3 state bits, R = 2. The reference for the
// functional behaviour is the example truth tables the top uses by default
// (rebuilt here from the same generator); the expected check bits and
// checker verdicts are worked out in the testbench.
//
// Mechanisms exercised and counted (each must occur at least once):
//   comb_ok      fault-free combinational vectors accepted
//   comb_out     unidirectional output errors (1 and 2 bits) flagged
//   comb_chk     check-bit errors flagged
//   seq_ok       fault-free machine cycles accepted
//   seq_out      output errors flagged in their own cycle
//   seq_ns       next-state errors flagged one cycle later
//   seq_ff       state flip-flop faults flagged
//   seq_reset    resets back to a code word
module tb_bl_ced_top;

  import bl_pkg::*;

  localparam int CNI = 5, CNO = 28, SNI = 3, SNO = 5, SNSB = 3;
  localparam int SE  = 2**(SNI+SNSB);

  localparam logic [(2**CNI)*CNO-1:0] C_TBL  = ((2**CNI)*CNO)'(example_table(1, 2**CNI, CNO));
  localparam logic [SE*SNSB-1:0]      NS_TBL = (SE*SNSB)'(example_table(2, SE, SNSB));
  localparam logic [SE*SNO-1:0]       Z_TBL  = (SE*SNO)'(example_table(3, SE, SNO));

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;
  int comb_ok = 0, comb_out = 0, comb_chk = 0;
  int seq_ok = 0, seq_out = 0, seq_ns = 0, seq_ff = 0, seq_reset = 0;

  logic [CNI-1:0]  comb_x;
  logic [CNO-1:0]  comb_y;
  logic [1:0]      comb_c;
  rail_t           comb_rail;
  logic            rst_n;
  logic [SNI-1:0]  seq_x;
  logic [SNO-1:0]  seq_z;
  logic [1:0]      seq_z_c, seq_ps_c;
  logic [SNSB-1:0] seq_ps, mstate;
  // Values written by force statements (never expressions of the forced net).
  logic [1:0]      bad_c;
  logic [SNO-1:0]  bad_z;
  logic [SNSB-1:0] bad_s;
  rail_t           seq_rail;

  bl_ced_top dut (
    .comb_x(comb_x), .comb_y(comb_y), .comb_c(comb_c), .comb_err_rail(comb_rail),
    .clk(clk), .rst_n(rst_n), .seq_x(seq_x), .seq_z(seq_z), .seq_z_c(seq_z_c),
    .seq_ps(seq_ps), .seq_ps_c(seq_ps_c), .seq_err_rail(seq_rail)
  );

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  function automatic logic [1:0] chk_of(int ones);
    return 2'(3 - ones % 4);
  endfunction

  task automatic seq_reset_to_model();
    @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    mstate = '0;
    #1;
    check(seq_ps == '0 && seq_ps_c == chk_of(0) && (seq_rail.r1 ^ seq_rail.r0), "reset");
    seq_reset++;
  endtask

  initial begin
    logic [CNO-1:0]  row, bad;
    logic [SNO-1:0]  zr;
    logic [SNSB-1:0] nsg;
    comb_x = '0; seq_x = '0; rst_n = 1'b1;

    // ---- Combinational circuit: every input vector, with injected errors.
    for (int i = 0; i < 2**CNI; i++) begin
      comb_x = CNI'(i);
      #1;
      row = C_TBL[i*CNO +: CNO];
      check(comb_y == row && comb_c == chk_of($countones(row)), "comb outputs");
      check(comb_rail.r1 ^ comb_rail.r0, "comb fault-free accepted");
      if (comb_rail.r1 ^ comb_rail.r0) comb_ok++;
      for (int n = 1; n <= 2; n++) begin
        bad = row;
        // n 0 -> 1 errors at the lowest zero bits (or 1 -> 0 if too few zeros)
        for (int b = 0, d = 0; b < CNO && d < n; b++)
          if (bad[b] == 1'b0) begin bad[b] = 1'b1; d++; end
        if ($countones(bad) == $countones(row))
          for (int b = 0, d = 0; b < CNO && d < n; b++)
            if (bad[b] == 1'b1) begin bad[b] = 1'b0; d++; end
        force dut.u_comb.u_logic.y = bad;
        #1 check(!(comb_rail.r1 ^ comb_rail.r0), "comb output error flagged");
        if (!(comb_rail.r1 ^ comb_rail.r0)) comb_out++;
        release dut.u_comb.u_logic.y;
      end
      bad_c = comb_c ^ 2'b01;
      force dut.u_comb.u_logic.c = bad_c;
      #1 check(!(comb_rail.r1 ^ comb_rail.r0), "comb check-bit error flagged");
      if (!(comb_rail.r1 ^ comb_rail.r0)) comb_chk++;
      release dut.u_comb.u_logic.c;
      #1;
    end

    // ---- Sequential machine.
    seq_reset_to_model();
    for (int k = 0; k < 400; k++) begin
      seq_x = SNI'($urandom);
      #1;
      zr = Z_TBL[{seq_x, mstate}*SNO +: SNO];
      check(seq_ps == mstate, "seq state follows the model");
      check(seq_z == zr && seq_z_c == chk_of($countones(zr) + $countones(mstate)), "seq outputs");
      check(seq_rail.r1 ^ seq_rail.r0, "seq fault-free accepted");
      if (seq_rail.r1 ^ seq_rail.r0) seq_ok++;
      if (k % 40 == 10) begin
        // output error, same cycle
        bad_z = seq_z ^ SNO'(1 << (k % SNO));
        force dut.u_seq.u_out.z = bad_z;
        #1 check(!(seq_rail.r1 ^ seq_rail.r0), "seq output error in its own cycle");
        if (!(seq_rail.r1 ^ seq_rail.r0)) seq_out++;
        release dut.u_seq.u_out.z;
        #1;
      end
      if (k % 40 == 20) begin
        // next-state error: clocked in, flagged in the next cycle
        nsg = dut.u_seq.ns;
        bad_s = nsg ^ SNSB'(1 << (k % SNSB));
        force dut.u_seq.u_ns.ns = bad_s;
        #1 check(seq_rail.r1 ^ seq_rail.r0, "NS error invisible before the edge");
        @(posedge clk);
        #1 release dut.u_seq.u_ns.ns;
        @(negedge clk);
        check(!(seq_rail.r1 ^ seq_rail.r0), "NS error flagged in the next cycle");
        if (!(seq_rail.r1 ^ seq_rail.r0)) seq_ns++;
        seq_reset_to_model();
        continue;
      end
      if (k % 40 == 30) begin
        // state flip-flop fault
        bad_s = seq_ps ^ SNSB'(1 << (k % SNSB));
        force dut.u_seq.u_state.ps = bad_s;
        #1 check(!(seq_rail.r1 ^ seq_rail.r0), "flip-flop fault flagged");
        if (!(seq_rail.r1 ^ seq_rail.r0)) seq_ff++;
        release dut.u_seq.u_state.ps;
        seq_reset_to_model();
        continue;
      end
      @(posedge clk);
      mstate = NS_TBL[{seq_x, mstate}*SNSB +: SNSB];
      @(negedge clk);
    end

    $display("comb_ok=%0d comb_out=%0d comb_chk=%0d", comb_ok, comb_out, comb_chk);
    $display("seq_ok=%0d seq_out=%0d seq_ns=%0d seq_ff=%0d seq_reset=%0d",
             seq_ok, seq_out, seq_ns, seq_ff, seq_reset);
    check(comb_ok > 0, "mechanism comb_ok seen");
    check(comb_out > 0, "mechanism comb_out seen");
    check(comb_chk > 0, "mechanism comb_chk seen");
    check(seq_ok > 0, "mechanism seq_ok seen");
    check(seq_out > 0, "mechanism seq_out seen");
    check(seq_ns > 0, "mechanism seq_ns seen");
    check(seq_ff > 0, "mechanism seq_ff seen");
    check(seq_reset > 0, "mechanism seq_reset seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
