// tb_bl_seq_ced: self-checking test of the self-checking sequential machine,
// with injected errors.
//
// A small machine (2 inputs, 3 outputs, 2 state bits, R = 2) is given
// next-state and output tables by the testbench, which also runs a reference
// model of the machine. Fault-free cycles must follow the model with a valid
// two-rail output. Errors are then injected by forcing internal signals, and
// the cycle in which each is flagged is checked:
//   - output bits Z or check bits Z_c: flagged in the same cycle;
//   - next-state bits NS or their check bits NS_c: not visible in that cycle,
//     flagged in the cycle after the clock edge that stores them;
//   - one NS bit and one output bit at once: the output part in the same
//     cycle, the state part in the next;
//   - a flip-flop of PS or of PS_c holding a wrong value: flagged while it
//     does.
// After each injection the machine is reset to bring it back to the model.
module tb_bl_seq_ced;

  import bl_pkg::*;

  localparam int NI  = 2;
  localparam int NO  = 3;
  localparam int NSB = 2;
  localparam int E   = 2**(NI+NSB);

  function automatic logic [E*32-1:0] make_rows(logic [31:0] seed);
    logic [E*32-1:0] t;
    logic [31:0] s;
    s = seed;
    for (int i = 0; i < E; i++) begin
      s = s * 32'd1103515245 + 32'd12345;
      t[i*32 +: 32] = s;
    end
    return t;
  endfunction

  function automatic logic [E*NSB-1:0] ns_rows();
    logic [E*32-1:0] r = make_rows(32'd7);
    logic [E*NSB-1:0] t;
    for (int i = 0; i < E; i++) t[i*NSB +: NSB] = r[i*32 + 20 +: NSB];
    return t;
  endfunction

  function automatic logic [E*NO-1:0] z_rows();
    logic [E*32-1:0] r = make_rows(32'd99);
    logic [E*NO-1:0] t;
    for (int i = 0; i < E; i++) t[i*NO +: NO] = r[i*32 + 16 +: NO];
    return t;
  endfunction

  localparam logic [E*NSB-1:0] NS_TBL = ns_rows();
  localparam logic [E*NO-1:0]  Z_TBL  = z_rows();
  localparam logic [NSB-1:0]   RST    = 2'b10;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;
  int n_out_same_cycle = 0;
  int n_ns_next_cycle  = 0;
  int n_ff_detected    = 0;

  logic           rst_n;
  logic [NI-1:0]  x;
  logic [NO-1:0]  z, bad_z;
  logic [1:0]     z_c, ps_c, bad_c;
  logic [NSB-1:0] ps, bad_ns, bad_ps;
  rail_t          rail;
  logic [NSB-1:0] mstate;

  bl_seq_ced #(
    .NI(NI), .NO(NO), .NSB(NSB), .R(2), .RESET_STATE(RST),
    .NS_TABLE(NS_TBL), .Z_TABLE(Z_TBL)
  ) dut (
    .clk(clk), .rst_n(rst_n), .x(x), .z(z), .z_c(z_c), .ps(ps), .ps_c(ps_c),
    .err_rail(rail)
  );

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic ok();
    return rail.r1 ^ rail.r0;
  endfunction

  task automatic expect_ok(input logic exp, input string what);
    checks++;
    if (ok() !== exp) begin
      failures++;
      $display("FAIL t=%0t %s: x=%b ps=%b ps_c=%b z=%b z_c=%b rail=%b%b",
               $time, what, x, ps, ps_c, z, z_c, rail.r1, rail.r0);
    end
  endtask

  // Compare with the reference model (at a point where x is stable).
  task automatic expect_model();
    logic [NO-1:0] zr;
    zr = Z_TBL[{x, mstate}*NO +: NO];
    checks += 3;
    if (ps !== mstate) begin
      failures++;
      $display("FAIL t=%0t ps=%b expected %b", $time, ps, mstate);
    end
    if (z !== zr) begin
      failures++;
      $display("FAIL t=%0t z=%b expected %b", $time, z, zr);
    end
    if (z_c !== 2'(3 - ($countones(zr) + $countones(mstate)) % 4)) begin
      failures++;
      $display("FAIL t=%0t z_c=%b", $time, z_c);
    end
    expect_ok(1'b1, "fault-free cycle");
  endtask

  // Advance one clock, updating the model.
  task automatic tick();
    @(posedge clk);
    mstate = NS_TBL[{x, mstate}*NSB +: NSB];
    @(negedge clk);
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    mstate = RST;
    #1;
    checks++;
    if (ps !== RST || ps_c !== 2'(3 - $countones(RST) % 4)) begin
      failures++;
      $display("FAIL reset: ps=%b ps_c=%b", ps, ps_c);
    end
  endtask

  // Flip up to n bits of w that hold value v.
  function automatic logic [7:0] flip(logic [7:0] w, int width, logic v, int n);
    int done = 0;
    for (int b = 0; b < width; b++) begin
      if (done < n && w[b] == v) begin
        w[b] = ~v;
        done++;
      end
    end
    return w;
  endfunction

  initial begin
    logic [NSB-1:0] ns_good;
    logic           v;
    x = '0;
    rst_n = 1'b1;
    @(negedge clk);
    do_reset();
    // Fault-free operation.
    for (int k = 0; k < 200; k++) begin
      x = NI'($urandom);
      #1 expect_model();
      tick();
    end
    // Error injection rounds.
    for (int k = 0; k < 60; k++) begin
      x = NI'($urandom);
      #1 expect_model();
      v = 1'($urandom);
      case (k % 6)
        0: begin // output error, one or two bits, same cycle
          bad_z = NO'(flip(8'(z), NO, v, 1 + (k / 6) % 2));
          if (bad_z != z) begin
            force dut.u_out.z = bad_z;
            #1 expect_ok(1'b0, "output error in its own cycle");
            if (!ok()) n_out_same_cycle++;
            release dut.u_out.z;
          end
        end
        1: begin // output check-bit error, same cycle
          bad_c = z_c ^ 2'b01;
          force dut.u_out.z_c = bad_c;
          #1 expect_ok(1'b0, "Z_c error in its own cycle");
          if (!ok()) n_out_same_cycle++;
          release dut.u_out.z_c;
        end
        2, 3: begin // next-state error: invisible now, flagged next cycle
          ns_good = dut.ns;
          bad_ns  = NSB'(flip(8'(ns_good), NSB, v, 1 + (k % 6) - 2));
          if (bad_ns == ns_good) bad_ns = NSB'(flip(8'(ns_good), NSB, ~v, 1));
          force dut.u_ns.ns = bad_ns;
          #1 expect_ok(1'b1, "NS error not visible before the clock edge");
          @(posedge clk);
          #1 release dut.u_ns.ns;
          @(negedge clk);
          expect_ok(1'b0, "NS error flagged in the next cycle");
          if (!ok()) n_ns_next_cycle++;
        end
        4: begin // one NS bit and one output bit together
          ns_good = dut.ns;
          bad_ns  = ns_good ^ NSB'(1);
          bad_z   = z ^ NO'(4);
          force dut.u_ns.ns = bad_ns;
          force dut.u_out.z = bad_z;
          #1 expect_ok(1'b0, "output part flagged in its own cycle");
          if (!ok()) n_out_same_cycle++;
          @(posedge clk);
          #1 release dut.u_ns.ns;
          release dut.u_out.z;
          @(negedge clk);
          expect_ok(1'b0, "state part flagged in the next cycle");
          if (!ok()) n_ns_next_cycle++;
        end
        5: begin // flip-flop faults: a PS bit, then a PS_c bit
          bad_ps = ps ^ NSB'(1 << ((k / 6) % NSB));
          force dut.u_state.ps = bad_ps;
          #1 expect_ok(1'b0, "PS flip-flop fault");
          if (!ok()) n_ff_detected++;
          release dut.u_state.ps;
          do_reset();
          bad_c = ps_c ^ 2'b10;
          force dut.u_state.ps_c = bad_c;
          #1 expect_ok(1'b0, "PS_c flip-flop fault");
          if (!ok()) n_ff_detected++;
          release dut.u_state.ps_c;
        end
        default: ;
      endcase
      do_reset();
    end
    $display("output errors flagged in their cycle: %0d", n_out_same_cycle);
    $display("next-state errors flagged one cycle later: %0d", n_ns_next_cycle);
    $display("flip-flop faults flagged: %0d", n_ff_detected);
    checks++;
    if (n_out_same_cycle == 0 || n_ns_next_cycle == 0 || n_ff_detected == 0) begin
      failures++;
      $display("FAIL a detection mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
