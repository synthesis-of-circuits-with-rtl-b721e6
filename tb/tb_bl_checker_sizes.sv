// tb_bl_checker_sizes: the Bose-Lin checker (R = 2) at the four word sizes
// of the literal-count comparison: 8, 16, 24 and 32 information bits.
//
// For each size a generate block drives its own checker with random code
// words (must pass), random check values (must pass exactly when they match
// the complemented count of ones modulo 4, computed here) and random one-
// and two-bit unidirectional errors over information and check bits (must be
// flagged). All four run in parallel and add to the shared counters.
module tb_bl_checker_sizes;

  import bl_pkg::*;

  localparam int NSIZES = 4;
  localparam int SIZES [NSIZES] = '{8, 16, 24, 32};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;
  int done     = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NSIZES; g++) begin : g_size
    localparam int N = SIZES[g];
    logic [N-1:0] info;
    logic [1:0]   chk;
    rail_t        rail;

    bl_checker #(.N(N), .R(2)) dut (.info(info), .chk(chk), .err_rail(rail));

    initial begin
      logic [N+1:0] cw, bad;
      logic         d;
      int           i1, i2;
      info = '0; chk = '0;
      for (int k = 0; k < 2000; k++) begin
        @(negedge clk);
        info = N'({$urandom, $urandom});
        cw   = {info, 2'(3 - $countones(info) % 4)};
        {info, chk} = cw;
        #1;
        checks++;
        if (!(rail.r1 ^ rail.r0)) begin
          failures++;
          $display("FAIL N=%0d code word rejected", N);
        end
        chk = 2'($urandom);
        #1;
        checks++;
        if ((rail.r1 ^ rail.r0) !== (chk == 2'(3 - $countones(info) % 4))) begin
          failures++;
          $display("FAIL N=%0d classification", N);
        end
        d   = 1'($urandom);
        i1  = int'($urandom % (N + 2));
        i2  = int'($urandom % (N + 2));
        bad = cw;
        if (cw[i1] != d) bad[i1] = d;
        if (cw[i2] != d) bad[i2] = d;
        if (bad != cw) begin
          {info, chk} = bad;
          #1;
          checks++;
          if (rail.r1 ^ rail.r0) begin
            failures++;
            $display("FAIL N=%0d unidirectional error missed", N);
          end
        end
      end
      done++;
    end
  end

  initial begin
    wait (done == NSIZES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
