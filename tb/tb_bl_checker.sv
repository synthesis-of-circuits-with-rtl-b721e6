// tb_bl_checker: self-checking test of the Bose-Lin code checker.
//
// 1. Every pair (info, chk) of an 8-bit, R = 2 checker and of an 8-bit,
//    R = 3 checker: the two-rail output must be valid exactly when chk equals
//    the complement of the number of ones in info modulo 2**R (computed in
//    the testbench).
// 2. Every code word of the R = 2 checker with every unidirectional error of
//    one or two bits, anywhere in the ten information and check bits, must be
//    flagged (the t = 2 guarantee). The number of such errors is counted.
// 3. A unidirectional error of four information bits is a code word again
//    (4 is 0 modulo 4) and must not be flagged: the code's limit.
// 4. A 0 -> 1 error on one information bit and one check bit, which a
//    non-complemented count would miss, must be flagged.
// 5. Every code word of the R = 3 checker with every unidirectional error of
//    one, two or three bits among its eleven bits must be flagged (t = 3).
// 6. A 32-bit, R = 2 checker (the largest size of the literal-count
//    comparison) with random code words, random non-code words and random
//    one- and two-bit unidirectional errors.
module tb_bl_checker;

  import bl_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;
  int uni_errors_flagged = 0;

  logic [7:0] info2, info3;
  logic [1:0] chk2;
  logic [2:0] chk3;
  rail_t      rail2, rail3;

  bl_checker #(.N(8), .R(2)) dut2 (.info(info2), .chk(chk2), .err_rail(rail2));
  bl_checker #(.N(8), .R(3)) dut3 (.info(info3), .chk(chk3), .err_rail(rail3));

  logic [31:0] info32;
  logic [1:0]  chk32;
  rail_t       rail32;
  int          uni3_flagged = 0;

  bl_checker #(.N(32), .R(2)) dut32 (.info(info32), .chk(chk32), .err_rail(rail32));

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect2(input logic ok_expected, input string what);
    checks++;
    if ((rail2.r1 ^ rail2.r0) !== ok_expected) begin
      failures++;
      $display("FAIL %s: info=%b chk=%b rail=%b%b", what, info2, chk2, rail2.r1, rail2.r0);
    end
  endtask

  initial begin
    logic [9:0]  cw, bad;
    logic [10:0] cw3, bad3;
    logic [33:0] cw32, bad32;
    logic        d;
    int          i1, i2;
    info2 = '0; chk2 = '0; info3 = '0; chk3 = '0; info32 = '0; chk32 = '0;
    // 1. Exhaustive code-word / non-code-word classification.
    for (int v = 0; v < 256; v++) begin
      for (int c = 0; c < 8; c++) begin
        info2 = 8'(v); chk2 = 2'(c);
        info3 = 8'(v); chk3 = 3'(c);
        #1;
        if (c < 4) expect2(c == 3 - ($countones(info2) % 4), "classify R=2");
        checks++;
        if ((rail3.r1 ^ rail3.r0) !== (c == 7 - ($countones(info3) % 8))) begin
          failures++;
          $display("FAIL classify R=3: info=%b chk=%b", info3, chk3);
        end
      end
      @(posedge clk);
    end
    // 2. Unidirectional errors of one and two bits on every code word.
    for (int v = 0; v < 256; v++) begin
      cw = {8'(v), 2'(3 - $countones(8'(v)) % 4)};
      for (int i = 0; i < 10; i++) begin
        for (int j = i; j < 10; j++) begin
          for (int dir = 0; dir < 2; dir++) begin
            // dir 0: 1 -> 0 errors, dir 1: 0 -> 1 errors; both bits must
            // hold the value that the error direction changes.
            if (cw[i] == dir[0] || cw[j] == dir[0]) continue;
            bad = cw;
            bad[i] = dir[0];
            bad[j] = dir[0];
            {info2, chk2} = bad;
            #1;
            expect2(1'b0, "unidirectional error");
            if (!(rail2.r1 ^ rail2.r0)) uni_errors_flagged++;
          end
        end
      end
      @(posedge clk);
    end
    $display("unidirectional 1- and 2-bit errors flagged: %0d", uni_errors_flagged);
    // 3. Four 1 -> 0 errors in the information bits go unseen.
    info2 = 8'b0000_1111; chk2 = 2'd3; #1;
    expect2(1'b1, "four ones lost is a code word");
    info2 = 8'b0000_0000; #1;
    expect2(1'b1, "four ones lost is a code word");
    // 4. info 0 -> 1 on bit 0 and chk 0 -> 1 on bit 0, from the code word
    //    (00000000, 11): gives (00000001, 11).
    info2 = 8'b0000_0000; chk2 = 2'b11; #1;
    expect2(1'b1, "all-zero code word");
    info2 = 8'b0000_0001; #1;
    expect2(1'b0, "single 0->1 error");
    info2 = 8'b0000_0000; chk2 = 2'b10; #1;
    info2 = 8'b0000_0001; chk2 = 2'b11; #1;
    expect2(1'b0, "0->1 error on an information and a check bit");
    // 5. R = 3: unidirectional errors of up to three bits.
    for (int v = 0; v < 256; v++) begin
      cw3 = {8'(v), 3'(7 - $countones(8'(v)) % 8)};
      for (int i = 0; i < 11; i++)
        for (int j = i; j < 11; j++)
          for (int k = j; k < 11; k++)
            for (int dir = 0; dir < 2; dir++) begin
              if (cw3[i] == dir[0] || cw3[j] == dir[0] || cw3[k] == dir[0]) continue;
              bad3 = cw3;
              bad3[i] = dir[0]; bad3[j] = dir[0]; bad3[k] = dir[0];
              {info3, chk3} = bad3;
              #1;
              checks++;
              if (rail3.r1 ^ rail3.r0) begin
                failures++;
                $display("FAIL R=3 unidirectional error missed: %b -> %b", cw3, bad3);
              end else uni3_flagged++;
            end
      @(posedge clk);
    end
    $display("R=3 unidirectional 1- to 3-bit errors flagged: %0d", uni3_flagged);
    // 6. 32-bit checker.
    for (int k = 0; k < 3000; k++) begin
      info32 = $urandom;
      cw32   = {info32, 2'(3 - $countones(info32) % 4)};
      {info32, chk32} = cw32;
      #1;
      checks++;
      if (!(rail32.r1 ^ rail32.r0)) begin
        failures++;
        $display("FAIL N=32 code word rejected: %h %b", info32, chk32);
      end
      chk32 = 2'($urandom);
      #1;
      checks++;
      if ((rail32.r1 ^ rail32.r0) !== (chk32 == 2'(3 - $countones(info32) % 4))) begin
        failures++;
        $display("FAIL N=32 classify: %h %b", info32, chk32);
      end
      // one or two unidirectional errors in the 34-bit word
      d   = 1'($urandom);
      i1  = int'($urandom % 34);
      i2  = int'($urandom % 34);
      bad32 = cw32;
      if (cw32[i1] != d) bad32[i1] = d;
      if (cw32[i2] != d) bad32[i2] = d;
      if (bad32 != cw32) begin
        {info32, chk32} = bad32;
        #1;
        checks++;
        if (rail32.r1 ^ rail32.r0) begin
          failures++;
          $display("FAIL N=32 unidirectional error missed: %h -> %h", cw32, bad32);
        end
      end
      if (k % 16 == 0) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
