// bl_ced_top: the two Bose-Lin concurrent-error-detection designs side by side.
//
//   comb_*  a self-checking combinational circuit (bl_comb_ced): a
//           functional circuit whose NO outputs carry R Bose-Lin check bits,
//           monitored by a Bose-Lin checker.
//   seq_*   a self-checking sequential machine (bl_seq_ced): state and
//           outputs both Bose-Lin encoded, with one modified checker that
//           checks both, flip-flops included.
// The two share only the code parameter R (R = 2: count of ones modulo 4,
// detection of every unidirectional error of up to two bits) and the clock
// domain of the sequential machine; each has its own ports and its own
// two-rail error output (2'b01 / 2'b10 fault-free, 2'b00 / 2'b11 error).
//
// Default sizes are those of two of the document's benchmarks, "bw" for the
// combinational circuit (5 inputs, 28 outputs) and "dk14" for the machine
// (3 inputs, 5 outputs, 7 states in 3 flip-flops). The benchmark functions
// are not reproduced: the default tables are example functions, meant to be
// replaced through the table parameters by the logic to be protected.
module bl_ced_top #(
  parameter int unsigned R        = bl_pkg::BL_R_DEFAULT,
  parameter int unsigned COMB_NI  = 5,
  parameter int unsigned COMB_NO  = 28,
  parameter logic [(2**COMB_NI)*COMB_NO-1:0] COMB_TABLE =
    ((2**COMB_NI)*COMB_NO)'(bl_pkg::example_table(1, 2**COMB_NI, COMB_NO)),
  parameter int unsigned SEQ_NI   = 3,
  parameter int unsigned SEQ_NO   = 5,
  parameter int unsigned SEQ_NSB  = 3,
  parameter logic [SEQ_NSB-1:0] SEQ_RESET_STATE = '0,
  parameter logic [(2**(SEQ_NI+SEQ_NSB))*SEQ_NSB-1:0] SEQ_NS_TABLE =
    ((2**(SEQ_NI+SEQ_NSB))*SEQ_NSB)'(bl_pkg::example_table(2, 2**(SEQ_NI+SEQ_NSB), SEQ_NSB)),
  parameter logic [(2**(SEQ_NI+SEQ_NSB))*SEQ_NO-1:0] SEQ_Z_TABLE =
    ((2**(SEQ_NI+SEQ_NSB))*SEQ_NO)'(bl_pkg::example_table(3, 2**(SEQ_NI+SEQ_NSB), SEQ_NO))
) (
  // Self-checking combinational circuit
  input  logic [COMB_NI-1:0] comb_x,
  output logic [COMB_NO-1:0] comb_y,
  output logic [R-1:0]       comb_c,
  output bl_pkg::rail_t      comb_err_rail,
  // Self-checking sequential machine
  input  logic               clk,
  input  logic               rst_n,
  input  logic [SEQ_NI-1:0]  seq_x,
  output logic [SEQ_NO-1:0]  seq_z,
  output logic [R-1:0]       seq_z_c,
  output logic [SEQ_NSB-1:0] seq_ps,
  output logic [R-1:0]       seq_ps_c,
  output bl_pkg::rail_t      seq_err_rail
);

  bl_comb_ced #(.NI(COMB_NI), .NO(COMB_NO), .R(R), .TABLE(COMB_TABLE)) u_comb (
    .x(comb_x), .y(comb_y), .c(comb_c), .err_rail(comb_err_rail)
  );

  bl_seq_ced #(
    .NI(SEQ_NI), .NO(SEQ_NO), .NSB(SEQ_NSB), .R(R),
    .RESET_STATE(SEQ_RESET_STATE), .NS_TABLE(SEQ_NS_TABLE), .Z_TABLE(SEQ_Z_TABLE)
  ) u_seq (
    .clk(clk), .rst_n(rst_n), .x(seq_x), .z(seq_z), .z_c(seq_z_c),
    .ps(seq_ps), .ps_c(seq_ps_c), .err_rail(seq_err_rail)
  );

endmodule
