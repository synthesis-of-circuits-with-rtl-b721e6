// bl_seq_checker: single checker of the self-checking sequential machine.
//
// Checks the state bits and the output bits of a sequential machine with one
// checker. The output check bits Z_c encode the number of ones in the
// outputs Z and the present state PS together, modulo 2**R. The checker
// counts the ones of Z modulo 2**R, adds the count that the stored
// present-state check bits PS_c encode, modulo 2**R, and compares the sum
// with Z_c. All check bits hold their count bit-wise complemented, so the
// count of PS_c is ~PS_c and the comparison pairs sum[i] with Z_c[i] as a
// two-rail signal. An error on the outputs
// shows in the same cycle; an error in the state flip-flops (or one clocked
// into them from the next-state logic) makes PS disagree with PS_c and so
// makes Z_c disagree with the sum.
//
// Interface: z (NO), ps_c (R), z_c (R) in; err_rail (bl_pkg::rail_t) out:
// 2'b01 / 2'b10 for a consistent word, 2'b00 / 2'b11 for an error.
// Purely combinational.
// The count, the modulo addition of PS_c and the comparison with Z_c follow
// the document; complemented check bits and the two-rail comparison are this
// design's choices.
module bl_seq_checker #(
  parameter int unsigned NO = 5,
  parameter int unsigned R  = bl_pkg::BL_R_DEFAULT
) (
  input  logic [NO-1:0] z,
  input  logic [R-1:0]  ps_c,
  input  logic [R-1:0]  z_c,
  output bl_pkg::rail_t err_rail
);

  logic [R-1:0] z_count;
  logic [R-1:0] sum;

  bl_ones_count #(.N(NO), .R(R)) u_count (.data(z), .count(z_count));

  // Modulo-2**R addition: the carry out of bit R-1 is dropped.
  always_comb sum = z_count + ~ps_c;

  bl_trc #(.PAIRS(R)) u_trc (.a1(sum), .a0(z_c), .z(err_rail));

endmodule
