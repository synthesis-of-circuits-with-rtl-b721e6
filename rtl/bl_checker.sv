// bl_checker: Bose-Lin code checker with a two-rail error indication.
//
// Monitors an N-bit information word and its R check bits. The checker
// recounts the ones of the information word modulo 2**R (bl_ones_count) and
// compares the count with the received check bits, which hold that count
// bit-wise complemented: each pair (count[i], chk[i]) is then a two-rail
// signal, valid exactly when the two agree, and bl_trc folds the R pairs into
// one two-rail output. A code word
// gives err_rail = 2'b01 or 2'b10; a non-code word gives 2'b00 or 2'b11.
//
// Interface: info (N), chk (R) in; err_rail (bl_pkg::rail_t) out.
// Purely combinational: an error shows in the same cycle as the word.
// The document specifies a totally self-checking checker that counts ones
// modulo 2**R with the carries above bit R-1 discarded. Complemented check
// bits and the bit-wise two-rail comparison are this design's choices.
module bl_checker #(
  parameter int unsigned N = 8,
  parameter int unsigned R = bl_pkg::BL_R_DEFAULT
) (
  input  logic [N-1:0]  info,
  input  logic [R-1:0]  chk,
  output bl_pkg::rail_t err_rail
);

  logic [R-1:0] count;

  bl_ones_count #(.N(N), .R(R)) u_count (.data(info), .count(count));

  bl_trc #(.PAIRS(R)) u_trc (.a1(count), .a0(chk), .z(err_rail));

endmodule
