// bl_ones_count: modulo-2**R counter of ones, the arithmetic core of the
// Bose-Lin checkers.
//
// Counts the ones of an N-bit word modulo 2**R. The count is an R-bit
// running sum; every addition simply drops the carries above bit R-1, which
// is how a modulo-2**R count is built in hardware (no full-width population
// count is ever formed). R = 2 (count modulo 4, double unidirectional error
// detection) is the main configuration; R = 3 (modulo 8) gives triple error
// detection. The check bits of a code word are this count, bit-wise
// complemented.
//
// Interface: data (N bits) in, count (R bits) out. Purely combinational.
// Counting modulo 2**R by discarding the upper carries follows the
// document; the serial accumulation order is this design's choice (a
// synthesis tool may rebalance it into a tree).
module bl_ones_count #(
  parameter int unsigned N = 8,
  parameter int unsigned R = bl_pkg::BL_R_DEFAULT
) (
  input  logic [N-1:0] data,
  output logic [R-1:0] count
);

  always_comb begin
    count = '0;
    for (int unsigned i = 0; i < N; i++) count = count + R'(data[i]);
  end

  initial begin
    assert (R == 2 || R == 3)
      else $error("bl_ones_count: R must be 2 (t=2, modulo 4) or 3 (t=3, modulo 8)");
  end

endmodule
