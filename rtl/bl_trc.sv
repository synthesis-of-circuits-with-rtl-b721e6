// bl_trc: two-rail checker reducing PAIRS two-rail signals to one.
//
// Each input pair (a1[i], a0[i]) is valid when its two rails differ. The
// classic two-rail checker cell combines two pairs a and b into
//   z1 = a1 & b1 | a0 & b0,   z0 = a1 & b0 | a0 & b1,
// whose rails differ exactly when both inputs are valid. PAIRS-1 cells are
// chained here; the result is a valid pair if and only if every input pair is
// valid. Purely combinational.
//
// The checker of the document compares a computed count with received check
// bits and signals an error on a two-rail output; the two-rail reduction used
// for that comparison is this design's choice of checker back end.
module bl_trc #(
  parameter int unsigned PAIRS = 2
) (
  input  logic [PAIRS-1:0] a1,
  input  logic [PAIRS-1:0] a0,
  output bl_pkg::rail_t    z
);

  always_comb begin
    z.r1 = a1[0];
    z.r0 = a0[0];
    for (int unsigned i = 1; i < PAIRS; i++) begin
      logic n1, n0;
      n1   = (z.r1 & a1[i]) | (z.r0 & a0[i]);
      n0   = (z.r1 & a0[i]) | (z.r0 & a1[i]);
      z.r1 = n1;
      z.r0 = n0;
    end
  end

endmodule
