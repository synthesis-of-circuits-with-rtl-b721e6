// bl_ns_logic: next-state logic of the self-checking sequential machine.
//
// From the primary inputs x (NI bits) and the present state ps (NSB bits) it
// computes the next state ns and its R Bose-Lin check bits ns_c, the number
// of ones in ns modulo 2**R, bit-wise complemented. As in every CED circuit the check bits are
// separate functions of the inputs, not a count taken from ns, so an error
// in ns is not copied into ns_c. The next-state function is a truth table,
// NS_TABLE, whose row {x, ps} (bits [{x,ps}*NSB +: NSB]) is the next state;
// the check-bit table is derived from it at elaboration.
//
// Interface: x, ps in; ns, ns_c out. Purely combinational.
// The document defines NS and NS_c; the state encoding is free (the code is
// separable). The default sizes are those of its benchmark machine "dk14"
// (3 inputs, 7 states in 3 flip-flops); the default table is an arbitrary
// example machine, not that benchmark.
module bl_ns_logic #(
  parameter int unsigned NI  = 3,
  parameter int unsigned NSB = 3,
  parameter int unsigned R   = bl_pkg::BL_R_DEFAULT,
  parameter logic [(2**(NI+NSB))*NSB-1:0] NS_TABLE =
    ((2**(NI+NSB))*NSB)'(bl_pkg::example_table(2, 2**(NI+NSB), NSB))
) (
  input  logic [NI-1:0]  x,
  input  logic [NSB-1:0] ps,
  output logic [NSB-1:0] ns,
  output logic [R-1:0]   ns_c
);

  localparam int unsigned ENTRIES = 2**(NI+NSB);

  localparam logic [ENTRIES*R-1:0] CHK_TABLE =
    (ENTRIES*R)'(bl_pkg::check_table(bl_pkg::table_t'(NS_TABLE), ENTRIES, NSB, R, 0));

  logic [NI+NSB-1:0] addr;

  always_comb addr = {x, ps};
  always_comb ns   = NS_TABLE[addr*NSB +: NSB];
  always_comb ns_c = CHK_TABLE[addr*R +: R];

  initial begin
    assert (NSB <= bl_pkg::ROW_MAX && ENTRIES*NSB <= bl_pkg::TBL_MAX)
      else $error("bl_ns_logic: table larger than the elaboration helpers handle");
  end

endmodule
