// bl_out_logic: output logic of the self-checking sequential machine.
//
// From the primary inputs x (NI bits) and the present state ps (NSB bits) it
// computes the outputs z (NO bits, a Mealy machine) and R check bits z_c.
// Unlike ordinary Bose-Lin check bits, z_c counts the ones in z AND in ps,
// modulo 2**R (stored bit-wise complemented, like all check bits here): it encodes the machine's input and output spaces together, so
// that one checker can check the state and the outputs at once. z_c is a
// separate function of the inputs, not derived from z. The output function is
// a truth table, Z_TABLE, whose row {x, ps} (bits [{x,ps}*NO +: NO]) is the
// output word; the z_c table is derived from it at elaboration.
//
// Interface: x, ps in; z, z_c out. Purely combinational.
// The definition of Z_c follows the document; that the outputs depend on the
// inputs as well as the state (Mealy) is this design's reading. Default sizes
// are those of the benchmark "dk14" (3 inputs, 5 outputs, 3 flip-flops); the
// default table is an arbitrary example machine, not that benchmark.
module bl_out_logic #(
  parameter int unsigned NI  = 3,
  parameter int unsigned NSB = 3,
  parameter int unsigned NO  = 5,
  parameter int unsigned R   = bl_pkg::BL_R_DEFAULT,
  parameter logic [(2**(NI+NSB))*NO-1:0] Z_TABLE =
    ((2**(NI+NSB))*NO)'(bl_pkg::example_table(3, 2**(NI+NSB), NO))
) (
  input  logic [NI-1:0]  x,
  input  logic [NSB-1:0] ps,
  output logic [NO-1:0]  z,
  output logic [R-1:0]   z_c
);

  localparam int unsigned ENTRIES = 2**(NI+NSB);

  // The present state occupies the NSB low bits of the row index, so those
  // bits are added to the count.
  localparam logic [ENTRIES*R-1:0] ZC_TABLE =
    (ENTRIES*R)'(bl_pkg::check_table(bl_pkg::table_t'(Z_TABLE), ENTRIES, NO, R, NSB));

  logic [NI+NSB-1:0] addr;

  always_comb addr = {x, ps};
  always_comb z    = Z_TABLE[addr*NO +: NO];
  always_comb z_c  = ZC_TABLE[addr*R +: R];

  initial begin
    assert (NO <= bl_pkg::ROW_MAX && ENTRIES*NO <= bl_pkg::TBL_MAX)
      else $error("bl_out_logic: table larger than the elaboration helpers handle");
  end

endmodule
