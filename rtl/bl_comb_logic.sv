// bl_comb_logic: functional combinational circuit with its Bose-Lin check
// bits.
//
// NI primary inputs drive NO functional outputs y and R check bits c. The
// check bits are the number of ones in y modulo 2**R, bit-wise complemented
// (see bl_pkg), but they are built as
// functions of the primary inputs of their own, not from y: a fault inside
// the functional logic then changes y without changing c, and the checker
// sees a non-code word. The function is given as a truth table, TABLE, whose
// row x (bits [x*NO +: NO]) is the output word for input x; the check-bit
// table is derived from it at elaboration.
//
// Interface: x (NI) in; y (NO), c (R) out. Purely combinational.
// The structure (functional outputs plus separately generated check-bit
// functions of the inputs) follows the document. The default dimensions are
// those of its benchmark "bw" (5 inputs, 28 outputs); the benchmark's function
// itself is not reproduced, and the default TABLE is an arbitrary example
// function to be replaced by the circuit to be protected. Detection of every
// internal single fault additionally relies on a gate-level implementation
// that is inverter-free and in which no internal node reaches more than t
// outputs; a table written in RTL does not by itself guarantee that
// structure.
module bl_comb_logic #(
  parameter int unsigned NI = 5,
  parameter int unsigned NO = 28,
  parameter int unsigned R  = bl_pkg::BL_R_DEFAULT,
  parameter logic [(2**NI)*NO-1:0] TABLE =
    ((2**NI)*NO)'(bl_pkg::example_table(1, 2**NI, NO))
) (
  input  logic [NI-1:0] x,
  output logic [NO-1:0] y,
  output logic [R-1:0]  c
);

  localparam int unsigned ENTRIES = 2**NI;

  localparam logic [ENTRIES*R-1:0] CHK_TABLE =
    (ENTRIES*R)'(bl_pkg::check_table(bl_pkg::table_t'(TABLE), ENTRIES, NO, R, 0));

  always_comb y = TABLE[x*NO +: NO];
  always_comb c = CHK_TABLE[x*R +: R];

  initial begin
    assert (NO <= bl_pkg::ROW_MAX && ENTRIES*NO <= bl_pkg::TBL_MAX)
      else $error("bl_comb_logic: table larger than the elaboration helpers handle");
  end

endmodule
