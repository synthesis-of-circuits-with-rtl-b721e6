// bl_comb_ced: self-checking combinational circuit based on a Bose-Lin code.
//
// The functional circuit (bl_comb_logic) produces NO outputs y together with
// R check bits c, the complemented number of ones in y modulo 2**R,
// generated as separate functions of the inputs. A Bose-Lin checker (bl_checker) watches y and c
// and drives a two-rail error indication: 2'b01 / 2'b10 while the pair is a
// code word, 2'b00 / 2'b11 as soon as it is not. With R = 2 every
// unidirectional error of one or two bits (in y, in c or in both) is caught.
//
// Interface: x (NI) in; y (NO), c (R), err_rail out. Purely combinational:
// the error indication belongs to the same input vector as y.
// The arrangement (outputs encoded with a separable code, one checker) is
// the document's; the functional table is an example (see bl_comb_logic).
module bl_comb_ced #(
  parameter int unsigned NI = 5,
  parameter int unsigned NO = 28,
  parameter int unsigned R  = bl_pkg::BL_R_DEFAULT,
  parameter logic [(2**NI)*NO-1:0] TABLE =
    ((2**NI)*NO)'(bl_pkg::example_table(1, 2**NI, NO))
) (
  input  logic [NI-1:0]  x,
  output logic [NO-1:0]  y,
  output logic [R-1:0]   c,
  output bl_pkg::rail_t  err_rail
);

  bl_comb_logic #(.NI(NI), .NO(NO), .R(R), .TABLE(TABLE)) u_logic (
    .x(x), .y(y), .c(c)
  );

  bl_checker #(.N(NO), .R(R)) u_checker (
    .info(y), .chk(c), .err_rail(err_rail)
  );

endmodule
