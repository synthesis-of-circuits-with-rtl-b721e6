// bl_seq_ced: self-checking sequential machine with one Bose-Lin checker.
//
// Both the state and the outputs are encoded with a Bose-Lin code:
//   - bl_ns_logic gives the next state NS and its check bits NS_c
//     (ones in NS modulo 2**R; every check value here is stored bit-wise
//     complemented);
//   - bl_state_reg stores both, giving the present state PS and PS_c;
//   - bl_out_logic gives the outputs Z and check bits Z_c, which count the
//     ones in Z and in PS together, modulo 2**R;
//   - bl_seq_checker adds the count held in PS_c to the count of ones in Z
//     and compares the sum with Z_c.
// The one checker therefore checks state and outputs together. An error on
// Z or Z_c shows in the cycle it occurs; an error on NS or NS_c is clocked
// into the flip-flops and shows one cycle later, through PS / PS_c; a fault
// in a flip-flop shows while it lasts. No constraint is placed on the state
// encoding, and data flip-flops may be protected the same way.
//
// Interface: clk, rst_n (asynchronous, active low), x (NI) in; z (NO),
// z_c (R), ps (NSB), ps_c (R) and err_rail out. Outputs are Mealy
// (combinational from x and ps); the state changes on the rising edge.
// The structure is the document's; the reset and the example tables are this
// design's (see the sub-blocks).
module bl_seq_ced #(
  parameter int unsigned    NI          = 3,
  parameter int unsigned    NO          = 5,
  parameter int unsigned    NSB         = 3,
  parameter int unsigned    R           = bl_pkg::BL_R_DEFAULT,
  parameter logic [NSB-1:0] RESET_STATE = '0,
  parameter logic [(2**(NI+NSB))*NSB-1:0] NS_TABLE =
    ((2**(NI+NSB))*NSB)'(bl_pkg::example_table(2, 2**(NI+NSB), NSB)),
  parameter logic [(2**(NI+NSB))*NO-1:0] Z_TABLE =
    ((2**(NI+NSB))*NO)'(bl_pkg::example_table(3, 2**(NI+NSB), NO))
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NI-1:0]  x,
  output logic [NO-1:0]  z,
  output logic [R-1:0]   z_c,
  output logic [NSB-1:0] ps,
  output logic [R-1:0]   ps_c,
  output bl_pkg::rail_t  err_rail
);

  logic [NSB-1:0] ns;
  logic [R-1:0]   ns_c;

  bl_ns_logic #(.NI(NI), .NSB(NSB), .R(R), .NS_TABLE(NS_TABLE)) u_ns (
    .x(x), .ps(ps), .ns(ns), .ns_c(ns_c)
  );

  bl_state_reg #(.NSB(NSB), .R(R), .RESET_STATE(RESET_STATE)) u_state (
    .clk(clk), .rst_n(rst_n), .ns(ns), .ns_c(ns_c), .ps(ps), .ps_c(ps_c)
  );

  bl_out_logic #(.NI(NI), .NSB(NSB), .NO(NO), .R(R), .Z_TABLE(Z_TABLE)) u_out (
    .x(x), .ps(ps), .z(z), .z_c(z_c)
  );

  bl_seq_checker #(.NO(NO), .R(R)) u_checker (
    .z(z), .ps_c(ps_c), .z_c(z_c), .err_rail(err_rail)
  );

endmodule
