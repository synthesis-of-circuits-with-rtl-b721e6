// bl_state_reg: state flip-flops of the self-checking sequential machine.
//
// Stores the next state ns and its check bits ns_c on every rising clock
// edge; they come out as the present state ps and its check bits ps_c. The
// check bits travel through flip-flops of their own, so a fault in any state
// flip-flop leaves ps and ps_c inconsistent, which the sequential checker
// detects. An asynchronous active-low reset loads RESET_STATE and its
// matching check bits, so the machine starts from a code word.
//
// Interface: clk, rst_n, ns (NSB), ns_c (R) in; ps (NSB), ps_c (R) out.
// One cycle from ns to ps.
// Storing NS_c with NS follows the document; the reset (its polarity, its
// asynchronous timing and the reset state) is this design's choice.
module bl_state_reg #(
  parameter int unsigned     NSB         = 3,
  parameter int unsigned     R           = bl_pkg::BL_R_DEFAULT,
  parameter logic [NSB-1:0]  RESET_STATE = '0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NSB-1:0] ns,
  input  logic [R-1:0]   ns_c,
  output logic [NSB-1:0] ps,
  output logic [R-1:0]   ps_c
);

  localparam logic [R-1:0] RESET_CHK =
    R'(bl_pkg::check_bits(bl_pkg::ROW_MAX'(RESET_STATE), R));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ps   <= RESET_STATE;
      ps_c <= RESET_CHK;
    end else begin
      ps   <= ns;
      ps_c <= ns_c;
    end
  end

endmodule
