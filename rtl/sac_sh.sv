// Self-healing approximate square-accumulate (SAC).
//
// Computes sum(A_i^2) over a vector of 8-bit unsigned elements, two
// elements per cycle. The approximation stage is a pair of approximate 8x8
// squarers built from the same APX_MASK: Sq1 (positive-error elements
// S2/M2, error +delta) squares the odd-indexed element A_i and Sq2
// (negative-error elements S1/M1, error -delta) squares the even-indexed
// element A_i+1, as in the original proposal. For equal inputs
// their errors are exact additive inverses, so with the same input
// distribution on both sides the exact healing stage (healing_accumulator)
// cancels the errors on average. MIRROR = 0 gives the conventional baseline
// in which both squarers use S1/M1 (no cancellation).
//
// Default configuration SH7: the two least significant Sq2x2 elements, the
// least significant P2x2 and the four P2x2 of the cross-product block are
// approximate. Interface: a valid/first/last beat stream; acc and out_valid
// as in healing_accumulator, result one cycle after the last beat. The
// squarers are combinational in front of the accumulator register; this
// single-stage timing is this design's choice.
module sac_sh
  import squash_pkg::*;
#(
  parameter logic [9:0]  APX_MASK = CFG_SH7,
  parameter bit          MIRROR   = 1'b1,
  parameter int unsigned ACC_W    = ACC_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_first,
  input  logic             in_last,
  input  logic [7:0]       a_odd,
  input  logic [7:0]       a_even,
  output logic [ACC_W-1:0] acc,
  output logic             out_valid
);
  localparam err_pol_e POL1 = MIRROR ? ERR_POS : ERR_NEG;

  logic [1:0][SQ8_OUT_W-1:0] sq_pair;

  // Approximation stage
  sq8x8 #(.APX_MASK(APX_MASK), .POL(POL1))    u_sq1 (.a(a_odd),  .sq(sq_pair[0]));
  sq8x8 #(.APX_MASK(APX_MASK), .POL(ERR_NEG)) u_sq2 (.a(a_even), .sq(sq_pair[1]));

  // Healing stage
  healing_accumulator #(.IN_W(SQ8_OUT_W), .N_IN(2), .ACC_W(ACC_W)) u_heal (
    .clk, .rst_n, .in_valid, .in_first, .in_last,
    .terms(sq_pair), .acc, .out_valid
  );
endmodule
