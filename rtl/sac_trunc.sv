// Truncated mirror-error SAC (the MEE1 / MEE2 designs).
//
// Square-accumulate of an N-bit two's complement vector, two elements per
// cycle, using sign-forcing truncated squarers (trunc_sq). With MEE2 = 0
// (MEE1) the odd-indexed element A_i is squared as a positive number and the
// even-indexed A_i+1 as a negative number; MEE2 = 1 swaps the roles. The
// positive squarer errs low and the negative one errs high, so the exact
// healing stage cancels most of the error. The errors are opposite in sign
// but not equal in magnitude, so this pair cancels only partly.
//
// Interface and timing as in healing_accumulator: result one cycle after
// the beat flagged last.
//
// The MEE1/MEE2 lane assignment follows the original design; accumulator
// width and stream interface are this design's choices.
module sac_trunc
  import squash_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned T     = 1,
  parameter bit          MEE2  = 1'b0,
  parameter int unsigned ACC_W = ACC_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_first,
  input  logic             in_last,
  input  logic [N-1:0]     a_odd,
  input  logic [N-1:0]     a_even,
  output logic [ACC_W-1:0] acc,
  output logic             out_valid
);
  logic [1:0][2*N-1:0] sq_pair;

  trunc_sq #(.N(N), .T(T), .NEG(MEE2))  u_sq1 (.a(a_odd),  .sq(sq_pair[0]));
  trunc_sq #(.N(N), .T(T), .NEG(!MEE2)) u_sq2 (.a(a_even), .sq(sq_pair[1]));

  healing_accumulator #(.IN_W(2*N), .N_IN(2), .ACC_W(ACC_W)) u_heal (
    .clk, .rst_n, .in_valid, .in_first, .in_last,
    .terms(sq_pair), .acc, .out_valid
  );
endmodule
