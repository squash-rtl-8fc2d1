// Self-healing square-accumulate of a complex vector: sum(Zr^2 + Zi^2).
//
// This is the SAC of a least-squares gain calibration loop (the power of
// the vector Z). Each cycle takes two consecutive complex samples Z_k and
// Z_k+1. The real parts go through one absolute approximate squarer mirror
// pair (Zr_k to the positive-error squarer, Zr_k+1 to the negative-error
// one) and the imaginary parts through a second pair; the four squares are
// summed and accumulated exactly. Real and imaginary parts are taken as
// 8-bit two's complement numbers; since a square ignores sign, their
// magnitudes (0..128) feed the unsigned 8x8 squarers. The number format
// and the magnitude step are this design's choices.
//
// Default approximation SH3 (three least significant elements). Interface
// and timing as in healing_accumulator.
module complex_sac
  import squash_pkg::*;
#(
  parameter logic [9:0]  APX_MASK = CFG_SH3,
  parameter bit          MIRROR   = 1'b1,
  parameter int unsigned ACC_W    = ACC_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_first,
  input  logic             in_last,
  input  logic [7:0]       zr_odd,
  input  logic [7:0]       zr_even,
  input  logic [7:0]       zi_odd,
  input  logic [7:0]       zi_even,
  output logic [ACC_W-1:0] acc,
  output logic             out_valid
);
  localparam err_pol_e POL1 = MIRROR ? ERR_POS : ERR_NEG;

  function automatic logic [7:0] mag8(input logic [7:0] x);
    return x[7] ? 8'(-x) : x;  // -128 gives 128, still fits 8 unsigned bits
  endfunction

  logic [3:0][SQ8_OUT_W-1:0] sq4;

  sq8x8 #(.APX_MASK(APX_MASK), .POL(POL1))    u_sqr1 (.a(mag8(zr_odd)),  .sq(sq4[0]));
  sq8x8 #(.APX_MASK(APX_MASK), .POL(ERR_NEG)) u_sqr2 (.a(mag8(zr_even)), .sq(sq4[1]));
  sq8x8 #(.APX_MASK(APX_MASK), .POL(POL1))    u_sqi1 (.a(mag8(zi_odd)),  .sq(sq4[2]));
  sq8x8 #(.APX_MASK(APX_MASK), .POL(ERR_NEG)) u_sqi2 (.a(mag8(zi_even)), .sq(sq4[3]));

  healing_accumulator #(.IN_W(SQ8_OUT_W), .N_IN(4), .ACC_W(ACC_W)) u_heal (
    .clk, .rst_n, .in_valid, .in_first, .in_last,
    .terms(sq4), .acc, .out_valid
  );
endmodule
