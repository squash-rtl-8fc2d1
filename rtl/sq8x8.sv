// 8x8 unsigned approximate squarer built from ten 2x2 elements.
//
// a*a = Sq4x4(a3..a0) + 32*P4x4(a3..a0, a7..a4) + 256*Sq4x4(a7..a4): the two
// equal 4x4 cross products share one P4x4 shifted by 5, and each 4x4 block
// is itself built from 2x2 elements (four Sq2x2 and six P2x2 in total).
// APX_MASK selects which of the ten elements are approximate (bit order in
// squash_pkg: bits 0-2 least significant Sq4x4, bits 3-6 P4x4, bits 7-9
// most significant Sq4x4). POL makes every approximate element of this
// squarer the negative-error kind (S1/M1) or the positive-error mirror kind
// (S2/M2); two squarers with the same mask and opposite POL form an
// absolute approximate squarer mirror pair whose errors sum to zero for the
// same input. Only the 2x2 elements are approximated; the adders are exact.
//
// Combinational. The result is 17 bits: one bit more than the 16-bit exact
// square, because a positive-error squarer exceeds 65535 for inputs near
// 255 (e.g. SH7 gives 66641 for 255). The default mask is SH7, the seven
// least significant elements.
//
// The ten-element structure, shift factors and configurations follow the
// original design; the 17-bit output and mask encoding are this design's.
module sq8x8
  import squash_pkg::*;
#(
  parameter logic [9:0] APX_MASK = CFG_SH7,
  parameter err_pol_e   POL      = ERR_NEG
) (
  input  logic [7:0]           a,
  output logic [SQ8_OUT_W-1:0] sq
);
  logic [7:0] sq_lo, sq_hi;
  logic [8:0] p_mid;

  sq4x4 #(.APX_MASK(APX_MASK[2:0]), .POL(POL)) u_sq_lo (.a(a[3:0]), .sq(sq_lo));
  p4x4  #(.APX_MASK(APX_MASK[6:3]), .POL(POL)) u_p_mid (.lo(a[3:0]), .hi(a[7:4]), .p(p_mid));
  sq4x4 #(.APX_MASK(APX_MASK[9:7]), .POL(POL)) u_sq_hi (.a(a[7:4]), .sq(sq_hi));

  always_comb begin
    sq = SQ8_OUT_W'(sq_lo) + (SQ8_OUT_W'(p_mid) << 5) + (SQ8_OUT_W'(sq_hi) << 8);
  end
endmodule
