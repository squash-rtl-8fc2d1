// 4x4 unsigned squarer built from 2x2 elements (one Sq4x4 of the Sq8x8).
//
// With a = {h, l} (two 2-bit digits), a*a = l*l + 8*(l*h) + 16*(h*h): the
// two equal cross products l*h and h*l share one P2x2 element whose result
// is shifted by 3 instead of 2. Each of the three elements is accurate or
// approximate according to APX_MASK (bit 0: Sq2x2(l), bit 1: P2x2(l,h),
// bit 2: Sq2x2(h)); POL picks the S1/M1 or the mirror S2/M2 variants, so
// all approximate elements of one squarer err in the same direction.
// Combinational. The output is the 8-bit square; the largest result any
// configuration can produce is 241, so 8 bits always suffice.
//
// The decomposition and shift factors follow the original design; the
// per-element mask and polarity parameters are this design's interface.
module sq4x4
  import squash_pkg::*;
#(
  parameter logic [2:0] APX_MASK = 3'b000,
  parameter err_pol_e   POL      = ERR_NEG
) (
  input  logic [3:0] a,
  output logic [7:0] sq
);
  logic [3:0] pp_ll, pp_lh, pp_hh;

  sq2x2_elem #(.APX(APX_MASK[0]), .POL(POL)) u_ll (.a(a[1:0]), .p(pp_ll));
  p2x2_elem  #(.APX(APX_MASK[1]), .POL(POL)) u_lh (.a(a[1:0]), .b(a[3:2]), .p(pp_lh));
  sq2x2_elem #(.APX(APX_MASK[2]), .POL(POL)) u_hh (.a(a[3:2]), .p(pp_hh));

  always_comb begin
    sq = 8'(pp_ll) + (8'(pp_lh) << 3) + (8'(pp_hh) << 4);
  end
endmodule
