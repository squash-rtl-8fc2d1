// 4x4 unsigned multiplier built from four 2x2 multiplier elements (the
// cross-product block of the Sq8x8).
//
// With lo = {l1, l0} and hi = {h1, h0} as 2-bit digits,
// lo*hi = l0*h0 + 4*(l0*h1 + l1*h0) + 16*(l1*h1). The elements are wired
// as in the 8x8 squarer: (a1a0, a5a4) x1, (a1a0, a7a6) x4, (a5a4, a3a2) x4,
// (a3a2, a7a6) x16. APX_MASK bit k makes element k approximate, POL picks
// M1 or its mirror M2. Combinational. The output is 9 bits, one more than
// an exact 4x4 product, because with M2 elements 15*15 gives 275.
//
// The element wiring and shift factors follow the original design; the
// 9-bit output and the mask parameter are this design's choices.
module p4x4
  import squash_pkg::*;
#(
  parameter logic [3:0] APX_MASK = 4'b0000,
  parameter err_pol_e   POL      = ERR_NEG
) (
  input  logic [3:0] lo,  // a3..a0 of the squarer input
  input  logic [3:0] hi,  // a7..a4 of the squarer input
  output logic [8:0] p
);
  logic [3:0] pp0, pp1, pp2, pp3;

  p2x2_elem #(.APX(APX_MASK[0]), .POL(POL)) u_e0 (.a(lo[1:0]), .b(hi[1:0]), .p(pp0));
  p2x2_elem #(.APX(APX_MASK[1]), .POL(POL)) u_e1 (.a(lo[1:0]), .b(hi[3:2]), .p(pp1));
  p2x2_elem #(.APX(APX_MASK[2]), .POL(POL)) u_e2 (.a(hi[1:0]), .b(lo[3:2]), .p(pp2));
  p2x2_elem #(.APX(APX_MASK[3]), .POL(POL)) u_e3 (.a(lo[3:2]), .b(hi[3:2]), .p(pp3));

  always_comb begin
    p = 9'(pp0) + (9'(pp1) << 2) + (9'(pp2) << 2) + (9'(pp3) << 4);
  end
endmodule
