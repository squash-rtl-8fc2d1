// 2x2 multiplier element selector: instantiates the accurate P2x2, M1 or M2.
//
// APX = 0 gives the accurate element; APX = 1 gives M1 (POL = ERR_NEG) or
// its mirror M2 (POL = ERR_POS). Chosen at elaboration, combinational.
module p2x2_elem
  import squash_pkg::*;
#(
  parameter bit       APX = 1'b0,
  parameter err_pol_e POL = ERR_NEG
) (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  if (!APX) begin : g_exact
    p2x2_exact u_p (.a(a), .b(b), .p(p));
  end else if (POL == ERR_NEG) begin : g_m1
    p2x2_m1 u_p (.a(a), .b(b), .p(p));
  end else begin : g_m2
    p2x2_m2 u_p (.a(a), .b(b), .p(p));
  end
endmodule
