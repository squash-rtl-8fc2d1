// 2x2 squarer element selector: instantiates the accurate Sq2x2, S1 or S2.
//
// APX = 0 gives the accurate element; APX = 1 gives S1 (POL = ERR_NEG) or
// its mirror S2 (POL = ERR_POS). Chosen at elaboration, combinational.
module sq2x2_elem
  import squash_pkg::*;
#(
  parameter bit       APX = 1'b0,
  parameter err_pol_e POL = ERR_NEG
) (
  input  logic [1:0] a,
  output logic [3:0] p
);
  if (!APX) begin : g_exact
    sq2x2_exact u_sq (.a(a), .p(p));
  end else if (POL == ERR_NEG) begin : g_s1
    sq2x2_s1 u_sq (.a(a), .p(p));
  end else begin : g_s2
    sq2x2_s2 u_sq (.a(a), .p(p));
  end
endmodule
