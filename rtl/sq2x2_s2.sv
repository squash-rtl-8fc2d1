// Approximate 2x2 squarer S2, the absolute mirror of S1 (positive error).
//
// Exact for a = 0, 1, 3; for a = 2 it returns 8 instead of 4 (error +4,
// the additive inverse of S1's error). Because 2*2 -> 8 and 3*3 -> 9 both
// set p3, p3 reduces to a1 and the element needs no gate at all.
// Combinational.
//
// The error case (2*2 -> 8) follows the original design; the equations are
// derived here from the truth table.
module sq2x2_s2 (
  input  logic [1:0] a,
  output logic [3:0] p
);
  always_comb begin
    p[0] = a[0];
    p[1] = 1'b0;
    p[2] = 1'b0;
    p[3] = a[1];
  end
endmodule
