// Approximate 2x2 multiplier M1 (negative-error member of the multiplier
// mirror pair; the well-known under-designed 2x2 multiplier).
//
// Exact except 3*3, which gives 7 instead of 9 (error -2). With that one
// case given up the product never needs 4 bits: p3 is tied low, p1 is an OR
// of the two cross terms and p2 = a1b1. Combinational.
//
// The error case (3*3 -> 7) follows the original design; the equations are
// derived here from the truth table.
module p2x2_m1 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  always_comb begin
    p[0] = a[0] & b[0];
    p[1] = (a[1] & b[0]) | (a[0] & b[1]);
    p[2] = a[1] & b[1];
    p[3] = 1'b0;
  end
endmodule
