// Approximate 2x2 squarer S1 (negative-error member of the squarer mirror pair).
//
// Exact for a = 0, 1, 3; for a = 2 it returns 0 instead of 4 (error -4).
// Dropping the a = 2 case removes the p2 logic: p2 is tied low, p0 = a0 and
// p3 = a1 & a0. Combinational.
//
// The error case (2*2 -> 0) follows the original design; the equations are
// derived here from the truth table.
module sq2x2_s1 (
  input  logic [1:0] a,
  output logic [3:0] p
);
  always_comb begin
    p[0] = a[0];
    p[1] = 1'b0;
    p[2] = 1'b0;
    p[3] = a[1] & a[0];
  end
endmodule
