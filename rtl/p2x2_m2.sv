// Approximate 2x2 multiplier M2, the absolute mirror of M1 (positive error).
//
// Exact except 3*3, which gives 11 (4'b1011) instead of 9 (error +2, the
// additive inverse of M1's error). p0 and p1 are as in M1; p2 = a1b1 unless
// a0b0 is also set (only 3*3), in which case p3 is set instead.
// Combinational.
//
// The error case (3*3 -> 11) follows the original design; the equations
// are derived here from the truth table.
module p2x2_m2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic hh, ll;
  always_comb begin
    hh   = a[1] & b[1];
    ll   = a[0] & b[0];
    p[0] = ll;
    p[1] = (a[1] & b[0]) | (a[0] & b[1]);
    p[2] = hh & ~ll;
    p[3] = hh & ll;
  end
endmodule
