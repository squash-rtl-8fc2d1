// Accurate 2x2 squarer (reference element of the recursive squarer).
//
// Computes p = a*a for a 2-bit unsigned a in pure logic: the square of a
// 2-bit number has p1 = 0 always, p0 = a0, p2 = a1 & ~a0 (a = 2) and
// p3 = a1 & a0 (a = 3). Combinational, no clock.
//
// The element and its role follow the original design; the equations are
// written here from the truth table.
module sq2x2_exact (
  input  logic [1:0] a,
  output logic [3:0] p
);
  always_comb begin
    p[0] = a[0];
    p[1] = 1'b0;
    p[2] = a[1] & ~a[0];
    p[3] = a[1] & a[0];
  end
endmodule
