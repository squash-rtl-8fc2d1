// Accurate 2x2 multiplier (reference element of the recursive multiplier).
//
// p = a*b for 2-bit unsigned operands: four partial-product ANDs and a
// half-adder chain (p1 = a1b0 ^ a0b1, carry into p2/p3). Combinational.
//
// The element and its role follow the original design; the equations are
// written here from the truth table.
module p2x2_exact (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic c1;
  always_comb begin
    c1   = a[1] & b[0] & a[0] & b[1];
    p[0] = a[0] & b[0];
    p[1] = (a[1] & b[0]) ^ (a[0] & b[1]);
    p[2] = (a[1] & b[1]) ^ c1;
    p[3] = a[1] & b[1] & c1;
  end
endmodule
