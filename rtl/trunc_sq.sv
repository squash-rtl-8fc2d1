// Sign-forcing truncated squarer, one member of a truncated mirror pair.
//
// Squares an N-bit two's complement input after dropping its T least
// significant bits. Since a square does not depend on the sign, the input
// is first forced to one sign: NEG = 0 squares +|A| (Sq1), NEG = 1 squares
// -|A| (Sq2). Truncation is an arithmetic right shift (rounds towards minus
// infinity), so Sq1 always errs low and Sq2 always errs high: for A = 25,
// N = 8, T = 1, Sq1 gives 12^2 << 2 = 576 and Sq2 gives 13^2 << 2 = 676
// against 625. The 2(N-T)-bit square is shifted left by 2T (zeros
// appended) to give the 2N-bit result.
//
// |A| is formed one bit wider than A so that -2^(N-1) is handled like every
// other input. Combinational.
//
// Sign forcing, truncation and zero appending follow the original design;
// the wider magnitude for -2^(N-1) is this design's choice.
module trunc_sq #(
  parameter int unsigned N   = 8,
  parameter int unsigned T   = 1,
  parameter bit          NEG = 1'b0
) (
  input  logic [N-1:0]   a,   // two's complement
  output logic [2*N-1:0] sq
);
  localparam int unsigned TW = N + 1 - T;  // width of the truncated operand

  logic signed [N:0]      a_ext, forced;
  logic signed [TW-1:0]   trunc;
  logic signed [2*TW-1:0] prod;

  always_comb begin
    a_ext  = $signed({a[N-1], a});
    // force the sign: +|A| for Sq1, -|A| for Sq2
    if (NEG) forced = a_ext[N] ? a_ext : -a_ext;
    else     forced = a_ext[N] ? -a_ext : a_ext;
    trunc = TW'(forced >>> T);
    prod  = trunc * trunc;
    sq    = (2*N)'(prod) << (2*T);
  end
endmodule
