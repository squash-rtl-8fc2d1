// Shared types and constants of the self-healing square-accumulate (SAC) design.
//
// err_pol_e selects which member of an absolute approximate mirror pair an
// approximate 2x2 element is: ERR_NEG elements (S1: 2*2->0, M1: 3*3->7) err
// below the exact result, ERR_POS elements (S2: 2*2->8, M2: 3*3->11) err above
// it by exactly the same amount, so one squarer of each kind summed by an
// exact adder cancels the error.
//
// The 10-bit approximation masks name the ten 2x2 elements of the 8x8 squarer
// (bit 0 = least significant square element, numbering as in sq8x8). The
// named configurations are the ones evaluated for the SAC; SH7 is the
// default of the design. Stream structs carry one beat of a vector into a SAC.
package squash_pkg;

  typedef enum logic {
    ERR_NEG = 1'b0,  // S1 / M1: result too small
    ERR_POS = 1'b1   // S2 / M2: result too large
  } err_pol_e;

  // Sq8x8 element order (bit k of an approximation mask):
  //   0 Sq2x2(a1a0) x1    1 P2x2(a1a0,a3a2) x8   2 Sq2x2(a3a2) x16
  //   3 P2x2(a1a0,a5a4) x1   4 P2x2(a1a0,a7a6) x4
  //   5 P2x2(a5a4,a3a2) x4   6 P2x2(a3a2,a7a6) x16   (block shifted by 5)
  //   7 Sq2x2(a5a4) x1    8 P2x2(a5a4,a7a6) x8   9 Sq2x2(a7a6) x16
  //                                                  (block shifted by 8)

  // Approximation configurations of an Sq8x8 pair
  localparam logic [9:0] CFG_ACCU = 10'b00_0000_0000;  // all elements exact
  localparam logic [9:0] CFG_SH1  = 10'b00_0000_0010;  // least significant P2x2
  localparam logic [9:0] CFG_SH3  = 10'b00_0000_0111;  // + two least significant Sq2x2
  localparam logic [9:0] CFG_SH7  = 10'b00_0111_1111;  // + the four P2x2 of P4x4

  // Widths. An ERR_POS squarer can exceed (2^8-1)^2, so its result is one
  // bit wider than the 16-bit exact square.
  localparam int unsigned SQ8_OUT_W = 17;
  localparam int unsigned ACC_W_DEF = 32;

  // One beat of an unsigned (or two's complement) SAC input stream: the
  // odd-indexed element A_i and the even-indexed element A_i+1 of a vector.
  typedef struct packed {
    logic       valid;
    logic       first;  // first beat of a vector: the sum restarts
    logic       last;   // last beat: the sum is complete one cycle later
    logic [7:0] a_odd;
    logic [7:0] a_even;
  } sac_in_t;

  // One beat of a complex SAC input stream: Z_k and Z_k+1, two's complement.
  typedef struct packed {
    logic       valid;
    logic       first;
    logic       last;
    logic [7:0] zr_odd;
    logic [7:0] zr_even;
    logic [7:0] zi_odd;
    logic [7:0] zi_even;
  } cx_in_t;

endpackage
