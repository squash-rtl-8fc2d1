// Healing stage of a square-accumulate: exact adder plus accumulator.
//
// Each valid beat carries N_IN unsigned terms (the outputs of the squarers
// of a mirror pair, or of several pairs). They are added exactly and the sum
// is accumulated over a vector, so that errors of opposite sign coming from
// the two members of a mirror pair cancel in the total. A beat with
// in_first set restarts the sum; a beat with in_last set ends the vector,
// and out_valid is high for one cycle with acc holding the complete sum.
//
// Timing: one register stage. acc updates on the clock edge that takes a
// valid beat, so a vector of K beats has its result one cycle after its
// last beat and a new vector can follow without a gap. The sum wraps modulo
// 2^ACC_W; the default 32 bits hold vectors of up to 65,000 exact 8-bit
// squares. Synchronous active-low reset clears acc and out_valid. Widths,
// framing flags and reset are this design's choices.
module healing_accumulator #(
  parameter int unsigned IN_W  = 17,
  parameter int unsigned N_IN  = 2,
  parameter int unsigned ACC_W = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic                      in_first,
  input  logic                      in_last,
  input  logic [N_IN-1:0][IN_W-1:0] terms,
  output logic [ACC_W-1:0]          acc,
  output logic                      out_valid
);
  logic [ACC_W-1:0] beat_sum;

  always_comb begin
    beat_sum = '0;
    for (int unsigned k = 0; k < N_IN; k++) begin
      beat_sum = beat_sum + ACC_W'(terms[k]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid & in_last;
      if (in_valid) begin
        acc <= (in_first ? '0 : acc) + beat_sum;
      end
    end
  end

  // Framing flags are only meaningful on a valid beat.
  a_flags_need_valid : assert property (@(posedge clk) disable iff (!rst_n)
    (in_first | in_last) |-> in_valid)
    else $error("healing_accumulator: first/last flag without in_valid");
endmodule
