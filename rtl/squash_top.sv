// Top level: three self-healing square-accumulate units side by side.
//
//  sh_*  the main design, a logic-pruned SAC with an 8x8 absolute
//        approximate squarer mirror pair in configuration SH7 (sac_sh);
//  tr_*  the truncated mirror-error SAC, 8-bit two's complement inputs,
//        1 bit truncated, MEE1 assignment (sac_trunc);
//  cx_*  the complex SAC for gain calibration, two squarer pairs in
//        configuration SH3 (complex_sac).
// Each unit has its own input stream (valid/first/last beat carrying two
// vector elements) and its own result, valid one cycle after the beat
// flagged last. The three share only clock and synchronous active-low reset;
// grouping them in one top is this design's choice.
module squash_top
  import squash_pkg::*;
#(
  parameter int unsigned ACC_W = ACC_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  sac_in_t          sh_in,
  output logic [ACC_W-1:0] sh_acc,
  output logic             sh_out_valid,
  input  sac_in_t          tr_in,
  output logic [ACC_W-1:0] tr_acc,
  output logic             tr_out_valid,
  input  cx_in_t           cx_in,
  output logic [ACC_W-1:0] cx_acc,
  output logic             cx_out_valid
);
  sac_sh #(.APX_MASK(CFG_SH7), .MIRROR(1'b1), .ACC_W(ACC_W)) u_sac_sh (
    .clk, .rst_n,
    .in_valid(sh_in.valid), .in_first(sh_in.first), .in_last(sh_in.last),
    .a_odd(sh_in.a_odd), .a_even(sh_in.a_even),
    .acc(sh_acc), .out_valid(sh_out_valid)
  );

  sac_trunc #(.N(8), .T(1), .MEE2(1'b0), .ACC_W(ACC_W)) u_sac_trunc (
    .clk, .rst_n,
    .in_valid(tr_in.valid), .in_first(tr_in.first), .in_last(tr_in.last),
    .a_odd(tr_in.a_odd), .a_even(tr_in.a_even),
    .acc(tr_acc), .out_valid(tr_out_valid)
  );

  complex_sac #(.APX_MASK(CFG_SH3), .MIRROR(1'b1), .ACC_W(ACC_W)) u_complex_sac (
    .clk, .rst_n,
    .in_valid(cx_in.valid), .in_first(cx_in.first), .in_last(cx_in.last),
    .zr_odd(cx_in.zr_odd), .zr_even(cx_in.zr_even),
    .zi_odd(cx_in.zi_odd), .zi_even(cx_in.zi_even),
    .acc(cx_acc), .out_valid(cx_out_valid)
  );
endmodule
