// Self-checking testbench for the self-healing SAC (default SH7, mirror).
// Drives vectors of 8-bit unsigned elements, two per beat, with idle gaps,
// and checks each result against the reference model (Sq1: S2/M2 errors on
// the odd element, Sq2: S1/M1 errors on the even element) and its timing
// (result one cycle after the last beat). A conventional instance
// (MIRROR = 0, both squarers S1/M1) runs on the same stream and is checked
// too. Vectors whose two lanes carry the same values must come out exact
// in the self-healing unit (complete cancellation) but not in the
// conventional one.
module tb_sac_sh;
  import squash_pkg::*;
  import squash_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [7:0] a_odd = 0, a_even = 0;
  logic [31:0] acc, acc_c;
  logic out_valid, out_valid_c;
  int checks = 0, failures = 0, cycles = 0;
  longint ref_sh, ref_cv, exact;
  int expect_at = -1, n_cancel = 0, n_conv_err = 0, n_err_beats = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  sac_sh dut (.clk, .rst_n, .in_valid, .in_first, .in_last, .a_odd, .a_even, .acc, .out_valid);
  sac_sh #(.APX_MASK(CFG_SH7), .MIRROR(1'b0)) dut_c (
    .clk, .rst_n, .in_valid, .in_first, .in_last, .a_odd, .a_even, .acc(acc_c), .out_valid(out_valid_c));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    #1;
    checks++;
    if (out_valid !== (cycles == expect_at) || out_valid_c !== out_valid) begin
      failures++;
      $display("FAIL out_valid=%0b at cycle %0d, expected at %0d", out_valid, cycles, expect_at);
    end
    if (out_valid) begin
      checks += 2;
      if (acc !== 32'(ref_sh)) begin
        failures++;
        $display("FAIL SH acc=%0d expected %0d (exact %0d)", acc, ref_sh, exact);
      end
      if (acc_c !== 32'(ref_cv)) begin
        failures++;
        $display("FAIL conventional acc=%0d expected %0d", acc_c, ref_cv);
      end
    end
  end

  task automatic run_vector(input int beats, input bit equal_lanes);
    longint s_sh = 0, s_cv = 0, s_ex = 0;
    for (int k = 0; k < beats; k++) begin
      int x, y;
      if ($urandom_range(0, 7) == 0) begin
        in_valid = 0; in_first = 0; in_last = 0;
        @(posedge clk); #1;
      end
      x = $urandom_range(0, 255);
      y = equal_lanes ? x : $urandom_range(0, 255);
      in_valid = 1; in_first = (k == 0); in_last = (k == beats - 1);
      a_odd = 8'(x); a_even = 8'(y);
      s_sh += sq8_ref(x, CFG_SH7, 1) + sq8_ref(y, CFG_SH7, 0);
      s_cv += sq8_ref(x, CFG_SH7, 0) + sq8_ref(y, CFG_SH7, 0);
      s_ex += x * x + y * y;
      if (sq8_err(x, CFG_SH7, 1) != 0 || sq8_err(y, CFG_SH7, 0) != 0) n_err_beats++;
      if (k == beats - 1) begin
        ref_sh = s_sh; ref_cv = s_cv; exact = s_ex;
        expect_at = cycles + 1;
      end
      @(posedge clk); #1;
    end
    in_valid = 0; in_first = 0; in_last = 0;
    if (equal_lanes) begin
      checks++;
      if (s_sh != s_ex) begin
        failures++;
        $display("FAIL equal lanes did not cancel: %0d vs %0d", s_sh, s_ex);
      end else n_cancel++;
      if (s_cv != s_ex) n_conv_err++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    for (int v = 0; v < 40; v++) run_vector(62, 0);   // 124-element vectors
    for (int v = 0; v < 20; v++) run_vector($urandom_range(1, 30), 1);
    @(posedge clk); #1;
    run_vector(1, 0);
    repeat (3) @(posedge clk);
    checks++;
    if (n_cancel == 0 || n_conv_err == 0 || n_err_beats == 0) begin
      failures++;
      $display("FAIL mechanism not exercised: cancel=%0d conv_err=%0d err_beats=%0d", n_cancel, n_conv_err, n_err_beats);
    end
    $display("beats with approximation error=%0d cancelled vectors=%0d", n_err_beats, n_cancel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
