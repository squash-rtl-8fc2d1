// Self-checking testbench for the complex self-healing SAC (default SH3).
// Random complex vectors with 8-bit two's complement parts (including
// -128) are accumulated; each result is compared with the reference
// sum of the modelled approximate squares of the magnitudes (real and
// imaginary odd parts through positive-error squarers, even parts
// through negative-error squarers) and must arrive one cycle after the
// last beat. Vectors with Z_k+1 = Z_k must come out exact.
module tb_complex_sac;
  import squash_pkg::*;
  import squash_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [7:0] zr_odd = 0, zr_even = 0, zi_odd = 0, zi_even = 0;
  logic [31:0] acc;
  logic out_valid;
  int checks = 0, failures = 0, cycles = 0, expect_at = -1, n_cancel = 0;
  longint r;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  complex_sac dut (.clk, .rst_n, .in_valid, .in_first, .in_last,
                   .zr_odd, .zr_even, .zi_odd, .zi_even, .acc, .out_valid);

  function automatic int mag(input int x);
    return x < 0 ? -x : x;
  endfunction

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
    if (out_valid !== (cycles == expect_at)) begin
      failures++;
      $display("FAIL out_valid at cycle %0d, expected at %0d", cycles, expect_at);
    end
    if (out_valid) begin
      checks++;
      if (acc !== 32'(r)) begin failures++; $display("FAIL acc=%0d expected %0d", acc, r); end
    end
  end

  initial begin
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    for (int v = 0; v < 60; v++) begin
      automatic int beats = $urandom_range(1, 40);
      automatic bit same = (v % 4 == 3);
      automatic longint s = 0, ex = 0;
      for (int k = 0; k < beats; k++) begin
        int r0, r1, i0, i1;
        r0 = int'($urandom_range(0, 255)) - 128;
        i0 = int'($urandom_range(0, 255)) - 128;
        r1 = same ? r0 : int'($urandom_range(0, 255)) - 128;
        i1 = same ? i0 : int'($urandom_range(0, 255)) - 128;
        if (v == 0 && k == 0) begin r0 = -128; i1 = -128; end
        in_valid = 1; in_first = (k == 0); in_last = (k == beats - 1);
        zr_odd = 8'(r0); zr_even = 8'(r1); zi_odd = 8'(i0); zi_even = 8'(i1);
        s += sq8_ref(mag(r0), CFG_SH3, 1) + sq8_ref(mag(r1), CFG_SH3, 0)
           + sq8_ref(mag(i0), CFG_SH3, 1) + sq8_ref(mag(i1), CFG_SH3, 0);
        ex += r0 * r0 + r1 * r1 + i0 * i0 + i1 * i1;
        if (k == beats - 1) begin r = s; expect_at = cycles + 1; end
        @(posedge clk); #1;
      end
      in_valid = 0; in_first = 0; in_last = 0;
      if (same) begin
        checks++;
        if (s != ex) begin failures++; $display("FAIL equal samples did not cancel"); end
        else n_cancel++;
      end
      if ($urandom_range(0, 1) == 0) begin @(posedge clk); #1; end
    end
    repeat (3) @(posedge clk);
    $display("cancelled vectors=%0d", n_cancel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
