// Self-checking testbench for the truncated mirror-error SAC.
// Random 8-bit two's complement vectors (including -128) go to an MEE1
// unit (default) and an MEE2 unit. Each result is checked against the
// reference (odd element squared as floor(|A|/2)^2*4 in MEE1, even element
// as ceil(|A|/2)^2*4; swapped in MEE2) and must arrive one cycle after the
// last beat. Also checks that the self-healing error is smaller in
// magnitude than the error of squaring every element as positive.
module tb_sac_trunc;
  import squash_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [7:0] a_odd = 0, a_even = 0;
  logic [31:0] acc1, acc2;
  logic ov1, ov2;
  int checks = 0, failures = 0, cycles = 0, expect_at = -1, n_min = 0;
  longint r1, r2;
  longint tot_err_mee = 0, tot_err_pos = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  sac_trunc dut (.clk, .rst_n, .in_valid, .in_first, .in_last, .a_odd, .a_even, .acc(acc1), .out_valid(ov1));
  sac_trunc #(.N(8), .T(1), .MEE2(1'b1)) dut2 (
    .clk, .rst_n, .in_valid, .in_first, .in_last, .a_odd, .a_even, .acc(acc2), .out_valid(ov2));

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
    if (ov1 !== (cycles == expect_at) || ov2 !== ov1) begin
      failures++;
      $display("FAIL out_valid at cycle %0d, expected at %0d", cycles, expect_at);
    end
    if (ov1) begin
      checks += 2;
      if (acc1 !== 32'(r1)) begin failures++; $display("FAIL MEE1 acc=%0d expected %0d", acc1, r1); end
      if (acc2 !== 32'(r2)) begin failures++; $display("FAIL MEE2 acc=%0d expected %0d", acc2, r2); end
    end
  end

  initial begin
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    for (int v = 0; v < 60; v++) begin
      automatic int beats = $urandom_range(1, 62);
      automatic longint s1 = 0, s2 = 0, ex = 0, sp = 0;
      for (int k = 0; k < beats; k++) begin
        int x, y;
        x = int'($urandom_range(0, 255)) - 128;
        y = int'($urandom_range(0, 255)) - 128;
        if (v == 0 && k == 0) begin x = -128; y = -128; n_min++; end
        in_valid = 1; in_first = (k == 0); in_last = (k == beats - 1);
        a_odd = 8'(x); a_even = 8'(y);
        s1 += trunc_ref(x, 1, 0) + trunc_ref(y, 1, 1);
        s2 += trunc_ref(x, 1, 1) + trunc_ref(y, 1, 0);
        sp += trunc_ref(x, 1, 0) + trunc_ref(y, 1, 0);
        ex += x * x + y * y;
        if (k == beats - 1) begin r1 = s1; r2 = s2; expect_at = cycles + 1; end
        @(posedge clk); #1;
      end
      tot_err_mee += (s1 > ex) ? s1 - ex : ex - s1;
      tot_err_pos += ex - sp;
      in_valid = 0; in_first = 0; in_last = 0;
      if ($urandom_range(0, 1) == 0) begin @(posedge clk); #1; end
    end
    repeat (3) @(posedge clk);
    checks++;
    if (tot_err_mee >= tot_err_pos || n_min == 0) begin
      failures++;
      $display("FAIL self-healing error %0d not below all-positive error %0d", tot_err_mee, tot_err_pos);
    end
    $display("sum |error|: MEE1 %0d, all-positive %0d", tot_err_mee, tot_err_pos);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
