// Workload testbench for the truncated mirror-error SAC (1-bit truncation
// of 8-bit two's complement inputs).
//
// Input sets: uniform over -128..127 and approximately normal with mean 0,
// 10, 20 and 30 (sigma 22.5, clipped to the 8-bit range), each as 1000
// vectors of 10,000 elements. The MEE1 and MEE2 units are checked against
// the reference on every vector. Their MSE(dB) against the exact sum is
// compared with two designs modelled in software only: squaring the
// truncated operand as it comes (conventional) and squaring every operand
// as positive (all-positive, zeros appended). MEE1 and MEE2 must beat the
// all-positive design on every set and the conventional design on the sets
// with non-zero mean.
module tb_workload_trunc;
  import squash_ref_pkg::*;

  localparam int VECS = 1000;
  localparam int ELEMS = 10000;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [7:0] a_odd = 0, a_even = 0;
  logic [31:0] acc1, acc2;
  logic ov1, ov2;
  int checks = 0, failures = 0;
  longint r1, r2, rconv, rpos, rex;
  real se1, se2, sec, sep;

  always #5 clk = ~clk;

  sac_trunc u_mee1 (.clk, .rst_n, .in_valid, .in_first, .in_last, .a_odd, .a_even, .acc(acc1), .out_valid(ov1));
  sac_trunc #(.N(8), .T(1), .MEE2(1'b1)) u_mee2 (
    .clk, .rst_n, .in_valid, .in_first, .in_last, .a_odd, .a_even, .acc(acc2), .out_valid(ov2));

  initial begin
    repeat (30000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (rst_n && ov1) begin
      checks += 2;
      if (acc1 !== 32'(r1) || acc2 !== 32'(r2) || !ov2) begin
        failures++;
        $display("FAIL acc1=%0d/%0d acc2=%0d/%0d", acc1, r1, acc2, r2);
      end
      se1 += real'(r1 - rex) ** 2;
      se2 += real'(r2 - rex) ** 2;
      sec += real'(rconv - rex) ** 2;
      sep += real'(rpos - rex) ** 2;
    end
  end

  function automatic int sample(input int mean);
    if (mean < 0) return int'($urandom_range(0, 255)) - 128;
    return norm8(real'(mean) + 128.0, 22.5) - 128;
  endfunction

  // conventional: arithmetic truncation of the operand as it comes
  function automatic longint conv_sq(input int x);
    longint q = longint'(x) >>> 1;
    return (q * q) << 2;
  endfunction

  function automatic real db(input real s);
    return 10.0 * $log10(s / VECS);
  endfunction

  task automatic run_set(input string label, input int mean);
    se1 = 0; se2 = 0; sec = 0; sep = 0;
    for (int v = 0; v < VECS; v++) begin
      automatic longint s1 = 0, s2 = 0, sc = 0, sp = 0, ex = 0;
      for (int k = 0; k < ELEMS / 2; k++) begin
        int x, y;
        x = sample(mean);
        y = sample(mean);
        in_valid = 1; in_first = (k == 0); in_last = (k == ELEMS / 2 - 1);
        a_odd = 8'(x); a_even = 8'(y);
        s1 += trunc_ref(x, 1, 0) + trunc_ref(y, 1, 1);
        s2 += trunc_ref(x, 1, 1) + trunc_ref(y, 1, 0);
        sc += conv_sq(x) + conv_sq(y);
        sp += trunc_ref(x, 1, 0) + trunc_ref(y, 1, 0);
        ex += x * x + y * y;
        if (k == ELEMS / 2 - 1) begin r1 = s1; r2 = s2; rconv = sc; rpos = sp; rex = ex; end
        @(posedge clk); #1;
      end
      in_valid = 0; in_first = 0; in_last = 0;
      @(posedge clk); #1;
    end
    $display("%-8s MSE dB: MEE1 %7.2f  MEE2 %7.2f  conventional %7.2f  all-positive %7.2f",
             label, db(se1), db(se2), db(sec), db(sep));
    checks += 2;
    if (!(se1 < sep && se2 < sep)) begin failures++; $display("FAIL %s: MEE not better than all-positive", label); end
    if (mean > 0 && !(se1 < sec && se2 < sec)) begin
      failures++; $display("FAIL %s: MEE not better than conventional", label);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    run_set("Uniform", -1);
    run_set("Norm_0", 0);
    run_set("Norm_10", 10);
    run_set("Norm_20", 20);
    run_set("Norm_30", 30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
