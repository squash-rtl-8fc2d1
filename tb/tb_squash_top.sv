// End-to-end self-checking testbench for squash_top at its default
// parameters (no parameter overrides).
//
// Three independent stimulus processes drive the three SAC units at the
// same time with random vectors: the SH7 self-healing unit with 8-bit
// unsigned elements, the truncated MEE1 unit and the SH3 complex unit with
// 8-bit two's complement values. Every result is compared with the
// reference models and must appear one cycle after its last beat. The run
// counts how often each mechanism of the design happened and fails if one
// never did: negative errors from Sq1 and positive errors from its mirror
// Sq2 in one beat, complete cancellation of a vector, a mirror-squarer
// result above 16 bits, the -128 input of the signed units, vector
// restarts back-to-back and after idle gaps, and single-beat vectors.
module tb_squash_top;
  import squash_pkg::*;
  import squash_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  sac_in_t sh_in = '0, tr_in = '0;
  cx_in_t  cx_in = '0;
  logic [31:0] sh_acc, tr_acc, cx_acc;
  logic sh_out_valid, tr_out_valid, cx_out_valid;

  int checks = 0, failures = 0, cycles = 0;
  int sh_at = -1, tr_at = -1, cx_at = -1;
  longint sh_ref, tr_ref, cx_ref;
  int n_sh_vec = 0, n_tr_vec = 0, n_cx_vec = 0;
  int n_both_err = 0, n_cancel = 0, n_wide = 0, n_min_tr = 0, n_min_cx = 0;
  int n_b2b = 0, n_gap = 0, n_single = 0, n_tr_mirror = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  squash_top dut (
    .clk, .rst_n,
    .sh_in, .sh_acc, .sh_out_valid,
    .tr_in, .tr_acc, .tr_out_valid,
    .cx_in, .cx_acc, .cx_out_valid
  );

  function automatic int mag(input int x);
    return x < 0 ? -x : x;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // result monitors
  always @(posedge clk) if (rst_n) begin
    #1;
    checks += 3;
    if (sh_out_valid !== (cycles == sh_at)) begin failures++; $display("FAIL sh timing at %0d", cycles); end
    if (tr_out_valid !== (cycles == tr_at)) begin failures++; $display("FAIL tr timing at %0d", cycles); end
    if (cx_out_valid !== (cycles == cx_at)) begin failures++; $display("FAIL cx timing at %0d", cycles); end
    if (sh_out_valid) begin
      checks++;
      if (sh_acc !== 32'(sh_ref)) begin failures++; $display("FAIL sh acc=%0d expected %0d", sh_acc, sh_ref); end
    end
    if (tr_out_valid) begin
      checks++;
      if (tr_acc !== 32'(tr_ref)) begin failures++; $display("FAIL tr acc=%0d expected %0d", tr_acc, tr_ref); end
    end
    if (cx_out_valid) begin
      checks++;
      if (cx_acc !== 32'(cx_ref)) begin failures++; $display("FAIL cx acc=%0d expected %0d", cx_acc, cx_ref); end
    end
  end

  task automatic drive_sh(input int nvec);
    for (int v = 0; v < nvec; v++) begin
      automatic int beats = (v % 7 == 6) ? 1 : $urandom_range(2, 62);
      automatic bit same = (v % 5 == 4);
      automatic longint s = 0, ex = 0;
      if (beats == 1) n_single++;
      for (int k = 0; k < beats; k++) begin
        int x, y;
        if ($urandom_range(1, 9) == 1) begin
          sh_in.valid = 0; sh_in.first = 0; sh_in.last = 0;
          n_gap++;
          @(posedge clk); #1;
        end
        x = $urandom_range(0, 255);
        y = same ? x : $urandom_range(0, 255);
        if (v == 1 && k == 0) x = 255;
        sh_in.valid = 1; sh_in.first = (k == 0); sh_in.last = (k == beats - 1);
        sh_in.a_odd = 8'(x); sh_in.a_even = 8'(y);
        s  += sq8_ref(x, CFG_SH7, 1) + sq8_ref(y, CFG_SH7, 0);
        ex += x * x + y * y;
        if (sq8_err(x, CFG_SH7, 1) > 0 && sq8_err(y, CFG_SH7, 0) < 0) n_both_err++;
        if (sq8_ref(x, CFG_SH7, 1) > 65535) n_wide++;
        if (k == beats - 1) begin sh_ref = s; sh_at = cycles + 1; end
        @(posedge clk); #1;
      end
      if (same && s == ex) n_cancel++;
      n_sh_vec++;
      if ($urandom_range(0, 1) == 0) begin
        sh_in.valid = 0; sh_in.first = 0; sh_in.last = 0;
        @(posedge clk); #1;
      end else n_b2b++;
    end
    sh_in.valid = 0; sh_in.first = 0; sh_in.last = 0;
  endtask

  task automatic drive_tr(input int nvec);
    for (int v = 0; v < nvec; v++) begin
      automatic int beats = $urandom_range(1, 62);
      automatic longint s = 0;
      for (int k = 0; k < beats; k++) begin
        int x, y;
        if ($urandom_range(1, 11) == 1) begin
          tr_in.valid = 0; tr_in.first = 0; tr_in.last = 0;
          n_gap++;
          @(posedge clk); #1;
        end
        x = int'($urandom_range(0, 255)) - 128;
        y = int'($urandom_range(0, 255)) - 128;
        if (v == 2 && k == 0) begin x = -128; n_min_tr++; end
        tr_in.valid = 1; tr_in.first = (k == 0); tr_in.last = (k == beats - 1);
        tr_in.a_odd = 8'(x); tr_in.a_even = 8'(y);
        s += trunc_ref(x, 1, 0) + trunc_ref(y, 1, 1);
        if (trunc_ref(x, 1, 0) < x * x && trunc_ref(y, 1, 1) > y * y) n_tr_mirror++;
        if (k == beats - 1) begin tr_ref = s; tr_at = cycles + 1; end
        @(posedge clk); #1;
      end
      n_tr_vec++;
      if ($urandom_range(0, 2) == 0) begin
        tr_in.valid = 0; tr_in.first = 0; tr_in.last = 0;
        @(posedge clk); #1;
      end
    end
    tr_in.valid = 0; tr_in.first = 0; tr_in.last = 0;
  endtask

  task automatic drive_cx(input int nvec);
    for (int v = 0; v < nvec; v++) begin
      automatic int beats = $urandom_range(1, 40);
      automatic longint s = 0;
      for (int k = 0; k < beats; k++) begin
        int r0, r1, i0, i1;
        if ($urandom_range(1, 13) == 1) begin
          cx_in.valid = 0; cx_in.first = 0; cx_in.last = 0;
          n_gap++;
          @(posedge clk); #1;
        end
        r0 = int'($urandom_range(0, 255)) - 128;  r1 = int'($urandom_range(0, 255)) - 128;
        i0 = int'($urandom_range(0, 255)) - 128;  i1 = int'($urandom_range(0, 255)) - 128;
        if (v == 3 && k == 0) begin i1 = -128; n_min_cx++; end
        cx_in.valid = 1; cx_in.first = (k == 0); cx_in.last = (k == beats - 1);
        cx_in.zr_odd = 8'(r0); cx_in.zr_even = 8'(r1); cx_in.zi_odd = 8'(i0); cx_in.zi_even = 8'(i1);
        s += sq8_ref(mag(r0), CFG_SH3, 1) + sq8_ref(mag(r1), CFG_SH3, 0)
           + sq8_ref(mag(i0), CFG_SH3, 1) + sq8_ref(mag(i1), CFG_SH3, 0);
        if (k == beats - 1) begin cx_ref = s; cx_at = cycles + 1; end
        @(posedge clk); #1;
      end
      n_cx_vec++;
      if ($urandom_range(0, 2) == 0) begin
        cx_in.valid = 0; cx_in.first = 0; cx_in.last = 0;
        @(posedge clk); #1;
      end
    end
    cx_in.valid = 0; cx_in.first = 0; cx_in.last = 0;
  endtask

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
    $display("  %-40s %0d", what, n);
  endtask

  initial begin
    repeat (3) @(posedge clk); #1;
    checks++;
    if (sh_out_valid || tr_out_valid || cx_out_valid || sh_acc != 0) begin
      failures++;
      $display("FAIL reset state");
    end
    rst_n = 1;
    fork
      drive_sh(60);
      drive_tr(40);
      drive_cx(40);
    join
    repeat (4) @(posedge clk);
    $display("mechanism counts:");
    need("SH vectors", n_sh_vec);
    need("truncated vectors", n_tr_vec);
    need("complex vectors", n_cx_vec);
    need("beats with Sq1 error > 0 and Sq2 error < 0", n_both_err);
    need("vectors cancelled exactly", n_cancel);
    need("mirror squarer results above 16 bits", n_wide);
    need("truncated: Sq1 low and Sq2 high in a beat", n_tr_mirror);
    need("truncated: -128 input", n_min_tr);
    need("complex: -128 input", n_min_cx);
    need("back-to-back vectors", n_b2b);
    need("idle cycles inside vectors", n_gap);
    need("single-beat vectors", n_single);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
