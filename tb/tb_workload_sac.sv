// Workload testbench: quality of self-healing against conventional
// approximate SAC on the evaluated input sets.
//
// Five sac_sh units run on the same stream: SH1, SH3 and SH7 (mirror pairs)
// and the conventional Convent (SH1 mask, no mirror) and Convent3 (SH3
// mask, no mirror). Inputs are 8-bit unsigned, uniform or approximately
// normal (mean 128, sigma 22.5), as vectors of 124 elements (small set,
// 100 vectors) and of 10,000 elements (large set, 1000 vectors). Every result is checked against the reference
// model; the squared error against the exact sum is accumulated per design
// and MSE(dB) = 10*log10(sum err^2 / vectors) is printed. The self-healing
// design must beat its conventional counterpart (SH1 vs Convent, SH3 vs
// Convent3) on every set, and SH7 must beat Convent3 on the large sets.
module tb_workload_sac;
  import squash_pkg::*;
  import squash_ref_pkg::*;

  localparam int NDES = 5;
  localparam int LARGE_VEC = 1000;
  localparam logic [9:0] MASK [NDES] = '{CFG_SH1, CFG_SH1, CFG_SH3, CFG_SH3, CFG_SH7};
  localparam bit         MIRR [NDES] = '{1'b0, 1'b1, 1'b0, 1'b1, 1'b1};
  localparam string      NAME [NDES] = '{"Convent", "SH1", "Convent3", "SH3", "SH7"};

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [7:0] a_odd = 0, a_even = 0;
  logic [31:0] acc [NDES];
  logic [NDES-1:0] ov;
  int checks = 0, failures = 0;
  longint refv [NDES];
  longint exact_v;
  real se [NDES];
  int nvec;

  always #5 clk = ~clk;

  for (genvar d = 0; d < NDES; d++) begin : g_des
    sac_sh #(.APX_MASK(MASK[d]), .MIRROR(MIRR[d])) u_sac (
      .clk, .rst_n, .in_valid, .in_first, .in_last, .a_odd, .a_even,
      .acc(acc[d]), .out_valid(ov[d]));
  end

  initial begin
    repeat (12000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (rst_n && ov[0]) for (int d = 0; d < NDES; d++) begin
      real e;
      checks++;
      if (acc[d] !== 32'(refv[d]) || !ov[d]) begin
        failures++;
        $display("FAIL %s acc=%0d expected %0d", NAME[d], acc[d], refv[d]);
      end
      e = real'(refv[d] - exact_v);
      se[d] += e * e;
    end
  end

  function automatic int sample(input bit normal);
    return normal ? norm8(128.0, 22.5) : $urandom_range(0, 255);
  endfunction

  task automatic run_set(input string label, input bit normal, input int vecs, input int elems,
                         input bit is_large);
    for (int d = 0; d < NDES; d++) se[d] = 0.0;
    for (int v = 0; v < vecs; v++) begin
      automatic longint s [NDES] = '{default: 0};
      automatic longint ex = 0;
      for (int k = 0; k < elems / 2; k++) begin
        int x, y;
        x = sample(normal);
        y = sample(normal);
        in_valid = 1; in_first = (k == 0); in_last = (k == elems / 2 - 1);
        a_odd = 8'(x); a_even = 8'(y);
        for (int d = 0; d < NDES; d++) s[d] += sq8_ref(x, MASK[d], MIRR[d]) + sq8_ref(y, MASK[d], 0);
        ex += x * x + y * y;
        if (k == elems / 2 - 1) begin
          refv = s;
          exact_v = ex;
        end
        @(posedge clk); #1;
      end
      in_valid = 0; in_first = 0; in_last = 0;
      @(posedge clk); #1;
    end
    $display("%s (%0d vectors x %0d elements): MSE dB", label, vecs, elems);
    for (int d = 0; d < NDES; d++)
      $display("  %-9s %8.2f", NAME[d], (se[d] > 0.0) ? 10.0 * $log10(se[d] / vecs) : -999.0);
    checks += 2;
    if (!(se[1] < se[0])) begin failures++; $display("FAIL %s: SH1 not better than Convent", label); end
    if (!(se[3] < se[2])) begin failures++; $display("FAIL %s: SH3 not better than Convent3", label); end
    if (is_large) begin
      checks++;
      if (!(se[4] < se[2])) begin failures++; $display("FAIL %s: SH7 not better than Convent3", label); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    run_set("Unif_S", 0, 100, 124, 0);
    run_set("Norm_S", 1, 100, 124, 0);
    run_set("Unif_L", 0, LARGE_VEC, 10000, 1);
    run_set("Norm_L", 1, LARGE_VEC, 10000, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
