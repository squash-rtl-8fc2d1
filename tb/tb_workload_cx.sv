// Workload testbench for the complex square-accumulate (|Z|^2 summed over
// a vector, as used by a least-squares gain calibration). Five complex
// SAC units run side by side on the same stream: exact (ACCU), Convent
// and SH1 (LS element 1 approximated), Convent3 and SH3 (LS elements
// 0..2 approximated). The Convent variants use the same element masks
// with MIRROR = 0, so both squarers of a pair err the same way; the SH
// variants use the mirror pair.
//
// Real and imaginary parts are 8-bit two's complement, drawn from an
// approximately normal distribution (sum of twelve uniforms) with mean 0
// and standard deviation 40, clipped to -128..127. The calibration data
// itself is not available, so this is a synthetic stand-in of the same
// shape. 200 vectors of 1000 complex samples (500 beats each) are run.
//
// Checks: the ACCU unit equals the exact sum of |Zr|^2 + |Zi|^2 for every
// vector, every result arrives one cycle after its last beat, and the
// mean squared error of SH1 and SH3 is below that of Convent and
// Convent3 respectively (the ordering of the calibration study).
module tb_workload_cx;
  import squash_pkg::*;
  localparam int NV = 200;     // vectors
  localparam int NB = 500;     // beats per vector (two complex samples each)
  localparam int ND = 5;       // designs

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [7:0] zr_odd = 0, zr_even = 0, zi_odd = 0, zi_even = 0;
  logic [31:0] acc [ND];
  logic        ov  [ND];
  int checks = 0, failures = 0, cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  complex_sac #(.APX_MASK(CFG_ACCU), .MIRROR(1'b0)) u_accu (.clk, .rst_n, .in_valid, .in_first,
    .in_last, .zr_odd, .zr_even, .zi_odd, .zi_even, .acc(acc[0]), .out_valid(ov[0]));
  complex_sac #(.APX_MASK(CFG_SH1), .MIRROR(1'b0)) u_conv1 (.clk, .rst_n, .in_valid, .in_first,
    .in_last, .zr_odd, .zr_even, .zi_odd, .zi_even, .acc(acc[1]), .out_valid(ov[1]));
  complex_sac #(.APX_MASK(CFG_SH1), .MIRROR(1'b1)) u_sh1 (.clk, .rst_n, .in_valid, .in_first,
    .in_last, .zr_odd, .zr_even, .zi_odd, .zi_even, .acc(acc[2]), .out_valid(ov[2]));
  complex_sac #(.APX_MASK(CFG_SH3), .MIRROR(1'b0)) u_conv3 (.clk, .rst_n, .in_valid, .in_first,
    .in_last, .zr_odd, .zr_even, .zi_odd, .zi_even, .acc(acc[3]), .out_valid(ov[3]));
  complex_sac #(.APX_MASK(CFG_SH3), .MIRROR(1'b1)) u_sh3 (.clk, .rst_n, .in_valid, .in_first,
    .in_last, .zr_odd, .zr_even, .zi_odd, .zi_even, .acc(acc[4]), .out_valid(ov[4]));

  // approximately normal 8-bit signed sample, mean 0, sigma 40
  function automatic logic [7:0] cnorm();
    int s = 0;
    for (int i = 0; i < 12; i++) s += int'($urandom_range(0, 4095));
    s = ((s - 6 * 4096) * 40) / 4096;
    if (s > 127)  s = 127;
    if (s < -128) s = -128;
    return 8'(s);
  endfunction

  function automatic longint sq(input logic [7:0] v);
    longint x = longint'($signed(v));
    return x * x;
  endfunction

  longint exact_q[$];
  int     last_at_q[$];
  real    se [ND];
  int     nres = 0;

  // result monitor
  always @(posedge clk) begin
    #1;
    if (ov[0]) begin
      longint ex;
      int     due;
      ex  = exact_q.pop_front();
      due = last_at_q.pop_front();
      checks++;
      if (longint'(acc[0]) != ex) begin
        failures++;
        $display("FAIL exact unit: got %0d expected %0d", acc[0], ex);
      end
      checks++;
      if (cycles != due + 1) begin
        failures++;
        $display("FAIL latency: result at cycle %0d, last beat at %0d", cycles, due);
      end
      for (int d = 0; d < ND; d++) begin
        real e;
        if (!ov[d]) begin
          failures++;
          $display("FAIL design %0d out_valid missing", d);
        end
        e = real'(longint'(acc[d]) - ex);
        se[d] += e * e;
      end
      nres++;
    end
  end

  initial begin
    repeat (NV * NB * 2 + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real mse [ND];
    for (int d = 0; d < ND; d++) se[d] = 0.0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int v = 0; v < NV; v++) begin
      automatic longint ex = 0;
      for (int b = 0; b < NB; b++) begin
        logic [7:0] a, c, e, f;
        a = cnorm(); c = cnorm(); e = cnorm(); f = cnorm();
        ex += sq(a) + sq(c) + sq(e) + sq(f);
        zr_odd  <= a; zr_even <= c;
        zi_odd  <= e; zi_even <= f;
        in_valid <= 1; in_first <= (b == 0); in_last <= (b == NB - 1);
        @(posedge clk);
        if (b == NB - 1) begin
          exact_q.push_back(ex);
          last_at_q.push_back(cycles);
        end
      end
      // one idle cycle between some vectors to vary the stream
      if (v[0]) begin
        in_valid <= 0; in_first <= 0; in_last <= 0;
        @(posedge clk);
      end
    end
    in_valid <= 0; in_first <= 0; in_last <= 0;
    repeat (4) @(posedge clk);

    checks++;
    if (nres != NV) begin
      failures++;
      $display("FAIL %0d results for %0d vectors", nres, NV);
    end
    for (int d = 0; d < ND; d++) mse[d] = se[d] / real'(nres);
    $display("MSE per vector: Accu %g  Convent %g  SH1 %g  Convent3 %g  SH3 %g",
             mse[0], mse[1], mse[2], mse[3], mse[4]);
    checks++;
    if (!(mse[2] < mse[1])) begin
      failures++;
      $display("FAIL SH1 MSE not below Convent");
    end
    checks++;
    if (!(mse[4] < mse[3])) begin
      failures++;
      $display("FAIL SH3 MSE not below Convent3");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
