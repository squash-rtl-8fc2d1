// Self-checking testbench for the healing-stage accumulator.
// Random vectors of random length (including single-beat vectors) with
// random idle gaps and back-to-back vectors; two 17-bit terms per beat.
// Checks every completed sum against a software sum, that out_valid comes
// exactly one cycle after the last beat and at no other time, that reset
// clears the state, and that the sum wraps modulo 2^ACC_W in a narrow copy.
module tb_healing_accumulator;
  localparam int IN_W = 17;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [1:0][IN_W-1:0] terms = '0;
  logic [31:0] acc;
  logic        out_valid;
  logic [7:0]  acc8;
  logic        out_valid8;
  int checks = 0, failures = 0, cycles = 0;
  int unsigned ref_sum, ref8;
  int expect_valid_at = -1, n_vec = 0, n_single = 0, n_gap = 0, n_b2b = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  healing_accumulator dut (.clk, .rst_n, .in_valid, .in_first, .in_last, .terms, .acc, .out_valid);
  healing_accumulator #(.IN_W(IN_W), .N_IN(2), .ACC_W(8)) dut8 (
    .clk, .rst_n, .in_valid, .in_first, .in_last, .terms, .acc(acc8), .out_valid(out_valid8));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // out_valid must be high exactly on the cycle after a last beat
  always @(posedge clk) if (rst_n) begin
    #1;
    checks++;
    if (out_valid !== (cycles == expect_valid_at)) begin
      failures++;
      $display("FAIL out_valid=%0b at cycle %0d (expected at %0d)", out_valid, cycles, expect_valid_at);
    end
    if (out_valid) begin
      checks += 2;
      if (acc !== ref_sum) begin
        failures++;
        $display("FAIL acc=%0d expected %0d", acc, ref_sum);
      end
      if (acc8 !== 8'(ref8) || !out_valid8) begin
        failures++;
        $display("FAIL wrap acc8=%0d expected %0d", acc8, 8'(ref8));
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (acc !== 0 || out_valid !== 0) begin
      failures++;
      $display("FAIL reset state");
    end
    rst_n = 1;
    for (int v = 0; v < 300; v++) begin
      automatic int len = ($urandom_range(0, 3) == 0) ? 1 : $urandom_range(2, 40);
      automatic int unsigned s = 0;
      if (len == 1) n_single++;
      for (int k = 0; k < len; k++) begin
        // random idle cycle inside or between vectors
        if ($urandom_range(0, 5) == 0) begin
          in_valid = 0; in_first = 0; in_last = 0;
          terms = {2{17'($urandom)}};
          n_gap++;
          @(posedge clk); #1;
        end
        in_valid = 1;
        in_first = (k == 0);
        in_last  = (k == len - 1);
        terms[0] = IN_W'($urandom);
        terms[1] = IN_W'($urandom);
        s += terms[0] + terms[1];
        if (k == len - 1) begin
          ref_sum = s;
          ref8    = s;
          expect_valid_at = cycles + 1;
        end
        @(posedge clk); #1;
      end
      n_vec++;
      if ($urandom_range(0, 1) == 0) begin
        in_valid = 0; in_first = 0; in_last = 0;
        @(posedge clk); #1;
      end else n_b2b++;
    end
    in_valid = 0; in_first = 0; in_last = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (n_single == 0 || n_gap == 0 || n_b2b == 0) begin
      failures++;
      $display("FAIL scenario not covered single=%0d gap=%0d b2b=%0d", n_single, n_gap, n_b2b);
    end
    $display("vectors=%0d single=%0d gaps=%0d back_to_back=%0d", n_vec, n_single, n_gap, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
