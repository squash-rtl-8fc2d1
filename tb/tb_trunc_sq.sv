// Exhaustive self-checking testbench for the sign-forcing truncated squarer.
// All 256 8-bit two's complement inputs go to Sq1 (positive) and Sq2
// (negative) with T = 1, and to a T = 2 pair. Reference: Sq1 squares
// floor(|A|/2^T), Sq2 squares ceil(|A|/2^T), both scaled by 4^T. Also checks
// the worked example A = +/-25 (576 and 676) and that Sq1 never exceeds and
// Sq2 never falls below the exact square.
module tb_trunc_sq;
  import squash_ref_pkg::*;
  logic [7:0]  a;
  logic [15:0] s1, s2, s1t2, s2t2;
  int checks = 0, failures = 0;

  trunc_sq                          u_s1   (.a(a), .sq(s1));
  trunc_sq #(.N(8), .T(1), .NEG(1)) u_s2   (.a(a), .sq(s2));
  trunc_sq #(.N(8), .T(2), .NEG(0)) u_s1t2 (.a(a), .sq(s1t2));
  trunc_sq #(.N(8), .T(2), .NEG(1)) u_s2t2 (.a(a), .sq(s2t2));

  task automatic chk(input string n, input longint got, input longint expv);
    checks++;
    if (got != expv) begin
      failures++;
      $display("FAIL %s a=%0d got %0d expected %0d", n, $signed(a), got, expv);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -128; i < 128; i++) begin
      a = 8'(i);
      #1;
      chk("sq1", s1, trunc_ref(i, 1, 0));
      chk("sq2", s2, trunc_ref(i, 1, 1));
      chk("sq1_t2", s1t2, trunc_ref(i, 2, 0));
      chk("sq2_t2", s2t2, trunc_ref(i, 2, 1));
      checks++;
      if (longint'(s1) > i * i || longint'(s2) < i * i) begin
        failures++;
        $display("FAIL error sign a=%0d s1=%0d s2=%0d", i, s1, s2);
      end
    end
    a = 8'd25;   #1; chk("fig_pos25", s1, 576); chk("fig_pos25_sq2", s2, 676);
    a = -8'sd25; #1; chk("fig_neg25", s1, 576); chk("fig_neg25_sq2", s2, 676);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
