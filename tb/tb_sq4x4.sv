// Exhaustive self-checking testbench for sq4x4 in several configurations.
// The reference is the exact square plus the error of each approximated
// element that sees its error case (digit 2 for a square element: -4/+4,
// both digits 3 for the multiply element: -2/+2), times its significance
// (1, 8, 16). Also checks that two squarers with opposite polarity form an
// absolute mirror pair: their sum is exactly 2*a*a.
module tb_sq4x4;
  import squash_pkg::*;
  logic [3:0] a;
  logic [7:0] sq_def, sq_n7, sq_p7, sq_p2, sq_n5;
  int checks = 0, failures = 0;

  sq4x4                                         u_def (.a(a), .sq(sq_def));
  sq4x4 #(.APX_MASK(3'b111), .POL(ERR_NEG))     u_n7  (.a(a), .sq(sq_n7));
  sq4x4 #(.APX_MASK(3'b111), .POL(ERR_POS))     u_p7  (.a(a), .sq(sq_p7));
  sq4x4 #(.APX_MASK(3'b010), .POL(ERR_POS))     u_p2  (.a(a), .sq(sq_p2));
  sq4x4 #(.APX_MASK(3'b101), .POL(ERR_NEG))     u_n5  (.a(a), .sq(sq_n5));

  function automatic int ref4(input int x, input logic [2:0] m, input bit pos);
    int l = x & 3, h = (x >> 2) & 3, e = 0, s = pos ? 1 : -1;
    if (m[0] && l == 2) e += 4 * 1 * s;
    if (m[1] && l == 3 && h == 3) e += 2 * 8 * s;
    if (m[2] && h == 2) e += 4 * 16 * s;
    return x * x + e;
  endfunction

  task automatic chk(input string n, input int got, input int expv);
    checks++;
    if (got != expv) begin
      failures++;
      $display("FAIL %s a=%0d got %0d expected %0d", n, a, got, expv);
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
    for (int i = 0; i < 16; i++) begin
      a = 4'(i);
      #1;
      chk("default", int'(sq_def), i * i);
      chk("neg111",  int'(sq_n7), ref4(i, 3'b111, 0));
      chk("pos111",  int'(sq_p7), ref4(i, 3'b111, 1));
      chk("pos010",  int'(sq_p2), ref4(i, 3'b010, 1));
      chk("neg101",  int'(sq_n5), ref4(i, 3'b101, 0));
      chk("mirror",  int'(sq_n7) + int'(sq_p7), 2 * i * i);
    end
    // the S1 case a=2 (l=2) must really be wrong in the approximate squarers
    a = 4'd2;
    #1;
    chk("s1_err", int'(sq_n7), 0);
    chk("s2_err", int'(sq_p7), 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
