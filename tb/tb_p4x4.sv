// Exhaustive self-checking testbench for p4x4 (all 256 operand pairs) in
// several configurations. Reference: lo*hi plus the M1 (-2) or M2 (+2)
// error of every approximated element whose two digits are both 3, times
// its significance (1, 4, 4, 16). Also checks the mirror property.
module tb_p4x4;
  import squash_pkg::*;
  logic [3:0] lo, hi;
  logic [8:0] p_def, p_nf, p_pf, p_p5;
  int checks = 0, failures = 0;

  p4x4                                       u_def (.lo, .hi, .p(p_def));
  p4x4 #(.APX_MASK(4'hF), .POL(ERR_NEG))     u_nf  (.lo, .hi, .p(p_nf));
  p4x4 #(.APX_MASK(4'hF), .POL(ERR_POS))     u_pf  (.lo, .hi, .p(p_pf));
  p4x4 #(.APX_MASK(4'b0101), .POL(ERR_POS))  u_p5  (.lo, .hi, .p(p_p5));

  function automatic int refp(input int l, input int h, input logic [3:0] m, input bit pos);
    int l0 = l & 3, l1 = l >> 2, h0 = h & 3, h1 = h >> 2, e = 0, s = pos ? 2 : -2;
    if (m[0] && l0 == 3 && h0 == 3) e += s * 1;
    if (m[1] && l0 == 3 && h1 == 3) e += s * 4;
    if (m[2] && h0 == 3 && l1 == 3) e += s * 4;
    if (m[3] && l1 == 3 && h1 == 3) e += s * 16;
    return l * h + e;
  endfunction

  task automatic chk(input string n, input int got, input int expv);
    checks++;
    if (got != expv) begin
      failures++;
      $display("FAIL %s lo=%0d hi=%0d got %0d expected %0d", n, lo, hi, got, expv);
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
      for (int j = 0; j < 16; j++) begin
        lo = 4'(i);
        hi = 4'(j);
        #1;
        chk("default", int'(p_def), i * j);
        chk("negF", int'(p_nf), refp(i, j, 4'hF, 0));
        chk("posF", int'(p_pf), refp(i, j, 4'hF, 1));
        chk("pos5", int'(p_p5), refp(i, j, 4'b0101, 1));
        chk("mirror", int'(p_nf) + int'(p_pf), 2 * i * j);
      end
    end
    lo = 4'd15; hi = 4'd15;
    #1;
    chk("max_pos", int'(p_pf), 275);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
