// Exhaustive self-checking testbench for the approximate 8x8 squarer.
// All 256 inputs are applied to the default squarer (SH7, negative error)
// and to squarers in the configurations ACCU, SH1, SH3, SH7 and all-ten,
// both polarities. Each output is compared with the element-error
// reference model, and each opposite-polarity pair must sum to exactly
// 2*a*a (absolute approximate squarer mirror pair).
module tb_sq8x8;
  import squash_pkg::*;
  import squash_ref_pkg::*;

  localparam int NC = 5;
  localparam logic [9:0] MASKS [NC] = '{CFG_ACCU, CFG_SH1, CFG_SH3, CFG_SH7, 10'h3FF};

  logic [7:0]           a;
  logic [SQ8_OUT_W-1:0] sq_def;
  logic [SQ8_OUT_W-1:0] sq_n [NC];
  logic [SQ8_OUT_W-1:0] sq_p [NC];
  int checks = 0, failures = 0, hits = 0;

  sq8x8 u_def (.a(a), .sq(sq_def));
  for (genvar c = 0; c < NC; c++) begin : g_cfg
    sq8x8 #(.APX_MASK(MASKS[c]), .POL(ERR_NEG)) u_n (.a(a), .sq(sq_n[c]));
    sq8x8 #(.APX_MASK(MASKS[c]), .POL(ERR_POS)) u_p (.a(a), .sq(sq_p[c]));
  end

  task automatic chk(input string n, input longint got, input longint expv);
    checks++;
    if (got != expv) begin
      failures++;
      $display("FAIL %s a=%0d got %0d expected %0d", n, a, got, expv);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      chk("default", longint'(sq_def), sq8_ref(i, CFG_SH7, 0));
      for (int c = 0; c < NC; c++) begin
        chk($sformatf("neg%0d", c), longint'(sq_n[c]), sq8_ref(i, MASKS[c], 0));
        chk($sformatf("pos%0d", c), longint'(sq_p[c]), sq8_ref(i, MASKS[c], 1));
        chk($sformatf("mirror%0d", c), longint'(sq_n[c]) + longint'(sq_p[c]), 2 * i * i);
      end
      if (sq8_err(i, CFG_SH7, 0) != 0) hits++;
    end
    // the printed example: 255 in SH7 with mirror elements exceeds 16 bits
    a = 8'd255;
    #1;
    chk("sh7_pos_255", longint'(sq_p[3]), 66641);
    checks++;
    if (hits == 0) begin
      failures++;
      $display("FAIL no input hit an approximation error");
    end
    $display("inputs with SH7 error: %0d of 256", hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
