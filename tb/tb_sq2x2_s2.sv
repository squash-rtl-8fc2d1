// Exhaustive self-checking testbench for the 2x2 element sq2x2_s2.
// Every input combination is applied and the output compared with the
// element's intended truth table: a*a except 2*2 = 8.
module tb_sq2x2_s2;
  logic [1:0] a, b;
  logic [3:0] p;
  int checks = 0, failures = 0;

  sq2x2_s2 dut (.a(a), .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        int expv;
        a = 2'(i);
        b = 2'(j);
        #1;
        expv = (i == 2) ? 8 : i * i;
        checks++;
        if (p !== 4'(expv)) begin
          failures++;
          $display("FAIL a=%0d b=%0d p=%0d expected %0d", i, j, p, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
