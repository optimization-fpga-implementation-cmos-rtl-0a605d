// Self-checking test of the Sayem-gate D-latch. Random enable and data
// values are applied one at a time; the expected output follows
// Q(t+1) = D.E + E'.Q. It checks that the latch follows D while E = 1, holds
// while E = 0 however D moves, and that g1 copies E.
module tb_sayem_dlatch;
  logic e, d, q, g1, g2;
  logic q_exp;
  int checks = 0, failures = 0;
  int holds = 0, passes = 0;

  sayem_dlatch dut (.e(e), .d(d), .q(q), .g1(g1), .g2(g2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic en, input logic dat);
    e = en;
    d = dat;
    #1;
    if (en) begin q_exp = dat; passes++; end
    else holds++;
    checks++;
    if (q !== q_exp || g1 !== en) begin
      failures++;
      $display("FAIL e=%b d=%b q=%b g1=%b exp q=%b", en, dat, q, g1, q_exp);
    end
  endtask

  initial begin
    // make the state known: transparent with D = 1, then D = 0
    step(1'b1, 1'b1);
    step(1'b1, 1'b0);
    step(1'b0, 1'b1);  // hold 0 against D = 1
    step(1'b1, 1'b1);
    step(1'b0, 1'b0);  // hold 1 against D = 0
    for (int i = 0; i < 400; i++)
      step(1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)));
    checks++;
    if (holds == 0 || passes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
