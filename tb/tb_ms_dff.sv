// Self-checking test of the reversible master-slave D flip-flop. A clock of
// period 10 runs; d gets a random value shortly after every rising edge and,
// half of the time, once more while clk is high, just before the fall. The
// model stores d at each falling edge. Q is compared one time unit after each
// falling edge (the new value must be there, no later) and again while clk is
// high (q must not have followed d through the transparent master).
module tb_ms_dff;
  logic clk = 1'b0;
  logic d, q;
  logic q_exp;
  int checks = 0, failures = 0;

  ms_dff dut (.clk(clk), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 1'b0;
    for (int cyc = 0; cyc < 300; cyc++) begin
      @(posedge clk);
      #1 d = 1'($urandom_range(0, 1));
      if (cyc > 0) begin
        #1;
        checks++;
        if (q !== q_exp) begin
          failures++;
          $display("FAIL cycle %0d while clk high: q=%b exp=%b", cyc, q, q_exp);
        end
        if ($urandom_range(0, 1) == 1) #1 d = ~d;
      end
      @(negedge clk);
      q_exp = d;
      #1;
      checks++;
      if (q !== q_exp) begin
        failures++;
        $display("FAIL cycle %0d after falling edge: q=%b exp=%b", cyc, q, q_exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
