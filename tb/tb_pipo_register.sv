// Self-checking test of the parallel-in parallel-out register. A random word
// is put on d after each rising edge, and sometimes changed again while clk
// is high. Checks that q shows the word present at the falling edge, right
// after that edge, and that q does not move while clk is high.
module tb_pipo_register;
  localparam int unsigned WIDTH = 5;  // not the default, to exercise the parameter
  logic clk = 1'b0;
  logic [WIDTH-1:0] d, q, q_exp;
  int checks = 0, failures = 0;

  pipo_register #(.WIDTH(WIDTH)) dut (.clk(clk), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    for (int cyc = 0; cyc < 500; cyc++) begin
      @(posedge clk);
      #1 d = WIDTH'($urandom);
      if (cyc > 0) begin
        #1;
        checks++;
        if (q !== q_exp) begin
          failures++;
          $display("FAIL cycle %0d clk high: q=%b exp=%b", cyc, q, q_exp);
        end
        if ($urandom_range(0, 1) == 1) #1 d = WIDTH'($urandom);
      end
      @(negedge clk);
      q_exp = d;
      #1;
      checks++;
      if (q !== q_exp) begin
        failures++;
        $display("FAIL cycle %0d after fall: q=%b exp=%b", cyc, q, q_exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
