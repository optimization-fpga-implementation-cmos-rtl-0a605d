// Self-checking test of the serial-in serial-out register. Random bits are
// shifted in, one per clock period; a queue model of the chain says which bit
// must be on dout. Checks that every bit comes out exactly WIDTH falling
// edges after it went in, and that dout is steady while clk is high.
module tb_siso_register;
  localparam int unsigned WIDTH = 5;  // not the default, to exercise the parameter
  logic clk = 1'b0;
  logic din, dout;
  logic [WIDTH-1:0] model;  // model[0] = FF1
  int checks = 0, failures = 0;

  siso_register #(.WIDTH(WIDTH)) dut (.clk(clk), .din(din), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 1'b0;
    for (int cyc = 0; cyc < 500; cyc++) begin
      @(posedge clk);
      #1 din = 1'($urandom_range(0, 1));
      if (cyc >= WIDTH) begin
        #1;
        checks++;
        if (dout !== model[WIDTH-1]) begin
          failures++;
          $display("FAIL cycle %0d clk high: dout=%b exp=%b", cyc, dout, model[WIDTH-1]);
        end
      end
      @(negedge clk);
      model = {model[WIDTH-2:0], din};
      #1;
      if (cyc >= WIDTH - 1) begin
        checks++;
        if (dout !== model[WIDTH-1]) begin
          failures++;
          $display("FAIL cycle %0d after fall: dout=%b exp=%b", cyc, dout, model[WIDTH-1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
