// Self-checking test of the parallel-in serial-out register. Random words are
// loaded with ws = 1 for one clock and then shifted out with ws = 0 for
// WIDTH-1 clocks (and sometimes a few more, to see FF1 reloading d's top
// bit). A model of the flip-flops, with the load/shift selection written
// out, gives dout. Checks that d[0] appears at the load edge and d[1] ..
// d[WIDTH-1] on the following falling edges, and that ws is obeyed.
module tb_piso_register;
  localparam int unsigned WIDTH = 5;  // not the default, to exercise the parameter
  logic clk = 1'b0;
  logic ws;
  logic [WIDTH-1:0] d, word;
  logic dout;
  logic [WIDTH-1:0] model;  // model[i] = flip-flop i, 0 = FF1
  int checks = 0, failures = 0, loads = 0, shifts = 0;

  piso_register #(.WIDTH(WIDTH)) dut (.clk(clk), .ws(ws), .d(d), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cycle(input logic sel, input logic [WIDTH-1:0] data, input bit check);
    @(posedge clk);
    #1;
    ws = sel;
    d  = data;
    @(negedge clk);
    for (int i = WIDTH - 1; i > 0; i--)
      model[i] = sel ? data[WIDTH-1-i] : model[i-1];
    model[0] = data[WIDTH-1];
    if (sel) loads++; else shifts++;
    #1;
    if (check) begin
      checks++;
      if (dout !== model[WIDTH-1]) begin
        failures++;
        $display("FAIL ws=%b d=%b dout=%b exp=%b", sel, data, dout, model[WIDTH-1]);
      end
    end
  endtask

  initial begin
    ws = 1'b0;
    d  = '0;
    for (int n = 0; n < 100; n++) begin
      word = WIDTH'($urandom);
      cycle(1'b1, word, 1'b1);
      checks++;
      if (dout !== word[0]) begin
        failures++;
        $display("FAIL load: dout=%b exp d[0]=%b", dout, word[0]);
      end
      for (int k = 1; k < WIDTH; k++) begin
        // d changes while shifting; only d[WIDTH-1] may matter (FF1)
        cycle(1'b0, WIDTH'($urandom), 1'b1);
        checks++;
        if (dout !== word[k]) begin
          failures++;
          $display("FAIL shift %0d: dout=%b exp d[%0d]=%b", k, dout, k, word[k]);
        end
      end
      repeat ($urandom_range(0, 2)) cycle(1'b0, WIDTH'($urandom), 1'b1);
    end
    checks++;
    if (loads == 0 || shifts == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
