// Self-checking test of the serial-in parallel-out register. Starts with the
// pattern of the published simulation (1, 0, 0, 1, ...), then random bits. A
// shift model gives the expected parallel word: the newest bit on
// q[WIDTH-1], the oldest on q[0]. Checks the word after every falling edge,
// including the first ones where only some bits are known, and that q is
// steady while clk is high.
module tb_sipo_register;
  localparam int unsigned WIDTH = 5;  // not the default, to exercise the parameter
  logic clk = 1'b0;
  logic din;
  logic [WIDTH-1:0] q;
  logic [WIDTH-1:0] model;  // model[WIDTH-1] = newest bit
  logic [WIDTH-1:0] known;  // which model bits have been shifted in
  int checks = 0, failures = 0;
  localparam logic [7:0] START = 8'b1001_0011;  // sent from bit 7 down

  sipo_register #(.WIDTH(WIDTH)) dut (.clk(clk), .din(din), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 1'b0;
    known = '0;
    for (int cyc = 0; cyc < 500; cyc++) begin
      @(posedge clk);
      #1 din = (cyc < 8) ? START[7-cyc] : 1'($urandom_range(0, 1));
      #1;
      checks++;
      if ((q & known) !== (model & known)) begin
        failures++;
        $display("FAIL cycle %0d clk high: q=%b exp=%b", cyc, q, model);
      end
      @(negedge clk);
      model = {din, model[WIDTH-1:1]};
      known = {1'b1, known[WIDTH-1:1]};
      #1;
      checks++;
      if ((q & known) !== (model & known)) begin
        failures++;
        $display("FAIL cycle %0d after fall: q=%b exp=%b (known %b)", cyc, q, model, known);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
