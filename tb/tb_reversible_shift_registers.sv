// End-to-end test of the four reversible shift registers at their default
// width, all on one clock.
//
// Every clock period each register gets new stimulus: random serial bits for
// the serial-in registers, random words for the parallel-in ones, and for
// the parallel-in serial-out register a load (piso_ws = 1) followed by
// WIDTH-1 shifts, again and again. Reference models written here predict
// every output after each falling edge, and the outputs are checked once
// more while clk is high (nothing may move then). Each mechanism is counted:
// a bit leaving the serial register WIDTH edges after entering, a full word
// assembled by the serial-in parallel-out register (the first one being the
// 1, 0, 0, 1 sequence that gives 1001), a parallel load and a shift of the
// parallel-in serial-out register, a parallel load of the parallel-in
// parallel-out register, and outputs held steady while clk is high. A
// mechanism that never happened counts as a failure.
module tb_reversible_shift_registers;
  localparam int unsigned W = 4;  // the top's default WIDTH
  logic clk = 1'b0;
  logic siso_din, siso_dout;
  logic sipo_din;
  logic [W-1:0] sipo_q;
  logic piso_ws;
  logic [W-1:0] piso_d;
  logic piso_dout;
  logic [W-1:0] pipo_d, pipo_q;

  // reference models
  logic [W-1:0] siso_m, sipo_m, piso_m, pipo_m;
  logic [W-1:0] piso_word;
  int valid;  // falling edges seen so far

  int checks = 0, failures = 0;
  int n_serial_out = 0, n_word = 0, n_piso_load = 0, n_piso_shift = 0;
  int n_pipo_load = 0, n_hold = 0;

  reversible_shift_registers dut (
    .clk       (clk),
    .siso_din  (siso_din),
    .siso_dout (siso_dout),
    .sipo_din  (sipo_din),
    .sipo_q    (sipo_q),
    .piso_ws   (piso_ws),
    .piso_d    (piso_d),
    .piso_dout (piso_dout),
    .pipo_d    (pipo_d),
    .pipo_q    (pipo_q)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  task automatic expect_word(input string what, input logic [W-1:0] got,
                             input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  task automatic check_all(input string when);
    if (valid >= int'(W)) begin
      expect_bit({"siso ", when}, siso_dout, siso_m[W-1]);
      expect_word({"sipo ", when}, sipo_q, sipo_m);
    end
    if (valid >= 1) begin
      expect_bit({"piso ", when}, piso_dout, piso_m[W-1]);
      expect_word({"pipo ", when}, pipo_q, pipo_m);
    end
  endtask

  localparam logic [3:0] FIRST_SIPO = 4'b1001;  // sent FIRST_SIPO[0] first

  initial begin
    siso_din = 1'b0; sipo_din = 1'b0; piso_ws = 1'b0;
    piso_d = '0; pipo_d = '0; valid = 0;
    for (int cyc = 0; cyc < 400; cyc++) begin
      @(posedge clk);
      #1;
      siso_din = 1'($urandom_range(0, 1));
      sipo_din = (cyc < 4) ? FIRST_SIPO[cyc] : 1'($urandom_range(0, 1));
      pipo_d   = W'($urandom);
      piso_ws  = (cyc % W == 0);
      piso_d   = W'($urandom);
      if (piso_ws) piso_word = piso_d;
      #2;
      if (valid >= int'(W)) n_hold++;
      check_all("while clk high");

      @(negedge clk);
      siso_m = {siso_m[W-2:0], siso_din};
      sipo_m = {sipo_din, sipo_m[W-1:1]};
      for (int i = W - 1; i > 0; i--)
        piso_m[i] = piso_ws ? piso_d[W-1-i] : piso_m[i-1];
      piso_m[0] = piso_d[W-1];
      pipo_m = pipo_d;
      valid++;
      #1;
      check_all("after falling edge");
      if (valid >= int'(W)) n_serial_out++;
      if (valid % W == 0) n_word++;
      if (valid == int'(W)) expect_word("first sipo word", sipo_q, 4'b1001);
      if (piso_ws) begin
        n_piso_load++;
        expect_bit("piso first bit after load", piso_dout, piso_word[0]);
      end else begin
        n_piso_shift++;
        expect_bit("piso bit after shift", piso_dout, piso_word[cyc % W]);
      end
      n_pipo_load++;
    end
    $display("mechanisms: serial_out=%0d sipo_words=%0d piso_loads=%0d piso_shifts=%0d pipo_loads=%0d holds=%0d",
             n_serial_out, n_word, n_piso_load, n_piso_shift, n_pipo_load, n_hold);
    checks++;
    if (n_serial_out == 0) failures++;
    checks++;
    if (n_word == 0) failures++;
    checks++;
    if (n_piso_load == 0) failures++;
    checks++;
    if (n_piso_shift == 0) failures++;
    checks++;
    if (n_pipo_load == 0) failures++;
    checks++;
    if (n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
