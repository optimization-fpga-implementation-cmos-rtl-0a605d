// Parallel-in serial-out shift register of reversible master-slave
// flip-flops, with Fredkin gates as load/shift multiplexers.
//
// FF1 takes d[WIDTH-1] directly. In front of every later flip-flop a Fredkin
// gate uses ws as its control: its Q output is the previous flip-flop's
// output when ws = 0 (shift) and the parallel bit when ws = 1 (load). The ws
// line passes through each Fredkin gate (P = A) on to the next one, since a
// wire cannot fan out; the R outputs are garbage.
//
// Use: hold ws = 1 over one falling edge of clk to load d (d[WIDTH-1] into
// FF1, d[0] into the last flip-flop, which drives dout at once), then ws = 0;
// each further falling edge brings the next bit to dout, d[0] first and
// d[WIDTH-1] last. While shifting, FF1 reloads d[WIDTH-1] on every edge, as
// it has no multiplexer. Structure follows the published register; the ws
// polarity is this design's choice. No reset.
module piso_register #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             ws,
  input  logic [WIDTH-1:0] d,
  output logic             dout
);
  logic [WIDTH-1:0] ff_q;    // ff_q[i] = output of flip-flop i (0 = FF1)
  logic [WIDTH-1:0] ff_d;    // ff_d[i] = data input of flip-flop i
  logic [WIDTH-1:0] ws_pass; // ws_pass[i] = ws as it leaves gate i (P output)
  logic [WIDTH-1:0] garb;    // Fredkin R outputs, unused

  assign ff_d[0]    = d[WIDTH-1];
  assign ws_pass[0] = ws;
  assign garb[0]    = 1'b0;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    if (i > 0) begin : g_mux
      fredkin_gate u_mux (
        .a (ws_pass[i-1]),
        .b (ff_q[i-1]),
        .c (d[WIDTH-1-i]),
        .p (ws_pass[i]),
        .q (ff_d[i]),
        .r (garb[i])
      );
    end
    ms_dff u_ff (
      .clk (clk),
      .d   (ff_d[i]),
      .q   (ff_q[i])
    );
  end

  assign dout = ff_q[WIDTH-1];
endmodule
