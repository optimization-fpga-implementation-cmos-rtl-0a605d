// Parallel-in parallel-out register of reversible master-slave flip-flops.
//
// WIDTH flip-flops share the clock; flip-flop i (FF1 .. FF4) loads its own
// bit of d and drives its own bit of q, with d[WIDTH-1] and q[WIDTH-1] on
// FF1. The word on d when clk falls appears on q at that edge and is held
// until the next falling edge. Structure follows the published register; the
// falling-edge timing comes from the flip-flop (see ms_dff). No reset.
module pipo_register #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  for (genvar i = 0; i < WIDTH; i++) begin : g_ff
    ms_dff u_ff (
      .clk (clk),
      .d   (d[WIDTH-1-i]),
      .q   (q[WIDTH-1-i])
    );
  end
endmodule
