// Serial-in serial-out shift register of reversible master-slave flip-flops.
//
// WIDTH flip-flops (FF1 .. FF4 at the default of 4) are chained: din feeds
// FF1, each flip-flop's output is the next one's data input, and dout is the
// last flip-flop. Every falling edge of clk moves the contents one place, so
// a bit on din appears on dout after WIDTH falling edges.
//
// The chain and its width follow the published register; the falling-edge
// timing comes from the flip-flop (see ms_dff). No reset: dout is unknown
// until WIDTH bits have been shifted in.
module siso_register #(
  parameter int unsigned WIDTH = 4
) (
  input  logic clk,
  input  logic din,
  output logic dout
);
  logic [WIDTH:0] chain;  // chain[0] = din, chain[i] = output of FF i

  assign chain[0] = din;

  for (genvar i = 0; i < WIDTH; i++) begin : g_ff
    ms_dff u_ff (
      .clk (clk),
      .d   (chain[i]),
      .q   (chain[i+1])
    );
  end

  assign dout = chain[WIDTH];
endmodule
