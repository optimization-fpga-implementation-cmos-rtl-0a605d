// Serial-in parallel-out shift register of reversible master-slave flip-flops.
//
// WIDTH flip-flops are chained as in the serial-in serial-out register. A
// reversible circuit may not fan a wire out, so after each flip-flop except
// the last a Feynman gate with B = 0 makes two copies of its output: one (P)
// goes on to the next flip-flop, the other (Q) to a parallel output pin. The
// last flip-flop drives its pin directly.
//
// Bit order: q[WIDTH-1] is FF1, the first to receive din, and q[0] the last
// flip-flop, so after WIDTH falling edges of clk the first bit shifted in is
// on q[0]. Structure and Feynman copies follow the published register; the
// bit order follows its published simulation. No reset.
module sipo_register #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             din,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] ff_q;    // ff_q[i] = output of flip-flop i (0 = FF1)
  logic [WIDTH:0]   ff_d;    // ff_d[i] = data input of flip-flop i

  assign ff_d[0] = din;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    ms_dff u_ff (
      .clk (clk),
      .d   (ff_d[i]),
      .q   (ff_q[i])
    );
    if (i < WIDTH - 1) begin : g_copy
      feynman_gate u_fg (
        .a (ff_q[i]),
        .b (1'b0),
        .p (ff_d[i+1]),
        .q (q[WIDTH-1-i])
      );
    end else begin : g_last
      assign q[WIDTH-1-i] = ff_q[i];
      assign ff_d[i+1]    = ff_q[i];  // end of chain, not used further
    end
  end
endmodule
