// Reversible master-slave D flip-flop: two Sayem-gate D-latches and a
// Feynman gate.
//
// A Feynman gate with its B input tied to 1 turns the clock into a copy (P,
// enabling the master latch) and a complement (Q, enabling the slave latch).
// While clk is 1 the master follows d and the slave holds; while clk is 0 the
// master holds and the slave passes the master's value to q. The value of d
// present when clk falls is therefore stored and appears on q at that falling
// edge; q does not change while clk is 1.
//
// The two latches and their order (master, then slave) are the published
// flip-flop; the clock phase that enables each latch, and the use of the
// Feynman gate as the clock inverter, are this design's reading of it.
// No reset: q is unknown until the first falling clock edge.
module ms_dff (
  input  logic clk,
  input  logic d,
  output logic q
);
  logic clk_m;   // clock copy for the master latch
  logic clk_s;   // complemented clock for the slave latch
  logic q_m;     // master output
  logic g1_m, g2_m, g1_s, g2_s;  // garbage outputs, unused

  feynman_gate u_clk_split (
    .a (clk),
    .b (1'b1),
    .p (clk_m),
    .q (clk_s)
  );

  sayem_dlatch u_master (
    .e  (clk_m),
    .d  (d),
    .q  (q_m),
    .g1 (g1_m),
    .g2 (g2_m)
  );

  sayem_dlatch u_slave (
    .e  (clk_s),
    .d  (q_m),
    .q  (q),
    .g1 (g1_s),
    .g2 (g2_s)
  );
endmodule
