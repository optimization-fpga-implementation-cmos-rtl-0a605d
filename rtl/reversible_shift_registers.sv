// The four reversible shift registers side by side: serial-in serial-out,
// serial-in parallel-out, parallel-in serial-out and parallel-in
// parallel-out, all WIDTH bits wide and built from the same Sayem-gate
// master-slave flip-flop.
//
// The registers are independent; this level only places them together with
// their own data ports and one shared clock (the shared clock is this
// design's choice). All four act on the falling edge of clk and have no
// reset; see each register for its bit order and timing.
module reversible_shift_registers #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  // serial in, serial out
  input  logic             siso_din,
  output logic             siso_dout,
  // serial in, parallel out
  input  logic             sipo_din,
  output logic [WIDTH-1:0] sipo_q,
  // parallel in, serial out
  input  logic             piso_ws,
  input  logic [WIDTH-1:0] piso_d,
  output logic             piso_dout,
  // parallel in, parallel out
  input  logic [WIDTH-1:0] pipo_d,
  output logic [WIDTH-1:0] pipo_q
);
  siso_register #(.WIDTH(WIDTH)) u_siso (
    .clk  (clk),
    .din  (siso_din),
    .dout (siso_dout)
  );

  sipo_register #(.WIDTH(WIDTH)) u_sipo (
    .clk (clk),
    .din (sipo_din),
    .q   (sipo_q)
  );

  piso_register #(.WIDTH(WIDTH)) u_piso (
    .clk  (clk),
    .ws   (piso_ws),
    .d    (piso_d),
    .dout (piso_dout)
  );

  pipo_register #(.WIDTH(WIDTH)) u_pipo (
    .clk (clk),
    .d   (pipo_d),
    .q   (pipo_q)
  );
endmodule
