// Level-sensitive D-latch built from a single Sayem gate.
//
// Enable E drives the gate's A input, data D its C input and input D (the
// gate's fourth input) is tied to 0, so Q = E'B + ED and R equals Q. Output R
// is wired back to input B: while E = 1 the latch is transparent (Q follows
// D), and while E = 0 the gate passes B to Q and R, so the loop holds the last
// value. This gives the characteristic equation Q(t+1) = D.E + E'.Q.
// P (a copy of E) and S are the gate's garbage outputs g1 and g2.
//
// The storage element is the combinational loop R -> B, exactly as the
// circuit is drawn; tools report it as a combinational loop, which here is
// the intended latch. There is no reset: the state is unknown until E has
// been high once. The pin assignment follows the published latch; the latch
// holds no other logic.
module sayem_dlatch (
  input  logic e,
  input  logic d,
  output logic q,
  output logic g1,
  output logic g2
);
  logic fb;  // R output fed back to input B

  sayem_gate u_sg (
    .a (e),
    .b (fb),
    .c (d),
    .d (1'b0),
    .p (g1),
    .q (q),
    .r (fb),
    .s (g2)
  );
endmodule
