// Fredkin gate: the 3x3 reversible controlled-swap gate.
//
// The control input A passes straight to P. When A is 0, B goes to Q and C to
// R; when A is 1 the two are swapped, so Q = A'B + AC and R = AB + A'C. Used
// with A as a select line, output Q is a 2:1 multiplexer (B when A = 0, C when
// A = 1) and R carries the unselected input as a garbage output. Purely
// combinational. The mapping is the published definition of the gate.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ? c : b;
  assign r = a ? b : c;
endmodule
