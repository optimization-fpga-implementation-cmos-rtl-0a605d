// Feynman gate: the 2x2 reversible controlled-NOT gate.
//
// P passes the control input A through unchanged and Q is A xor B. With
// B tied to 0 the gate copies A onto two wires (reversible circuits allow no
// fan-out, so this is how a signal is duplicated); with B tied to 1 it gives
// A and its complement. Purely combinational, no timing of its own.
// The mapping (P = A, Q = A'B + AB') is the published definition of the gate.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
