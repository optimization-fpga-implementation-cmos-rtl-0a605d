// Sayem gate: a 4x4 reversible gate that makes a D-latch with one feedback wire.
//
//   P = A
//   Q = A'B xor AC          (B when A = 0, C when A = 1)
//   R = A'B xor AC xor D    (Q, inverted when D = 1)
//   S = AB  xor A'C xor D   (the unselected input, xor D)
//
// A acts as a select: Q picks B or C, and R is a second copy of Q when D is
// held at 0. That second copy is what lets the latch feed its own state back
// without fan-out. Purely combinational. The equations are those of the
// published gate symbol. Inside sayem_dlatch, R is wired back to B, so lint
// tools report a combinational loop through this gate; that loop is the
// latch's storage and is intended.
module sayem_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic sel;    // A'B xor AC
  logic unsel;  // AB xor A'C

  assign sel   = (~a & b) ^ (a & c);
  assign unsel = (a & b) ^ (~a & c);

  assign p = a;
  assign q = sel;
  assign r = sel ^ d;
  assign s = unsel ^ d;
endmodule
