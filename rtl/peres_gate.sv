// Peres gate (PG), a 3-input/3-output reversible gate.
//
// P = A, Q = A XOR B, R = (A AND B) XOR C. With C tied to 1 the R output is
// NAND(A, B), which is how the flip-flop of this design uses it: every NAND
// of a conventional gated latch becomes one Peres gate, and the P and Q
// outputs are garbage outputs that keep the gate reversible. The gate is
// named in the source design; its equations are the standard definition of
// the Peres gate. Purely combinational, no clock.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,   // = a
  output logic q,   // = a ^ b
  output logic r    // = (a & b) ^ c
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
