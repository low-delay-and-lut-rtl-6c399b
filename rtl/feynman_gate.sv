// Feynman gate (FG), the 2-input/2-output reversible controlled-NOT.
//
// P passes A through; Q is A XOR B. With B tied to 0 the gate copies A onto
// two wires (fan-out), with B tied to 1 it gives A and its complement. The
// flip-flop of this design uses it in both of those ways. The gate is named
// in the source design; its equations are the standard definition of the
// Feynman gate. Purely combinational, no clock.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,   // = a
  output logic q    // = a ^ b
);
  assign p = a;
  assign q = a ^ b;
endmodule
