// Shared definitions of the universal shift register: the operating modes
// and their code on the two select lines {s2, s1}. The four modes are those
// of the source design (parallel load, shift left, shift right, hold); the
// binary code is this design's choice.
package usr_pkg;
  typedef enum logic [1:0] {
    MODE_LOAD  = 2'b00,   // Q <= D
    MODE_SHL   = 2'b01,   // Q <= {Q[N-2:0], sl}
    MODE_SHR   = 2'b10,   // Q <= {sr, Q[N-1:1]}
    MODE_HOLD  = 2'b11    // Q <= Q
  } usr_mode_e;
endpackage
