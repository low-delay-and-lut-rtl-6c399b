// Universal shift register of WIDTH bits built from reversible flip-flops.
//
// Every bit is one mux4_1 feeding one rev_dff, all on a common clock and a
// common clear. The select lines pick, at each rising clk edge, one of four
// operations (codes in usr_pkg, {s2, s1}):
//   00 load   Q <= D
//   01 shift left:  Q <= {Q[WIDTH-2:0], sl}  (sl enters bit 0, Q[WIDTH-1] leaves)
//   10 shift right: Q <= {sr, Q[WIDTH-1:1]}  (sr enters the top bit, Q[0] leaves)
//   11 hold   Q <= Q
// The structure (one 4-to-1 selector and one reversible D flip-flop per bit),
// the port names D, clk, reset, sl, sr, s1, s2, Q and the widths 4 and 8 are
// from the source design; the select code, the direction each serial input
// shifts in and the asynchronous active-high reset are this design's choices.
// Q changes one clk edge after the mode and data are presented; reset clears
// Q at once.
module universal_sr #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             reset,
  input  logic [WIDTH-1:0] D,
  input  logic             sl,     // serial input for shift left
  input  logic             sr,     // serial input for shift right
  input  logic             s1,     // select, low bit
  input  logic             s2,     // select, high bit
  output logic [WIDTH-1:0] Q
);
  logic [WIDTH-1:0] next_q;
  logic [WIDTH-1:0] from_right;    // value shifted in when moving left
  logic [WIDTH-1:0] from_left;     // value shifted in when moving right

  if (WIDTH == 1) begin : g_one
    assign from_right = sl;
    assign from_left  = sr;
  end else begin : g_many
    assign from_right = {Q[WIDTH-2:0], sl};
    assign from_left  = {sr, Q[WIDTH-1:1]};
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    logic [8:0] unused_garbage;
    mux4_1  u_mux (.i0(D[i]), .i1(from_right[i]), .i2(from_left[i]), .i3(Q[i]),
                   .s1(s1), .s2(s2), .y1(next_q[i]));
    rev_dff u_ff  (.clk(clk), .rst(reset), .d1(next_q[i]), .dout(Q[i]),
                   .garbage(unused_garbage));
  end
endmodule
