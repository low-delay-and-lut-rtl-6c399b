// Serial-in, parallel-out shift register of WIDTH reversible flip-flops.
//
// The flip-flops form a chain FF0 -> FF1 -> ... : at each rising clk edge
// data_in enters FF0 and every bit moves one place up, so after WIDTH edges
// the last WIDTH serial bits stand on q in parallel (the first one received
// in q[WIDTH-1]). data_out is the last flip-flop, the serial end of the
// chain. The chain, the common clock and clear lines and the four-bit width
// follow the source design's schematic; the asynchronous active-high clear
// is this design's choice.
module sipo_sr #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             clear,
  input  logic             data_in,
  output logic [WIDTH-1:0] q,
  output logic             data_out
);
  logic [WIDTH-1:0] d;

  assign d[0] = data_in;
  for (genvar i = 1; i < WIDTH; i++) begin : g_link
    assign d[i] = q[i-1];
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_ff
    logic [8:0] unused_garbage;
    rev_dff u_ff (.clk(clk), .rst(clear), .d1(d[i]), .dout(q[i]),
                  .garbage(unused_garbage));
  end

  assign data_out = q[WIDTH-1];
endmodule
