// Parallel-in, parallel-out register of WIDTH reversible flip-flops.
//
// Each rev_dff takes its own input bit d[i] at every rising clk edge, so the
// whole word appears on q one clock edge after it is presented. The one
// flip-flop per bit on a common clock and clear, and the four-bit width,
// follow the source design's schematic; the asynchronous active-high clear
// is this design's choice.
module pipo_sr #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             clear,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  for (genvar i = 0; i < WIDTH; i++) begin : g_ff
    logic [8:0] unused_garbage;
    rev_dff u_ff (.clk(clk), .rst(clear), .d1(d[i]), .dout(q[i]),
                  .garbage(unused_garbage));
  end
endmodule
