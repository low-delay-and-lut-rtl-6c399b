// Serial-in, serial-out shift register of WIDTH reversible flip-flops.
//
// A chain of rev_dff cells on one clock: at each rising clk edge data_in
// enters the first flip-flop and every stored bit moves one place along, so
// a bit presented before edge k appears on data_out after edge k+WIDTH-1,
// i.e. the register delays the serial stream by WIDTH clock cycles counted
// from the edge that takes it in. Only the two serial ends are brought out.
// The chain and four-bit width follow the source design; the asynchronous
// active-high clear is this design's choice.
module siso_sr #(
  parameter int unsigned WIDTH = 4
) (
  input  logic clk,
  input  logic clear,
  input  logic data_in,
  output logic data_out
);
  logic [WIDTH-1:0] stage;

  for (genvar i = 0; i < WIDTH; i++) begin : g_ff
    logic       d;
    logic [8:0] unused_garbage;
    if (i == 0) begin : g_first
      assign d = data_in;
    end else begin : g_next
      assign d = stage[i-1];
    end
    rev_dff u_ff (.clk(clk), .rst(clear), .d1(d), .dout(stage[i]),
                  .garbage(unused_garbage));
  end

  assign data_out = stage[WIDTH-1];
endmodule
