// Parallel-in, serial-out shift register of WIDTH reversible flip-flops.
//
// A WRITE/SHIFT line chooses, for every flip-flop after the first, between
// its own parallel input d[i] (write) and the output of the flip-flop before
// it (shift). The first flip-flop always takes d[0]. Writing loads the whole
// word in one rising clk edge; each later edge with write_shift low moves the
// word one place towards the last flip-flop, whose output is serial_out, so
// the word leaves highest bit first: d[WIDTH-1], d[WIDTH-2], ..., d[0].
// The WRITE/SHIFT control, the per-bit selection and the direct d[0] input
// follow the source design's schematic; the polarity (1 = write, 0 = shift)
// and the asynchronous active-high clear are this design's choices.
module piso_sr #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             clear,
  input  logic             write_shift,  // 1: load d, 0: shift
  input  logic [WIDTH-1:0] d,
  output logic             serial_out,
  output logic [WIDTH-1:0] q              // state, for observation
);
  logic [WIDTH-1:0] next_q;

  assign next_q[0] = d[0];
  for (genvar i = 1; i < WIDTH; i++) begin : g_sel
    assign next_q[i] = write_shift ? d[i] : q[i-1];
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_ff
    logic [8:0] unused_garbage;
    rev_dff u_ff (.clk(clk), .rst(clear), .d1(next_q[i]), .dout(q[i]),
                  .garbage(unused_garbage));
  end

  assign serial_out = q[WIDTH-1];
endmodule
