// D flip-flop built from reversible Peres (PG) and Feynman (FG) gates.
//
// The gate network is the reversible form of the five-NAND gated D latch:
//   * an FG with its second input at 1 gives D and ~D;
//   * two PGs with C = 1 act as the gating NANDs:
//       s_n = NAND(D, G)   and   r_n = NAND(G, ~D);
//   * two more PGs with C = 1 form the cross-coupled NAND pair,
//       qb = NAND(Q, r_n)   and   q_next = NAND(s_n, qb),
//     each followed by an FG with B = 0 that copies its result to the output
//     and back into the pair.
// The network, the gate inputs held at constant 0/1 and the port names
// (clk, d1, rst, dout) follow the source design. This design's own choice is
// how the flip-flop is clocked: instead of a closed combinational loop, the
// path from q_next to its FG (output copy and feedback into the lower NAND
// of the pair) runs through a rising-edge register, so the stored bit is
// q_next sampled at the clock edge. Walking the pair in that order (lower
// NAND, then upper) gives the latch's settled value in one pass: set, reset
// or hold. The gating input G
// of the two gating NANDs is held at 1 because the register already provides
// the clocking, so q_next = d1 and the cell behaves as an ordinary D
// flip-flop: dout takes d1 one rising clk edge later.
// rst is an asynchronous, active-high clear (the shift registers' CLEAR line).
// garbage collects the PG and FG outputs that carry no data, as the garbage
// outputs of every flip-flop in the register schematics.
module rev_dff (
  input  logic       clk,
  input  logic       rst,
  input  logic       d1,
  output logic       dout,
  output logic [8:0] garbage
);
  localparam logic GATE = 1'b1;   // gating input of the latch, held open

  logic d_t, d_c;                 // D and ~D from the input FG
  logic s_n, r_n;                 // gated set/reset, active low
  logic qb, q_next;               // outputs of the cross-coupled pair
  logic q_reg;                    // stored bit
  logic q_fb;                     // FG copy of the stored bit fed back
  logic qb_fb;                    // FG copy of qb fed to the upper NAND

  feynman_gate u_fg_in  (.a(d1), .b(1'b1), .p(d_t), .q(d_c));

  peres_gate   u_pg_set (.a(d_t), .b(GATE), .c(1'b1),
                         .p(garbage[0]), .q(garbage[1]), .r(s_n));
  peres_gate   u_pg_rst (.a(GATE), .b(d_c), .c(1'b1),
                         .p(garbage[2]), .q(garbage[3]), .r(r_n));

  peres_gate   u_pg_qb  (.a(q_fb), .b(r_n), .c(1'b1),
                         .p(garbage[4]), .q(garbage[5]), .r(qb));
  feynman_gate u_fg_qb  (.a(qb), .b(1'b0), .p(garbage[8]), .q(qb_fb));

  peres_gate   u_pg_q   (.a(s_n), .b(qb_fb), .c(1'b1),
                         .p(garbage[6]), .q(garbage[7]), .r(q_next));
  always_ff @(posedge clk or posedge rst) begin
    if (rst) q_reg <= 1'b0;
    else     q_reg <= q_next;
  end

  feynman_gate u_fg_q   (.a(q_reg), .b(1'b0), .p(dout), .q(q_fb));
endmodule
