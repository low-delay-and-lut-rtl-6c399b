// Family of shift registers built from reversible (Peres/Feynman) D
// flip-flops, placed side by side on one clock.
//
// The source design presents the universal shift register as its main
// result, at four and at eight bits, together with the four basic register
// organisations it is made from. They do not feed one another, so each keeps
// its own ports here, prefixed by its name:
//   u4_*   4-bit universal shift register (load, shift left/right, hold)
//   u8_*   8-bit universal shift register
//   siso_* serial-in serial-out,   sipo_* serial-in parallel-out,
//   piso_* parallel-in serial-out, pipo_* parallel-in parallel-out
// Every register acts on the rising edge of clk; each has its own
// asynchronous, active-high clear. Sharing one clock input is this design's
// choice; the widths are the source design's (4 and 8 for the universal
// registers, 4 for the basic ones).
module rev_sr_top #(
  parameter int unsigned U4_WIDTH    = 4,
  parameter int unsigned U8_WIDTH    = 8,
  parameter int unsigned BASIC_WIDTH = 4
) (
  input  logic                   clk,

  input  logic                   u4_reset,
  input  logic [U4_WIDTH-1:0]    u4_D,
  input  logic                   u4_sl,
  input  logic                   u4_sr,
  input  logic                   u4_s1,
  input  logic                   u4_s2,
  output logic [U4_WIDTH-1:0]    u4_Q,

  input  logic                   u8_reset,
  input  logic [U8_WIDTH-1:0]    u8_D,
  input  logic                   u8_sl,
  input  logic                   u8_sr,
  input  logic                   u8_s1,
  input  logic                   u8_s2,
  output logic [U8_WIDTH-1:0]    u8_Q,

  input  logic                   siso_clear,
  input  logic                   siso_in,
  output logic                   siso_out,

  input  logic                   sipo_clear,
  input  logic                   sipo_in,
  output logic [BASIC_WIDTH-1:0] sipo_q,
  output logic                   sipo_out,

  input  logic                   piso_clear,
  input  logic                   piso_write_shift,
  input  logic [BASIC_WIDTH-1:0] piso_d,
  output logic                   piso_out,
  output logic [BASIC_WIDTH-1:0] piso_q,

  input  logic                   pipo_clear,
  input  logic [BASIC_WIDTH-1:0] pipo_d,
  output logic [BASIC_WIDTH-1:0] pipo_q
);
  universal_sr #(.WIDTH(U4_WIDTH)) u_universal_4bit (
    .clk(clk), .reset(u4_reset), .D(u4_D), .sl(u4_sl), .sr(u4_sr),
    .s1(u4_s1), .s2(u4_s2), .Q(u4_Q));

  universal_sr #(.WIDTH(U8_WIDTH)) u_universal_8bit (
    .clk(clk), .reset(u8_reset), .D(u8_D), .sl(u8_sl), .sr(u8_sr),
    .s1(u8_s1), .s2(u8_s2), .Q(u8_Q));

  siso_sr #(.WIDTH(BASIC_WIDTH)) u_siso (
    .clk(clk), .clear(siso_clear), .data_in(siso_in), .data_out(siso_out));

  sipo_sr #(.WIDTH(BASIC_WIDTH)) u_sipo (
    .clk(clk), .clear(sipo_clear), .data_in(sipo_in), .q(sipo_q),
    .data_out(sipo_out));

  piso_sr #(.WIDTH(BASIC_WIDTH)) u_piso (
    .clk(clk), .clear(piso_clear), .write_shift(piso_write_shift),
    .d(piso_d), .serial_out(piso_out), .q(piso_q));

  pipo_sr #(.WIDTH(BASIC_WIDTH)) u_pipo (
    .clk(clk), .clear(pipo_clear), .d(pipo_d), .q(pipo_q));
endmodule
