// 4-to-1 selector in front of each bit of the universal shift register.
//
// Chooses the next value of one register bit from four candidates under two
// select lines s1 and s2. The port names (i0..i3, s1, s2, y1) and the
// assignment of the inputs (i0 = parallel data, i1 = shift-left input,
// i2 = shift-right input) follow the register's schematic; the select code,
// {s2, s1} as a binary index (s1 is the low bit), is this design's choice.
// i3 carries the bit's own output, so code 3 holds. Purely combinational.
module mux4_1 (
  input  logic i0,
  input  logic i1,
  input  logic i2,
  input  logic i3,
  input  logic s1,
  input  logic s2,
  output logic y1
);
  always_comb begin
    unique case ({s2, s1})
      2'b00:   y1 = i0;
      2'b01:   y1 = i1;
      2'b10:   y1 = i2;
      default: y1 = i3;
    endcase
  end
endmodule
