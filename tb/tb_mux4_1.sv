// Exhaustive check of the 4-to-1 selector: for every select code {s2, s1}
// and every data pattern, y1 must equal the data input the code names.
module tb_mux4_1;
  logic [3:0] i;
  logic s1, s2, y1;
  int checks = 0, failures = 0;

  mux4_1 dut (.i0(i[0]), .i1(i[1]), .i2(i[2]), .i3(i[3]),
              .s1(s1), .s2(s2), .y1(y1));

  initial begin
    for (int sel = 0; sel < 4; sel++) begin
      for (int v = 0; v < 16; v++) begin
        {s2, s1} = 2'(sel);
        i = 4'(v);
        #1;
        checks++;
        if (y1 !== i[sel]) begin
          failures++;
          $display("FAIL sel=%0d i=%b -> y1=%b", sel, i, y1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
