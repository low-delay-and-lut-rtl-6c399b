// Check of the reversible D flip-flop: after reset dout is 0; then for a
// random bit stream dout must equal the bit presented before the previous
// rising edge (one-cycle latency), must not change between edges, and an
// asynchronous reset in mid-cycle must clear it at once.
module tb_rev_dff;
  logic clk = 1'b0, rst, d1, dout;
  logic [8:0] garbage;
  logic expected;
  int checks = 0, failures = 0, cycles = 0;

  rev_dff dut (.clk(clk), .rst(rst), .d1(d1), .dout(dout), .garbage(garbage));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(input logic exp, input string what);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL %s: dout=%b expected %b (cycle %0d)", what, dout, exp, cycles);
    end
  endtask

  initial begin
    rst = 1'b1; d1 = 1'b1;
    repeat (2) @(posedge clk);
    #1 check(1'b0, "reset");
    @(negedge clk) rst = 1'b0;
    expected = 1'b0;
    for (int n = 0; n < 200; n++) begin
      // here: at a falling edge
      check(expected, "hold between edges");
      d1 = 1'($urandom);
      @(posedge clk);
      expected = d1;
      #1 check(expected, "capture");
      if (n == 100) begin
        // async clear in mid-cycle, with a 1 stored
        d1 = 1'b1;
        @(posedge clk);
        #2 rst = 1'b1;
        #1 check(1'b0, "async reset");
        expected = 1'b0;
      end
      @(negedge clk) rst = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
