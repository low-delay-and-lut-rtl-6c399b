// Check of the parallel-in parallel-out register: random words are
// presented; q must show each word exactly one rising edge later and stay
// unchanged between edges. Also checks the asynchronous clear.
module tb_pipo_sr;
  localparam int W = 4;
  logic clk = 1'b0, clear;
  logic [W-1:0] d, q, model;
  int checks = 0, failures = 0;

  pipo_sr dut (.clk(clk), .clear(clear), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic compare(input string what);
    checks++;
    if (q !== model) begin
      failures++;
      $display("FAIL %s t=%0t q=%b exp %b", what, $time, q, model);
    end
  endtask

  initial begin
    clear = 1'b1; d = '1;
    repeat (2) @(posedge clk);
    model = '0;
    #1 compare("clear");
    @(negedge clk) clear = 1'b0;
    for (int n = 0; n < 300; n++) begin
      d = W'($urandom);
      compare("between edges");
      @(posedge clk);
      model = d;
      #1 compare("load");
      @(negedge clk);
    end
    clear = 1'b1;
    #1 model = '0;
    compare("async clear");
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
