// Check of the serial-in parallel-out register: a random serial stream is
// clocked in; after each rising edge q must hold the last four bits received
// (newest in q[0]) and data_out the bit received four edges earlier. Also
// checks the clear and that a pattern needs exactly WIDTH edges to fill q.
module tb_sipo_sr;
  localparam int W = 4;
  logic clk = 1'b0, clear, data_in, data_out;
  logic [W-1:0] q, model;
  int checks = 0, failures = 0;

  sipo_sr dut (.clk(clk), .clear(clear), .data_in(data_in), .q(q), .data_out(data_out));

  always #5 clk = ~clk;

  task automatic compare(input string what);
    checks++;
    if (q !== model || data_out !== model[W-1]) begin
      failures++;
      $display("FAIL %s t=%0t q=%b out=%b exp %b", what, $time, q, data_out, model);
    end
  endtask

  initial begin
    clear = 1'b1; data_in = 1'b1;
    repeat (2) @(posedge clk);
    model = '0;
    #1 compare("clear");
    @(negedge clk) clear = 1'b0;
    // fill with 1011 (first bit sent ends in q[3]): takes exactly W edges
    for (int k = 0; k < W; k++) begin
      data_in = 1'(4'b1011 >> (W - 1 - k));
      @(posedge clk);
      model = {model[W-2:0], data_in};
      #1 compare("fill");
      @(negedge clk);
    end
    checks++;
    if (q !== 4'b1011) begin failures++; $display("FAIL word after 4 edges: %b", q); end
    for (int n = 0; n < 300; n++) begin
      data_in = 1'($urandom);
      compare("between edges");
      @(posedge clk);
      model = {model[W-2:0], data_in};
      #1 compare("shift");
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
