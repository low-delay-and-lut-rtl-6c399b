// Check of the parallel-in serial-out register. Random words are written
// (write_shift = 1) and then shifted out (write_shift = 0); serial_out must
// give d[3], d[2], d[1], d[0] on the edges that follow the write, and the
// full state q is compared with a reference on every edge, including random
// interleavings of writes and shifts. Also checks the asynchronous clear.
module tb_piso_sr;
  localparam int W = 4;
  logic clk = 1'b0, clear, ws, serial_out;
  logic [W-1:0] d, q, model;
  int checks = 0, failures = 0, writes = 0, shifts = 0;

  piso_sr dut (.clk(clk), .clear(clear), .write_shift(ws), .d(d),
               .serial_out(serial_out), .q(q));

  always #5 clk = ~clk;

  task automatic compare(input string what);
    checks++;
    if (q !== model || serial_out !== model[W-1]) begin
      failures++;
      $display("FAIL %s t=%0t q=%b out=%b exp %b", what, $time, q, serial_out, model);
    end
  endtask

  task automatic step;
    // at a falling edge with ws and d set
    compare("between edges");
    if (ws) writes++; else shifts++;
    @(posedge clk);
    model = ws ? d : {model[W-2:0], d[0]};
    #1 compare(ws ? "write" : "shift");
    @(negedge clk);
  endtask

  initial begin
    clear = 1'b1; d = '1; ws = 1'b1;
    repeat (2) @(posedge clk);
    model = '0;
    #1 compare("clear");
    @(negedge clk) clear = 1'b0;
    // whole-word transfers: write, then read serial bits
    for (int n = 0; n < 40; n++) begin
      logic [W-1:0] word;
      word = W'($urandom);
      ws = 1'b1; d = word;
      step();
      for (int k = W - 1; k >= 0; k--) begin
        checks++;
        if (serial_out !== word[k]) begin
          failures++;
          $display("FAIL word %b bit %0d: out=%b", word, k, serial_out);
        end
        if (k > 0) begin
          ws = 1'b0; d = W'($urandom);
          step();
        end
      end
    end
    // random interleaving
    for (int n = 0; n < 200; n++) begin
      ws = 1'($urandom); d = W'($urandom);
      step();
    end
    clear = 1'b1;
    #1 model = '0;
    compare("async clear");
    $display("writes=%0d shifts=%0d", writes, shifts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
