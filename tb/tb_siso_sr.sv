// Check of the serial-in serial-out register: a random stream is clocked in
// and data_out must reproduce it delayed by exactly WIDTH rising edges
// (zeros first, after the clear). Also checks the asynchronous clear.
module tb_siso_sr;
  localparam int W = 4;
  logic clk = 1'b0, clear, data_in, data_out;
  logic [W-1:0] hist;     // last W bits sent, newest in bit 0
  int checks = 0, failures = 0;

  siso_sr dut (.clk(clk), .clear(clear), .data_in(data_in), .data_out(data_out));

  always #5 clk = ~clk;

  initial begin
    clear = 1'b1; data_in = 1'b1;
    repeat (2) @(posedge clk);
    hist = '0;
    #1 checks++;
    if (data_out !== 1'b0) begin failures++; $display("FAIL clear"); end
    @(negedge clk) clear = 1'b0;
    for (int n = 0; n < 300; n++) begin
      data_in = 1'($urandom);
      @(posedge clk);
      hist = {hist[W-2:0], data_in};
      #1 checks++;
      if (data_out !== hist[W-1]) begin
        failures++;
        $display("FAIL t=%0t out=%b exp %b", $time, data_out, hist[W-1]);
      end
      @(negedge clk);
    end
    clear = 1'b1;
    #1 checks++;
    // after the clear all stages are 0: check by shifting zeros through
    if (data_out !== 1'b0) begin failures++; $display("FAIL async clear"); end
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
