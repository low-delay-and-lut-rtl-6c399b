// Check of the universal shift register at both widths the design is used
// at, 4 (default) and 8 bits. Random modes, data and serial inputs are
// applied for many cycles; after every rising edge Q is compared with a
// reference register updated by the mode definitions in usr_pkg. Each result
// must appear exactly one clock edge after its inputs (no extra latency).
// A mid-run asynchronous reset is checked too, and each of the four modes
// must have been exercised.
module tb_universal_sr;
  import usr_pkg::*;

  logic clk = 1'b0, reset;
  logic [3:0] d4, q4, m4;
  logic [7:0] d8, q8, m8;
  logic sl, sr;
  usr_mode_e mode;
  int checks = 0, failures = 0;
  int mode_count [4];

  universal_sr            dut4 (.clk(clk), .reset(reset), .D(d4), .sl(sl), .sr(sr),
                                .s1(mode[0]), .s2(mode[1]), .Q(q4));
  universal_sr #(.WIDTH(8)) dut8 (.clk(clk), .reset(reset), .D(d8), .sl(sl), .sr(sr),
                                .s1(mode[0]), .s2(mode[1]), .Q(q8));

  always #5 clk = ~clk;

  function automatic logic [7:0] model(input usr_mode_e md, input int w,
                                       input logic [7:0] q, input logic [7:0] d,
                                       input logic l, input logic r);
    logic [7:0] n;
    case (md)
      MODE_LOAD: n = d;
      MODE_SHL:  n = {q[6:0], l};
      MODE_SHR:  begin n = q >> 1; n[w-1] = r; end
      default:   n = q;
    endcase
    return (w == 8) ? n : (n & 8'h0F);
  endfunction

  task automatic compare;
    checks += 2;
    if (q4 !== m4) begin failures++; $display("FAIL w4 t=%0t rst=%b mode=%s Q=%h exp %h", $time, reset, mode.name(), q4, m4); end
    if (q8 !== m8) begin failures++; $display("FAIL w8 mode=%s Q=%h exp %h", mode.name(), q8, m8); end
  endtask

  initial begin
    reset = 1'b1; d4 = '1; d8 = '1; sl = 1'b1; sr = 1'b1; mode = MODE_LOAD;
    repeat (2) @(posedge clk);
    m4 = '0; m8 = '0;
    #1 compare();
    @(negedge clk) reset = 1'b0;
    for (int n = 0; n < 400; n++) begin
      // here: at a falling edge
      mode = usr_mode_e'($urandom_range(0, 3));
      d4 = 4'($urandom); d8 = 8'($urandom);
      sl = 1'($urandom); sr = 1'($urandom);
      // values before the edge must still be the old ones
      compare();
      mode_count[mode]++;
      m4 = 4'(model(mode, 4, {4'h0, m4}, {4'h0, d4}, sl, sr));
      m8 = model(mode, 8, m8, d8, sl, sr);
      @(posedge clk);
      #1 compare();
      if (n == 200) begin
        #1 reset = 1'b1;
        #1 m4 = '0; m8 = '0;
        compare();
      end
      @(negedge clk) reset = 1'b0;
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (mode_count[k] == 0) begin
        failures++;
        $display("FAIL mode %0d never exercised", k);
      end
    end
    $display("modes: load=%0d shl=%0d shr=%0d hold=%0d",
             mode_count[0], mode_count[1], mode_count[2], mode_count[3]);
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
