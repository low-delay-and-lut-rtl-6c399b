// End-to-end check of the whole register family at its default sizes.
//
// All six registers run at once on the shared clock with random stimulus.
// A behavioural reference of every register (written from the operating
// definitions, not from the RTL) is advanced on each rising edge and all
// outputs are compared after the edge and again just before the next one.
// The test also counts how often each mechanism happened and fails if one
// never did: the four modes of both universal registers, the PISO write and
// shift, and the asynchronous clear of every register.
module tb_rev_sr_top;
  import usr_pkg::*;

  logic clk = 1'b0;
  logic u4_reset, u8_reset, siso_clear, sipo_clear, piso_clear, pipo_clear;
  logic [3:0] u4_D, u4_Q;
  logic [7:0] u8_D, u8_Q;
  logic u4_sl, u4_sr, u8_sl, u8_sr;
  usr_mode_e u4_mode, u8_mode;
  logic siso_in, siso_out, sipo_in, sipo_out, piso_ws, piso_out;
  logic [3:0] sipo_q, piso_d, piso_q, pipo_d, pipo_q;

  // reference state
  logic [3:0] m_u4, m_siso, m_sipo, m_piso, m_pipo;
  logic [7:0] m_u8;

  int checks = 0, failures = 0;
  int n_u4 [4], n_u8 [4];
  int n_write = 0, n_shift = 0, n_clear = 0;

  rev_sr_top dut (
    .clk(clk),
    .u4_reset(u4_reset), .u4_D(u4_D), .u4_sl(u4_sl), .u4_sr(u4_sr),
    .u4_s1(u4_mode[0]), .u4_s2(u4_mode[1]), .u4_Q(u4_Q),
    .u8_reset(u8_reset), .u8_D(u8_D), .u8_sl(u8_sl), .u8_sr(u8_sr),
    .u8_s1(u8_mode[0]), .u8_s2(u8_mode[1]), .u8_Q(u8_Q),
    .siso_clear(siso_clear), .siso_in(siso_in), .siso_out(siso_out),
    .sipo_clear(sipo_clear), .sipo_in(sipo_in), .sipo_q(sipo_q), .sipo_out(sipo_out),
    .piso_clear(piso_clear), .piso_write_shift(piso_ws), .piso_d(piso_d),
    .piso_out(piso_out), .piso_q(piso_q),
    .pipo_clear(pipo_clear), .pipo_d(pipo_d), .pipo_q(pipo_q));

  always #5 clk = ~clk;

  function automatic logic [3:0] usr4(usr_mode_e md, logic [3:0] q, logic [3:0] d,
                                      logic l, logic r);
    case (md)
      MODE_LOAD: return d;
      MODE_SHL:  return {q[2:0], l};
      MODE_SHR:  return {r, q[3:1]};
      default:   return q;
    endcase
  endfunction

  function automatic logic [7:0] usr8(usr_mode_e md, logic [7:0] q, logic [7:0] d,
                                      logic l, logic r);
    case (md)
      MODE_LOAD: return d;
      MODE_SHL:  return {q[6:0], l};
      MODE_SHR:  return {r, q[7:1]};
      default:   return q;
    endcase
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  task automatic compare_all;
    chk(u4_Q === m_u4, "u4");
    chk(u8_Q === m_u8, "u8");
    chk(siso_out === m_siso[3], "siso");
    chk(sipo_q === m_sipo && sipo_out === m_sipo[3], "sipo");
    chk(piso_q === m_piso && piso_out === m_piso[3], "piso");
    chk(pipo_q === m_pipo, "pipo");
  endtask

  task automatic randomize_inputs;
    u4_mode = usr_mode_e'($urandom_range(0, 3));
    u8_mode = usr_mode_e'($urandom_range(0, 3));
    u4_D = 4'($urandom); u8_D = 8'($urandom);
    {u4_sl, u4_sr, u8_sl, u8_sr} = 4'($urandom);
    siso_in = 1'($urandom); sipo_in = 1'($urandom);
    piso_ws = ($urandom_range(0, 3) == 0);   // mostly shifting
    piso_d = 4'($urandom); pipo_d = 4'($urandom);
  endtask

  task automatic clear_all;
    {u4_reset, u8_reset, siso_clear, sipo_clear, piso_clear, pipo_clear} = '1;
    #1;
    {m_u4, m_u8, m_siso, m_sipo, m_piso, m_pipo} = '0;
    n_clear++;
    compare_all();
  endtask

  initial begin
    {u4_reset, u8_reset, siso_clear, sipo_clear, piso_clear, pipo_clear} = '1;
    randomize_inputs();
    repeat (2) @(posedge clk);
    #1 clear_all();
    @(negedge clk);
    {u4_reset, u8_reset, siso_clear, sipo_clear, piso_clear, pipo_clear} = '0;
    for (int n = 0; n < 1000; n++) begin
      // at a falling edge
      randomize_inputs();
      compare_all();
      n_u4[u4_mode]++;
      n_u8[u8_mode]++;
      if (piso_ws) n_write++; else n_shift++;
      @(posedge clk);
      m_u4   = usr4(u4_mode, m_u4, u4_D, u4_sl, u4_sr);
      m_u8   = usr8(u8_mode, m_u8, u8_D, u8_sl, u8_sr);
      m_siso = {m_siso[2:0], siso_in};
      m_sipo = {m_sipo[2:0], sipo_in};
      m_piso = piso_ws ? piso_d : {m_piso[2:0], piso_d[0]};
      m_pipo = pipo_d;
      #1 compare_all();
      if (n % 333 == 332) begin
        #1 clear_all();
      end
      @(negedge clk);
      {u4_reset, u8_reset, siso_clear, sipo_clear, piso_clear, pipo_clear} = '0;
    end
    for (int k = 0; k < 4; k++) begin
      chk(n_u4[k] > 0, $sformatf("4-bit mode %0d exercised", k));
      chk(n_u8[k] > 0, $sformatf("8-bit mode %0d exercised", k));
    end
    chk(n_write > 0, "PISO write exercised");
    chk(n_shift > 0, "PISO shift exercised");
    chk(n_clear > 1, "mid-run clear exercised");
    $display("u4 modes load/shl/shr/hold = %0d/%0d/%0d/%0d", n_u4[0], n_u4[1], n_u4[2], n_u4[3]);
    $display("u8 modes load/shl/shr/hold = %0d/%0d/%0d/%0d", n_u8[0], n_u8[1], n_u8[2], n_u8[3]);
    $display("piso writes=%0d shifts=%0d, clears=%0d", n_write, n_shift, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
