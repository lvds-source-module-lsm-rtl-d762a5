// tb_fp_indicators: checks the LED drivers against a reference model:
// VME access and TTC command LEDs stay lit for exactly STRETCH clocks after
// the last event, Running / TTC Ready follow their inputs, the configured
// LED needs all six PG FPGAs configured and the bar shows the last
// broadcast byte.
module tb_fp_indicators;
  localparam int STRETCH = 10;
  logic clk = 0, rst = 1;
  logic vme_access = 0, running = 0, ttc_ready = 0, brcst_seen = 0;
  logic [7:0] last_brcst = 0;
  logic [6:1] pg_done = '1;
  logic led_vme, led_running, led_ttc_ready, led_ttc_cmd, led_pg_config;
  logic [7:0] led_bar;
  int checks = 0, failures = 0, m_v = 0, m_c = 0, lit_v = 0;

  fp_indicators #(.STRETCH(STRETCH)) dut (.*);

  always #12.5 clk = ~clk;

  always @(posedge clk) if (rst) begin m_v = 0; m_c = 0; end else begin
    m_v = vme_access ? STRETCH : (m_v > 0 ? m_v - 1 : 0);
    m_c = brcst_seen ? STRETCH : (m_c > 0 ? m_c - 1 : 0);
  end

  always @(negedge clk) if (!rst) begin
    checks++;
    if (led_vme !== (m_v > 0) || led_ttc_cmd !== (m_c > 0) || led_running !== running ||
        led_ttc_ready !== ttc_ready || led_pg_config !== (&pg_done) || led_bar !== last_brcst) begin
      failures++;
      $display("FAIL t=%0t vme %b/%0d cmd %b/%0d", $time, led_vme, m_v, led_ttc_cmd, m_c);
    end
    if (led_vme) lit_v++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // one isolated access: lit for STRETCH clocks
    @(negedge clk) vme_access = 1;
    @(negedge clk) vme_access = 0;
    repeat (STRETCH + 5) @(negedge clk);
    checks++;
    if (lit_v != STRETCH) begin failures++; $display("FAIL stretch %0d", lit_v); end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      vme_access = ($urandom_range(0, 14) == 0);
      brcst_seen = ($urandom_range(0, 19) == 0);
      running    = ($urandom_range(0, 9) != 0) ? running : !running;
      ttc_ready  = ($urandom_range(0, 9) != 0) ? ttc_ready : !ttc_ready;
      if (brcst_seen) last_brcst = 8'($urandom);
      pg_done    = ($urandom_range(0, 3) == 0) ? 6'($urandom) : '1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
