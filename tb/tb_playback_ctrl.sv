// tb_playback_ctrl: checks Memory_sync against a reference model under
// random register settings and TTC commands, and counts the cases the
// design must handle: VME start, VME freeze, TTC start, TTC restart while
// running (one clock of low), TTC stop, and switching control to TTC.
module tb_playback_ctrl;
  logic clk = 0, rst = 1;
  logic pg_playback = 0, pg_sel_ttc = 0, ttc_start = 0, ttc_stop = 0;
  logic memory_sync, cycling;
  int checks = 0, failures = 0;
  int n_vme_start = 0, n_vme_stop = 0, n_ttc_start = 0, n_restart = 0, n_ttc_stop = 0, n_switch = 0;

  playback_ctrl dut (.*);

  always #12.5 clk = ~clk;

  logic m_run = 0, m_ms = 0, m_pb = 0, m_sel = 0;
  always @(posedge clk) begin
    if (rst) begin m_run = 0; m_ms = 0; m_pb = 0; m_sel = 0; end
    else begin
      logic run, restart;
      if (!pg_sel_ttc) m_run = 0;
      else if (ttc_start) m_run = 1;
      else if (ttc_stop) m_run = 0;
      run = pg_sel_ttc ? m_run : pg_playback;
      restart = pg_sel_ttc ? ttc_start : (pg_playback && !m_pb);
      if (restart && m_ms) n_restart += pg_sel_ttc;
      if (!pg_sel_ttc && pg_playback && !m_pb) n_vme_start++;
      if (!pg_sel_ttc && !pg_playback && m_pb && m_ms) n_vme_stop++;
      if (pg_sel_ttc && ttc_start) n_ttc_start++;
      if (pg_sel_ttc && ttc_stop && !ttc_start && m_ms) n_ttc_stop++;
      if (pg_sel_ttc && !m_sel) n_switch++;
      m_ms = run && !(restart && m_ms);
      m_pb = pg_playback;
      m_sel = pg_sel_ttc;
    end
  end

  always @(negedge clk) if (!rst) begin
    checks++;
    if (memory_sync !== m_ms || cycling !== m_ms) begin
      failures++;
      $display("FAIL t=%0t memory_sync %b expected %b", $time, memory_sync, m_ms);
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // directed: VME start, then a TTC restart while running
    @(negedge clk) pg_playback = 1;
    repeat (3) @(negedge clk);
    checks++; if (!memory_sync) begin failures++; $display("FAIL VME start"); end
    pg_sel_ttc = 1; pg_playback = 0;
    @(negedge clk) ttc_start = 1;
    @(negedge clk) ttc_start = 0;
    checks++; if (!memory_sync) begin failures++; $display("FAIL TTC start"); end
    @(negedge clk) ttc_start = 1;
    @(negedge clk) ttc_start = 0;
    checks++; if (memory_sync) begin failures++; $display("FAIL restart dip"); end
    @(negedge clk);
    checks++; if (!memory_sync) begin failures++; $display("FAIL after dip"); end
    // random
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 49) == 0) pg_sel_ttc = !pg_sel_ttc;
      if ($urandom_range(0, 19) == 0) pg_playback = !pg_playback;
      ttc_start = ($urandom_range(0, 29) == 0);
      ttc_stop  = ($urandom_range(0, 29) == 0);
    end
    @(negedge clk);
    checks++;
    if (!n_vme_start || !n_vme_stop || !n_ttc_start || !n_restart || !n_ttc_stop || !n_switch) begin
      failures++;
      $display("FAIL coverage %0d %0d %0d %0d %0d %0d", n_vme_start, n_vme_stop, n_ttc_start, n_restart, n_ttc_stop, n_switch);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
