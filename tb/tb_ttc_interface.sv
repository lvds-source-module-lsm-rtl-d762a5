// tb_ttc_interface: random TTCrx traffic against a cycle-by-cycle reference
// model of the broadcast decoder (start = 01 0000 xx, stop = 10 0000 xx,
// nothing for other codes), the 12-bit BC counter, the 16-bit L1A counter,
// the SER/DER flags and the 16-deep dump FIFO (push, pop, flush, full,
// empty).  Also checks the TTCrx address 0000 ssss 001000.
module tb_ttc_interface;
  logic clk = 0, rst = 1;
  logic [7:0] brcst = 0;
  logic brcst_str = 0, bcnt_rst = 0, evcnt_rst = 0, l1a = 0;
  logic sin_err_str = 0, db_err_str = 0, clr_flags = 0;
  logic [7:0] dout = 0;
  logic [3:0] dq = 0;
  logic dout_str = 0, fifo_pop = 0, fifo_flush = 0;
  logic [3:0] serial_lsb = 4'hB;
  logic ttc_start, ttc_stop, brcst_seen;
  logic [7:0] last_brcst;
  logic [11:0] bcnt;
  logic [15:0] evnt;
  logic ser_flag, der_flag;
  logic [11:0] fifo_data;
  logic fifo_full, fifo_empty;
  logic [13:0] ttcrx_addr;
  int checks = 0, failures = 0;
  int nstart = 0, nstop = 0, nfull = 0, nbcrst = 0;

  ttc_interface dut (.*);

  always #12.5 clk = ~clk;

  // reference state
  logic        m_start = 0, m_stop = 0, m_seen = 0;
  logic [7:0]  m_last = 0;
  logic [11:0] m_bcnt = 0;
  logic [15:0] m_evnt = 0;
  logic        m_ser = 0, m_der = 0;
  logic [11:0] m_q [$];

  always @(posedge clk) begin
    if (rst) begin
      m_start = 0; m_stop = 0; m_seen = 0; m_last = 0; m_bcnt = 0; m_evnt = 0;
      m_ser = 0; m_der = 0; m_q.delete();
    end else begin
      m_start = brcst_str && brcst[7:2] == 6'b010000;
      m_stop  = brcst_str && brcst[7:2] == 6'b100000;
      m_seen  = brcst_str;
      if (brcst_str) m_last = brcst;
      m_bcnt = bcnt_rst ? 0 : m_bcnt + 1;
      if (evcnt_rst) m_evnt = 0; else if (l1a) m_evnt++;
      if (clr_flags) begin m_ser = 0; m_der = 0; end
      else begin if (sin_err_str) m_ser = 1; if (db_err_str) m_der = 1; end
      if (fifo_flush) m_q.delete();
      else begin
        logic was_empty, was_full;
        was_empty = (m_q.size() == 0);
        was_full  = (m_q.size() == 16);
        if (fifo_pop && !was_empty) void'(m_q.pop_front());
        if (dout_str && !was_full) m_q.push_back({dq, dout});
      end
      if (m_start) nstart++;
      if (m_stop) nstop++;
      if (m_q.size() == 16) nfull++;
      if (bcnt_rst) nbcrst++;
    end
  end

  always @(negedge clk) if (!rst) begin
    checks++;
    if (ttc_start !== m_start || ttc_stop !== m_stop || brcst_seen !== m_seen ||
        last_brcst !== m_last || bcnt !== m_bcnt || evnt !== m_evnt ||
        ser_flag !== m_ser || der_flag !== m_der ||
        fifo_empty !== (m_q.size() == 0) || fifo_full !== (m_q.size() == 16) ||
        (m_q.size() != 0 && fifo_data !== m_q[0])) begin
      failures++;
      $display("FAIL t=%0t start %b/%b stop %b/%b bcnt %h/%h evnt %h/%h flags %b%b/%b%b fifo e%b f%b %h (model %0d %h)",
               $time, ttc_start, m_start, ttc_stop, m_stop, bcnt, m_bcnt, evnt, m_evnt,
               ser_flag, der_flag, m_ser, m_der, fifo_empty, fifo_full, fifo_data,
               m_q.size(), (m_q.size() != 0) ? m_q[0] : 12'h0);
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
    checks++;
    if (ttcrx_addr !== 14'b0000_1011_001000) begin
      failures++; $display("FAIL ttcrx_addr %b", ttcrx_addr);
    end
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      brcst_str = ($urandom_range(0, 9) == 0);
      case ($urandom_range(0, 3))
        0: brcst = {6'b010000, 2'($urandom)};
        1: brcst = {6'b100000, 2'($urandom)};
        default: brcst = 8'($urandom);
      endcase
      bcnt_rst   = (n % 3564 == 3563);
      evcnt_rst  = ($urandom_range(0, 999) == 0);
      l1a        = ($urandom_range(0, 3) == 0);
      sin_err_str = ($urandom_range(0, 99) == 0);
      db_err_str  = ($urandom_range(0, 199) == 0);
      clr_flags   = ($urandom_range(0, 149) == 0);
      dout_str   = ($urandom_range(0, (n / 2000) % 2 ? 1 : 5) == 0);
      dout       = 8'($urandom);
      dq         = 4'($urandom);
      fifo_pop   = ($urandom_range(0, (n / 2000) % 2 ? 7 : 1) == 0);
      fifo_flush = ($urandom_range(0, 499) == 0);
    end
    @(negedge clk);
    checks++;
    if (nstart == 0 || nstop == 0 || nfull == 0 || nbcrst == 0) begin
      failures++; $display("FAIL coverage start=%0d stop=%0d full=%0d bcrst=%0d", nstart, nstop, nfull, nbcrst);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
