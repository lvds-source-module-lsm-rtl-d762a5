// tb_lsm_top: end-to-end test of the whole LVDS Source Module at its
// default size (6 PG FPGAs x 16 links x 1024 words), driven only through
// its VME, TTC and I2C pins.
//
// A reference model of the 96 link memories and of the playback pointer
// predicts every 12-bit frame on all 96 serial outputs in every bunch
// crossing; it follows the Memory_sync, length, LVDS Sync and local bus
// signals inside the board, whose own behaviour the VME FPGA testbench
// checks.  The run: sync frames after power-up; idle words once LVDS Sync
// is cleared; patterns loaded into every link over VME; playback under VME
// control with a cycle longer than the memory (location 0 fills the tail),
// including two full 3564-crossing orbit cycles;
// VME reads and writes during playback; switch to TTC control with Start,
// restart and Stop broadcasts; the VME lockout; a PG reset (which blanks
// the serial outputs for two crossings and realigns them); the PLL fault
// bit; BCNT/EVNT counters; the TTCrx dump FIFO; an I2C register write and
// read; and LVDS Sync again.  Each mechanism is counted, and one that never
// happened counts as a failure.
module tb_lsm_top;
  import lsm_pkg::*;
  localparam int NPG = 6, NL = 16, NLINK = NPG * NL, DEPTH = 1024, LOADED = 48;
  localparam logic [31:0] BASE = 32'h00A4_0000;  // A24: A23..A18 = 101001

  logic clk_ser = 0, clk = 0, rst = 1;
  logic        vme_as_n, vme_ds0_n, vme_ds1_n, vme_write_n, vme_lword_n;
  logic [5:0]  vme_am;
  logic [31:1] vme_addr;
  logic [15:0] vme_d_in, vme_d_out;
  logic        vme_d_oe, vme_dtack_n;
  logic [15:0] base_sw = 16'h00A4;
  logic [7:0]  serial_num = 8'h13;
  logic [3:0]  revision = 4'h1;
  logic ttcdec_s1 = 1, ttcdec_s2 = 1;
  logic [7:0] brcst = 0;
  logic brcst_str = 0, bcnt_rst = 0, evcnt_rst = 0, l1a = 0, sin_err_str = 0, db_err_str = 0;
  logic [7:0] ttc_dout = 0;
  logic [3:0] ttc_dq = 0;
  logic ttc_dout_str = 0;
  logic [13:0] ttcrx_addr;
  logic ttcdec_tx, ttcrx_reset, ttcrx_jtag_reset;
  logic i2c_scl_oe, i2c_sda_oe, s_scl_oe, s_sda_oe;
  wire  scl = !(i2c_scl_oe || s_scl_oe);
  wire  sda = !(i2c_sda_oe || s_sda_oe);
  logic [6:1] pg_done = 6'b111111;
  logic [NPG-1:0] pll_locked = '1;
  logic pg_pll_reset;
  logic [NLINK-1:0] lvds_out;
  logic led_vme, led_running, led_ttc_ready, led_ttc_cmd, led_pg_config;
  logic [7:0] led_bar;
  int checks = 0, failures = 0;
  int cnt [string];

  lsm_top dut (
    .clk, .clk_ser, .rst, .vme_as_n, .vme_ds0_n, .vme_ds1_n, .vme_write_n, .vme_lword_n,
    .vme_am, .vme_addr, .vme_d_in, .vme_d_out, .vme_d_oe, .vme_dtack_n,
    .base_sw, .serial_num, .revision, .ttcdec_s1, .ttcdec_s2, .brcst, .brcst_str,
    .bcnt_rst, .evcnt_rst, .l1a, .sin_err_str, .db_err_str, .ttc_dout, .ttc_dq,
    .ttc_dout_str, .ttcrx_addr, .ttcdec_tx, .ttcrx_reset, .ttcrx_jtag_reset,
    .i2c_scl_i(scl), .i2c_sda_i(sda), .i2c_scl_oe, .i2c_sda_oe,
    .pg_done, .pll_locked, .pg_pll_reset, .lvds_out,
    .led_vme, .led_running, .led_ttc_ready, .led_ttc_cmd, .led_pg_config, .led_bar);
  vme_master_bfm bfm (.vme_as_n, .vme_ds0_n, .vme_ds1_n, .vme_write_n,
                      .vme_lword_n, .vme_am, .vme_addr, .vme_d_in, .vme_d_out,
                      .vme_d_oe, .vme_dtack_n);
  ttcrx_i2c_model ttcrx (.scl, .sda, .scl_oe(s_scl_oe), .sda_oe(s_sda_oe));

  always #1 clk_ser = ~clk_ser;
  initial begin #1 clk = 1; forever #12 clk = ~clk; end

  function automatic logic [9:0] pattern(int p, int l, int n);
    return 10'((p * 101 + l * 37 + n * 11 + 5) ^ (n >> 2));
  endfunction

  // ---------------- reference model of the 96 links ----------------
  logic [9:0]  mm [NPG][NL][DEPTH];
  logic [9:0]  q_m [NPG][NL];
  logic [9:0]  q_prev [NPG][NL];
  logic        ovr_m [NPG][NL];
  logic        ovr_prev [NPG][NL];
  int unsigned mptr = 0;
  logic        msq = 0;
  bit          checking = 0;
  int          quiet = 0;   // crossings whose frames a PG reset blanks (only
                            // the start bit of the first is sent)

  initial for (int p = 0; p < NPG; p++) for (int l = 0; l < NL; l++)
    for (int n = 0; n < DEPTH; n++) mm[p][l][n] = 10'h001;

  initial begin : model_and_checker
    logic [11:0] got [NLINK];
    logic [11:0] exp;
    logic        sync_now;
    lb_req_t     b;
    forever begin
      @(posedge clk);
      q_prev = q_m;
      ovr_prev = ovr_m;
      sync_now = dut.lvds_sync;
      b = dut.pg_lb;
      if (dut.pg_rst) quiet = 2;
      for (int p = 0; p < NPG; p++)
        for (int l = 0; l < NL; l++) begin
          automatic int unsigned pa = (mptr < DEPTH) ? mptr : 0;
          ovr_m[p][l] = 0;
          if (b.req && b.addr[17:15] == 3'(p + 1) && b.addr[14:11] == 4'(l)) begin
            ovr_m[p][l] = 1;
            if (b.we) begin mm[p][l][b.addr[10:1]] = b.wdata[9:0]; q_m[p][l] = b.wdata[9:0]; end
            else q_m[p][l] = mm[p][l][b.addr[10:1]];
          end else q_m[p][l] = mm[p][l][pa];
        end
      if (mptr >= DEPTH && dut.memory_sync && msq) cnt["beyond_depth"]++;
      if (dut.pg_rst) begin
        if (!rst) cnt["pg_reset"]++;
        mptr = 0; msq = 0;
      end else begin
        if (dut.memory_sync && !msq) begin mptr = 0; cnt["restart"]++; end
        else if (dut.memory_sync) begin
          if (mptr >= dut.pg_length) begin
            mptr = 0; cnt["wrap"]++;
            if (dut.pg_length == 16'd3563) cnt["orbit_cycle_3564"]++;
          end else mptr++;
        end else if (msq) cnt["freeze"]++;
        msq = dut.memory_sync;
      end
      for (int bit_i = 0; bit_i < 12; bit_i++) begin
        @(negedge clk_ser);
        for (int k = 0; k < NLINK; k++) got[k][bit_i] = lvds_out[k];
      end
      if (checking) begin
        for (int k = 0; k < NLINK; k++) begin
          exp = (quiet == 2) ? 12'b1 : (quiet == 1) ? 12'b0 :
                sync_now ? 12'b000000_111111 : {1'b0, q_prev[k / NL][k % NL], 1'b1};
          checks++;
          if (got[k] !== exp) begin
            failures++;
            if (failures < 10) $display("FAIL t=%0t link %0d frame %b expected %b", $time, k, got[k], exp);
          end
          if (!sync_now && ovr_prev[k / NL][k % NL] && msq) cnt["vme_override_in_playback"]++;
        end
        if (quiet > 0) cnt["frames_blanked_by_pg_reset"]++;
        else if (sync_now) cnt["sync_frames"]++; else cnt["data_frames"]++;
      end
      if (quiet > 0) quiet--;
    end
  end

  // ---------------- helpers ----------------
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input logic [17:0] a, input logic [15:0] d);
    logic ok;
    bfm.write16(BASE | a, d, ok);
    check(ok, $sformatf("write %h acknowledged", a));
  endtask

  task automatic rd(input logic [17:0] a, output logic [15:0] d);
    logic ok;
    bfm.read16(BASE | a, d, ok);
    check(ok, $sformatf("read %h acknowledged", a));
  endtask

  task automatic rd_expect(input logic [17:0] a, input logic [15:0] exp);
    logic [15:0] d;
    rd(a, d);
    check(d === exp, $sformatf("read %h got %h expected %h", a, d, exp));
  endtask

  task automatic ttc_brcst(input logic [7:0] b);
    @(negedge clk) begin brcst = b; brcst_str = 1; end
    @(negedge clk) brcst_str = 0;
  endtask

  function automatic logic [17:0] maddr(int p, int l, int n);
    return 18'((p + 1) * 32'h8000 + l * 32'h800 + n * 2);
  endfunction

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  initial begin
    logic [15:0] d;
    bfm.am = 6'h3D;
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (3) @(posedge clk);
    checking = 1;
    repeat (10) @(posedge clk);
    // identity
    rd_expect(A_MODULE_ID, 16'h2423);
    rd_expect(A_SERIAL_REV, 16'h0113);
    rd_expect(A_FPGA_STATUS, 16'h0000);
    rd_expect(A_MOD_CONTROL, 16'h0001);
    rd_expect(A_PG_LENGTH, 16'd1023);
    check(ttcrx_addr == 14'b0000_0011_001000, "TTCrx address");
    // idle words
    wr(A_MOD_CONTROL, 16'h0000);
    repeat (20) @(posedge clk);
    // load every link: LOADED words each, plus the last location
    for (int p = 0; p < NPG; p++)
      for (int l = 0; l < NL; l++) begin
        for (int n = 0; n < LOADED; n++) wr(maddr(p, l, n), {6'h0, pattern(p, l, n)});
        wr(maddr(p, l, DEPTH - 1), {6'h0, pattern(p, l, DEPTH - 1)});
      end
    for (int k = 0; k < 60; k++) begin
      automatic int p = $urandom_range(0, NPG - 1);
      automatic int l = $urandom_range(0, NL - 1);
      automatic int n = $urandom_range(0, LOADED - 1);
      rd_expect(maddr(p, l, n), {6'h0, pattern(p, l, n)});
    end
    // PLL fault bit in location 0
    pll_locked[3] = 0;
    rd_expect(maddr(3, 5, 0), {1'b1, 5'h0, pattern(3, 5, 0)});
    rd_expect(maddr(3, 5, 1), {6'h0, pattern(3, 5, 1)});
    rd_expect(maddr(2, 5, 0), {6'h0, pattern(2, 5, 0)});
    pll_locked[3] = 1;
    cnt["pll_fault_bit"]++;
    // VME-controlled playback, cycle 1100 > depth
    wr(A_PG_LENGTH, 16'd1099);
    wr(A_PG_CONTROL, 16'h0004);
    rd_expect(A_PG_STATUS, 16'h0004);
    cnt["vme_playback"]++;
    repeat (1200) @(posedge clk);
    // full LHC orbit cycle: 3564 crossings
    wr(A_PG_LENGTH, 16'd3563);
    repeat (2 * 3564 + 10) @(posedge clk);
    wr(A_PG_LENGTH, 16'd1099);
    // VME accesses during playback
    for (int k = 0; k < 30; k++) begin
      automatic int p = $urandom_range(0, NPG - 1);
      automatic int l = $urandom_range(0, NL - 1);
      automatic int n = $urandom_range(0, LOADED - 1);
      if (k % 2) wr(maddr(p, l, n), {6'h0, pattern(p, l, n)});
      else rd_expect(maddr(p, l, n), {6'h0, pattern(p, l, n)});
    end
    // short cycle, then freeze from VME
    wr(A_PG_LENGTH, 16'd39);
    repeat (100) @(posedge clk);
    wr(A_PG_CONTROL, 16'h0000);
    rd_expect(A_PG_STATUS, 16'h0000);
    repeat (20) @(posedge clk);
    // TTC control
    wr(A_PG_CONTROL, 16'h0001);
    ttc_brcst(8'b01_0000_00);
    cnt["ttc_start"]++;
    repeat (57) @(posedge clk);
    ttc_brcst(8'b01_0000_10);                 // restart while running
    cnt["ttc_restart"]++;
    repeat (25) @(posedge clk);
    ttc_brcst(8'b10_0000_00);
    cnt["ttc_stop"]++;
    repeat (10) @(posedge clk);
    check(!led_running && led_ttc_cmd && led_bar == 8'b10_0000_00, "LEDs after TTC stop");
    ttc_brcst(8'b01_0000_00);
    repeat (30) @(posedge clk);
    // PG reset while running
    wr(A_PULSE, 16'h0001);
    repeat (30) @(posedge clk);
    // VME lockout
    wr(A_MOD_CONTROL, 16'h0002);
    wr(maddr(0, 0, 3), 16'h0155);
    rd_expect(maddr(0, 0, 3), 16'h0000);
    wr(A_MOD_CONTROL, 16'h0000);
    rd_expect(maddr(0, 0, 3), {6'h0, pattern(0, 0, 3)});
    cnt["vme_lockout"]++;
    // TTC counters and dump FIFO
    @(negedge clk) bcnt_rst = 1;
    @(negedge clk) bcnt_rst = 0;
    repeat (5) begin @(negedge clk) l1a = 1; @(negedge clk) l1a = 0; end
    rd_expect(A_EVNT, 16'd5);
    rd(A_BCNT, d);
    check(d > 16'd10 && d < 16'd100, $sformatf("BCNT %0d", d));
    @(negedge clk) begin ttc_dout = 8'h5C; ttc_dq = 4'h9; ttc_dout_str = 1; end
    @(negedge clk) ttc_dout_str = 0;
    rd_expect(A_FIFO_DATA, 16'h095C);
    rd_expect(A_FIFO_STATUS, 16'h0002);
    cnt["dump_fifo"]++;
    // I2C: write and read a TTCrx register
    wr(A_I2C_CTRL, 16'h2300 | 16'h005D);
    do rd(A_I2C_STATUS, d); while (d[13]);
    check(ttcrx.regs[3] == 8'h5D && !d[14], "I2C write");
    wr(A_I2C_CTRL, 16'h0300);
    do rd(A_I2C_STATUS, d); while (d[13]);
    check(d == 16'h005D, $sformatf("I2C read %h", d));
    cnt["i2c"]++;
    // LVDS sync frames again
    wr(A_MOD_CONTROL, 16'h0001);
    repeat (10) @(posedge clk);
    wr(A_PG_CONTROL, 16'h0000);
    repeat (5) @(posedge clk);
    begin
      string names [] = '{"sync_frames", "data_frames", "restart", "wrap", "beyond_depth",
                          "freeze", "vme_override_in_playback", "pg_reset", "frames_blanked_by_pg_reset", "pll_fault_bit",
                          "vme_playback", "orbit_cycle_3564", "ttc_start", "ttc_restart", "ttc_stop", "vme_lockout",
                          "dump_fifo", "i2c"};
      foreach (names[i]) begin
        checks++;
        if (!cnt.exists(names[i]) || cnt[names[i]] == 0) begin
          failures++;
          $display("FAIL mechanism never happened: %s", names[i]);
        end else $display("  %-26s %0d", names[i], cnt[names[i]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
