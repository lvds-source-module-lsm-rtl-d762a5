// tb_vme_fpga: checks the VME FPGA through its VME port.
// A behavioural PG target answers the local bus for the memory windows.
// Checks: identity and status reads, register writes reaching their
// outputs, routing of memory accesses to the PG bus, the VME lockout,
// PG reset pulse, playback under VME and under TTC broadcast commands
// (Memory_sync), BC and L1A counters, the SER/DER flags, the dump FIFO,
// an I2C write and read of a TTCrx register, and the VME access LED.
module tb_vme_fpga;
  import lsm_pkg::*;
  logic clk = 0, rst = 1;
  logic        vme_as_n, vme_ds0_n, vme_ds1_n, vme_write_n, vme_lword_n;
  logic [5:0]  vme_am;
  logic [31:1] vme_addr;
  logic [15:0] vme_d_in, vme_d_out;
  logic        vme_d_oe, vme_dtack_n;
  logic [15:0] base_sw = 16'h0012;
  logic [7:0]  serial_num = 8'h27;
  logic [3:0]  revision = 4'h2;
  logic ttcdec_s1 = 1, ttcdec_s2 = 0;
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
  lb_req_t pg_lb;
  lb_rsp_t pg_rsp = '0;
  logic memory_sync, lvds_sync, pg_rst, pg_pll_reset;
  logic [15:0] pg_length;
  logic led_vme, led_running, led_ttc_ready, led_ttc_cmd, led_pg_config;
  logic [7:0] led_bar;
  int checks = 0, failures = 0, n_pg_req = 0, n_pg_rst = 0;
  logic [15:0] pgmem [logic [16:0]];
  localparam logic [31:0] BASE = 32'h0010_0000;   // A23..A18 = base_sw[7:2] = 000100

  vme_fpga #(.I2C_QDIV(4), .LED_STRETCH(50)) dut (
    .clk, .rst, .vme_as_n, .vme_ds0_n, .vme_ds1_n, .vme_write_n, .vme_lword_n,
    .vme_am, .vme_addr, .vme_d_in, .vme_d_out, .vme_d_oe, .vme_dtack_n,
    .base_sw, .serial_num, .revision, .ttcdec_s1, .ttcdec_s2, .brcst, .brcst_str,
    .bcnt_rst, .evcnt_rst, .l1a, .sin_err_str, .db_err_str, .ttc_dout, .ttc_dq,
    .ttc_dout_str, .ttcrx_addr, .ttcdec_tx, .ttcrx_reset, .ttcrx_jtag_reset,
    .i2c_scl_i(scl), .i2c_sda_i(sda), .i2c_scl_oe, .i2c_sda_oe,
    .pg_done, .pg_lb, .pg_rsp, .memory_sync, .pg_length, .lvds_sync, .pg_rst,
    .pg_pll_reset, .led_vme, .led_running, .led_ttc_ready, .led_ttc_cmd,
    .led_pg_config, .led_bar);
  vme_master_bfm bfm (.vme_as_n, .vme_ds0_n, .vme_ds1_n, .vme_write_n,
                      .vme_lword_n, .vme_am, .vme_addr, .vme_d_in, .vme_d_out,
                      .vme_d_oe, .vme_dtack_n);
  ttcrx_i2c_model ttcrx (.scl, .sda, .scl_oe(s_scl_oe), .sda_oe(s_sda_oe));

  always #12.5 clk = ~clk;

  // PG stand-in: answers one clock after a request
  always @(posedge clk) begin
    pg_rsp <= '0;
    if (pg_lb.req && !rst) begin
      n_pg_req++;
      if (pg_lb.we) pgmem[pg_lb.addr] = pg_lb.wdata;
      pg_rsp <= '{ack: 1'b1, rdata: pg_lb.we ? 16'h0 : (pgmem.exists(pg_lb.addr) ? pgmem[pg_lb.addr] : 16'h0001)};
    end
    if (!rst && pg_rst) n_pg_rst++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input logic [17:0] a, input logic [15:0] d);
    logic ok;
    bfm.write16(BASE | a, d, ok);
    check(ok, $sformatf("write %h acknowledged", a));
  endtask

  task automatic rd_expect(input logic [17:0] a, input logic [15:0] exp);
    logic ok;
    logic [15:0] d;
    bfm.read16(BASE | a, d, ok);
    check(ok && d === exp, $sformatf("read %h got %h expected %h", a, d, exp));
  endtask

  task automatic ttc_brcst(input logic [7:0] b);
    @(negedge clk) begin brcst = b; brcst_str = 1; end
    @(negedge clk) brcst_str = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    logic ok;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    bfm.am = 6'h39;
    rd_expect(A_MODULE_ID, 16'h2423);
    rd_expect(A_SERIAL_REV, 16'h0227);
    check(ttcrx_addr == 14'b0000_0111_001000, "TTCrx address");
    check(lvds_sync && pg_length == 16'd1023 && ttcdec_tx, "power-up values");
    check(led_vme, "VME access LED lit");
    wr(A_MOD_CONTROL, 16'h0004);
    check(!lvds_sync && !ttcdec_tx, "module control outputs");
    // memory routing
    wr(18'h08000, 16'h0123);
    wr(18'h37FFE, 16'h03FF);
    rd_expect(18'h08000, 16'h0123);
    rd_expect(18'h37FFE, 16'h03FF);
    check(n_pg_req == 4 && pgmem[17'h04000] == 16'h0123, "PG requests forwarded");
    rd_expect(18'h38000, 16'h0000);
    check(n_pg_req == 4, "unused window not forwarded");
    wr(A_MOD_CONTROL, 16'h0002);        // VME lockout
    wr(18'h08000, 16'h0055);
    rd_expect(18'h08000, 16'h0000);
    check(n_pg_req == 4, "lockout blocks memory access");
    wr(A_MOD_CONTROL, 16'h0000);
    // PG reset pulse
    wr(A_PULSE, 16'h0001);
    check(n_pg_rst == 1, "PG reset pulse");
    // playback under VME control
    wr(A_PG_LENGTH, 16'd3563);
    check(pg_length == 16'd3563, "length");
    rd_expect(A_PG_STATUS, 16'h0000);
    wr(A_PG_CONTROL, 16'h0004);
    check(memory_sync && led_running, "VME playback start");
    rd_expect(A_PG_STATUS, 16'h0004);
    rd_expect(A_MOD_STATUS, 16'h0005);
    wr(A_PG_CONTROL, 16'h0000);
    check(!memory_sync, "VME playback freeze");
    // playback under TTC control
    wr(A_PG_CONTROL, 16'h0001);
    ttc_brcst(8'b01_0001_00);             // other sub-code: ignored
    repeat (3) @(negedge clk);
    check(!memory_sync, "other broadcast ignored");
    ttc_brcst(8'b01_0000_11);
    repeat (3) @(negedge clk);
    check(memory_sync && led_ttc_cmd && led_bar == 8'b01_0000_11, "TTC start");
    ttc_brcst(8'b10_0000_01);
    repeat (3) @(negedge clk);
    check(!memory_sync, "TTC stop");
    // counters
    @(negedge clk) bcnt_rst = 1;
    @(negedge clk) bcnt_rst = 0;
    begin
      logic [15:0] b1, b2;
      bfm.read16(BASE | A_BCNT, b1, ok);
      #1000;
      bfm.read16(BASE | A_BCNT, b2, ok);
      check(b2 > b1 && b1 < 16'd400, $sformatf("BCNT advancing %0d %0d", b1, b2));
    end
    repeat (7) begin @(negedge clk) l1a = 1; @(negedge clk) l1a = 0; end
    rd_expect(A_EVNT, 16'd7);
    @(negedge clk) evcnt_rst = 1;
    @(negedge clk) evcnt_rst = 0;
    rd_expect(A_EVNT, 16'd0);
    @(negedge clk) sin_err_str = 1;
    @(negedge clk) sin_err_str = 0;
    rd_expect(A_TTCRX_STAT, 16'h0041);
    wr(A_TTCRX_PULSE, 16'h0001);
    rd_expect(A_TTCRX_STAT, 16'h0001);
    // dump FIFO
    rd_expect(A_FIFO_STATUS, 16'h0002);
    for (int i = 0; i < 3; i++) begin
      @(negedge clk) begin ttc_dout = 8'(8'hA0 + i); ttc_dq = 4'(i + 1); ttc_dout_str = 1; end
      @(negedge clk) ttc_dout_str = 0;
    end
    rd_expect(A_FIFO_STATUS, 16'h0000);
    rd_expect(A_FIFO_DATA, 16'h01A0);
    rd_expect(A_FIFO_DATA, 16'h02A1);
    rd_expect(A_FIFO_DATA, 16'h03A2);
    rd_expect(A_FIFO_STATUS, 16'h0002);
    // I2C: write TTCrx register 5, read it back
    wr(A_I2C_CTRL, 16'h2500 | 16'h00C6);
    do bfm.read16(BASE | A_I2C_STATUS, d, ok); while (d[13]);
    check(!d[14] && ttcrx.regs[5] == 8'hC6, "I2C write");
    wr(A_I2C_CTRL, 16'h0500);
    do bfm.read16(BASE | A_I2C_STATUS, d, ok); while (d[13]);
    check(d == 16'h00C6, $sformatf("I2C read status %h", d));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
