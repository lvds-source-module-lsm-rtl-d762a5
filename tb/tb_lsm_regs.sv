// tb_lsm_regs: checks the VME register file through its local bus port.
// Covers reset values (LVDS Sync set, playback length 1023, the rest 0),
// the read-only identity and status registers, read/write registers and
// the control outputs they drive, one-clock pulse outputs that read back as
// 0, the FIFO pop-on-read and flush-on-write strobes, the I2C start/reset
// strobes and the one-clock response latency.  Undefined locations read 0.
module tb_lsm_regs;
  import lsm_pkg::*;
  logic clk = 0, rst = 1;
  lb_req_t lb = '0;
  lb_rsp_t rsp;
  logic [7:0] serial_num = 8'h5A;
  logic [3:0] revision = 4'h3;
  logic [6:1] pg_done = 6'b110101;
  logic ttcdec_s1 = 1, ttcdec_s2 = 0, cycling = 0;
  logic ttcdec_tx, vme_lockout, lvds_sync;
  logic ttcrx_reset, ttcrx_jtag_reset, pg_pll_reset, pg_reset, clr_flags;
  logic pg_playback, pg_sel_ttc;
  logic [15:0] pg_length;
  logic ser_flag = 1, der_flag = 0;
  logic [11:0] bcnt = 12'hABC;
  logic [15:0] evnt = 16'h1234;
  logic fifo_full = 0, fifo_empty = 0;
  logic [11:0] fifo_data = 12'h9F1;
  logic fifo_pop, fifo_flush, i2c_start, i2c_reset;
  logic [13:0] i2c_cmd;
  logic i2c_error = 1, i2c_busy = 0;
  logic [7:0] i2c_rdata = 8'hC3;
  int checks = 0, failures = 0;
  int npulse [string];

  lsm_regs dut (.*);

  always #12.5 clk = ~clk;

  always @(posedge clk) if (!rst) begin
    if (ttcrx_reset)      npulse["ttcrx_reset"]++;
    if (ttcrx_jtag_reset) npulse["ttcrx_jtag"]++;
    if (pg_pll_reset)     npulse["pll"]++;
    if (pg_reset)         npulse["pg"]++;
    if (clr_flags)        npulse["clr"]++;
    if (fifo_pop)         npulse["pop"]++;
    if (fifo_flush)       npulse["flush"]++;
    if (i2c_start)        npulse["i2c_start"]++;
    if (i2c_reset)        npulse["i2c_reset"]++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic access(input logic [17:0] a, input logic we, input logic [15:0] wd,
                        output logic [15:0] rd);
    @(negedge clk);
    lb.req = 1; lb.we = we; lb.addr = a[17:1]; lb.wdata = wd;
    @(negedge clk);
    lb.req = 0;
    check(rsp.ack === 1'b1, $sformatf("ack one clock after request, addr %h", a));
    rd = rsp.rdata;
    @(negedge clk);
    check(rsp.ack === 1'b0, "single ack");
  endtask

  task automatic rd_expect(input logic [17:0] a, input logic [15:0] exp);
    logic [15:0] d;
    access(a, 0, 0, d);
    check(d === exp, $sformatf("read %h got %h expected %h", a, d, exp));
  endtask

  task automatic wr(input logic [17:0] a, input logic [15:0] d);
    logic [15:0] x;
    access(a, 1, d, x);
  endtask

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
    // reset values and identity
    check(lvds_sync === 1 && pg_length === 16'd1023 && !pg_playback && !pg_sel_ttc && !vme_lockout && ttcdec_tx,
          "reset values");
    rd_expect(A_MODULE_ID, 16'h2423);
    rd_expect(A_SERIAL_REV, 16'h035A);
    rd_expect(A_FW_REV, FW_REVISION);
    rd_expect(A_FPGA_STATUS, 16'b0000000_0_0010100);
    rd_expect(A_MOD_STATUS, 16'h0001);
    cycling = 1; ttcdec_s2 = 1;
    rd_expect(A_MOD_STATUS, 16'h0007);
    rd_expect(A_PG_STATUS, 16'h0004);
    rd_expect(A_MOD_CONTROL, 16'h0001);
    rd_expect(A_PG_LENGTH, 16'd1023);
    // module control
    wr(A_MOD_CONTROL, 16'hFFF6);
    rd_expect(A_MOD_CONTROL, 16'h0006);
    check(!ttcdec_tx && vme_lockout && !lvds_sync, "module control outputs");
    wr(A_MOD_CONTROL, 16'h0009);
    check(ttcdec_tx && !vme_lockout && lvds_sync, "module control outputs 2");
    // pulses
    wr(A_PULSE, 16'h00C3);
    rd_expect(A_PULSE, 16'h0000);
    check(npulse["ttcrx_reset"] == 1 && npulse["ttcrx_jtag"] == 1 && npulse["pll"] == 1 && npulse["pg"] == 1,
          "pulse register strobes once each");
    wr(A_PULSE, 16'h0001);
    check(npulse["pg"] == 2 && npulse["pll"] == 1, "only written pulse bits fire");
    // PG control and length
    wr(A_PG_CONTROL, 16'h00FF);
    rd_expect(A_PG_CONTROL, 16'h0005);
    check(pg_playback && pg_sel_ttc, "PG control outputs");
    wr(A_PG_CONTROL, 16'h0004);
    check(pg_playback && !pg_sel_ttc, "PG control VME");
    wr(A_PG_LENGTH, 16'd3563);
    rd_expect(A_PG_LENGTH, 16'd3563);
    check(pg_length == 16'd3563, "length output");
    // TTCrx
    rd_expect(A_TTCRX_STAT, 16'h0041);
    wr(A_TTCRX_PULSE, 16'h0001);
    check(npulse["clr"] == 1, "clear SER/DER strobe");
    rd_expect(A_TTCRX_PULSE, 16'h0000);
    rd_expect(A_BCNT, 16'h0ABC);
    rd_expect(A_EVNT, 16'h1234);
    rd_expect(A_FIFO_STATUS, 16'h0000);
    fifo_full = 1;
    rd_expect(A_FIFO_STATUS, 16'h0004);
    rd_expect(A_FIFO_DATA, 16'h09F1);
    check(npulse["pop"] == 1, "FIFO pop on data read");
    fifo_empty = 1; fifo_full = 0;
    rd_expect(A_FIFO_STATUS, 16'h0002);
    rd_expect(A_FIFO_DATA, 16'h09F1);
    check(npulse["pop"] == 1, "no pop when empty");
    wr(A_FIFO_DATA, 16'h0);
    check(npulse["flush"] == 1, "flush on write");
    // I2C
    wr(A_I2C_CTRL, 16'h2D5A);
    check(npulse["i2c_start"] == 1 && i2c_cmd == 14'h2D5A, "I2C start");
    rd_expect(A_I2C_CTRL, 16'h2D5A);
    wr(A_I2C_CTRL, 16'h8000);
    check(npulse["i2c_reset"] == 1 && npulse["i2c_start"] == 1, "I2C reset");
    rd_expect(A_I2C_STATUS, 16'h40C3);
    // undefined locations
    rd_expect(18'h0000E, 16'h0);
    rd_expect(18'h00026, 16'h0);
    rd_expect(18'h38000, 16'h0);
    wr(18'h3FFFE, 16'hFFFF);
    rd_expect(A_PG_LENGTH, 16'd3563);
    // reset restores LVDS sync
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    check(lvds_sync && pg_length == 16'd1023 && !pg_playback, "values after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
