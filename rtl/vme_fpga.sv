// vme_fpga: the LSM's VME and TTC interface FPGA.
//
// Joins the VME slave (vme_slave), the register file (lsm_regs), the TTCrx
// interface (ttc_interface), the playback control that drives Memory_sync
// (playback_ctrl), the TTCrx I2C controller (ttcrx_i2c_master) and the
// front-panel LED logic (fp_indicators), all on the 40 MHz TTC clock.
//
// Every VME word access becomes one local bus request.  Requests to
// 0x08000..0x37FFE (PG 1..6 memories) leave on pg_lb for the PG FPGAs and are
// answered by pg_rsp; all others, and memory requests while the VME lockout
// bit is set, go to lsm_regs (memories then read 0 and ignore writes).
// pg_rst resets the PG FPGAs on module reset or on a PG_Reset pulse.
//
// The partition follows the specification's block diagram; the local bus
// and the lockout behaviour are this design's choice.
module vme_fpga
  import lsm_pkg::*;
#(
  parameter int unsigned I2C_QDIV   = 100,
  parameter int unsigned LED_STRETCH = 2_000_000
) (
  input  logic        clk,
  input  logic        rst,
  // VME
  input  logic        vme_as_n,
  input  logic        vme_ds0_n,
  input  logic        vme_ds1_n,
  input  logic        vme_write_n,
  input  logic        vme_lword_n,
  input  logic [5:0]  vme_am,
  input  logic [31:1] vme_addr,
  input  logic [15:0] vme_d_in,
  output logic [15:0] vme_d_out,
  output logic        vme_d_oe,
  output logic        vme_dtack_n,
  input  logic [15:0] base_sw,
  input  logic [7:0]  serial_num,
  input  logic [3:0]  revision,
  // TTCdec / TTCrx
  input  logic        ttcdec_s1,
  input  logic        ttcdec_s2,
  input  logic [7:0]  brcst,
  input  logic        brcst_str,
  input  logic        bcnt_rst,
  input  logic        evcnt_rst,
  input  logic        l1a,
  input  logic        sin_err_str,
  input  logic        db_err_str,
  input  logic [7:0]  ttc_dout,
  input  logic [3:0]  ttc_dq,
  input  logic        ttc_dout_str,
  output logic [13:0] ttcrx_addr,
  output logic        ttcdec_tx,
  output logic        ttcrx_reset,
  output logic        ttcrx_jtag_reset,
  input  logic        i2c_scl_i,
  input  logic        i2c_sda_i,
  output logic        i2c_scl_oe,
  output logic        i2c_sda_oe,
  // PG FPGAs
  input  logic [6:1]  pg_done,
  output lb_req_t     pg_lb,
  input  lb_rsp_t     pg_rsp,
  output logic        memory_sync,
  output logic [15:0] pg_length,
  output logic        lvds_sync,
  output logic        pg_rst,
  output logic        pg_pll_reset,
  // front panel
  output logic        led_vme,
  output logic        led_running,
  output logic        led_ttc_ready,
  output logic        led_ttc_cmd,
  output logic        led_pg_config,
  output logic [7:0]  led_bar
);

  lb_req_t     lb, reg_lb;
  lb_rsp_t     rsp, reg_rsp;
  logic        access, pg_hit, vme_lockout, cycling;
  logic        pg_reset, clr_flags, pg_playback, pg_sel_ttc;
  logic        ser_flag, der_flag, fifo_full, fifo_empty, fifo_pop, fifo_flush;
  logic [11:0] bcnt, fifo_data;
  logic [15:0] evnt;
  logic        ttc_start, ttc_stop, brcst_seen;
  logic [7:0]  last_brcst;
  logic        i2c_start, i2c_reset, i2c_busy, i2c_error;
  logic [13:0] i2c_cmd;
  logic [7:0]  i2c_rdata;

  vme_slave u_vme (
    .clk, .rst, .vme_as_n, .vme_ds0_n, .vme_ds1_n, .vme_write_n, .vme_lword_n,
    .vme_am, .vme_addr, .vme_d_in, .vme_d_out, .vme_d_oe, .vme_dtack_n,
    .base_sw, .lb, .rsp, .access
  );

  // Local bus routing
  always_comb begin
    pg_hit     = (lb.addr[17:15] >= 3'd1) && (lb.addr[17:15] <= 3'd6) && !vme_lockout;
    pg_lb      = lb;
    pg_lb.req  = lb.req && pg_hit;
    reg_lb     = lb;
    reg_lb.req = lb.req && !pg_hit;
    rsp        = pg_rsp.ack ? pg_rsp : reg_rsp;
  end

  lsm_regs u_regs (
    .clk, .rst, .lb(reg_lb), .rsp(reg_rsp),
    .serial_num, .revision, .pg_done, .ttcdec_s1, .ttcdec_s2, .cycling,
    .ttcdec_tx, .vme_lockout, .lvds_sync,
    .ttcrx_reset, .ttcrx_jtag_reset, .pg_pll_reset, .pg_reset, .clr_flags,
    .pg_playback, .pg_sel_ttc, .pg_length,
    .ser_flag, .der_flag, .bcnt, .evnt, .fifo_full, .fifo_empty, .fifo_data,
    .fifo_pop, .fifo_flush,
    .i2c_start, .i2c_reset, .i2c_cmd, .i2c_error, .i2c_busy, .i2c_rdata
  );

  ttc_interface u_ttc (
    .clk, .rst, .brcst, .brcst_str, .bcnt_rst, .evcnt_rst, .l1a,
    .sin_err_str, .db_err_str, .clr_flags,
    .dout(ttc_dout), .dq(ttc_dq), .dout_str(ttc_dout_str),
    .fifo_pop, .fifo_flush, .serial_lsb(serial_num[3:0]),
    .ttc_start, .ttc_stop, .brcst_seen, .last_brcst, .bcnt, .evnt,
    .ser_flag, .der_flag, .fifo_data, .fifo_full, .fifo_empty, .ttcrx_addr
  );

  playback_ctrl u_play (
    .clk, .rst, .pg_playback, .pg_sel_ttc, .ttc_start, .ttc_stop,
    .memory_sync, .cycling
  );

  ttcrx_i2c_master #(.QDIV(I2C_QDIV)) u_i2c (
    .clk, .rst, .start(i2c_start), .reset(i2c_reset), .cmd(i2c_cmd),
    .busy(i2c_busy), .error(i2c_error), .rdata(i2c_rdata),
    .scl_i(i2c_scl_i), .sda_i(i2c_sda_i), .scl_oe(i2c_scl_oe), .sda_oe(i2c_sda_oe)
  );

  fp_indicators #(.STRETCH(LED_STRETCH)) u_leds (
    .clk, .rst, .vme_access(access), .running(cycling), .ttc_ready(ttcdec_s1),
    .brcst_seen, .last_brcst, .pg_done,
    .led_vme, .led_running, .led_ttc_ready, .led_ttc_cmd, .led_pg_config, .led_bar
  );

  assign pg_rst = rst || pg_reset;

endmodule
