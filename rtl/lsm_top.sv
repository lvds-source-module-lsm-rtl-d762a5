// lsm_top: LVDS Source Module - a 6U VME board that plays stored test
// patterns into 96 serial LVDS links at 480 Mb/s, in step with the LHC
// bunch-crossing clock, to exercise the trigger processor modules.
//
// One VME/TTC FPGA (vme_fpga) holds the registers, the TTCrx interface and
// the playback control; six Pattern Generator FPGAs (pg_fpga) each hold 16
// link memories of 1k x 10 bits with a common playback counter and 16
// serialisers.  The VME FPGA reaches the memories over a shared local bus
// and starts, stops and restarts all playback counters together through the
// Memory_sync line, so all 96 links stay aligned.
//
// Clocks: clk is the 40 MHz TTC clock from the TTCdec card; clk_ser is the
// 480 MHz serial clock, 12 x clk and phase-aligned to it, which the PG
// FPGAs' PLLs make on the board (the PLLs, LVDS output buffers, cable
// pre-compensation, TTCdec and VME buffers are outside this RTL; their
// signals are ports).  rst is the power-up / VME system reset, synchronous to
// clk.  lvds_out[16*(p-1)+l] is link l (A=0 .. P=15) of PG FPGA p.
module lsm_top
  import lsm_pkg::*;
#(
  parameter int unsigned N_PG        = 6,
  parameter int unsigned NLINKS      = 16,
  parameter int unsigned DEPTH       = 1024,
  parameter int unsigned I2C_QDIV    = 100,
  parameter int unsigned LED_STRETCH = 2_000_000
) (
  input  logic                     clk,
  input  logic                     clk_ser,
  input  logic                     rst,
  // VME
  input  logic                     vme_as_n,
  input  logic                     vme_ds0_n,
  input  logic                     vme_ds1_n,
  input  logic                     vme_write_n,
  input  logic                     vme_lword_n,
  input  logic [5:0]               vme_am,
  input  logic [31:1]              vme_addr,
  input  logic [15:0]              vme_d_in,
  output logic [15:0]              vme_d_out,
  output logic                     vme_d_oe,
  output logic                     vme_dtack_n,
  input  logic [15:0]              base_sw,
  input  logic [7:0]               serial_num,
  input  logic [3:0]               revision,
  // TTCdec / TTCrx
  input  logic                     ttcdec_s1,
  input  logic                     ttcdec_s2,
  input  logic [7:0]               brcst,
  input  logic                     brcst_str,
  input  logic                     bcnt_rst,
  input  logic                     evcnt_rst,
  input  logic                     l1a,
  input  logic                     sin_err_str,
  input  logic                     db_err_str,
  input  logic [7:0]               ttc_dout,
  input  logic [3:0]               ttc_dq,
  input  logic                     ttc_dout_str,
  output logic [13:0]              ttcrx_addr,
  output logic                     ttcdec_tx,
  output logic                     ttcrx_reset,
  output logic                     ttcrx_jtag_reset,
  input  logic                     i2c_scl_i,
  input  logic                     i2c_sda_i,
  output logic                     i2c_scl_oe,
  output logic                     i2c_sda_oe,
  // PG FPGA configuration and PLLs
  input  logic [6:1]               pg_done,
  input  logic [N_PG-1:0]          pll_locked,
  output logic                     pg_pll_reset,
  // LVDS links (to the output buffers)
  output logic [N_PG*NLINKS-1:0]   lvds_out,
  // front panel
  output logic                     led_vme,
  output logic                     led_running,
  output logic                     led_ttc_ready,
  output logic                     led_ttc_cmd,
  output logic                     led_pg_config,
  output logic [7:0]               led_bar
);

  lb_req_t     pg_lb;
  lb_rsp_t     pg_rsp;
  lb_rsp_t     pg_rsp_i [N_PG];
  logic        memory_sync, lvds_sync, pg_rst;
  logic [15:0] pg_length;

  vme_fpga #(.I2C_QDIV(I2C_QDIV), .LED_STRETCH(LED_STRETCH)) u_vme_fpga (
    .clk, .rst,
    .vme_as_n, .vme_ds0_n, .vme_ds1_n, .vme_write_n, .vme_lword_n, .vme_am,
    .vme_addr, .vme_d_in, .vme_d_out, .vme_d_oe, .vme_dtack_n,
    .base_sw, .serial_num, .revision,
    .ttcdec_s1, .ttcdec_s2, .brcst, .brcst_str, .bcnt_rst, .evcnt_rst, .l1a,
    .sin_err_str, .db_err_str, .ttc_dout, .ttc_dq, .ttc_dout_str,
    .ttcrx_addr, .ttcdec_tx, .ttcrx_reset, .ttcrx_jtag_reset,
    .i2c_scl_i, .i2c_sda_i, .i2c_scl_oe, .i2c_sda_oe,
    .pg_done, .pg_lb, .pg_rsp, .memory_sync, .pg_length, .lvds_sync,
    .pg_rst, .pg_pll_reset,
    .led_vme, .led_running, .led_ttc_ready, .led_ttc_cmd, .led_pg_config, .led_bar
  );

  for (genvar p = 0; p < N_PG; p++) begin : g_pg
    logic running_unused;
    pg_fpga #(.PG_NUM(p + 1), .NLINKS(NLINKS), .DEPTH(DEPTH)) u_pg (
      .clk, .clk_ser, .rst(pg_rst), .lb(pg_lb), .rsp(pg_rsp_i[p]),
      .memory_sync, .length(pg_length), .lvds_sync, .pll_locked(pll_locked[p]),
      .running(running_unused), .sdo(lvds_out[p*NLINKS +: NLINKS])
    );
  end

  // Only the addressed PG FPGA acknowledges; pass its response on.
  always_comb begin
    pg_rsp = '0;
    for (int p = 0; p < N_PG; p++)
      if (pg_rsp_i[p].ack) pg_rsp = pg_rsp_i[p];
  end

endmodule
