// lsm_regs: control and status registers of the LSM's VME FPGA.
//
// Serves every word of the 256 KB window that is not forwarded to a Pattern
// Generator FPGA.  A request (lb.req, single cycle) is answered one clock
// later with rsp.ack and, for a read, rsp.rdata.  Locations and bits that
// are not defined read as 0; writeable registers reset to 0 except Module
// Control bit 0 (LVDS Sync, reset to 1) and the PG Playback Length (reset to
// 1023).
//
//   0x00 Module ID (0x2423)        0x20 PG Control  <2> playback <0> TTC/VME
//   0x02 Serial + revision         0x22 PG Status   <2> cycling
//   0x04 Firmware revision         0x24 PG Playback Length (16 bit)
//   0x06 FPGA status <6:1> PG FPGA not configured (inverted DONE)
//   0x08 Module status <2> cycling <1> TTCdec S2 <0> TTCdec S1
//   0x0A Module control <3> TTCdecPD <2> TTCdec XTAL <1> VME lockout
//        <0> LVDS Sync
//   0x0C Pulse <7> TTCrx reset <6> TTCrx JTAG reset <1> PG PLL reset
//        <0> PG reset (one-clock pulses, read 0)
//   0x30 TTCRX Pulse <0> clear SER/DER flags   0x32 TTCRX status <6> SER
//        <5> DER <0> ready
//   0x34 BCNT (12 bit)  0x36 EVNT (16 bit)
//   0x3C TTC FIFO status <2> full <1> empty
//   0x3E TTC FIFO data <11:8> DQ <7:0> DOUT; a read pops the FIFO, a write
//        empties it
//   0x40 I2C control (a write starts an access, or resets the controller
//        when bit 15 is set)   0x42 I2C status <14> error <13> busy <7:0> data
//
// The map, bit meanings and reset values follow the specification.  Pulse
// width (one 25 ns clock), keeping the reserved TTCdecPD bit as a plain
// read/write bit that drives no pin (the board pulls that pin high), the FIFO read-pops/write-flushes behaviour and
// the I2C start-on-write rule are this design's choices.
module lsm_regs
  import lsm_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  lb_req_t     lb,
  output lb_rsp_t     rsp,
  // identity and board status
  input  logic [7:0]  serial_num,
  input  logic [3:0]  revision,
  input  logic [6:1]  pg_done,
  input  logic        ttcdec_s1,
  input  logic        ttcdec_s2,
  input  logic        cycling,
  // module control
  output logic        ttcdec_tx,
  output logic        vme_lockout,
  output logic        lvds_sync,
  // pulses
  output logic        ttcrx_reset,
  output logic        ttcrx_jtag_reset,
  output logic        pg_pll_reset,
  output logic        pg_reset,
  output logic        clr_flags,
  // pattern generator control
  output logic        pg_playback,
  output logic        pg_sel_ttc,
  output logic [15:0] pg_length,
  // TTC interface
  input  logic        ser_flag,
  input  logic        der_flag,
  input  logic [11:0] bcnt,
  input  logic [15:0] evnt,
  input  logic        fifo_full,
  input  logic        fifo_empty,
  input  logic [11:0] fifo_data,
  output logic        fifo_pop,
  output logic        fifo_flush,
  // I2C controller
  output logic        i2c_start,
  output logic        i2c_reset,
  output logic [13:0] i2c_cmd,
  input  logic        i2c_error,
  input  logic        i2c_busy,
  input  logic [7:0]  i2c_rdata
);

  logic [3:0]  mod_ctrl;
  logic [17:0] a;
  logic        wr, rd;
  logic [15:0] rdata;

  always_comb begin
    a  = {lb.addr, 1'b0};
    wr = lb.req && lb.we;
    rd = lb.req && !lb.we;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      mod_ctrl         <= 4'b0001;
      pg_playback      <= 1'b0;
      pg_sel_ttc       <= 1'b0;
      pg_length        <= PG_LENGTH_RESET;
      i2c_cmd          <= '0;
      ttcrx_reset      <= 1'b0;
      ttcrx_jtag_reset <= 1'b0;
      pg_pll_reset     <= 1'b0;
      pg_reset         <= 1'b0;
      clr_flags        <= 1'b0;
      fifo_pop         <= 1'b0;
      fifo_flush       <= 1'b0;
      i2c_start        <= 1'b0;
      i2c_reset        <= 1'b0;
      rsp              <= '0;
    end else begin
      ttcrx_reset      <= 1'b0;
      ttcrx_jtag_reset <= 1'b0;
      pg_pll_reset     <= 1'b0;
      pg_reset         <= 1'b0;
      clr_flags        <= 1'b0;
      fifo_pop         <= 1'b0;
      fifo_flush       <= 1'b0;
      i2c_start        <= 1'b0;
      i2c_reset        <= 1'b0;
      rsp.ack          <= lb.req;
      rsp.rdata        <= rd ? rdata : '0;
      if (wr) begin
        unique case (a)
          A_MOD_CONTROL: mod_ctrl <= lb.wdata[3:0];
          A_PULSE: begin
            ttcrx_reset      <= lb.wdata[7];
            ttcrx_jtag_reset <= lb.wdata[6];
            pg_pll_reset     <= lb.wdata[1];
            pg_reset         <= lb.wdata[0];
          end
          A_PG_CONTROL: begin
            pg_playback <= lb.wdata[2];
            pg_sel_ttc  <= lb.wdata[0];
          end
          A_PG_LENGTH:   pg_length  <= lb.wdata;
          A_TTCRX_PULSE: clr_flags  <= lb.wdata[0];
          A_FIFO_DATA:   fifo_flush <= 1'b1;
          A_I2C_CTRL: begin
            i2c_cmd   <= {lb.wdata[13], lb.wdata[12:0]};
            i2c_reset <= lb.wdata[15];
            i2c_start <= !lb.wdata[15];
          end
          default: ;
        endcase
      end
      if (rd && a == A_FIFO_DATA && !fifo_empty)
        fifo_pop <= 1'b1;
    end
  end

  // Read multiplexer
  always_comb begin
    rdata = '0;
    unique case (a)
      A_MODULE_ID:   rdata = MODULE_TYPE;
      A_SERIAL_REV:  rdata = {4'h0, revision, serial_num};
      A_FW_REV:      rdata = FW_REVISION;
      A_FPGA_STATUS: rdata = {9'h0, ~pg_done, 1'b0};
      A_MOD_STATUS:  rdata = {13'h0, cycling, ttcdec_s2, ttcdec_s1};
      A_MOD_CONTROL: rdata = {12'h0, mod_ctrl};
      A_PG_CONTROL:  rdata = {13'h0, pg_playback, 1'b0, pg_sel_ttc};
      A_PG_STATUS:   rdata = {13'h0, cycling, 2'b00};
      A_PG_LENGTH:   rdata = pg_length;
      A_TTCRX_STAT:  rdata = {9'h0, ser_flag, der_flag, 4'h0, ttcdec_s1};
      A_BCNT:        rdata = {4'h0, bcnt};
      A_EVNT:        rdata = evnt;
      A_FIFO_STATUS: rdata = {13'h0, fifo_full, fifo_empty, 1'b0};
      A_FIFO_DATA:   rdata = {4'h0, fifo_data};
      A_I2C_CTRL:    rdata = {2'b00, i2c_cmd};
      A_I2C_STATUS:  rdata = {1'b0, i2c_error, i2c_busy, 5'h0, i2c_rdata};
      default:       rdata = '0;
    endcase
  end

  always_comb begin
    ttcdec_tx   = !mod_ctrl[2];
    vme_lockout = mod_ctrl[1];
    lvds_sync   = mod_ctrl[0];
  end

endmodule
