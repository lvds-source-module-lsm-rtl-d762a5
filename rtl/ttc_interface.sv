// ttc_interface: TTCrx side of the LSM's VME FPGA, on the 40 MHz TTC clock.
//
// - Broadcast decode: a broadcast byte b[7:0] strobed by brcst_str is read as
//   b[7:6] command, b[5:2] sub-code mmmm, b[1:0] don't care.  01 0000 xx
//   gives a one-clock ttc_start (start playback and reset the pointer),
//   10 0000 xx a one-clock ttc_stop.  Every strobed byte is kept in
//   last_brcst (front-panel LED bar) and pulses brcst_seen.
// - BCNT: 12-bit counter advanced every bunch crossing, cleared by bcnt_rst.
// - EVNT: 16-bit counter advanced on each L1A, cleared by evcnt_rst.
// - SER/DER flags: set by the TTCrx single- and double-error strobes, cleared
//   by clr_flags (TTCRX Pulse register).
// - Dump FIFO: each dout_str pushes {DQ[3:0], DOUT[7:0]}.
// - ttcrx_addr: the TTCrx ID strapped at reset, 0000 ssss 001000 with ssss
//   the low four bits of the module serial number.
//
// Command codes, counter widths and the TTCrx address pattern follow the
// specification.  A counter clear wins over a simultaneous count; the FIFO
// depth (16) and the byte-wide broadcast input are this design's choices.
module ttc_interface
  import lsm_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  brcst,
  input  logic        brcst_str,
  input  logic        bcnt_rst,
  input  logic        evcnt_rst,
  input  logic        l1a,
  input  logic        sin_err_str,
  input  logic        db_err_str,
  input  logic        clr_flags,
  input  logic [7:0]  dout,
  input  logic [3:0]  dq,
  input  logic        dout_str,
  input  logic        fifo_pop,
  input  logic        fifo_flush,
  input  logic [3:0]  serial_lsb,
  output logic        ttc_start,
  output logic        ttc_stop,
  output logic        brcst_seen,
  output logic [7:0]  last_brcst,
  output logic [11:0] bcnt,
  output logic [15:0] evnt,
  output logic        ser_flag,
  output logic        der_flag,
  output logic [11:0] fifo_data,
  output logic        fifo_full,
  output logic        fifo_empty,
  output logic [13:0] ttcrx_addr
);

  always_ff @(posedge clk) begin
    if (rst) begin
      ttc_start  <= 1'b0;
      ttc_stop   <= 1'b0;
      brcst_seen <= 1'b0;
      last_brcst <= '0;
      bcnt       <= '0;
      evnt       <= '0;
      ser_flag   <= 1'b0;
      der_flag   <= 1'b0;
    end else begin
      ttc_start  <= brcst_str && brcst[7:6] == BC_CMD_START && brcst[5:2] == BC_MMMM_LSM;
      ttc_stop   <= brcst_str && brcst[7:6] == BC_CMD_STOP  && brcst[5:2] == BC_MMMM_LSM;
      brcst_seen <= brcst_str;
      if (brcst_str) last_brcst <= brcst;

      bcnt <= bcnt_rst  ? '0 : bcnt + 1'b1;
      if (evcnt_rst)  evnt <= '0;
      else if (l1a)   evnt <= evnt + 1'b1;

      if (clr_flags) begin
        ser_flag <= 1'b0;
        der_flag <= 1'b0;
      end else begin
        if (sin_err_str) ser_flag <= 1'b1;
        if (db_err_str)  der_flag <= 1'b1;
      end
    end
  end

  ttc_dump_fifo #(.WIDTH(12), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk(clk), .rst(rst), .push(dout_str), .din({dq, dout}),
    .pop(fifo_pop), .flush(fifo_flush), .dout(fifo_data),
    .full(fifo_full), .empty(fifo_empty)
  );

  assign ttcrx_addr = {4'b0000, serial_lsb, 6'b001000};

endmodule
