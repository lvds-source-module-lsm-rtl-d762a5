// ttcrx_i2c_master: I2C controller giving VME access to the internal
// registers of the TTCrx chip.
//
// The TTCrx answers at two I2C addresses built from its 6-bit I2C ID: {ID,0}
// is a pointer register that selects one of its internal registers, {ID,1}
// is the data register that reads or writes the selected one.  One
// controller operation is therefore two I2C transactions:
//   1. START, {ID,0}+W, ACK, register index, ACK, STOP
//   2. write: START, {ID,1}+W, ACK, data, ACK, STOP
//      read : START, {ID,1}+R, ACK, data from TTCrx, master NACK, STOP
// A missing acknowledge sets `error`, ends the operation with STOP and skips
// the second transaction.
//
// Each I2C bit time is four quarters of QDIV clocks (40 MHz / (4*QDIV),
// 100 kHz by default); SDA changes in quarter 0 with SCL low, SCL is high in
// quarters 1 and 2, and SDA is sampled at the end of quarter 2.  A slave
// holding SCL low stretches quarters 1 and 2.  Both lines are open drain:
// scl_oe / sda_oe = 1 pulls the line low.
//
// Interface: start (one clock) with cmd = {write, index[4:0], data[7:0]};
// reset (one clock) aborts and clears error; busy, error, rdata.  The
// register fields follow the specification's controller registers; the
// two-address TTCrx protocol is taken from the TTCrx's own documentation,
// which the specification refers to; the bit timing and the default I2C ID
// (the low six bits, 001000, of the module's TTCrx address) are this
// design's choice.
module ttcrx_i2c_master #(
  parameter int unsigned QDIV   = 100,
  parameter logic [5:0]  I2C_ID = 6'b001000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        reset,
  input  logic [13:0] cmd,
  output logic        busy,
  output logic        error,
  output logic [7:0]  rdata,
  input  logic        scl_i,
  input  logic        sda_i,
  output logic        scl_oe,
  output logic        sda_oe
);

  localparam int unsigned DW = (QDIV > 1) ? $clog2(QDIV) : 1;
  localparam logic [4:0] ST_START = 5'd0;
  localparam logic [4:0] ST_ACK0  = 5'd9;
  localparam logic [4:0] ST_ACK1  = 5'd18;
  localparam logic [4:0] ST_STOP  = 5'd19;

  logic [DW-1:0] div_cnt;
  logic [4:0]    step;
  logic [1:0]    q;
  logic          tr;       // 0: pointer transaction, 1: data transaction
  logic          op_write;
  logic [4:0]    op_index;
  logic [7:0]    op_data;
  logic          tick, stall;
  logic [7:0]    byte0, byte1;
  logic          master_rx; // second byte is driven by the TTCrx
  logic          scl_v, sda_v;

  always_comb begin
    byte0     = {I2C_ID, tr, tr && !op_write};
    byte1     = tr ? op_data : {3'b000, op_index};
    master_rx = tr && !op_write;
    tick      = (div_cnt == DW'(QDIV - 1));
    stall     = (q == 2'd1 || q == 2'd2) && !scl_i;

    // Line levels for the current step and quarter
    scl_v = 1'b1;
    sda_v = 1'b1;
    if (busy) begin
      if (step == ST_START) begin
        scl_v = (q != 2'd3);
        sda_v = (q < 2'd2);
      end else if (step == ST_STOP) begin
        scl_v = (q != 2'd0);
        sda_v = (q >= 2'd2);
      end else begin
        scl_v = (q == 2'd1) || (q == 2'd2);
        if (step < ST_ACK0)
          sda_v = byte0[3'(5'd8 - step)];
        else if (step > ST_ACK0 && step < ST_ACK1)
          sda_v = master_rx ? 1'b1 : byte1[3'(5'd17 - step)];
        else
          sda_v = 1'b1;   // ACK from slave, or master NACK after a read
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst || reset) begin
      busy    <= 1'b0;
      error   <= 1'b0;
      rdata   <= '0;
      div_cnt <= '0;
      step    <= '0;
      q       <= '0;
      tr      <= 1'b0;
      op_write <= 1'b0;
      op_index <= '0;
      op_data  <= '0;
      scl_oe  <= 1'b0;
      sda_oe  <= 1'b0;
    end else begin
      scl_oe <= !scl_v;
      sda_oe <= !sda_v;
      if (!busy) begin
        if (start) begin
          busy     <= 1'b1;
          error    <= 1'b0;
          op_write <= cmd[13];
          op_index <= cmd[12:8];
          op_data  <= cmd[7:0];
          tr       <= 1'b0;
          step     <= ST_START;
          q        <= '0;
          div_cnt  <= '0;
        end
      end else if (!(tick && stall)) begin
        div_cnt <= tick ? '0 : div_cnt + 1'b1;
        if (tick) begin
          // sample at the end of quarter 2
          if (q == 2'd2) begin
            if ((step == ST_ACK0 || (step == ST_ACK1 && !master_rx)) && sda_i) begin
              error <= 1'b1;
            end
            if (master_rx && step > ST_ACK0 && step < ST_ACK1)
              rdata <= {rdata[6:0], sda_i};
          end
          q <= q + 1'b1;
          if (q == 2'd3) begin
            if ((step == ST_ACK0 || step == ST_ACK1) && error)
              step <= ST_STOP;
            else if (step == ST_STOP) begin
              step <= ST_START;
              if (tr || error) busy <= 1'b0;
              else tr <= 1'b1;
            end else
              step <= step + 1'b1;
          end
        end
      end
    end
  end

endmodule
