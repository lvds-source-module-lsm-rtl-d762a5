// lvds_serialiser: parallel-to-serial converter of one LVDS link (the "P-S"
// boxes of the PG FPGA).
//
// Each 25 ns bunch crossing carries one 12-bit frame at 480 Mb/s, so the
// serial clock clk_ser runs at 12 times the TTC clock and must be
// phase-aligned to it (both come from the PG FPGA's PLL).  A bit counter
// counts 0..11 in the clk_ser domain; it is cleared by rst_ser, which is to be
// released in step with a TTC clock edge so that count 0 falls on that edge.
// At count 5, half way through the bunch crossing and far from any edge of
// the TTC clock, the 10-bit word and the sync request are captured from the
// 40 MHz domain.  At count 11 the frame is loaded and it is sent, least
// significant bit first, during the next bunch crossing:
//   data frame : start bit 1, D0 .. D9, stop bit 0
//   sync frame : six 1s followed by six 0s
// So a word presented after TTC edge k is sent during bunch crossing k+1.
//
// Ports: clk_ser, rst_ser, word (10 bit, TTC domain), sync (send sync
// frames, TTC domain) -> sdo (serial data to the LVDS output buffer).
//
// The 480 Mb/s rate and 10-bit words follow the specification, which asks
// that the serial format match the existing LVDS links (National
// serialisers).  The frame layout above is that serialiser family's format as
// generally documented, not printed in the specification.
module lvds_serialiser #(
  parameter int unsigned WIDTH      = 10,
  parameter int unsigned FRAME_BITS = WIDTH + 2,
  parameter int unsigned CAPTURE_AT = 5
) (
  input  logic             clk_ser,
  input  logic             rst_ser,
  input  logic [WIDTH-1:0] word,
  input  logic             sync,
  output logic             sdo
);

  localparam int unsigned CW = $clog2(FRAME_BITS);

  logic [CW-1:0]         bitcnt;
  logic [WIDTH-1:0]      word_hold;
  logic                  sync_hold;
  logic [FRAME_BITS-1:0] shreg;
  logic [FRAME_BITS-1:0] next_frame;

  // Frame to be sent next, LSB first
  always_comb begin
    if (sync_hold)
      next_frame = {{(FRAME_BITS/2){1'b0}}, {(FRAME_BITS - FRAME_BITS/2){1'b1}}};
    else
      next_frame = {1'b0, word_hold, 1'b1};
  end

  always_ff @(posedge clk_ser) begin
    if (rst_ser) begin
      bitcnt    <= '0;
      word_hold <= '0;
      sync_hold <= 1'b1;
      shreg     <= '0;
    end else begin
      bitcnt <= (bitcnt == CW'(FRAME_BITS - 1)) ? '0 : bitcnt + 1'b1;
      if (bitcnt == CW'(CAPTURE_AT)) begin
        word_hold <= word;
        sync_hold <= sync;
      end
      if (bitcnt == CW'(FRAME_BITS - 1))
        shreg <= next_frame;
      else
        shreg <= {1'b0, shreg[FRAME_BITS-1:1]};
    end
  end

  assign sdo = shreg[0];

endmodule
