// pg_playback_counter: playback pointer of one Pattern Generator FPGA.
//
// The pointer counts one step per bunch crossing (40 MHz TTC clock) while the
// Memory_sync line from the VME FPGA is high, and holds (playback frozen)
// while it is low.  A low-to-high transition of Memory_sync restarts the
// pointer at location 0.  The pointer runs from 0 to `length` (the PG
// Playback Length register, cycle length - 1) and then returns to 0, so a
// cycle may be longer than the memory, up to the LHC orbit of 3564 BC.
// Pointer values at or beyond the memory depth address location 0, which
// therefore holds the link idle value.
//
// Ports: memory_sync (level, run/freeze), length (16 bit) -> ptr (16 bit
// pointer), mem_addr (memory address, registered with ptr), running.
// Timing: ptr is 0 in the first cycle after the clock edge that sees
// Memory_sync rise, then increments every cycle.
//
// The wrap rule and the location-0 fill follow the specification; carrying
// run and restart on the single Memory_sync line (restart = rising edge) is
// this design's reading of the block diagram.
module pg_playback_counter #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned PTR_W = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     memory_sync,
  input  logic [PTR_W-1:0]         length,
  output logic [PTR_W-1:0]         ptr,
  output logic [$clog2(DEPTH)-1:0] mem_addr,
  output logic                     running
);

  logic sync_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync_q <= 1'b0;
      ptr    <= '0;
    end else begin
      sync_q <= memory_sync;
      if (memory_sync && !sync_q)
        ptr <= '0;
      else if (memory_sync)
        ptr <= (ptr >= length) ? '0 : ptr + 1'b1;
    end
  end

  always_comb begin
    mem_addr = (ptr < PTR_W'(DEPTH)) ? ptr[$clog2(DEPTH)-1:0] : '0;
    running  = sync_q;
  end

endmodule
