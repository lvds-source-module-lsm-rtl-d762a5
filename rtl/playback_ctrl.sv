// playback_ctrl: decides when the pattern memories play, and drives the
// Memory_sync line to the six PG FPGAs.
//
// With PG Control bit 0 = 0 (VME control), playback follows PG Control bit 2:
// setting it starts cyclic playback from location 0, clearing it freezes
// the pointers.  With bit 0 = 1 (TTC control), a TTC Start Playback command
// starts playback from location 0 (also when already running) and a Stop
// command freezes it; switching to TTC control starts frozen.
//
// Memory_sync is a level: high = run, low = frozen, and the PG counters
// restart at location 0 on its rising edge.  A restart while running is sent
// as one clock of low.  `cycling` is the PG Status / Module Status bit.
// Everything is on the TTC clock, so the VME playback bit is synchronised to
// it as the specification asks.
//
// Inputs: pg_playback, pg_sel_ttc (register bits), ttc_start, ttc_stop
// (one-clock pulses).  Output memory_sync is registered: it reacts one clock
// after its cause.  The control choices follow the specification; the
// one-wire encoding of run and restart is this design's own.
module playback_ctrl (
  input  logic clk,
  input  logic rst,
  input  logic pg_playback,
  input  logic pg_sel_ttc,
  input  logic ttc_start,
  input  logic ttc_stop,
  output logic memory_sync,
  output logic cycling
);

  logic ttc_run, ttc_run_next, pb_q, run_next, restart;

  always_comb begin
    ttc_run_next = !pg_sel_ttc ? 1'b0 :
                   ttc_start   ? 1'b1 :
                   ttc_stop    ? 1'b0 : ttc_run;
    run_next     = pg_sel_ttc ? ttc_run_next : pg_playback;
    restart      = pg_sel_ttc ? ttc_start : (pg_playback && !pb_q);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ttc_run     <= 1'b0;
      pb_q        <= 1'b0;
      memory_sync <= 1'b0;
    end else begin
      ttc_run     <= ttc_run_next;
      pb_q        <= pg_playback;
      memory_sync <= run_next && !(restart && memory_sync);
    end
  end

  assign cycling = memory_sync;

endmodule
