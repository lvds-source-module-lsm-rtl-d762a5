// fp_indicators: drives the LSM's front-panel LEDs from the VME FPGA.
//
// LEDs: VME access (yellow), Running (yellow), TTC Ready and TTC Command
// (yellow), PG FPGAs configured (green) and an 8-LED bar showing the last TTC
// short broadcast.  VME access and TTC command are single-clock events, so
// each one restarts a counter that keeps its LED lit for STRETCH clocks
// (default 2,000,000 clocks = 50 ms at 40 MHz) to make it visible.  Running,
// TTC Ready and configured are shown as they are.  LED outputs are active
// high.
//
// The set of indicators follows the specification; the stretch time and
// the polarity are this design's choice.
module fp_indicators #(
  parameter int unsigned STRETCH = 2_000_000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       vme_access,
  input  logic       running,
  input  logic       ttc_ready,
  input  logic       brcst_seen,
  input  logic [7:0] last_brcst,
  input  logic [6:1] pg_done,
  output logic       led_vme,
  output logic       led_running,
  output logic       led_ttc_ready,
  output logic       led_ttc_cmd,
  output logic       led_pg_config,
  output logic [7:0] led_bar
);

  localparam int unsigned SW = $clog2(STRETCH + 1);

  logic [SW-1:0] vme_cnt, cmd_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      vme_cnt <= '0;
      cmd_cnt <= '0;
    end else begin
      if (vme_access)        vme_cnt <= SW'(STRETCH);
      else if (vme_cnt != 0) vme_cnt <= vme_cnt - 1'b1;
      if (brcst_seen)        cmd_cnt <= SW'(STRETCH);
      else if (cmd_cnt != 0) cmd_cnt <= cmd_cnt - 1'b1;
    end
  end

  always_comb begin
    led_vme       = (vme_cnt != 0);
    led_ttc_cmd   = (cmd_cnt != 0);
    led_running   = running;
    led_ttc_ready = ttc_ready;
    led_pg_config = &pg_done;
    led_bar       = last_brcst;
  end

endmodule
