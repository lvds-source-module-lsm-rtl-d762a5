// lsm_pkg: constants and types shared by the LVDS Source Module RTL.
//
// Holds the VME register map (byte offsets inside the module's 256 KB
// window), the identity numbers read back by software, the TTC broadcast
// command codes and the local bus structure that carries a VME access from
// the VME FPGA to the six Pattern Generator FPGAs.  The register offsets,
// the module type 0x2423 and the broadcast codes follow the specification;
// the firmware revision number and the local bus format are this design's
// own choice.
package lsm_pkg;

  // Identity
  localparam logic [15:0] MODULE_TYPE   = 16'h2423;
  localparam logic [15:0] FW_REVISION   = 16'h0001;

  // Register byte offsets in the 256 KB window (A17..A1 used, A0 implied 0)
  localparam logic [17:0] A_MODULE_ID   = 18'h00000;
  localparam logic [17:0] A_SERIAL_REV  = 18'h00002;
  localparam logic [17:0] A_FW_REV      = 18'h00004;
  localparam logic [17:0] A_FPGA_STATUS = 18'h00006;
  localparam logic [17:0] A_MOD_STATUS  = 18'h00008;
  localparam logic [17:0] A_MOD_CONTROL = 18'h0000A;
  localparam logic [17:0] A_PULSE       = 18'h0000C;
  localparam logic [17:0] A_PG_CONTROL  = 18'h00020;
  localparam logic [17:0] A_PG_STATUS   = 18'h00022;
  localparam logic [17:0] A_PG_LENGTH   = 18'h00024;
  localparam logic [17:0] A_TTCRX_PULSE = 18'h00030;
  localparam logic [17:0] A_TTCRX_STAT  = 18'h00032;
  localparam logic [17:0] A_BCNT        = 18'h00034;
  localparam logic [17:0] A_EVNT        = 18'h00036;
  localparam logic [17:0] A_FIFO_STATUS = 18'h0003C;
  localparam logic [17:0] A_FIFO_DATA   = 18'h0003E;
  localparam logic [17:0] A_I2C_CTRL    = 18'h00040;
  localparam logic [17:0] A_I2C_STATUS  = 18'h00042;

  // TTC broadcast command decode: bits <7:6> command, <5:2> mmmm, <1:0> don't care
  localparam logic [1:0] BC_CMD_START = 2'b01;
  localparam logic [1:0] BC_CMD_STOP  = 2'b10;
  localparam logic [3:0] BC_MMMM_LSM  = 4'b0000;

  // Playback length register power-up value: full memory depth - 1
  localparam logic [15:0] PG_LENGTH_RESET = 16'd1023;

  // One word access on the local bus between the VME FPGA and the PG FPGAs.
  // req is a single-cycle strobe; addr is a byte address with bit 0 dropped.
  typedef struct packed {
    logic        req;
    logic        we;
    logic [17:1] addr;
    logic [15:0] wdata;
  } lb_req_t;

  // Response from one target: ack is a single-cycle strobe carrying rdata.
  typedef struct packed {
    logic        ack;
    logic [15:0] rdata;
  } lb_rsp_t;

endpackage
