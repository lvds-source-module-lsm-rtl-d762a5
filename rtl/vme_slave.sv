// vme_slave: A24/A32, D16 VME slave of the LSM, run on the 40 MHz TTC clock.
//
// The module answers in a 256 KB window whose base is set by four rotary hex
// switches (base_sw[15:0]).  In A24 cycles the two low switches give A23..A16
// and A23..A18 must match base_sw[7:2]; in A32 cycles all four switches give
// A31..A16 and A31..A18 must match base_sw[15:2].  Accepted address modifiers
// are the data and program codes of A24 (0x39, 0x3A, 0x3D, 0x3E) and A32
// (0x09, 0x0A, 0x0D, 0x0E).  Only 16-bit word cycles (both data strobes low,
// LWORD* high) are answered.
//
// AS*, DS0* and DS1* pass through two-flop synchronisers.  When both data
// strobes are seen low with AS* low and the address matches, the slave
// issues one single-cycle request on the local bus (lb), waits for the
// response (rsp.ack), then drives DTACK* low (with read data on the bus for a
// read) until both data strobes return high.  `access` pulses once per
// accepted cycle, for the front-panel VME access LED.
//
// The window size, the A24/A32 D16 slave type and the switch-set base follow
// the specification; the synchroniser, the handshake sequence and the
// address-modifier set are this design's choice.
module vme_slave
  import lsm_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // VME bus (after the board's buffers)
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
  // Base address switches
  input  logic [15:0] base_sw,
  // Local bus
  output lb_req_t     lb,
  input  lb_rsp_t     rsp,
  output logic        access
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_DTACK} state_t;
  state_t state;

  logic [1:0] as_s, ds0_s, ds1_s;
  logic       as_l, ds_l, ds_h;
  logic       am_a24, am_a32, hit;

  always_ff @(posedge clk) begin
    if (rst) begin
      as_s  <= 2'b11;
      ds0_s <= 2'b11;
      ds1_s <= 2'b11;
    end else begin
      as_s  <= {as_s[0],  vme_as_n};
      ds0_s <= {ds0_s[0], vme_ds0_n};
      ds1_s <= {ds1_s[0], vme_ds1_n};
    end
  end

  always_comb begin
    as_l   = !as_s[1];
    ds_l   = !ds0_s[1] && !ds1_s[1];
    ds_h   = ds0_s[1] && ds1_s[1];
    am_a24 = (vme_am == 6'h39) || (vme_am == 6'h3A) ||
             (vme_am == 6'h3D) || (vme_am == 6'h3E);
    am_a32 = (vme_am == 6'h09) || (vme_am == 6'h0A) ||
             (vme_am == 6'h0D) || (vme_am == 6'h0E);
    hit    = vme_lword_n &&
             ((am_a24 && (vme_addr[23:18] == base_sw[7:2])) ||
              (am_a32 && (vme_addr[31:18] == base_sw[15:2])));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      lb          <= '0;
      vme_d_out   <= '0;
      vme_d_oe    <= 1'b0;
      vme_dtack_n <= 1'b1;
      access      <= 1'b0;
    end else begin
      lb.req <= 1'b0;
      access <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (as_l && ds_l && hit) begin
            lb.req   <= 1'b1;
            lb.we    <= !vme_write_n;
            lb.addr  <= vme_addr[17:1];
            lb.wdata <= vme_d_in;
            access   <= 1'b1;
            state    <= S_WAIT;
          end
        end
        S_WAIT: begin
          if (rsp.ack) begin
            vme_d_out   <= rsp.rdata;
            vme_d_oe    <= !lb.we;
            vme_dtack_n <= 1'b0;
            state       <= S_DTACK;
          end
        end
        S_DTACK: begin
          if (ds_h) begin
            vme_d_oe    <= 1'b0;
            vme_dtack_n <= 1'b1;
            state       <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
