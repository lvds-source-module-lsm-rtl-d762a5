// pg_fpga: one Pattern Generator FPGA, driving 16 LVDS links.
//
// Each link has its own 1k x 10 pattern memory (pg_link_mem) and its own
// parallel-to-serial converter (lvds_serialiser).  One playback counter
// (pg_playback_counter), run by the Memory_sync line of the VME FPGA, gives
// the read address of all 16 memories, so the links play in lock step.  The
// memories are single-port: a VME access to a link takes that link's address
// port for one bunch crossing, and the word it reads or writes is what the
// link sends in the next crossing; the other 15 links carry on.
//
// VME window (byte offsets from 0x8000*PG_NUM): link L (A=0 .. P=15) at
// 0x800*L, location n at +2n.  Bits <9:0> are the pattern word.  Reading
// location 0 of a link also returns bit <15> = 1 when the FPGA's PLL is not
// locked.
//
// Interface: local bus request `lb` (single-cycle req), response `rsp`
// (ack one clock later with rdata); memory_sync and length from the VME
// FPGA; lvds_sync selects sync frames on every link; clk is the 40 MHz TTC
// clock, clk_ser its 12x multiple from the PLL (the PLL itself is not part
// of this RTL, only its locked output enters).  sdo[L] is link L's serial
// stream.
//
// Sizes, the VME layout, the PLL status bit and the VME priority follow the
// specification; the local bus format and the per-link scope of the VME
// override are this design's choice.
module pg_fpga
  import lsm_pkg::*;
#(
  parameter int unsigned PG_NUM = 1,
  parameter int unsigned NLINKS = 16,
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned WIDTH  = 10
) (
  input  logic              clk,
  input  logic              clk_ser,
  input  logic              rst,
  input  lb_req_t           lb,
  output lb_rsp_t           rsp,
  input  logic              memory_sync,
  input  logic [15:0]       length,
  input  logic              lvds_sync,
  input  logic              pll_locked,
  output logic              running,
  output logic [NLINKS-1:0] sdo
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned LW = $clog2(NLINKS);

  logic [AW-1:0]    play_addr;
  logic [15:0]      ptr;
  logic             sel;
  logic [LW-1:0]    acc_link;
  logic [AW-1:0]    acc_loc;
  logic [WIDTH-1:0] q [NLINKS];
  logic [LW-1:0]    rd_link;
  logic             rd_loc0;
  logic             rst_ser;

  pg_playback_counter #(.DEPTH(DEPTH), .PTR_W(16)) u_counter (
    .clk(clk), .rst(rst), .memory_sync(memory_sync), .length(length),
    .ptr(ptr), .mem_addr(play_addr), .running(running)
  );

  // Local bus decode: A17..A15 select the PG, A14..A11 the link, A10..A1 the word
  always_comb begin
    sel      = lb.req && (lb.addr[17:15] == 3'(PG_NUM));
    acc_link = lb.addr[11 +: LW];
    acc_loc  = lb.addr[1 +: AW];
  end

  for (genvar l = 0; l < NLINKS; l++) begin : g_link
    logic          mine;
    logic [AW-1:0] addr;
    always_comb begin
      mine = sel && (acc_link == LW'(l));
      addr = mine ? acc_loc : play_addr;
    end

    pg_link_mem #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_mem (
      .clk(clk), .addr(addr), .we(mine && lb.we),
      .wdata(lb.wdata[WIDTH-1:0]), .q(q[l])
    );

    lvds_serialiser #(.WIDTH(WIDTH)) u_ser (
      .clk_ser(clk_ser), .rst_ser(rst_ser), .word(q[l]), .sync(lvds_sync),
      .sdo(sdo[l])
    );
  end

  // Serialiser reset leaves this domain on a TTC clock edge, which aligns
  // the serial frames to the bunch crossings.
  always_ff @(posedge clk) begin
    rst_ser <= rst;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rsp.ack <= 1'b0;
      rd_link <= '0;
      rd_loc0 <= 1'b0;
    end else begin
      rsp.ack <= sel;
      if (sel) begin
        rd_link <= acc_link;
        rd_loc0 <= (acc_loc == '0);
      end
    end
  end

  always_comb begin
    rsp.rdata = '0;
    rsp.rdata[WIDTH-1:0] = q[rd_link];
    rsp.rdata[15] = rd_loc0 && !pll_locked;
  end

endmodule
