// tb_pg_fpga: checks one Pattern Generator FPGA end to end, at the serial
// outputs.  A reference model holds the 16 link memories and the playback
// pointer; every 25 ns bunch crossing the testbench collects the 12 serial
// bits of all 16 links and compares them with the frame the model predicts
// (sync frames while LVDS Sync is set, else start bit, 10-bit word, stop
// bit).  The run fills all 16 x 1024 locations over the local bus, reads a
// sample back (including the PLL fault bit of location 0), then plays with
// a cycle longer than the memory (so location 0 fills the tail), with
// VME accesses during playback (which override that link for one crossing),
// a freeze and a restart.  It also checks that requests for another PG are
// ignored.
module tb_pg_fpga;
  import lsm_pkg::*;
  localparam int NL = 16, DEPTH = 1024, PGN = 2;
  logic clk_ser = 0, clk = 0, rst = 1;
  lb_req_t lb = '0;
  lb_rsp_t rsp;
  logic memory_sync = 0, lvds_sync = 1, pll_locked = 1, running;
  logic [15:0] length = 16'd1023;
  logic [NL-1:0] sdo;
  int checks = 0, failures = 0;
  int n_sync = 0, n_data = 0, n_override = 0, n_beyond = 0, n_wrap = 0, n_freeze = 0;

  pg_fpga #(.PG_NUM(PGN)) dut (.clk, .clk_ser, .rst, .lb, .rsp, .memory_sync,
                              .length, .lvds_sync, .pll_locked, .running, .sdo);

  always #1 clk_ser = ~clk_ser;
  initial begin #1 clk = 1; forever #12 clk = ~clk; end

  function automatic logic [9:0] pattern(int l, int n);
    return 10'((l * 37 + n * 11 + 5) ^ (n >> 3));
  endfunction

  // reference model
  logic [9:0]  mm [NL][DEPTH];
  logic [9:0]  q_m [NL];
  logic [9:0]  q_prev [NL];
  logic        ovr_m [NL];
  logic        ovr_prev [NL];
  int unsigned mptr = 0;
  logic        msq = 0;
  bit          checking = 0;

  initial for (int l = 0; l < NL; l++) for (int n = 0; n < DEPTH; n++) mm[l][n] = 10'h001;

  initial begin : model_and_checker
    logic [11:0] got [NL];
    logic [11:0] exp;
    logic        sync_now;
    forever begin
      @(posedge clk);
      q_prev = q_m;
      ovr_prev = ovr_m;
      sync_now = lvds_sync;
      // memory model: the edge's reads and writes
      for (int l = 0; l < NL; l++) begin
        automatic int unsigned pa = (mptr < DEPTH) ? mptr : 0;
        ovr_m[l] = 0;
        if (lb.req && lb.addr[17:15] == 3'(PGN) && lb.addr[14:11] == 4'(l)) begin
          ovr_m[l] = 1;
          if (lb.we) begin mm[l][lb.addr[10:1]] = lb.wdata[9:0]; q_m[l] = lb.wdata[9:0]; end
          else q_m[l] = mm[l][lb.addr[10:1]];
        end else q_m[l] = mm[l][pa];
      end
      if (mptr >= DEPTH && memory_sync && msq) n_beyond++;
      // pointer model
      if (rst) begin mptr = 0; msq = 0; end
      else begin
        if (memory_sync && !msq) mptr = 0;
        else if (memory_sync) begin
          if (mptr >= length) begin mptr = 0; n_wrap++; end else mptr++;
        end else if (msq) n_freeze++;
        msq = memory_sync;
      end
      // serial frames of this crossing carry the words held after the last edge
      for (int b = 0; b < 12; b++) begin
        @(negedge clk_ser);
        for (int l = 0; l < NL; l++) got[l][b] = sdo[l];
      end
      if (checking) begin
        for (int l = 0; l < NL; l++) begin
          exp = sync_now ? 12'b000000_111111 : {1'b0, q_prev[l], 1'b1};
          checks++;
          if (got[l] !== exp) begin
            failures++;
            if (failures < 10) $display("FAIL t=%0t link %0d frame %b expected %b", $time, l, got[l], exp);
          end
          if (!sync_now && ovr_prev[l] && msq) n_override++;
        end
        if (sync_now) n_sync++; else n_data++;
      end
    end
  end

  task automatic bus(input logic we, input logic [17:0] a, input logic [15:0] d,
                     output logic [15:0] rd, output logic acked);
    @(negedge clk);
    lb.req = 1; lb.we = we; lb.addr = a[17:1]; lb.wdata = d;
    @(negedge clk);
    lb.req = 0;
    acked = rsp.ack;
    rd = rsp.rdata;
  endtask

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [17:0] maddr(int pg, int l, int n);
    return 18'(pg * 32'h8000 + l * 32'h800 + n * 2);
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    logic ack;
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (3) @(posedge clk);
    checking = 1;
    repeat (5) @(posedge clk);
    @(negedge clk) lvds_sync = 0;        // idle words 0x001 on every link
    repeat (5) @(posedge clk);
    // fill all memories
    for (int l = 0; l < NL; l++)
      for (int n = 0; n < DEPTH; n++) begin
        bus(1, maddr(PGN, l, n), {6'h3F, pattern(l, n)}, d, ack);
        if (!ack) begin failures++; $display("FAIL write not acknowledged"); end
      end
    checks++;
    // read back a sample
    for (int k = 0; k < 300; k++) begin
      automatic int l = $urandom_range(0, NL - 1);
      automatic int n = (k < 16) ? 0 : $urandom_range(0, DEPTH - 1);
      if (k < 16) l = k;
      pll_locked = (k % 2 == 0);
      bus(0, maddr(PGN, l, n), 16'h0, d, ack);
      check(ack && d == {(n == 0 && !pll_locked), 5'b0, pattern(l, n)},
            $sformatf("readback link %0d loc %0d got %h", l, n, d));
    end
    pll_locked = 1;
    // other PG's window and the register area are ignored
    bus(1, maddr(PGN + 1, 3, 5), 16'h3FF, d, ack);
    check(!ack, "other PG ignored");
    bus(0, 18'h00024, 16'h0, d, ack);
    check(!ack, "register area ignored");
    // playback with a cycle longer than the memory
    @(negedge clk) begin length = 16'd1100; memory_sync = 1; end
    repeat (2500) @(posedge clk);
    // VME accesses during playback
    for (int k = 0; k < 40; k++) begin
      automatic int l = $urandom_range(0, NL - 1);
      automatic int n = $urandom_range(1, DEPTH - 1);
      bus(k % 2, maddr(PGN, l, n), {6'h0, pattern(l, n)}, d, ack);
      repeat ($urandom_range(0, 20)) @(posedge clk);
    end
    // freeze, restart, short cycle
    @(negedge clk) memory_sync = 0;
    repeat (30) @(posedge clk);
    @(negedge clk) begin memory_sync = 1; length = 16'd9; end
    repeat (60) @(posedge clk);
    @(negedge clk) lvds_sync = 1;
    repeat (5) @(posedge clk);
    checks++;
    if (!n_sync || !n_data || !n_override || !n_beyond || !n_wrap || !n_freeze) begin
      failures++;
      $display("FAIL coverage sync=%0d data=%0d override=%0d beyond=%0d wrap=%0d freeze=%0d",
               n_sync, n_data, n_override, n_beyond, n_wrap, n_freeze);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
