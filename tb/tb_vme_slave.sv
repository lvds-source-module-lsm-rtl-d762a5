// tb_vme_slave: checks the VME slave's address decode and handshake.
// A behavioural target on the local bus stores words in an associative array
// and answers after a random 1..4 clocks.  The testbench writes and reads
// back random words through A24 and A32 cycles at the switch-set base, and
// checks that cycles to another base, with an unused address modifier or
// with LWORD* low get no DTACK*, and that each accepted cycle makes exactly
// one local bus request.
module tb_vme_slave;
  import lsm_pkg::*;
  logic clk = 0, rst = 1;
  logic        vme_as_n, vme_ds0_n, vme_ds1_n, vme_write_n, vme_lword_n;
  logic [5:0]  vme_am;
  logic [31:1] vme_addr;
  logic [15:0] vme_d_in, vme_d_out;
  logic        vme_d_oe, vme_dtack_n;
  logic [15:0] base_sw = 16'hA5C8;
  lb_req_t     lb;
  lb_rsp_t     rsp;
  logic        access;
  int checks = 0, failures = 0, nreq = 0, nacc = 0;
  logic [15:0] target [logic [16:0]];
  int          lat = 0;
  logic        pend = 0;
  lb_req_t     held;

  vme_slave dut (.clk, .rst, .vme_as_n, .vme_ds0_n, .vme_ds1_n, .vme_write_n,
                 .vme_lword_n, .vme_am, .vme_addr, .vme_d_in, .vme_d_out,
                 .vme_d_oe, .vme_dtack_n, .base_sw, .lb, .rsp, .access);
  vme_master_bfm bfm (.vme_as_n, .vme_ds0_n, .vme_ds1_n, .vme_write_n,
                      .vme_lword_n, .vme_am, .vme_addr, .vme_d_in, .vme_d_out,
                      .vme_d_oe, .vme_dtack_n);

  always #12.5 clk = ~clk;

  // local bus target
  always @(posedge clk) begin
    rsp.ack <= 1'b0;
    if (rst) pend = 0;
    else if (lb.req) begin
      nreq++;
      held = lb; pend = 1; lat = $urandom_range(0, 3);
      if (lb.we) target[lb.addr] = lb.wdata;
    end else if (pend) begin
      if (lat == 0) begin
        pend = 0;
        rsp.ack   <= 1'b1;
        rsp.rdata <= held.we ? 16'h0 : (target.exists(held.addr) ? target[held.addr] : 16'hDEAD);
      end else lat--;
    end
    if (access && !rst) nacc++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ok;
    logic [15:0] d;
    logic [31:0] a24base, a32base, a;
    logic [15:0] ref_data [logic [16:0]];
    rsp = '0;
    a24base = {8'h00, base_sw[7:2], 18'h0};
    a32base = {base_sw[15:2], 18'h0};
    repeat (4) @(posedge clk);
    rst = 0;
    repeat (4) @(posedge clk);
    for (int n = 0; n < 200; n++) begin
      bfm.am = (n % 2) ? 6'h39 : 6'h0D;
      a = ((n % 2) ? a24base : a32base) | {14'h0, 17'($urandom), 1'b0};
      d = 16'($urandom);
      bfm.write16(a, d, ok);
      check(ok, "write acknowledged");
      ref_data[a[17:1]] = d;
      bfm.read16(a, d, ok);
      check(ok && d == ref_data[a[17:1]], $sformatf("readback %h got %h", a, d));
    end
    check(nreq == 400 && nacc == 400, $sformatf("one request per cycle (%0d, %0d)", nreq, nacc));
    // no response outside the window, to bad AM codes or to 32-bit cycles
    bfm.timeout_ns = 400;
    bfm.am = 6'h39;
    bfm.read16(a24base ^ 32'h0004_0000, d, ok);
    check(!ok, "A24 other base ignored");
    bfm.am = 6'h09;
    bfm.read16(a32base ^ 32'h8000_0000, d, ok);
    check(!ok, "A32 other base ignored");
    bfm.am = 6'h29;   // A16
    bfm.read16(a24base, d, ok);
    check(!ok, "A16 AM ignored");
    bfm.am = 6'h3E;
    force vme_lword_n = 1'b0;
    bfm.read16(a24base, d, ok);
    release vme_lword_n;
    check(!ok, "LWORD* low ignored");
    bfm.read16(a24base | 32'h2, d, ok);
    check(ok, "A24 program AM accepted");
    check(nreq == 401, "no stray requests");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
