// tb_ttcrx_i2c_master: runs the I2C controller against a behavioural TTCrx
// I2C slave.  Writes random data to random TTCrx registers and reads them
// back, checking the slave's register contents, the read data, the busy
// flag, the SCL bit period (4 x QDIV clocks), operation with clock
// stretching, the error flag on a missing acknowledge and the controller
// reset.
module tb_ttcrx_i2c_master;
  localparam int QDIV = 4;
  logic clk = 0, rst = 1;
  logic start = 0, reset = 0;
  logic [13:0] cmd = '0;
  logic busy, error;
  logic [7:0] rdata;
  logic scl_oe, sda_oe, s_scl_oe, s_sda_oe;
  wire  scl = !(scl_oe || s_scl_oe);
  wire  sda = !(sda_oe || s_sda_oe);
  int checks = 0, failures = 0;

  ttcrx_i2c_master #(.QDIV(QDIV)) dut (
    .clk, .rst, .start, .reset, .cmd, .busy, .error, .rdata,
    .scl_i(scl), .sda_i(sda), .scl_oe, .sda_oe);
  ttcrx_i2c_model slave (.scl, .sda, .scl_oe(s_scl_oe), .sda_oe(s_sda_oe));

  always #12.5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic op(input logic wr, input logic [4:0] idx, input logic [7:0] d);
    @(negedge clk);
    cmd = {wr, idx, d}; start = 1;
    @(negedge clk);
    start = 0;
    check(busy, "busy after start");
    while (busy) @(negedge clk);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // SCL period inside the first address byte
  realtime r1, r2;
  initial begin
    @(negedge rst);
    @(posedge busy);
    repeat (2) @(posedge scl);
    r1 = $realtime;
    @(posedge scl);
    r2 = $realtime;
  end

  initial begin
    logic [7:0] d;
    logic [4:0] idx;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    check(!busy && !error && scl && sda, "idle bus after reset");
    for (int n = 0; n < 30; n++) begin
      idx = 5'($urandom_range(0, 19));
      d = 8'($urandom);
      if (n == 15) slave.stretch_ns = 300;
      op(1'b1, idx, d);
      check(!error, "write acknowledged");
      check(slave.regs[idx] == d, $sformatf("TTCrx reg %0d = %h expected %h", idx, slave.regs[idx], d));
      op(1'b0, idx, 8'h00);
      check(!error && rdata == d, $sformatf("read reg %0d got %h expected %h", idx, rdata, d));
    end
    check(r2 - r1 == 4 * QDIV * 25.0, $sformatf("SCL period %0t", r2 - r1));
    check(slave.n_stretch > 0 && slave.n_writes == 30 && slave.n_reads == 30, "slave saw all accesses");
    // missing acknowledge
    slave.nack = 1;
    op(1'b1, 5'd3, 8'h55);
    check(error, "error on NACK");
    check(scl && sda, "bus released after error");
    slave.nack = 0;
    op(1'b0, 5'd3, 8'h00);
    check(!error, "error cleared by next operation");
    // controller reset in mid operation
    @(negedge clk);
    cmd = {1'b1, 5'd4, 8'hAA}; start = 1;
    @(negedge clk) start = 0;
    repeat (30) @(negedge clk);
    reset = 1;
    @(negedge clk) reset = 0;
    check(!busy && !error, "reset aborts");
    repeat (20) @(negedge clk);
    check(scl && sda, "reset releases bus");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
