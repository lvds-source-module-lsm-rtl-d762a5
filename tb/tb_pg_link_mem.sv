// tb_pg_link_mem: checks the link pattern memory.
// Reads every location after power-up and expects the idle word 0x001,
// then performs random writes and reads against a reference array and
// checks the one-clock read latency and the write-first output.
module tb_pg_link_mem;
  localparam int DEPTH = 1024;
  logic       clk = 0;
  logic [9:0] addr = '0;
  logic       we = 0;
  logic [9:0] wdata = '0;
  logic [9:0] q;
  logic [9:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  pg_link_mem dut (.clk, .addr, .we, .wdata, .q);

  always #5 clk = ~clk;

  task automatic check(input logic [9:0] got, input logic [9:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) ref_mem[i] = 10'h001;
    // power-up contents
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); addr = 10'(i); we = 0;
      @(posedge clk); #1;
      check(q, 10'h001, $sformatf("power-up loc %0d", i));
    end
    // random traffic
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      addr  = 10'($urandom_range(0, DEPTH - 1));
      we    = ($urandom_range(0, 1) == 1);
      wdata = 10'($urandom);
      @(posedge clk); #1;
      if (we) begin
        ref_mem[addr] = wdata;
        check(q, wdata, "write-first output");
      end else begin
        check(q, ref_mem[addr], $sformatf("read loc %0d", addr));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
