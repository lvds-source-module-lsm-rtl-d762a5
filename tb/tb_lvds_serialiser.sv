// tb_lvds_serialiser: checks the 12-bit serial frames of one link.
// clk_ser runs at 12 x clk40 with coincident rising edges.  After each
// clk40 edge the testbench presents a new random word (and now and then a
// sync request); the 12 bits sent during the next bunch crossing must be
// start 1, D0..D9, stop 0, or six 1s then six 0s for sync.  This checks the
// 480 Mb/s rate (12 bits per 25 ns crossing) and the one-crossing latency.
module tb_lvds_serialiser;
  logic       clk_ser = 0, clk40 = 0, rst_ser = 1;
  logic [9:0] word = '0;
  logic       sync = 1;
  logic       sdo;
  int checks = 0, failures = 0, nsync = 0, ndata = 0;

  lvds_serialiser dut (.clk_ser, .rst_ser, .word, .sync, .sdo);

  always #1 clk_ser = ~clk_ser;
  initial begin #1 clk40 = 1; forever #12 clk40 = ~clk40; end

  initial begin
    repeat (50000) @(posedge clk_ser);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus, in the clk40 domain
  initial begin
    repeat (3) @(posedge clk40);
    rst_ser <= 1'b0;
    for (int k = 0; k < 1500; k++) begin
      @(posedge clk40);
      word <= 10'($urandom);
      sync <= ($urandom_range(0, 7) == 0);
    end
    @(posedge clk40);
    checks++;
    if (nsync == 0 || ndata == 0) begin
      failures++; $display("FAIL coverage sync=%0d data=%0d", nsync, ndata);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker: the frame sent from clk40 edge k carries the word presented
  // after edge k-1
  initial begin
    logic [11:0] exp, got;
    @(negedge rst_ser);
    forever begin
      @(posedge clk40);
      exp = sync ? 12'b000000_111111 : {1'b0, word, 1'b1};
      for (int b = 0; b < 12; b++) begin
        @(negedge clk_ser);
        got[b] = sdo;
      end
      checks++;
      if (sync) nsync++; else ndata++;
      if (got !== exp) begin
        failures++;
        $display("FAIL t=%0t frame %b expected %b", $time, got, exp);
      end
    end
  end
endmodule
