// tb_pg_playback_counter: checks the playback pointer against a reference
// model: restart at 0 on a rising Memory_sync, wrap after `length`, freeze
// while Memory_sync is low, and memory address 0 for pointers beyond the
// memory depth.  Runs one full orbit-length cycle (length 3563) and several
// short cycles, and checks the cycle period in clocks.
module tb_pg_playback_counter;
  logic        clk = 0, rst = 1;
  logic        memory_sync = 0;
  logic [15:0] length = 16'd1023;
  logic [15:0] ptr;
  logic [9:0]  mem_addr;
  logic        running;
  int checks = 0, failures = 0;
  int unsigned mptr = 0;
  logic msq = 0;
  int wraps = 0, beyond = 0, freezes = 0;

  pg_playback_counter dut (.clk, .rst, .memory_sync, .length, .ptr, .mem_addr, .running);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model, updated on the same edge as the DUT
  always @(posedge clk) begin
    if (rst) begin
      mptr = 0; msq = 0;
    end else begin
      if (memory_sync && !msq) mptr = 0;
      else if (memory_sync) begin
        if (mptr >= length) begin mptr = 0; wraps++; end
        else mptr = mptr + 1;
      end else if (msq) freezes++;
      msq = memory_sync;
    end
  end

  always @(negedge clk) if (!rst) begin
    checks++;
    if (ptr !== 16'(mptr) || mem_addr !== ((mptr < 1024) ? 10'(mptr) : 10'd0) || running !== msq) begin
      failures++;
      $display("FAIL t=%0t ptr=%0d exp %0d addr=%0d run=%b", $time, ptr, mptr, mem_addr, running);
    end
    if (mptr >= 1024) beyond++;
  end

  initial begin
    int t0, t1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // Orbit length cycle: 3564 BC
    @(negedge clk) begin length = 16'd3563; memory_sync = 1; end
    @(posedge clk); #1;
    wait (ptr == 0); t0 = $time - 1;
    @(posedge clk); #1;
    wait (ptr == 0); t1 = $time;
    checks++;
    if ((t1 - t0) / 10 != 3564) begin
      failures++; $display("FAIL orbit period %0d", (t1 - t0) / 10);
    end
    // freeze and resume without restart
    repeat (17) @(posedge clk);
    @(negedge clk) memory_sync = 0;
    repeat (20) @(posedge clk);
    @(negedge clk) memory_sync = 1;      // restart from 0
    repeat (50) @(posedge clk);
    // short cycles
    @(negedge clk) length = 16'd4;
    repeat (40) @(posedge clk);
    @(negedge clk) length = 16'd0;
    repeat (5) @(posedge clk);
    for (int k = 0; k < 20; k++) begin
      @(negedge clk) begin length = 16'($urandom_range(0, 1200)); memory_sync = ($urandom_range(0, 3) != 0); end
      repeat ($urandom_range(1, 1500)) @(posedge clk);
    end
    checks++;
    if (wraps < 3 || beyond == 0 || freezes == 0) begin
      failures++; $display("FAIL coverage wraps=%0d beyond=%0d freezes=%0d", wraps, beyond, freezes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
