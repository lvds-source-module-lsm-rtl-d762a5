// pg_link_mem: pattern memory of one LVDS link (1k words of 10 bits).
//
// A single-port synchronous RAM, as the specification asks: there is one
// address, so whoever drives it (the VME side or the playback counter, chosen
// by the parent) gets the port.  The read word appears on q one clock after
// the address; a write also updates q with the written word (write-first).
// Every location starts at 0x001, the link idle value, as the specification
// requires.  Depth and width are the specification's 1024 x 10; the
// write-first read behaviour is this design's choice.
//
// Ports: clk, addr, we, wdata -> q (registered).
module pg_link_mem #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 10,
  parameter logic [WIDTH-1:0] INIT_WORD = 'h001
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic                     we,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         q
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = INIT_WORD;
  end

  always_ff @(posedge clk) begin
    if (we) begin
      mem[addr] <= wdata;
      q         <= wdata;
    end else begin
      q <= mem[addr];
    end
  end

endmodule
