// ttc_dump_fifo: small synchronous first-word-fall-through FIFO that keeps
// the words the TTCrx puts out after a 'TTCrx Dump' command.
//
// push writes din when not full; pop drops the head word when not empty;
// flush empties the FIFO.  dout always shows the head word.  A pointer pair
// with one extra wrap bit tells full from empty.  DEPTH is this design's
// choice.
module ttc_dump_fifo #(
  parameter int unsigned WIDTH = 12,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  input  logic             flush,
  output logic [WIDTH-1:0] dout,
  output logic             full,
  output logic             empty
);

  localparam int unsigned PW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW:0]      wp, rp;

  always_comb begin
    empty = (wp == rp);
    full  = (wp[PW-1:0] == rp[PW-1:0]) && (wp[PW] != rp[PW]);
    dout  = mem[rp[PW-1:0]];
  end

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (push && !full) begin
        mem[wp[PW-1:0]] <= din;
        wp <= wp + 1'b1;
      end
      if (pop && !empty)
        rp <= rp + 1'b1;
    end
  end

endmodule
