// vme_master_bfm: behavioural VME bus master used by the testbenches.
// Runs D16 single-word cycles: drives address, address modifier and LWORD*,
// asserts AS*, then both data strobes, waits for DTACK* (or a bus timeout),
// samples read data, releases the strobes and waits for DTACK* to go high.
// Tasks: write16(addr, data, ok), read16(addr, data, ok).  `am` selects the
// address modifier used by the next cycles.
module vme_master_bfm (
  output logic        vme_as_n,
  output logic        vme_ds0_n,
  output logic        vme_ds1_n,
  output logic        vme_write_n,
  output logic        vme_lword_n,
  output logic [5:0]  vme_am,
  output logic [31:1] vme_addr,
  output logic [15:0] vme_d_in,
  input  logic [15:0] vme_d_out,
  input  logic        vme_d_oe,
  input  logic        vme_dtack_n
);
  logic [5:0] am = 6'h39;
  int         timeout_ns = 2000;

  initial begin
    vme_as_n = 1; vme_ds0_n = 1; vme_ds1_n = 1; vme_write_n = 1;
    vme_lword_n = 1; vme_am = '0; vme_addr = '0; vme_d_in = '0;
  end

  task automatic cycle(input logic [31:0] addr, input logic wr,
                       inout logic [15:0] data, output logic ok);
    int t = 0;
    vme_addr    = addr[31:1];
    vme_am      = am;
    vme_lword_n = 1;
    vme_write_n = !wr;
    if (wr) vme_d_in = data;
    #10 vme_as_n = 0;
    #10 begin vme_ds0_n = 0; vme_ds1_n = 0; end
    while (vme_dtack_n && t < timeout_ns) begin #1; t++; end
    ok = !vme_dtack_n;
    if (ok && !wr) begin
      #1 data = vme_d_oe ? vme_d_out : 16'hxxxx;
    end
    #5 begin vme_ds0_n = 1; vme_ds1_n = 1; end
    #5 vme_as_n = 1;
    t = 0;
    while (!vme_dtack_n && t < timeout_ns) begin #1; t++; end
    #20;
  endtask

  task automatic write16(input logic [31:0] addr, input logic [15:0] data, output logic ok);
    logic [15:0] d = data;
    cycle(addr, 1'b1, d, ok);
  endtask

  task automatic read16(input logic [31:0] addr, output logic [15:0] data, output logic ok);
    logic [15:0] d = '0;
    cycle(addr, 1'b0, d, ok);
    data = d;
  endtask
endmodule
