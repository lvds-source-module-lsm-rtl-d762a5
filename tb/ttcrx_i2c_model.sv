// ttcrx_i2c_model: behavioural model of the TTCrx chip's I2C slave, for
// testbenches only.  It answers at {ID,0} (pointer register, selects one of
// 32 internal byte registers) and {ID,1} (data register: writes or reads the
// selected register).  It acknowledges every byte written to it unless
// `nack` is set, drives read data MSB first, and when `stretch_ns` is
// non-zero holds SCL low for that long after each acknowledge.
module ttcrx_i2c_model #(
  parameter logic [5:0] ID = 6'b001000
) (
  input  logic scl,
  input  logic sda,
  output logic scl_oe,
  output logic sda_oe
);
  typedef enum {IDLE, ADDR, WR, RD} st_t;
  st_t        st = IDLE;
  logic [7:0] regs [32];
  logic [4:0] ptr = '0;
  logic [7:0] sh = '0, tx = '0;
  logic       sel_data = 0, rnw = 0;
  int         bitn = 0;
  bit         nack = 0;
  int         stretch_ns = 0;
  int         n_stretch = 0, n_writes = 0, n_reads = 0;

  initial begin
    sda_oe = 0; scl_oe = 0;
    for (int i = 0; i < 32; i++) regs[i] = 8'(i * 7 + 3);
  end

  always @(negedge sda) if (scl) begin st = ADDR; bitn = 0; sda_oe = 0; end
  always @(posedge sda) if (scl) begin st = IDLE; sda_oe = 0; end

  always @(posedge scl) begin
    if (st == ADDR || st == WR) begin
      if (bitn < 8) sh = {sh[6:0], sda};
      bitn++;
    end else if (st == RD) bitn++;
  end

  task automatic stretch();
    if (stretch_ns > 0) begin
      n_stretch++;
      scl_oe = 1;
      #(stretch_ns);
      scl_oe = 0;
    end
  endtask

  always @(negedge scl) begin
    case (st)
      ADDR: if (bitn == 8) begin
              if (sh[7:2] == ID && !nack) begin
                sda_oe = 1; sel_data = sh[1]; rnw = sh[0];
              end else st = IDLE;
            end else if (bitn == 9) begin
              sda_oe = 0; bitn = 0;
              if (rnw) begin
                st = RD; tx = regs[ptr]; sda_oe = !tx[7]; n_reads++;
              end else st = WR;
              stretch();
            end
      WR:   if (bitn == 8) begin
              if (nack) st = IDLE;
              else begin
                sda_oe = 1;
                if (sel_data) begin regs[ptr] = sh; n_writes++; end
                else ptr = sh[4:0];
              end
            end else if (bitn == 9) begin
              sda_oe = 0; bitn = 0;
            end
      RD:   if (bitn < 8) sda_oe = !tx[7 - bitn];
            else sda_oe = 0;
      default: ;
    endcase
  end
endmodule
