// Activation buffer: two banks of (1,5,6) words for layer inputs and outputs.
//
// A layer reads its input vector from one bank and writes its output vector
// to the other, so a multi-layer network runs by alternating banks without
// moving data. The host fills the input bank and reads results through its
// own port. The default depth of 3072 words per bank is the widest vector
// of the evaluated networks (the 32x32x3 input image). The banked buffer is
// this design's choice: the architecture names only a memory module.
//
// Interface: host write and read port (bank, address), two combinational
// engine read ports on bank eng_rbank, one engine write port on eng_wbank.
// Writes are synchronous; an engine write wins over a host write to the
// same word in the same cycle.
module act_buffer
  import bc_pkg::*;
#(
  parameter int DEPTH = 3072,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          host_we,
  input  logic          host_bank,
  input  logic [AW-1:0] host_addr,
  input  data_t         host_wdata,
  output data_t         host_rdata,
  input  logic          eng_rbank,
  input  logic [AW-1:0] eng_raddr0,
  output data_t         eng_rdata0,
  input  logic [AW-1:0] eng_raddr1,
  output data_t         eng_rdata1,
  input  logic          eng_we,
  input  logic          eng_wbank,
  input  logic [AW-1:0] eng_waddr,
  input  data_t         eng_wdata
);

  data_t mem [2][DEPTH];

  always_ff @(posedge clk) begin
    if (host_we && int'(host_addr) < DEPTH) mem[host_bank][host_addr] <= host_wdata;
    if (eng_we && int'(eng_waddr) < DEPTH)  mem[eng_wbank][eng_waddr] <= eng_wdata;
  end

  assign host_rdata = (int'(host_addr)  < DEPTH) ? mem[host_bank][host_addr]  : '0;
  assign eng_rdata0 = (int'(eng_raddr0) < DEPTH) ? mem[eng_rbank][eng_raddr0] : '0;
  assign eng_rdata1 = (int'(eng_raddr1) < DEPTH) ? mem[eng_rbank][eng_raddr1] : '0;

endmodule
