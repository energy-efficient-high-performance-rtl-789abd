// Memory module: the ROM of FFT constants, the RAM of frequency-domain
// weights and the activation buffer, grouped as one unit.
//
// The twiddle ROM has BF+1 read ports: tw_* for the butterflies of the
// FFT/IFFT module and pp_tw_* for the real-input post-processing. The weight
// RAM is written by the host and read by the peripheral computing module.
// The activation buffer is shared by the host, the packing loader (read)
// and the peripheral computing module (write). All reads are combinational;
// all writes are synchronous. The ROM + weight RAM content follows the
// architecture; the activation buffer is this design's addition.
module bc_memory
  import bc_pkg::*;
#(
  parameter int N         = 128,
  parameter int BF        = 4,
  parameter int W_DEPTH   = 95940,
  parameter int ACT_DEPTH = 3072,
  localparam int TAW      = $clog2(N/2 + 1),
  localparam int W_AW     = $clog2(W_DEPTH),
  localparam int ACT_AW   = $clog2(ACT_DEPTH)
) (
  input  logic              clk,
  // twiddle ROM
  input  logic [TAW-1:0]    tw_idx [BF],
  output tw_cplx_t          tw_val [BF],
  input  logic [TAW-1:0]    pp_tw_idx,
  output tw_cplx_t          pp_tw_val,
  // weight RAM
  input  logic              w_we,
  input  logic [W_AW-1:0]   w_waddr,
  input  cplx_t             w_wdata,
  input  logic [W_AW-1:0]   w_raddr,
  output cplx_t             w_rdata,
  // activation buffer
  input  logic              host_we,
  input  logic              host_bank,
  input  logic [ACT_AW-1:0] host_addr,
  input  data_t             host_wdata,
  output data_t             host_rdata,
  input  logic              eng_rbank,
  input  logic [ACT_AW-1:0] eng_raddr0,
  output data_t             eng_rdata0,
  input  logic [ACT_AW-1:0] eng_raddr1,
  output data_t             eng_rdata1,
  input  logic              eng_we,
  input  logic              eng_wbank,
  input  logic [ACT_AW-1:0] eng_waddr,
  input  data_t             eng_wdata
);

  logic [TAW-1:0] rom_idx [BF+1];
  tw_cplx_t       rom_val [BF+1];

  for (genvar u = 0; u < BF; u++) begin : g_port
    assign rom_idx[u] = tw_idx[u];
    assign tw_val[u]  = rom_val[u];
  end
  assign rom_idx[BF] = pp_tw_idx;
  assign pp_tw_val   = rom_val[BF];

  twiddle_rom #(.N(N), .NP(BF + 1)) u_rom (
    .idx (rom_idx),
    .val (rom_val)
  );

  weight_ram #(.DEPTH(W_DEPTH)) u_wram (
    .clk   (clk),
    .we    (w_we),
    .waddr (w_waddr),
    .wdata (w_wdata),
    .raddr (w_raddr),
    .rdata (w_rdata)
  );

  act_buffer #(.DEPTH(ACT_DEPTH)) u_act (
    .clk        (clk),
    .host_we    (host_we),
    .host_bank  (host_bank),
    .host_addr  (host_addr),
    .host_wdata (host_wdata),
    .host_rdata (host_rdata),
    .eng_rbank  (eng_rbank),
    .eng_raddr0 (eng_raddr0),
    .eng_rdata0 (eng_rdata0),
    .eng_raddr1 (eng_raddr1),
    .eng_rdata1 (eng_rdata1),
    .eng_we     (eng_we),
    .eng_wbank  (eng_wbank),
    .eng_waddr  (eng_waddr),
    .eng_wdata  (eng_wdata)
  );

endmodule
