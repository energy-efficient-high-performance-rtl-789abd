// Frequency-domain weight RAM.
//
// Holds the pre-calculated spectra fft(w_ij) of the circulant blocks of
// every layer. Because each w_ij is real, only bins 0 .. k/2 of its k-point
// FFT are kept (the rest are conjugates), one complex (1,5,6) word per bin,
// so a block takes k/2+1 words and block (i,j) of a layer with q column
// blocks starts at w_base + (i*q + j)*(k/2+1). The spectra are computed off
// line by the host and written through the write port before inference.
// Keeping fft(w) rather than w in the RAM follows the architecture; the
// half-spectrum layout is this design's choice. The default depth holds all
// seven weight matrices of the 3072-2048-2048-2048-2048-2048-512-10 network
// at k = 128: 1476 blocks of 65 words.
//
// Interface: synchronous write port, combinational read port.
module weight_ram
  import bc_pkg::*;
#(
  parameter int DEPTH = 95940,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  cplx_t         wdata,
  input  logic [AW-1:0] raddr,
  output cplx_t         rdata
);

  cplx_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
