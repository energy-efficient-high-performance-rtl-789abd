// Twiddle-factor ROM: the constant coefficients of the FFT/IFFT module.
//
// Holds W_N^k = cos(2*pi*k/N) - j*sin(2*pi*k/N) for k = 0 .. N/2, where N is
// the largest transform the FFT/IFFT module runs. Smaller transforms of size
// n = N/2^s use every 2^s-th entry, and the real-input post-processing for a
// size-k vector needs W_k^k/2 = -1, hence the one extra entry. The table is
// computed at elaboration from the cosine and sine, so no data file is
// needed; each value is rounded to a 12-bit word with 10 fraction bits.
//
// Interface: NP independent combinational read ports (index in, value out).
// Storing the FFT constants in a ROM inside the memory module follows the
// architecture; the port count and word format are this design's choices.
module twiddle_rom
  import bc_pkg::*;
#(
  parameter int N  = 128,   // largest transform size (power of two)
  parameter int NP = 5,     // number of read ports
  localparam int DEPTH = N/2 + 1,
  localparam int AW    = $clog2(DEPTH)
) (
  input  logic [AW-1:0] idx [NP],
  output tw_cplx_t      val [NP]
);

  typedef tw_t rom_t [DEPTH];

  // part = 0: real part cos(a); part = 1: imaginary part -sin(a)
  function automatic rom_t make_rom(input bit part);
    rom_t r;
    real  ang, v;
    for (int k = 0; k < DEPTH; k++) begin
      ang  = 2.0 * 3.14159265358979323846 * real'(k) / real'(N);
      v    = part ? -$sin(ang) : $cos(ang);
      r[k] = tw_t'($rtoi($floor(v * real'(1 << TW_FRAC) + 0.5)));
    end
    return r;
  endfunction

  localparam rom_t ROM_RE = make_rom(1'b0);
  localparam rom_t ROM_IM = make_rom(1'b1);

  always_comb begin
    for (int i = 0; i < NP; i++) begin
      if (int'(idx[i]) < DEPTH) begin
        val[i].re = ROM_RE[idx[i]];
        val[i].im = ROM_IM[idx[i]];
      end else begin
        val[i] = '0;
      end
    end
  end

endmodule
