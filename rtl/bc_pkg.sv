// Shared types and constants of the block-circulant DNN inference accelerator.
//
// All datapath numbers use the (1,5,6) fixed-point format: a 12-bit two's
// complement word with 1 sign bit, 5 integer bits and 6 fraction bits. That
// is the quantization scheme the design is built around; the FFT twiddle
// factors are constants of the same 12-bit word size but with 10 fraction
// bits (range [-2,2)), which is this design's own choice for the ROM. The
// package also holds the complex sample type and the saturating rounding
// helpers that every arithmetic block uses, so all blocks quantize alike.
package bc_pkg;

  // Data word: (sign, integer, fraction) = (1,5,6).
  localparam int DATA_W = 12;
  localparam int FRAC_W = 6;
  // Twiddle word: 12 bits, 10 of them fraction.
  localparam int TW_W   = 12;
  localparam int TW_FRAC = 10;
  // Accumulator for the per-row sums over the q column blocks.
  localparam int ACC_W  = 20;

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [TW_W-1:0]   tw_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  typedef struct packed {
    data_t re;
    data_t im;
  } cplx_t;

  typedef struct packed {
    tw_t re;
    tw_t im;
  } tw_cplx_t;

  localparam data_t DATA_MAX = data_t'({1'b0, {(DATA_W-1){1'b1}}});
  localparam data_t DATA_MIN = data_t'({1'b1, {(DATA_W-1){1'b0}}});

  // Saturate a wide signed value to the data word.
  function automatic data_t sat_data(input logic signed [47:0] v);
    if (v > 48'(signed'(DATA_MAX)))      return DATA_MAX;
    else if (v < 48'(signed'(DATA_MIN))) return DATA_MIN;
    else                                 return data_t'(v);
  endfunction

  // Arithmetic right shift by sh with round-half-to-even, then saturate.
  // Rounding ties to even keeps the repeated halving of the IFFT free of
  // the drift that always rounding ties up would add to every block sum.
  function automatic data_t round_sat(input logic signed [47:0] v, input int sh);
    logic signed [47:0] r, rem, half;
    if (sh == 0) begin
      r = v;
    end else begin
      r    = v >>> sh;
      rem  = v - (r <<< sh);
      half = 48'sd1 <<< (sh - 1);
      if (rem > half || (rem == half && r[0])) r = r + 48'sd1;
    end
    return sat_data(r);
  endfunction

  function automatic cplx_t cconj(input cplx_t a);
    cplx_t r;
    r.re = a.re;
    r.im = sat_data(-48'(signed'(a.im)));
    return r;
  endfunction

  // Run-time layer configuration handed from the host to the controller.
  typedef struct packed {
    logic [3:0]  logk;       // log2 of the partition size k (2..log2 N)
    logic [7:0]  p;          // row blocks    (ceil(m/k))
    logic [7:0]  q;          // column blocks (ceil(n/k))
    logic [15:0] n_in;       // input vector length n (before zero padding)
    logic [15:0] m_out;      // output vector length m
    logic [19:0] w_base;     // first weight-RAM word of this layer
    logic        in_bank;    // activation bank holding x; result goes to the other
    logic        relu;       // apply ReLU to the layer output
    logic [2:0]  fshift;     // forward-FFT stages that halve (see fft_core)
  } layer_cfg_t;

endpackage
