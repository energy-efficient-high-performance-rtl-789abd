// Peripheral computing module: everything in a block-circulant layer that
// is not an FFT.
//
// For one circulant block C_ij it
//   1. multiplies each bin X[m] of fft(x_j), as it streams out of the
//      post-processing, by the stored bin W[m] of fft(w_ij) (element-wise
//      product; the weight address is driven combinationally from the bin
//      index) and keeps the k/2+1 products in a spectrum buffer;
//   2. loads the full k-point spectrum into the FFT/IFFT module for the
//      IFFT, rebuilding bins k/2+1 .. k-1 as conjugates of bins k/2-1 .. 1;
//   3. reads the k IFFT outputs back (real parts) and adds them into the
//      row accumulator a_i, clearing it first when j = 0;
//   4. after the last column block, applies ReLU (when enabled), saturates
//      to (1,5,6) and writes rows i*k .. i*k+k-1 that lie below the layer's
//      true output length to the activation buffer.
// Steps 2-4 each take k cycles after their start pulse and end with a done
// pulse; step 1 follows the post-processing stream. Which operations live
// here follows the architecture; the accumulation in the time domain after
// every IFFT follows the forward-propagation algorithm as written; buffer
// layout and timing are this design's choices.
module periph_unit
  import bc_pkg::*;
#(
  parameter int N      = 128,
  parameter int W_AW   = 17,
  parameter int ACT_AW = 12,
  localparam int AW    = $clog2(N)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [3:0]        logk,
  // step 1: element-wise multiplication
  input  logic              pp_valid,
  input  logic [AW-1:0]     pp_idx,
  input  cplx_t             pp_data,
  input  logic [W_AW-1:0]   w_blk_base,
  output logic [W_AW-1:0]   w_addr,
  input  cplx_t             w_data,
  // step 2: IFFT load
  input  logic              start_load,
  output logic              load_en,
  output logic [AW-1:0]     load_addr,
  output cplx_t             load_data,
  // step 3: accumulate
  input  logic              start_acc,
  input  logic              acc_clear,
  output logic [AW-1:0]     rd_addr,
  input  cplx_t             rd_data,
  // step 4: write back
  input  logic              start_wb,
  input  logic              relu,
  input  logic [15:0]       row_base,   // i*k
  input  logic [15:0]       m_out,
  output logic              act_we,
  output logic [ACT_AW-1:0] act_waddr,
  output data_t             act_wdata,
  output logic              busy,
  output logic              done,
  // activity counts for observation
  output logic              relu_clip
);

  typedef enum logic [1:0] {P_IDLE, P_LOAD, P_ACC, P_WB} phase_e;

  phase_e        phase;
  logic [AW-1:0] a;
  logic [AW-1:0] last;
  logic [AW:0]   half;

  cplx_t spec [N/2 + 1];
  acc_t  acc  [N];

  assign last = AW'((1 << logk) - 1);
  assign half = (AW+1)'((1 << logk) >> 1);
  assign busy = (phase != P_IDLE);

  // step 1: product of the two spectra
  cplx_t prod;
  assign w_addr = w_blk_base + W_AW'(pp_idx);
  always_comb begin
    logic signed [47:0] pr, pi;
    pr = 48'(signed'(pp_data.re)) * 48'(signed'(w_data.re))
       - 48'(signed'(pp_data.im)) * 48'(signed'(w_data.im));
    pi = 48'(signed'(pp_data.re)) * 48'(signed'(w_data.im))
       + 48'(signed'(pp_data.im)) * 48'(signed'(w_data.re));
    prod.re = round_sat(pr, FRAC_W);
    prod.im = round_sat(pi, FRAC_W);
  end

  // step 2: Hermitian extension of the half spectrum
  always_comb begin
    logic [AW:0] mirror;
    mirror    = (AW+1)'(1 << logk) - (AW+1)'(a);
    load_en   = (phase == P_LOAD);
    load_addr = a;
    if ((AW+1)'(a) <= half) load_data = spec[a];
    else                    load_data = cconj(spec[AW'(mirror)]);
  end

  // step 3/4 addressing
  assign rd_addr = a;

  data_t  wb_val;
  logic   wb_clip;
  logic [16:0] row;
  always_comb begin
    wb_val  = sat_data(48'(signed'(acc[a])));
    wb_clip = 1'b0;
    if (relu && wb_val < 0) begin
      wb_val  = '0;
      wb_clip = 1'b1;
    end
    row = 17'(row_base) + 17'(a);
  end
  assign act_we    = (phase == P_WB) && (row < 17'(m_out));
  assign act_waddr = ACT_AW'(row);
  assign act_wdata = wb_val;
  assign relu_clip = act_we && wb_clip;

  always_ff @(posedge clk) begin
    if (pp_valid) spec[pp_idx] <= prod;
    if (phase == P_ACC)
      acc[a] <= (acc_clear ? acc_t'(0) : acc[a]) + acc_t'(signed'(rd_data.re));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= P_IDLE;
      a     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (phase == P_IDLE) begin
        a <= '0;
        if (start_load)     phase <= P_LOAD;
        else if (start_acc) phase <= P_ACC;
        else if (start_wb)  phase <= P_WB;
      end else if (a == last) begin
        phase <= P_IDLE;
        done  <= 1'b1;
        a     <= '0;
      end else begin
        a <= a + 1'b1;
      end
    end
  end

  // Only one step may be requested at a time, and only when idle.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      a_one_start: assert (32'(start_load) + 32'(start_acc) + 32'(start_wb) <= 1)
        else $error("periph_unit: several steps started at once");
      a_idle_start: assert (!(start_load || start_acc || start_wb) || phase == P_IDLE)
        else $error("periph_unit: step started while busy");
    end
  end

endmodule
