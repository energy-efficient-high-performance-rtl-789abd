// Block-circulant DNN inference accelerator, top level.
//
// A fully-connected layer a = W x whose m x n weight matrix is made of
// p x q circulant k x k blocks needs only one k-vector w_ij per block, and
// each block product is C_ij x_j = ifft( fft(w_ij) o fft(x_j) ). The
// accelerator stores fft(w_ij), pre-calculated off line, so one block costs
// one forward FFT and one IFFT. The forward FFT of the real segment x_j is
// done as a k/2-point complex FFT of the packed pairs (x_2i + j x_2i+1)
// followed by a post-processing step. One FFT/IFFT module of up to N points
// serves both the k/2-point FFT and the k-point IFFT, and any k from 4 to N
// (a power of two) can be chosen per layer.
//
// Units: control module (bc_controller), FFT/IFFT module (fft_core),
// packing loader (pack_loader), post-processing (rfft_postproc),
// peripheral computing module (periph_unit: element-wise products,
// accumulation, ReLU) and memory module (bc_memory: twiddle ROM, weight
// RAM, activation buffer).
//
// Host interface: write weight spectra through w_*, write the input vector
// and read results through act_*, set cfg and pulse start; done pulses when
// the layer's outputs are in bank ~cfg.in_bank. One layer costs, per block,
// k/2 (pack) + (log2(k)-1)*ceil(k/4/BF) (FFT) + k/2+1 (post) + k (load) +
// log2(k)*ceil(k/2/BF) (IFFT) + k (accumulate) cycles plus a few cycles of
// handshake, and k cycles of write-back per row block.
// Exactly: cycles = p*q*(12 + k/2 + (log2k-1)*ceil(k/4/BF) + k/2+1 + k
//                  + log2k*ceil(k/2/BF) + k) + p*(k+2) + 2.
// cfg.fshift moves that many 1/2 scalings from the IFFT to the last forward
// FFT stages so that non-negative inputs do not saturate the DC bin; the
// overall gain is unchanged. The phase order, the shared FFT module and the
// off-line weight spectra follow the published architecture; the activation
// buffer, the half-spectrum weight layout, fshift and the handshakes are
// this design's own choices. Reset is synchronous and active low.
module bc_accel_top
  import bc_pkg::*;
#(
  parameter int N         = 128,
  parameter int BF        = 4,
  parameter int W_DEPTH   = 95940,
  parameter int ACT_DEPTH = 3072,
  localparam int AW       = $clog2(N),
  localparam int TAW      = $clog2(N/2 + 1),
  localparam int W_AW     = $clog2(W_DEPTH),
  localparam int ACT_AW   = $clog2(ACT_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // layer command
  input  layer_cfg_t        cfg,
  input  logic              start,
  output logic              busy,
  output logic              done,
  // weight RAM load
  input  logic              w_we,
  input  logic [W_AW-1:0]   w_addr,
  input  cplx_t             w_wdata,
  // activation buffer host port
  input  logic              act_we,
  input  logic              act_bank,
  input  logic [ACT_AW-1:0] act_addr,
  input  data_t             act_wdata,
  output data_t             act_rdata
);

  // controller
  logic ph_pack, ph_post, ph_iload, ph_acc, fft_inv;
  logic [3:0] fft_log;
  logic [AW-1:0] fft_scale;
  logic pack_start, fft_start, post_start, load_start, acc_start, wb_start;
  logic pack_done, fft_done, post_done, per_done;
  logic acc_clear;
  logic [15:0] seg_base, row_base;
  logic [W_AW-1:0] w_blk_base;

  // FFT/IFFT module ports
  logic          core_load_en;
  logic [AW-1:0] core_load_addr;
  cplx_t         core_load_data;
  logic [AW-1:0] core_rd_addr0, core_rd_addr1;
  cplx_t         core_rd_data0, core_rd_data1;
  logic          core_busy;
  logic [TAW-1:0] core_tw_idx [BF];
  tw_cplx_t       core_tw_val [BF];
  logic [TAW-1:0] pp_tw_idx;
  tw_cplx_t       pp_tw_val;

  // packing loader
  logic pack_busy, pk_load_en;
  logic [AW-1:0] pk_load_addr;
  cplx_t pk_load_data;
  logic [ACT_AW-1:0] act_raddr0, act_raddr1;
  data_t act_rdata0, act_rdata1;

  // post-processing
  logic post_busy, pp_valid;
  logic [AW-1:0] pp_idx, pp_rd_addr0, pp_rd_addr1;
  cplx_t pp_data;

  // peripheral computing module
  logic per_busy, pe_load_en, relu_clip;
  logic [AW-1:0] pe_load_addr, pe_rd_addr;
  cplx_t pe_load_data;
  logic [W_AW-1:0] w_raddr;
  cplx_t w_rdata;
  logic eng_we;
  logic [ACT_AW-1:0] eng_waddr;
  data_t eng_wdata;

  bc_controller #(.W_AW(W_AW), .LOGN(AW)) u_ctrl (
    .clk, .rst_n, .cfg, .start, .busy, .done,
    .ph_pack, .ph_post, .ph_iload, .ph_acc, .fft_inv, .fft_log, .fft_scale,
    .pack_start, .fft_start, .post_start, .load_start, .acc_start, .wb_start,
    .pack_done, .fft_done, .post_done, .per_done,
    .acc_clear, .seg_base, .row_base, .w_blk_base
  );

  // The FFT/IFFT module is loaded by the packing loader or by the
  // peripheral unit and read by the post-processing or by the peripheral
  // unit, depending on the phase.
  always_comb begin
    if (ph_pack) begin
      core_load_en   = pk_load_en;
      core_load_addr = pk_load_addr;
      core_load_data = pk_load_data;
    end else begin
      core_load_en   = pe_load_en && ph_iload;
      core_load_addr = pe_load_addr;
      core_load_data = pe_load_data;
    end
    core_rd_addr0 = ph_post ? pp_rd_addr0 : pe_rd_addr;
    core_rd_addr1 = pp_rd_addr1;
  end

  fft_core #(.N(N), .BF(BF)) u_fft (
    .clk, .rst_n,
    .cfg_log   (fft_log),
    .cfg_inv   (fft_inv),
    .cfg_scale (fft_scale),
    .load_en   (core_load_en),
    .load_addr (core_load_addr),
    .load_data (core_load_data),
    .start     (fft_start),
    .busy      (core_busy),
    .done      (fft_done),
    .rd_addr0  (core_rd_addr0),
    .rd_data0  (core_rd_data0),
    .rd_addr1  (core_rd_addr1),
    .rd_data1  (core_rd_data1),
    .tw_idx    (core_tw_idx),
    .tw_val    (core_tw_val)
  );

  pack_loader #(.N(N), .ACT_AW(ACT_AW)) u_pack (
    .clk, .rst_n,
    .logk      (cfg.logk),
    .seg_base  (seg_base),
    .n_in      (cfg.n_in),
    .start     (pack_start),
    .busy      (pack_busy),
    .done      (pack_done),
    .act_addr0 (act_raddr0),
    .act_data0 (act_rdata0),
    .act_addr1 (act_raddr1),
    .act_data1 (act_rdata1),
    .load_en   (pk_load_en),
    .load_addr (pk_load_addr),
    .load_data (pk_load_data)
  );

  rfft_postproc #(.N(N)) u_post (
    .clk, .rst_n,
    .logk      (cfg.logk),
    .start     (post_start),
    .busy      (post_busy),
    .rd_addr0  (pp_rd_addr0),
    .rd_data0  (core_rd_data0),
    .rd_addr1  (pp_rd_addr1),
    .rd_data1  (core_rd_data1),
    .tw_idx    (pp_tw_idx),
    .tw_val    (pp_tw_val),
    .out_valid (pp_valid),
    .out_idx   (pp_idx),
    .out_data  (pp_data),
    .done      (post_done)
  );

  periph_unit #(.N(N), .W_AW(W_AW), .ACT_AW(ACT_AW)) u_per (
    .clk, .rst_n,
    .logk       (cfg.logk),
    .pp_valid   (pp_valid),
    .pp_idx     (pp_idx),
    .pp_data    (pp_data),
    .w_blk_base (w_blk_base),
    .w_addr     (w_raddr),
    .w_data     (w_rdata),
    .start_load (load_start),
    .load_en    (pe_load_en),
    .load_addr  (pe_load_addr),
    .load_data  (pe_load_data),
    .start_acc  (acc_start),
    .acc_clear  (acc_clear),
    .rd_addr    (pe_rd_addr),
    .rd_data    (core_rd_data0),
    .start_wb   (wb_start),
    .relu       (cfg.relu),
    .row_base   (row_base),
    .m_out      (cfg.m_out),
    .act_we     (eng_we),
    .act_waddr  (eng_waddr),
    .act_wdata  (eng_wdata),
    .busy       (per_busy),
    .done       (per_done),
    .relu_clip  (relu_clip)
  );

  bc_memory #(.N(N), .BF(BF), .W_DEPTH(W_DEPTH), .ACT_DEPTH(ACT_DEPTH)) u_mem (
    .clk,
    .tw_idx     (core_tw_idx),
    .tw_val     (core_tw_val),
    .pp_tw_idx  (pp_tw_idx),
    .pp_tw_val  (pp_tw_val),
    .w_we       (w_we),
    .w_waddr    (w_addr),
    .w_wdata    (w_wdata),
    .w_raddr    (w_raddr),
    .w_rdata    (w_rdata),
    .host_we    (act_we),
    .host_bank  (act_bank),
    .host_addr  (act_addr),
    .host_wdata (act_wdata),
    .host_rdata (act_rdata),
    .eng_rbank  (cfg.in_bank),
    .eng_raddr0 (act_raddr0),
    .eng_rdata0 (act_rdata0),
    .eng_raddr1 (act_raddr1),
    .eng_rdata1 (act_rdata1),
    .eng_we     (eng_we),
    .eng_wbank  (~cfg.in_bank),
    .eng_waddr  (eng_waddr),
    .eng_wdata  (eng_wdata)
  );

endmodule
