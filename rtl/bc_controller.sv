// Control module: sequences one block-circulant layer, a = W x with
// W = [C_ij] made of p x q circulant k x k blocks.
//
// For i = 0 .. p-1 and, inside, j = 0 .. q-1, one block runs through
//   PACK  pack x_j into k/2 complex samples and load the FFT/IFFT module,
//   FFT   k/2-point forward FFT,
//   POST  real-input post-processing, each bin multiplied by fft(w_ij),
//   ILOAD load the k-point product spectrum,
//   IFFT  k-point inverse FFT,
//   ACC   add the real result into the row accumulator a_i,
// and after the last j of a row, WB writes ReLU(a_i) to the activation
// buffer. Each phase starts its unit with a one-cycle pulse and waits for
// its done pulse. The loop order and the per-block FFT-multiply-IFFT-add
// step follow the forward-propagation algorithm; the phase split and the
// handshakes are this design's choices.
//
// Interface: start (pulse) with cfg held for the whole layer; busy; done
// pulses when the last row is written. Phase and loop indices are outputs
// so the top can steer the shared FFT/IFFT module's ports.
module bc_controller
  import bc_pkg::*;
#(
  parameter int W_AW = 17,
  parameter int LOGN = 7     // log2 of the FFT/IFFT module's largest size
) (
  input  logic            clk,
  input  logic            rst_n,
  input  layer_cfg_t      cfg,
  input  logic            start,
  output logic            busy,
  output logic            done,
  // phase outputs
  output logic            ph_pack,
  output logic            ph_post,
  output logic            ph_iload,
  output logic            ph_acc,
  output logic            fft_inv,
  output logic [3:0]      fft_log,
  output logic [LOGN-1:0] fft_scale,
  // unit starts
  output logic            pack_start,
  output logic            fft_start,
  output logic            post_start,
  output logic            load_start,
  output logic            acc_start,
  output logic            wb_start,
  // unit dones
  input  logic            pack_done,
  input  logic            fft_done,
  input  logic            post_done,
  input  logic            per_done,
  // loop state
  output logic            acc_clear,
  output logic [15:0]     seg_base,
  output logic [15:0]     row_base,
  output logic [W_AW-1:0] w_blk_base
);

  typedef enum logic [3:0] {
    S_IDLE, S_PACK, S_FFT, S_POST, S_ILOAD, S_IFFT, S_ACC, S_WB, S_DONE
  } state_e;

  state_e    st;
  logic      issued;     // start pulse of the current phase has been sent
  logic [7:0] i, j;

  assign busy     = (st != S_IDLE);
  assign ph_pack  = (st == S_PACK);
  assign ph_post  = (st == S_POST);
  assign ph_iload = (st == S_ILOAD);
  assign ph_acc   = (st == S_ACC);
  assign fft_inv  = (st == S_IFFT) || (st == S_ILOAD) || (st == S_ACC);
  assign fft_log  = fft_inv ? cfg.logk : cfg.logk - 4'd1;

  // Scaling schedule: the forward FFT halves on its last fshift stages and
  // the IFFT halves on all but its last fshift stages, so the pair divides
  // by exactly k whatever fshift is.
  always_comb begin
    for (int s = 0; s < LOGN; s++) begin
      if (fft_inv) fft_scale[s] = (s < int'(cfg.logk) - int'(cfg.fshift));
      else         fft_scale[s] = (s >= int'(cfg.logk) - 1 - int'(cfg.fshift)) &&
                                  (s < int'(cfg.logk) - 1);
    end
  end

  assign pack_start = (st == S_PACK)  && !issued;
  assign fft_start  = (st == S_FFT || st == S_IFFT) && !issued;
  assign post_start = (st == S_POST)  && !issued;
  assign load_start = (st == S_ILOAD) && !issued;
  assign acc_start  = (st == S_ACC)   && !issued;
  assign wb_start   = (st == S_WB)    && !issued;

  assign acc_clear = (j == 8'd0);
  assign seg_base  = 16'(j) << cfg.logk;
  assign row_base  = 16'(i) << cfg.logk;

  logic [W_AW-1:0] blk_words;
  assign blk_words = W_AW'(((1 << cfg.logk) >> 1) + 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st         <= S_IDLE;
      issued     <= 1'b0;
      i          <= '0;
      j          <= '0;
      w_blk_base <= '0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      if (st != S_IDLE) issued <= 1'b1;
      unique case (st)
        S_IDLE: if (start) begin
          st         <= S_PACK;
          issued     <= 1'b0;
          i          <= '0;
          j          <= '0;
          w_blk_base <= W_AW'(cfg.w_base);
        end
        S_PACK:  if (pack_done) begin st <= S_FFT;   issued <= 1'b0; end
        S_FFT:   if (fft_done)  begin st <= S_POST;  issued <= 1'b0; end
        S_POST:  if (post_done) begin st <= S_ILOAD; issued <= 1'b0; end
        S_ILOAD: if (per_done)  begin st <= S_IFFT;  issued <= 1'b0; end
        S_IFFT:  if (fft_done)  begin st <= S_ACC;   issued <= 1'b0; end
        S_ACC: if (per_done) begin
          issued     <= 1'b0;
          w_blk_base <= w_blk_base + blk_words;
          if (j == cfg.q - 8'd1) st <= S_WB;
          else begin
            j  <= j + 8'd1;
            st <= S_PACK;
          end
        end
        S_WB: if (per_done) begin
          issued <= 1'b0;
          j      <= '0;
          if (i == cfg.p - 8'd1) st <= S_DONE;
          else begin
            i  <= i + 8'd1;
            st <= S_PACK;
          end
        end
        S_DONE: begin
          st   <= S_IDLE;
          done <= 1'b1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // A layer needs at least one block and a partition size of 4 or more.
  always_ff @(posedge clk) begin
    if (rst_n && start && st == S_IDLE) begin
      a_cfg: assert (cfg.p != 0 && cfg.q != 0 && cfg.logk >= 4'd2 &&
                    int'(cfg.fshift) < int'(cfg.logk))
        else $error("bc_controller: bad layer configuration");
    end
  end

endmodule
