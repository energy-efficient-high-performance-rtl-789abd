// FFT/IFFT module: an in-place, radix-2, decimation-in-time transform engine
// of run-time selectable size.
//
// The engine holds N complex samples in a register array. The size of each
// run is n = 2^cfg_log with 1 <= cfg_log <= log2(N): a transform smaller than
// N uses only part of the array and every (N/n)-th twiddle factor, which is
// how one module serves both the n/2-point forward FFT of the packed input
// and the n-point IFFT. A size-n transform is log2(n) stages of n/2
// butterflies; BF butterflies run per clock, so a run takes
// log2(n) * ceil(n/2/BF) cycles after start. Each stage combines pairs of
// half-size transforms with one butterfly, the recursive structure of the FFT.
//
// Forward runs use W = W_N^k, inverse runs use conj(W). Each stage s whose
// bit is set in cfg_scale halves its outputs (with rounding); the other
// stages only round and saturate. An inverse run that halves on every stage
// is the normalized IFFT (divided by n); halving on some forward stages
// keeps the DC bin of a non-negative input inside the (1,5,6) range, and
// the controller then halves on as many fewer IFFT stages, so the gain of
// FFT-multiply-IFFT is unchanged. That the IFFT is the FFT with a small
// change follows the architecture; the scaling schedule, the per-stage
// rounding, the in-place memory and the BF-wide butterfly array are this
// design's choices.
//
// Interface:
//   load_en/load_addr/load_data  write sample load_addr (natural order); it is
//                                stored bit-reversed for the current cfg_log.
//   start                        pulse: begin a run (cfg_* held).
//   busy, done                   done pulses one cycle when the run ends.
//   rd_addr*/rd_data*            two combinational read ports, natural order.
//   tw_idx/tw_val                BF ports to the twiddle ROM.
module fft_core
  import bc_pkg::*;
#(
  parameter int N  = 128,
  parameter int BF = 4,
  localparam int LOGN = $clog2(N),
  localparam int AW   = $clog2(N),
  localparam int TAW  = $clog2(N/2 + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [3:0]      cfg_log,
  input  logic            cfg_inv,
  input  logic [LOGN-1:0] cfg_scale,   // bit s: stage s halves
  input  logic            load_en,
  input  logic [AW-1:0]   load_addr,
  input  cplx_t           load_data,
  input  logic            start,
  output logic            busy,
  output logic            done,
  input  logic [AW-1:0]   rd_addr0,
  output cplx_t           rd_data0,
  input  logic [AW-1:0]   rd_addr1,
  output cplx_t           rd_data1,
  output logic [TAW-1:0]  tw_idx [BF],
  input  tw_cplx_t        tw_val [BF]
);

  cplx_t mem [N];

  logic [3:0]    stage;
  logic [AW-1:0] step;      // butterfly group of BF handled this cycle
  logic [AW-1:0] last_step; // ceil((n/2)/BF) - 1

  always_comb begin
    int half;
    half      = (1 << cfg_log) >> 1;
    last_step = AW'((half + BF - 1) / BF - 1);
  end

  function automatic logic [AW-1:0] bitrev(input logic [AW-1:0] a, input logic [3:0] l);
    logic [AW-1:0] r;
    r = '0;
    for (int i = 0; i < AW; i++)
      if (i < int'(l)) r[int'(l) - 1 - i] = a[i];
    return r;
  endfunction

  // Butterfly addressing for this cycle.
  logic [AW-1:0] top_a [BF];
  logic [AW-1:0] bot_a [BF];
  logic          bf_on [BF];
  cplx_t         top_n [BF];
  cplx_t         bot_n [BF];

  // Twiddle index of each butterfly: W_2h^pos = W_N^(pos * N/2h).
  always_comb begin
    for (int u = 0; u < BF; u++) begin
      int b, pos;
      b         = int'(step) * BF + u;
      pos       = b & ((1 << stage) - 1);
      tw_idx[u] = TAW'(pos << (LOGN - 1 - int'(stage)));
    end
  end

  logic halve;
  assign halve = (int'(stage) < LOGN) ? cfg_scale[stage[$clog2(LOGN)-1:0]] : 1'b0;

  always_comb begin
    for (int u = 0; u < BF; u++) begin
      int b, pos, grp, h;
      logic signed [47:0] pr, pi, sr, si, dr, di;
      tw_cplx_t w;
      cplx_t ta, ba;
      h        = 1 << stage;
      b        = int'(step) * BF + u;
      bf_on[u] = busy && (b < ((1 << cfg_log) >> 1));
      pos      = b & (h - 1);
      grp      = b >> stage;
      top_a[u] = AW'(grp * 2 * h + pos);
      bot_a[u] = AW'(grp * 2 * h + pos + h);
      w  = tw_val[u];
      if (cfg_inv) w.im = -w.im;
      ta = mem[top_a[u]];
      ba = mem[bot_a[u]];
      // t = w * bottom, kept at TW_FRAC extra fraction bits
      pr = 48'(signed'(w.re)) * 48'(signed'(ba.re)) - 48'(signed'(w.im)) * 48'(signed'(ba.im));
      pi = 48'(signed'(w.re)) * 48'(signed'(ba.im)) + 48'(signed'(w.im)) * 48'(signed'(ba.re));
      sr = (48'(signed'(ta.re)) <<< TW_FRAC) + pr;
      si = (48'(signed'(ta.im)) <<< TW_FRAC) + pi;
      dr = (48'(signed'(ta.re)) <<< TW_FRAC) - pr;
      di = (48'(signed'(ta.im)) <<< TW_FRAC) - pi;
      top_n[u].re = round_sat(sr, TW_FRAC + (halve ? 1 : 0));
      top_n[u].im = round_sat(si, TW_FRAC + (halve ? 1 : 0));
      bot_n[u].re = round_sat(dr, TW_FRAC + (halve ? 1 : 0));
      bot_n[u].im = round_sat(di, TW_FRAC + (halve ? 1 : 0));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      stage <= '0;
      step  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy  <= 1'b1;
        stage <= '0;
        step  <= '0;
      end else if (busy) begin
        if (step == last_step) begin
          step <= '0;
          if (stage == cfg_log - 4'd1) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            stage <= stage + 4'd1;
          end
        end else begin
          step <= step + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (load_en && !busy) mem[bitrev(load_addr, cfg_log)] <= load_data;
    for (int u = 0; u < BF; u++) begin
      if (bf_on[u]) begin
        mem[top_a[u]] <= top_n[u];
        mem[bot_a[u]] <= bot_n[u];
      end
    end
  end

  assign rd_data0 = mem[rd_addr0];
  assign rd_data1 = mem[rd_addr1];

  // Handshake rules: start only when idle, and only for a size the array holds.
  always_ff @(posedge clk) begin
    if (rst_n && start) begin
      a_start_idle: assert (!busy) else $error("fft_core: start while busy");
      a_size_ok: assert (cfg_log >= 4'd1 && int'(cfg_log) <= LOGN)
        else $error("fft_core: unsupported transform size");
    end
  end

endmodule
