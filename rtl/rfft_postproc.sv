// Real-input FFT post-processing.
//
// A size-k real vector s is packed into the size-k/2 complex vector
// t_i = s_2i + j*s_2i+1 and transformed with a k/2-point FFT, giving T.
// This block turns T into the first k/2+1 bins of the k-point FFT of s,
// which is all a real signal needs (the other bins are their conjugates):
//
//   A = T[m mod M],  B = conj(T[(M-m) mod M]),  M = k/2,  m = 0 .. M
//   X[m] = ( (A + B) - j * W_k^m * (A - B) ) / 2
//
// One bin is produced per clock. Both T values are read combinationally
// from the FFT/IFFT module's two read ports, W_k^m from the twiddle ROM
// (entry m * N/k), and X[m] leaves registered one cycle later with its
// index. The packing/post-processing split follows the architecture; the
// one-bin-per-cycle schedule and the rounding are this design's choices.
//
// Interface: start (pulse, logk held), out_valid/out_idx/out_data stream,
// done pulses with the last bin.
module rfft_postproc
  import bc_pkg::*;
#(
  parameter int N = 128,
  localparam int LOGN = $clog2(N),
  localparam int AW   = $clog2(N),
  localparam int TAW  = $clog2(N/2 + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [3:0]     logk,
  input  logic           start,
  output logic           busy,
  output logic [AW-1:0]  rd_addr0,
  input  cplx_t          rd_data0,
  output logic [AW-1:0]  rd_addr1,
  input  cplx_t          rd_data1,
  output logic [TAW-1:0] tw_idx,
  input  tw_cplx_t       tw_val,
  output logic           out_valid,
  output logic [AW-1:0]  out_idx,
  output cplx_t          out_data,
  output logic           done
);

  logic [AW:0] m;      // current bin, 0 .. M
  logic [AW:0] half;   // M = k/2

  assign half = (AW+1)'((1 << logk) >> 1);

  always_comb begin
    logic [AW:0] mm, nm;
    mm = (m == half) ? '0 : m;
    nm = (m == '0) ? '0 : half - m;
    rd_addr0 = AW'(mm);
    rd_addr1 = AW'(nm);
    tw_idx   = TAW'(int'(m) << (LOGN - int'(logk)));
  end

  cplx_t x_n;
  always_comb begin
    logic signed [47:0] er, ei, dr, di, wr, wi, fr, fi;
    // A = rd_data0, B = conj(rd_data1)
    er = 48'(signed'(rd_data0.re)) + 48'(signed'(rd_data1.re));
    ei = 48'(signed'(rd_data0.im)) - 48'(signed'(rd_data1.im));
    dr = 48'(signed'(rd_data0.re)) - 48'(signed'(rd_data1.re));
    di = 48'(signed'(rd_data0.im)) + 48'(signed'(rd_data1.im));
    wr = 48'(signed'(tw_val.re));
    wi = 48'(signed'(tw_val.im));
    // F = W * D ; -j * F = F.im - j F.re
    fr = wr * dr - wi * di;
    fi = wr * di + wi * dr;
    x_n.re = round_sat((er <<< TW_FRAC) + fi, TW_FRAC + 1);
    x_n.im = round_sat((ei <<< TW_FRAC) - fr, TW_FRAC + 1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      m         <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_data  <= '0;
      done      <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        m    <= '0;
      end else if (busy) begin
        out_valid <= 1'b1;
        out_idx   <= AW'(m);
        out_data  <= x_n;
        if (m == half) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          m <= m + 1'b1;
        end
      end
    end
  end

endmodule
