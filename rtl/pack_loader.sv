// Packing transform: feeds a real input segment to the FFT/IFFT module as a
// half-length complex vector.
//
// For column block j of a layer, the k real inputs x_j = x[j*k .. j*k+k-1]
// are read two at a time from the activation buffer and written to the FFT
// load port as t_i = x[j*k+2i] + j*x[j*k+2i+1], i = 0 .. k/2-1, one per
// clock. Inputs past the layer's true length n_in read as zero: this is the
// zero padding that makes a layer whose width is not a multiple of k fit
// whole blocks. The packing itself follows the architecture; the streaming
// schedule is this design's choice.
//
// Interface: start (pulse; logk, seg_base, n_in held), two combinational
// activation-buffer read ports, FFT load port, done pulse after the last
// write. A segment of k inputs takes k/2 cycles.
module pack_loader
  import bc_pkg::*;
#(
  parameter int N        = 128,
  parameter int ACT_AW   = 12,
  localparam int AW      = $clog2(N)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [3:0]        logk,
  input  logic [15:0]       seg_base,   // j*k
  input  logic [15:0]       n_in,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic [ACT_AW-1:0] act_addr0,
  input  data_t             act_data0,
  output logic [ACT_AW-1:0] act_addr1,
  input  data_t             act_data1,
  output logic              load_en,
  output logic [AW-1:0]     load_addr,
  output cplx_t             load_data
);

  logic [AW-1:0] i;
  logic [AW-1:0] last;
  logic [16:0]   e0, e1;

  assign last = AW'(((1 << logk) >> 1) - 1);
  assign e0   = 17'(seg_base) + 17'({i, 1'b0});
  assign e1   = e0 + 17'd1;

  assign act_addr0 = ACT_AW'(e0);
  assign act_addr1 = ACT_AW'(e1);

  assign load_en      = busy;
  assign load_addr    = i;
  assign load_data.re = (e0 < 17'(n_in)) ? act_data0 : '0;
  assign load_data.im = (e1 < 17'(n_in)) ? act_data1 : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      i    <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        i    <= '0;
      end else if (busy) begin
        if (i == last) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          i <= i + 1'b1;
        end
      end
    end
  end

endmodule
