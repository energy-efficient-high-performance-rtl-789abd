// Precision and rate of the 128-point FFT in the (1,5,6) data format.
//
// Feeds fft_core many sets of 128 random real inputs, uniform in [-1, 1],
// rounded to the 12-bit data word on the way in. It compares each output
// bin with a double-precision DFT of the unrounded inputs, so input
// rounding, twiddle rounding and the rounding of every butterfly all count.
// Per set it takes the L2 distance (square root of the summed squared
// complex errors over the 128 bins) and reports the average over all sets,
// with the average rms error per bin. The original work reports an average
// L2 distance of 0.157 for a 128-point FFT in this format, but does not
// define its measure closely enough to reproduce; the figure printed here is
// for comparison only. The limits checked are this design's own: the FFT
// rounds after every one of its 7 unscaled stages, which leaves about 4 LSB
// (0.06) of rms error per bin, so the average L2 distance must stay below
// 0.8 and every bin within 0.25 of the exact value. Each run must also take
// exactly 7 * ceil(64/BF) cycles.
module fft_quant_tb;
  import bc_pkg::*;

  localparam int  N     = 128;
  localparam int  BF    = 4;
  localparam int  LOGN  = $clog2(N);
  localparam int  TAW   = $clog2(N/2 + 1);
  localparam int  SETS  = 300;
  localparam real PI    = 3.14159265358979323846;
  localparam real SCALE = real'(1 << FRAC_W);
  localparam real L2_LIMIT  = 0.8;
  localparam real BIN_LIMIT = 0.25;

  logic clk = 0, rst_n = 0;
  logic [3:0] cfg_log;
  logic cfg_inv, load_en, start, busy, done;
  logic [LOGN-1:0] cfg_scale;
  logic [LOGN-1:0] load_addr, rd_addr0, rd_addr1;
  cplx_t load_data, rd_data0, rd_data1;
  logic [TAW-1:0] tw_idx [BF];
  tw_cplx_t tw_val [BF];

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  twiddle_rom #(.N(N), .NP(BF)) u_rom (.idx(tw_idx), .val(tw_val));
  fft_core #(.N(N), .BF(BF)) dut (.*);

  initial begin
    repeat (SETS * 400 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real cos_t [N], sin_t [N];
  real x [N];

  initial begin
    int cycles, expc;
    real er, ei, gr, gi, e2, l2, l2_sum, rms_sum, worst;
    load_en = 0; start = 0; cfg_log = 4'(LOGN); cfg_inv = 0; cfg_scale = '0;
    load_addr = '0; load_data = '0; rd_addr0 = '0; rd_addr1 = '0;
    for (int i = 0; i < N; i++) begin
      cos_t[i] = $cos(2.0 * PI * real'(i) / real'(N));
      sin_t[i] = $sin(2.0 * PI * real'(i) / real'(N));
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    expc = LOGN * ((N / 2 + BF - 1) / BF);
    l2_sum = 0.0; rms_sum = 0.0; worst = 0.0;
    for (int s = 0; s < SETS; s++) begin
      for (int i = 0; i < N; i++) begin
        x[i] = real'($urandom_range(0, 1000000)) / 500000.0 - 1.0;
        load_en = 1;
        load_addr = LOGN'(i);
        load_data.re = data_t'($rtoi($floor(x[i] * SCALE + 0.5)));
        load_data.im = '0;
        @(negedge clk);
      end
      load_en = 0;
      start = 1;
      @(negedge clk);
      start = 0;
      cycles = 1;
      while (!done) begin
        @(negedge clk);
        cycles++;
      end
      checks++;
      if (cycles != expc + 1) begin
        failures++;
        $display("FAIL set %0d: %0d cycles, expected %0d", s, cycles - 1, expc);
      end
      e2 = 0.0;
      for (int k = 0; k < N; k++) begin
        er = 0.0; ei = 0.0;
        for (int t = 0; t < N; t++) begin
          er += x[t] * cos_t[(k * t) % N];
          ei -= x[t] * sin_t[(k * t) % N];
        end
        rd_addr0 = LOGN'(k);
        #1;
        gr = real'(rd_data0.re) / SCALE;
        gi = real'(rd_data0.im) / SCALE;
        e2 += (gr - er) * (gr - er) + (gi - ei) * (gi - ei);
        if ($sqrt((gr - er) * (gr - er) + (gi - ei) * (gi - ei)) > worst)
          worst = $sqrt((gr - er) * (gr - er) + (gi - ei) * (gi - ei));
        checks++;
        if ($sqrt((gr - er) * (gr - er) + (gi - ei) * (gi - ei)) > BIN_LIMIT) begin
          failures++;
          if (failures < 10)
            $display("FAIL set %0d bin %0d: got (%f,%f) want (%f,%f)", s, k, gr, gi, er, ei);
        end
      end
      l2 = $sqrt(e2);
      l2_sum += l2;
      rms_sum += $sqrt(e2 / real'(N));
      @(negedge clk);
    end
    $display("%0d sets of %0d points, %0d cycles each: average L2 distance %f, average rms error per bin %f, worst bin %f",
             SETS, N, expc, l2_sum / real'(SETS), rms_sum / real'(SETS), worst);
    checks++;
    if (l2_sum / real'(SETS) > L2_LIMIT) begin
      failures++;
      $display("FAIL average L2 distance %f above %f", l2_sum / real'(SETS), L2_LIMIT);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
