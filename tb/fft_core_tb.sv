// Self-checking testbench for fft_core.
//
// Loads random complex vectors, runs forward and inverse transforms of
// several sizes, and compares every output bin with a double-precision DFT
// computed here (the inverse divided by n). It also checks that a run takes
// exactly log2(n) * ceil(n/2/BF) cycles from start to done.
module fft_core_tb;
  import bc_pkg::*;

  localparam int N  = 128;
  localparam int BF = 4;
  localparam int AW = $clog2(N);
  localparam int TAW = $clog2(N/2 + 1);
  localparam real PI = 3.14159265358979323846;
  localparam real SCALE = real'(1 << FRAC_W);

  logic clk = 0, rst_n = 0;
  logic [3:0] cfg_log;
  logic cfg_inv, load_en, start, busy, done;
  logic [6:0] cfg_scale;
  logic [AW-1:0] load_addr, rd_addr0, rd_addr1;
  cplx_t load_data, rd_data0, rd_data1;
  logic [TAW-1:0] tw_idx [BF];
  tw_cplx_t tw_val [BF];

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  twiddle_rom #(.N(N), .NP(BF)) u_rom (.idx(tw_idx), .val(tw_val));
  fft_core #(.N(N), .BF(BF)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real in_re [N], in_im [N];

  // inv: inverse run. Scaling: every stage halves on an inverse run; a
  // forward run halves on its last fs stages, dividing the DFT by 2^fs.
  task automatic run(input int l, input bit inv, input real amp, input real tol, input int fs = 0);
    int n, cycles, expc;
    real er, ei, ang, gr, gi, err, maxerr;
    n = 1 << l;
    cfg_log = 4'(l);
    cfg_inv = inv;
    for (int s = 0; s < 7; s++) cfg_scale[s] = inv ? 1'b1 : (s >= l - fs);
    for (int i = 0; i < n; i++) begin
      in_re[i] = (real'($urandom_range(0, 2000)) / 1000.0 - 1.0) * amp;
      in_im[i] = (real'($urandom_range(0, 2000)) / 1000.0 - 1.0) * amp;
      // quantize the stimulus the way the hardware sees it
      in_re[i] = real'($rtoi($floor(in_re[i] * SCALE + 0.5))) / SCALE;
      in_im[i] = real'($rtoi($floor(in_im[i] * SCALE + 0.5))) / SCALE;
    end
    @(negedge clk);
    for (int i = 0; i < n; i++) begin
      load_en = 1;
      load_addr = AW'(i);
      load_data.re = data_t'($rtoi(in_re[i] * SCALE));
      load_data.im = data_t'($rtoi(in_im[i] * SCALE));
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
    expc = l * ((n / 2 + BF - 1) / BF);
    checks++;
    if (cycles != expc + 1) begin
      failures++;
      $display("FAIL size %0d inv %0d: %0d cycles, expected %0d", n, inv, cycles - 1, expc);
    end
    maxerr = 0.0;
    for (int k = 0; k < n; k++) begin
      er = 0.0; ei = 0.0;
      for (int t = 0; t < n; t++) begin
        ang = (inv ? 2.0 : -2.0) * PI * real'(k * t) / real'(n);
        er += in_re[t] * $cos(ang) - in_im[t] * $sin(ang);
        ei += in_re[t] * $sin(ang) + in_im[t] * $cos(ang);
      end
      if (inv) begin er /= real'(n); ei /= real'(n); end
      else begin er /= real'(1 << fs); ei /= real'(1 << fs); end
      rd_addr0 = AW'(k);
      rd_addr1 = AW'(n - 1 - k);
      #1;
      gr = real'(rd_data0.re) / SCALE;
      gi = real'(rd_data0.im) / SCALE;
      err = (gr - er) * (gr - er) + (gi - ei) * (gi - ei);
      err = $sqrt(err);
      if (err > maxerr) maxerr = err;
      checks++;
      if (err > tol) begin
        failures++;
        if (failures < 10)
          $display("FAIL size %0d inv %0d bin %0d: got (%f,%f) want (%f,%f)", n, inv, k, gr, gi, er, ei);
      end
    end
    $display("size %0d inv %0d shift %0d: %0d cycles, max error %f", n, inv, fs, cycles - 1, maxerr);
  endtask

  initial begin
    load_en = 0; start = 0; cfg_log = 1; cfg_inv = 0; cfg_scale = '0;
    load_addr = '0; load_data = '0; rd_addr0 = '0; rd_addr1 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      run(6, 0, 1.0, 0.15);   // 64-point forward, inputs in [-1,1]
      run(7, 1, 4.0, 0.06);   // 128-point inverse
      run(7, 0, 1.0, 0.20);   // 128-point forward
      run(3, 0, 2.0, 0.08);   // 8-point forward
      run(1, 1, 8.0, 0.03);   // 2-point inverse
      run(6, 0, 3.0, 0.10, 2); // 64-point forward, last two stages halve
      run(7, 0, 4.0, 0.10, 3); // 128-point forward, last three stages halve
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
