// Self-checking testbench for rfft_postproc. For a random real vector s of
// size k, the testbench packs it, computes the k/2-point DFT T of the
// packed vector in double precision, rounds it to (1,5,6) and serves it on
// the two read ports like the FFT/IFFT module would. The streamed bins
// X[0..k/2] must match the k-point DFT of s within a few LSBs, arrive one
// per cycle in order, and done must come with the last bin.
module rfft_postproc_tb;
  import bc_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam real SC = 64.0;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [3:0] logk;
  logic start = 0, busy, done, out_valid;
  logic [6:0] rd_addr0, rd_addr1, out_idx, tw_idx;
  cplx_t rd_data0, rd_data1, out_data;
  tw_cplx_t tw_val;
  logic [6:0] ridx [1];
  tw_cplx_t   rval [1];
  cplx_t tmem [128];
  real s [128];

  always #5 clk = ~clk;
  rfft_postproc dut (.*);
  twiddle_rom #(.N(128), .NP(1)) u_rom (.idx(ridx), .val(rval));
  assign ridx[0] = tw_idx;
  assign tw_val  = rval[0];
  assign rd_data0 = tmem[rd_addr0];
  assign rd_data1 = tmem[rd_addr1];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int lk);
    int k, mh, nb, expect_idx;
    real tr, ti, ang, xr, xi, gr, gi, err, maxerr;
    k = 1 << lk;
    mh = k / 2;
    for (int t = 0; t < k; t++)
      s[t] = real'($rtoi($floor((real'($urandom_range(0, 2000)) / 1000.0 - 1.0) * SC + 0.5))) / SC;
    for (int m = 0; m < mh; m++) begin
      tr = 0; ti = 0;
      for (int t = 0; t < mh; t++) begin
        ang = -2.0 * PI * real'(m * t) / real'(mh);
        tr += s[2*t] * $cos(ang) - s[2*t+1] * $sin(ang);
        ti += s[2*t] * $sin(ang) + s[2*t+1] * $cos(ang);
      end
      tmem[m].re = data_t'($rtoi($floor(tr * SC + 0.5)));
      tmem[m].im = data_t'($rtoi($floor(ti * SC + 0.5)));
    end
    @(negedge clk);
    logk = 4'(lk);
    start = 1;
    @(negedge clk);
    start = 0;
    nb = 0;
    maxerr = 0;
    while (1) begin
      @(posedge clk);
      #1;
      if (out_valid) begin
        expect_idx = nb;
        checks++;
        if (int'(out_idx) != expect_idx) begin failures++; $display("FAIL k=%0d: bin %0d came as %0d", k, expect_idx, out_idx); end
        xr = 0; xi = 0;
        for (int t = 0; t < k; t++) begin
          ang = -2.0 * PI * real'(expect_idx * t) / real'(k);
          xr += s[t] * $cos(ang);
          xi += s[t] * $sin(ang);
        end
        gr = real'(out_data.re) / SC;
        gi = real'(out_data.im) / SC;
        err = $sqrt((gr - xr) * (gr - xr) + (gi - xi) * (gi - xi));
        if (err > maxerr) maxerr = err;
        checks++;
        if (err > 0.05) begin
          failures++;
          $display("FAIL k=%0d bin %0d: (%f,%f) want (%f,%f)", k, expect_idx, gr, gi, xr, xi);
        end
        nb++;
        if (done) break;
      end
    end
    checks++;
    if (nb != mh + 1) begin failures++; $display("FAIL k=%0d: %0d bins", k, nb); end
    $display("k=%0d: %0d bins, max error %f", k, nb, maxerr);
  endtask

  initial begin
    logk = 7;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      run(7);
      run(5);
      run(4);
      run(2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
