// Self-checking testbench for periph_unit, with k = 16 and k = 128.
// Step 1: streams random spectra X[0..k/2] and answers weight reads from a
//         model RAM here; step 2: the k words loaded for the IFFT must be
//         round(X*W) for bins 0..k/2 and their conjugates mirrored above;
// step 3: three accumulation passes over random IFFT outputs (the first
//         clearing); step 4: write-back with ReLU must give the clipped,
//         saturated sums, only for rows below m_out.
// Each step's done must come k cycles after its start.
module periph_unit_tb;
  import bc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [3:0] logk;
  logic pp_valid = 0;
  logic [6:0] pp_idx = '0;
  cplx_t pp_data = '0;
  logic [16:0] w_blk_base, w_addr;
  cplx_t w_data;
  logic start_load = 0, load_en;
  logic [6:0] load_addr;
  cplx_t load_data;
  logic start_acc = 0, acc_clear = 0;
  logic [6:0] rd_addr;
  cplx_t rd_data;
  logic start_wb = 0, relu = 0;
  logic [15:0] row_base, m_out;
  logic act_we;
  logic [11:0] act_waddr;
  data_t act_wdata;
  logic busy, done, relu_clip;

  cplx_t wmem [131072];
  cplx_t ifft_out [128];
  cplx_t xs [65];
  cplx_t loaded [128];
  data_t written [4096];
  logic  wrote [4096];
  longint accm [128];
  int nclip;

  always #5 clk = ~clk;
  periph_unit dut (.*);
  assign w_data  = wmem[w_addr];
  assign rd_data = ifft_out[rd_addr];

  always @(posedge clk) begin
    if (load_en) loaded[load_addr] <= load_data;
    if (act_we) begin written[act_waddr] <= act_wdata; wrote[act_waddr] <= 1'b1; end
    if (relu_clip) nclip++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic data_t q(input longint v, input int sh);
    // round half to even, saturate to 12 bits
    longint r, rem, h;
    r = v >>> sh;
    rem = v - (r <<< sh);
    h = 64'sd1 <<< (sh - 1);
    if (rem > h || (rem == h && r[0])) r++;
    if (r > 2047) r = 2047;
    if (r < -2048) r = -2048;
    return data_t'(r);
  endfunction

  task automatic step_and_time(input string what, input int k);
    int cyc;
    @(negedge clk);
    case (what)
      "load": start_load = 1;
      "acc":  start_acc = 1;
      default: start_wb = 1;
    endcase
    @(negedge clk);
    start_load = 0; start_acc = 0; start_wb = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != k + 1) begin failures++; $display("FAIL %s k=%0d: done after %0d cycles", what, k, cyc); end
  endtask

  task automatic run(input int lk, input int wbase, input int rbase, input int mout);
    int k, mh;
    k = 1 << lk;
    mh = k / 2;
    logk = 4'(lk);
    w_blk_base = 17'(wbase);
    // step 1
    for (int m = 0; m <= mh; m++) begin
      xs[m] = cplx_t'($urandom);
      xs[m].re = data_t'($signed(xs[m].re) >>> 2);
      xs[m].im = data_t'($signed(xs[m].im) >>> 2);
      wmem[wbase + m] = cplx_t'($urandom);
      wmem[wbase + m].re = data_t'($signed(wmem[wbase + m].re) >>> 4);
      wmem[wbase + m].im = data_t'($signed(wmem[wbase + m].im) >>> 4);
    end
    for (int m = 0; m <= mh; m++) begin
      @(negedge clk);
      pp_valid = 1; pp_idx = 7'(m); pp_data = xs[m];
    end
    @(negedge clk);
    pp_valid = 0;
    // step 2
    step_and_time("load", k);
    for (int a = 0; a < k; a++) begin
      int b;
      longint pr, pi;
      cplx_t e;
      b = (a <= mh) ? a : k - a;
      pr = longint'(xs[b].re) * wmem[wbase + b].re - longint'(xs[b].im) * wmem[wbase + b].im;
      pi = longint'(xs[b].re) * wmem[wbase + b].im + longint'(xs[b].im) * wmem[wbase + b].re;
      e.re = q(pr, 6);
      e.im = q(pi, 6);
      if (a > mh) e.im = (e.im == -2048) ? 12'sd2047 : -e.im;
      checks++;
      if (loaded[a] !== e) begin
        failures++;
        if (failures < 10) $display("FAIL load k=%0d a=%0d: (%0d,%0d) want (%0d,%0d)", k, a, loaded[a].re, loaded[a].im, e.re, e.im);
      end
    end
    // step 3: three column blocks
    for (int j = 0; j < 3; j++) begin
      for (int a = 0; a < k; a++) begin
        ifft_out[a] = cplx_t'($urandom);
        if (j == 0) accm[a] = 0;
        accm[a] += longint'(ifft_out[a].re);
      end
      acc_clear = (j == 0);
      step_and_time("acc", k);
    end
    // step 4
    row_base = 16'(rbase); m_out = 16'(mout); relu = 1;
    for (int a = 0; a < 4096; a++) wrote[a] = 0;
    nclip = 0;
    step_and_time("wb", k);
    for (int a = 0; a < k; a++) begin
      longint e;
      e = accm[a];
      if (e > 2047) e = 2047;
      if (e < -2048) e = -2048;
      if (e < 0) e = 0;
      checks++;
      if (rbase + a < mout) begin
        if (!wrote[rbase + a] || written[rbase + a] !== data_t'(e)) begin
          failures++;
          if (failures < 10) $display("FAIL wb row %0d: %0d want %0d", rbase + a, written[rbase + a], e);
        end
      end else if (wrote[rbase + a]) begin
        failures++;
        $display("FAIL wb row %0d written past m_out", rbase + a);
      end
    end
    checks++;
    if (nclip == 0) begin failures++; $display("FAIL no ReLU clipping seen"); end
  endtask

  initial begin
    logk = 4; w_blk_base = 0; row_base = 0; m_out = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(4, 100, 32, 40);
    run(7, 5000, 256, 1000);
    run(7, 130000 - 70, 0, 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
