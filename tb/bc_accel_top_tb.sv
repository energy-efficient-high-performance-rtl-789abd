// End-to-end testbench for bc_accel_top at its default parameters.
//
// Runs three block-circulant layers back to back through the host
// interface, the way a network is run one layer at a time:
//   L1: 200 -> 100, k = 32, ReLU, bank 0 -> 1 (input and output lengths
//       not multiples of k: zero padding and dropped rows)
//   L2: 100 -> 40,  k = 16, no ReLU, bank 1 -> 0 (input is L1's output
//       as the accelerator left it: bank swap and a change of FFT size)
//   L3: 1024 -> 512, k = 128, ReLU, bank 0 -> 1 (a 1024x512 layer of the
//       784-2048-2048-1024-1024-512-10 MNIST network at k = 128)
//   L4: 512 -> 128, k = 128, no ReLU, bank 1 -> 0, L3's output as input,
//       forward FFT halving on its last two stages (fshift = 2)
// For every block the time-domain weights w_ij are random multiples of
// 1/64; the testbench computes their spectra with a double-precision DFT,
// rounds them to (1,5,6) and writes bins 0..k/2 to the weight RAM. The
// expected outputs come from the circulant matrix-vector product
// a_r = sum_c w[(r - c) mod k] x[c] in double precision, followed by ReLU,
// and each output must lie within a fixed-point tolerance of it.
// It also checks the layer latency against the cycle formula and counts
// how often each mechanism (padding, dropped rows, ReLU clipping, bank
// swap, FFT size change, conjugate-bin rebuild, accumulation over column
// blocks, forward-FFT scaling) happened; a mechanism that never happened
// counts as a failure.
module bc_accel_top_tb;
  import bc_pkg::*;

  localparam int N    = 128;
  localparam int BF   = 4;
  localparam real PI  = 3.14159265358979323846;
  localparam real SC  = 64.0;

  logic clk = 0, rst_n = 0;
  layer_cfg_t cfg;
  logic start, busy, done;
  logic w_we;
  logic [16:0] w_addr;
  cplx_t w_wdata;
  logic act_we, act_bank;
  logic [11:0] act_addr;
  data_t act_wdata, act_rdata;

  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  bc_accel_top dut (.*);

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, observed inside the design
  int n_pad = 0, n_drop = 0, n_clip = 0, n_mirror = 0, n_accum = 0;
  int n_sizes = 0, n_swap = 0, n_fscale = 0;
  logic [3:0] last_logk = 0;
  logic       last_bank = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_pack.busy && (dut.u_pack.e1 >= 17'(cfg.n_in))) n_pad++;
    if (dut.u_per.phase == 2'd3 && !dut.u_per.act_we) n_drop++;
    if (dut.u_per.relu_clip) n_clip++;
    if (dut.u_per.load_en && dut.u_ctrl.ph_iload &&
        (17'(dut.u_per.load_addr) > 17'(dut.u_per.half))) n_mirror++;
    if (dut.u_ctrl.acc_start && !dut.u_ctrl.acc_clear) n_accum++;
    if (dut.u_fft.busy && !dut.u_fft.cfg_inv && dut.u_fft.halve) n_fscale++;
  end

  real x [3072];
  real wt [];          // time-domain weights, block-major
  real expv [3072];

  task automatic host_write_act(input bit bank, input int addr, input real v);
    @(negedge clk);
    act_we = 1; act_bank = bank; act_addr = 12'(addr);
    act_wdata = data_t'($rtoi($floor(v * SC + 0.5)));
    @(negedge clk);
    act_we = 0;
  endtask

  task automatic host_read_act(input bit bank, input int addr, output real v);
    act_bank = bank; act_addr = 12'(addr);
    #1;
    v = real'(act_rdata) / SC;
  endtask

  task automatic run_layer(input int n_in, input int m_out, input int logk,
                           input bit relu, input bit in_bank, input int w_base,
                           input bit fresh_input, input real wamp, input real tol,
                           input int fsh = 0);
    int k, p, q, nb, words, cycles, expc, fails0;
    real er, ei, ang, got, err, maxerr;
    k = 1 << logk;
    p = (m_out + k - 1) / k;
    q = (n_in + k - 1) / k;
    nb = p * q;
    words = k / 2 + 1;
    fails0 = failures;
    // input vector
    for (int c = 0; c < n_in; c++) begin
      if (fresh_input) begin
        x[c] = real'($rtoi($floor((real'($urandom_range(0, 2000)) / 1000.0 - 1.0) * SC + 0.5))) / SC;
        host_write_act(in_bank, c, x[c]);
      end else begin
        host_read_act(in_bank, c, x[c]);
      end
    end
    // weights and their spectra
    wt = new[nb * k];
    for (int b = 0; b < nb; b++) begin
      for (int t = 0; t < k; t++)
        wt[b*k + t] = real'($rtoi($floor((real'($urandom_range(0, 2000)) / 1000.0 - 1.0) * wamp * SC + 0.5))) / SC;
      for (int m = 0; m < words; m++) begin
        er = 0.0; ei = 0.0;
        for (int t = 0; t < k; t++) begin
          ang = -2.0 * PI * real'(m * t) / real'(k);
          er += wt[b*k + t] * $cos(ang);
          ei += wt[b*k + t] * $sin(ang);
        end
        @(negedge clk);
        w_we = 1;
        w_addr = 17'(w_base + b * words + m);
        w_wdata.re = data_t'($rtoi($floor(er * SC + 0.5)));
        w_wdata.im = data_t'($rtoi($floor(ei * SC + 0.5)));
      end
    end
    @(negedge clk);
    w_we = 0;
    // reference
    for (int r = 0; r < m_out; r++) begin
      int i;
      i = r / k;
      expv[r] = 0.0;
      for (int c = 0; c < n_in; c++) begin
        int j;
        j = c / k;
        expv[r] += wt[(i*q + j)*k + (((r % k) - (c % k) + k) % k)] * x[c];
      end
      if (relu && expv[r] < 0.0) expv[r] = 0.0;
    end
    // run
    if (logk != int'(last_logk)) n_sizes++;
    if (in_bank != last_bank) n_swap++;
    last_logk = 4'(logk);
    last_bank = in_bank;
    cfg.logk = 4'(logk); cfg.p = 8'(p); cfg.q = 8'(q);
    cfg.n_in = 16'(n_in); cfg.m_out = 16'(m_out);
    cfg.w_base = 20'(w_base); cfg.in_bank = in_bank; cfg.relu = relu;
    cfg.fshift = 3'(fsh);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    // per block: k/2 (pack) + (logk-1)*ceil(k/4/BF) (FFT) + k/2+1 (post)
    //          + k (load) + logk*ceil(k/2/BF) (IFFT) + k (accumulate)
    //          + 2 cycles of start/done handshake for each of the 6 phases;
    // per row block k (write back) + 2; 2 more to start and finish
    expc = nb * (12 + k/2 + (logk-1)*((k/4 + BF - 1)/BF) + k/2 + 1 + k
                 + logk*((k/2 + BF - 1)/BF) + k) + p * (2 + k) + 2;
    checks++;
    if (cycles != expc) begin
      failures++;
      $display("FAIL layer %0d->%0d: %0d cycles, expected %0d", n_in, m_out, cycles, expc);
    end
    // compare
    maxerr = 0.0;
    for (int r = 0; r < m_out; r++) begin
      host_read_act(!in_bank, r, got);
      err = got - expv[r];
      if (err < 0.0) err = -err;
      if (err > maxerr) maxerr = err;
      checks++;
      if (err > tol) begin
        failures++;
        if (failures - fails0 < 8)
          $display("FAIL layer %0d->%0d row %0d: got %f want %f", n_in, m_out, r, got, expv[r]);
      end
    end
    $display("layer %0d->%0d k=%0d: %0d cycles, max |error| %f", n_in, m_out, k, cycles, maxerr);
  endtask

  initial begin
    cfg = '0; start = 0; w_we = 0; w_addr = '0; w_wdata = '0;
    act_we = 0; act_bank = 0; act_addr = '0; act_wdata = '0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    run_layer(200,  100, 5, 1'b1, 1'b0, 0,    1'b1, 0.10, 0.08);
    run_layer(100,  40,  4, 1'b0, 1'b1, 476,  1'b0, 0.15, 0.08);
    run_layer(1024, 512, 7, 1'b1, 1'b0, 1000, 1'b1, 0.05, 0.12);
    run_layer(512,  128, 7, 1'b0, 1'b1, 3080, 1'b0, 0.08, 0.15, 2);
    $display("mechanisms: pad=%0d drop=%0d relu_clip=%0d bank_swap=%0d size_change=%0d mirror=%0d accum=%0d fwd_scale=%0d",
             n_pad, n_drop, n_clip, n_swap, n_sizes, n_mirror, n_accum, n_fscale);
    checks += 8;
    if (n_fscale == 0) failures++;
    if (n_pad == 0)    failures++;
    if (n_drop == 0)   failures++;
    if (n_clip == 0)   failures++;
    if (n_swap == 0)   failures++;
    if (n_sizes < 3)   failures++;
    if (n_mirror == 0) failures++;
    if (n_accum == 0)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
