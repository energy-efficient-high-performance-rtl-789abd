// Workload testbench: whole networks on bc_accel_top at default parameters.
//
// Runs every block-circulant layer of the two evaluated networks with all
// weight matrices resident in the weight RAM at once, partition size
// k = 128 everywhere:
//   MNIST: 784-2048-2048-1024-1024-512 (weight matrices 1-5; the 512x10
//          softmax layer stays dense and is not run here)
//   SVHN:  3072-2048-2048-2048-2048-2048-512-10 (weight matrices 1-7)
// Hidden layers use ReLU, the last layer of each network does not, and the
// banks alternate from layer to layer so each layer reads what the one
// before it left. Weights are random (scaled to keep activations in range);
// their spectra are computed here and loaded once per network. Every layer
// halves on the last two forward-FFT stages (fshift = 2), since ReLU outputs
// and pixels are non-negative and their DC bins would saturate. Each layer's
// outputs are compared with the circulant matrix-vector product of the
// vector the accelerator actually read, in double precision, within a
// fixed-point tolerance (0.40 on any output, 0.12 rms over a layer), and the
// layer latency with the cycle formula.
module network_tb;
  import bc_pkg::*;

  localparam int  BF = 4;
  localparam real PI = 3.14159265358979323846;
  localparam real SC = 64.0;
  localparam int  K  = 128;
  localparam int  LK = 7;

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

  always #5 clk = ~clk;
  bc_accel_top dut (.*);

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real x [3072];
  real expv [3072];
  real wt [];           // time-domain weights of the whole network
  int  wofs [8];        // first block of each layer in wt
  int  sizes [9];
  int  nlayers;

  task automatic host_read_act(input bit bank, input int addr, output real v);
    act_bank = bank; act_addr = 12'(addr);
    #1;
    v = real'(act_rdata) / SC;
  endtask

  task automatic load_weights();
    int nb, p, q;
    real er, ei, ang, amp;
    nb = 0;
    for (int l = 0; l < nlayers; l++) begin
      wofs[l] = nb;
      nb += ((sizes[l+1] + K - 1) / K) * ((sizes[l] + K - 1) / K);
    end
    wofs[nlayers] = nb;
    wt = new[nb * K];
    for (int l = 0; l < nlayers; l++) begin
      amp = $sqrt(6.0 / real'(sizes[l]));
      for (int b = wofs[l]; b < wofs[l+1]; b++) begin
        for (int t = 0; t < K; t++)
          wt[b*K + t] = real'($rtoi($floor((real'($urandom_range(0, 2000)) / 1000.0 - 1.0) * amp * SC + 0.5))) / SC;
        for (int m = 0; m <= K/2; m++) begin
          er = 0.0; ei = 0.0;
          for (int t = 0; t < K; t++) begin
            ang = -2.0 * PI * real'(m * t) / real'(K);
            er += wt[b*K + t] * $cos(ang);
            ei += wt[b*K + t] * $sin(ang);
          end
          @(negedge clk);
          w_we = 1;
          w_addr = 17'(b * (K/2 + 1) + m);
          w_wdata.re = data_t'($rtoi($floor(er * SC + 0.5)));
          w_wdata.im = data_t'($rtoi($floor(ei * SC + 0.5)));
        end
      end
    end
    @(negedge clk);
    w_we = 0;
    $display("loaded %0d blocks = %0d weight words", nb, nb * (K/2 + 1));
  endtask

  task automatic run_layer(input int l, input bit in_bank, input bit relu, input int fsh, input real tol,
                           input real rms_tol);
    int n_in, m_out, p, q, nb, cycles, expc, f0;
    real got, err, maxerr, sumsq, esq;
    n_in = sizes[l]; m_out = sizes[l+1];
    p = (m_out + K - 1) / K;
    q = (n_in + K - 1) / K;
    nb = p * q;
    f0 = failures;
    for (int c = 0; c < n_in; c++) host_read_act(in_bank, c, x[c]);
    sumsq = 0.0;
    for (int r = 0; r < m_out; r++) begin
      int i;
      i = r / K;
      expv[r] = 0.0;
      for (int c = 0; c < n_in; c++)
        expv[r] += wt[(wofs[l] + i*q + c/K)*K + (((r % K) - (c % K) + K) % K)] * x[c];
      if (relu && expv[r] < 0.0) expv[r] = 0.0;
      sumsq += expv[r] * expv[r];
    end
    cfg = '0;
    cfg.logk = 4'(LK); cfg.p = 8'(p); cfg.q = 8'(q);
    cfg.n_in = 16'(n_in); cfg.m_out = 16'(m_out);
    cfg.w_base = 20'(wofs[l] * (K/2 + 1)); cfg.in_bank = in_bank; cfg.relu = relu;
    cfg.fshift = 3'(fsh);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    expc = nb * (12 + K/2 + (LK-1)*((K/4 + BF - 1)/BF) + K/2 + 1 + K
                 + LK*((K/2 + BF - 1)/BF) + K) + p * (2 + K) + 2;
    checks++;
    if (cycles != expc) begin
      failures++;
      $display("FAIL layer %0d: %0d cycles, expected %0d", l + 1, cycles, expc);
    end
    maxerr = 0.0;
    esq = 0.0;
    for (int r = 0; r < m_out; r++) begin
      host_read_act(!in_bank, r, got);
      err = got - expv[r];
      esq += err * err;
      if (err < 0.0) err = -err;
      if (err > maxerr) maxerr = err;
      checks++;
      if (err > tol) begin
        failures++;
        if (failures - f0 < 5)
          $display("FAIL layer %0d row %0d: got %f want %f", l + 1, r, got, expv[r]);
      end
    end
    checks++;
    if ($sqrt(esq / real'(m_out)) > rms_tol) begin
      failures++;
      $display("FAIL layer %0d: rms error %f", l + 1, $sqrt(esq / real'(m_out)));
    end
    $display("layer %0d %0d->%0d: %0d blocks, %0d cycles, rms output %f, rms error %f, max |error| %f",
             l + 1, n_in, m_out, nb, cycles, $sqrt(sumsq / real'(m_out)), $sqrt(esq / real'(m_out)), maxerr);
  endtask

  task automatic run_network(input string name);
    bit bank;
    $display("%s network", name);
    load_weights();
    // random image-like input in [0,1]
    for (int c = 0; c < sizes[0]; c++) begin
      @(negedge clk);
      act_we = 1; act_bank = 0; act_addr = 12'(c);
      act_wdata = data_t'($urandom_range(0, 64));
    end
    @(negedge clk);
    act_we = 0;
    bank = 0;
    for (int l = 0; l < nlayers; l++) begin
      run_layer(l, bank, l != nlayers - 1, 2, 0.40, 0.12);
      bank = !bank;
    end
  endtask

  initial begin
    cfg = '0; start = 0; w_we = 0; w_addr = '0; w_wdata = '0;
    act_we = 0; act_bank = 0; act_addr = '0; act_wdata = '0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    sizes = '{784, 2048, 2048, 1024, 1024, 512, 0, 0, 0};
    nlayers = 5;
    run_network("MNIST");
    sizes = '{3072, 2048, 2048, 2048, 2048, 2048, 512, 10, 0};
    nlayers = 7;
    run_network("SVHN");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
