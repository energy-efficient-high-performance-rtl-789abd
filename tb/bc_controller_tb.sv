// Self-checking testbench for bc_controller. Simple unit models here answer
// each start pulse with a done pulse after a unit-specific delay. The
// testbench logs every start and checks it against the loop order of the
// forward algorithm: for each row block i and column block j, pack(j),
// forward FFT at size k/2 (halving on its last fshift stages),
// post-process, IFFT load, inverse FFT at size k (halving on all but its
// last fshift stages),
// accumulate (clearing only at j = 0, weights at w_base + (i*q+j)*(k/2+1)),
// then one write-back per row block at row i*k, then one done pulse.
module bc_controller_tb;
  import bc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  layer_cfg_t cfg;
  logic start = 0, busy, done;
  logic ph_pack, ph_post, ph_iload, ph_acc, fft_inv;
  logic [3:0] fft_log;
  logic [6:0] fft_scale;
  logic pack_start, fft_start, post_start, load_start, acc_start, wb_start;
  logic pack_done = 0, fft_done = 0, post_done = 0, per_done = 0;
  logic acc_clear;
  logic [15:0] seg_base, row_base;
  logic [16:0] w_blk_base;

  always #5 clk = ~clk;
  bc_controller dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // unit models: done after a fixed delay
  int cnt_pack = -1, cnt_fft = -1, cnt_post = -1, cnt_per = -1;
  always @(posedge clk) begin
    pack_done <= (cnt_pack == 0);
    fft_done  <= (cnt_fft == 0);
    post_done <= (cnt_post == 0);
    per_done  <= (cnt_per == 0);
    cnt_pack <= pack_start ? 3 : (cnt_pack >= 0 ? cnt_pack - 1 : -1);
    cnt_fft  <= fft_start  ? 5 : (cnt_fft  >= 0 ? cnt_fft  - 1 : -1);
    cnt_post <= post_start ? 2 : (cnt_post >= 0 ? cnt_post - 1 : -1);
    cnt_per  <= (load_start || acc_start || wb_start) ? 4 : (cnt_per >= 0 ? cnt_per - 1 : -1);
  end

  // event log: 0 pack, 1 fft fwd, 2 post, 3 load, 4 fft inv, 5 acc, 6 wb
  int ev [$];
  int ev_a [$];
  int ev_b [$];
  always @(posedge clk) if (rst_n) begin
    if (pack_start) begin ev.push_back(0); ev_a.push_back(int'(seg_base)); ev_b.push_back(0); end
    if (fft_start)  begin ev.push_back(fft_inv ? 4 : 1); ev_a.push_back(int'(fft_log)); ev_b.push_back(int'(fft_scale)); end
    if (post_start) begin ev.push_back(2); ev_a.push_back(0); ev_b.push_back(int'(ph_post)); end
    if (load_start) begin ev.push_back(3); ev_a.push_back(0); ev_b.push_back(int'(ph_iload)); end
    if (acc_start)  begin ev.push_back(5); ev_a.push_back(int'(acc_clear)); ev_b.push_back(int'(w_blk_base)); end
    if (wb_start)   begin ev.push_back(6); ev_a.push_back(int'(row_base)); ev_b.push_back(0); end
  end

  task automatic expect_ev(input int e, input int a, input int b, input string what);
    checks++;
    if (ev.size() == 0) begin
      failures++;
      $display("FAIL missing %s", what);
      return;
    end
    if (ev[0] != e || ev_a[0] != a || ev_b[0] != b) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got event %0d (%0d,%0d), want %0d (%0d,%0d)", what, ev[0], ev_a[0], ev_b[0], e, a, b);
    end
    void'(ev.pop_front()); void'(ev_a.pop_front()); void'(ev_b.pop_front());
  endtask

  task automatic layer(input int lk, input int p, input int q, input int wbase, input int fsh);
    int k, ndone, fmask, imask;
    k = 1 << lk;
    ev.delete(); ev_a.delete(); ev_b.delete();
    cfg = '0;
    cfg.logk = 4'(lk); cfg.p = 8'(p); cfg.q = 8'(q); cfg.w_base = 20'(wbase);
    cfg.n_in = 16'(q * k); cfg.m_out = 16'(p * k);
    cfg.fshift = 3'(fsh);
    // forward: last fsh of its lk-1 stages halve; inverse: all but the last fsh
    fmask = 0; imask = 0;
    for (int s = 0; s < lk - 1; s++) if (s >= lk - 1 - fsh) fmask |= 1 << s;
    for (int s = 0; s < lk; s++)     if (s < lk - fsh)      imask |= 1 << s;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    ndone = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL busy after done"); end
    for (int i = 0; i < p; i++) begin
      for (int j = 0; j < q; j++) begin
        expect_ev(0, j * k, 0, "pack");
        expect_ev(1, lk - 1, fmask, "forward FFT");
        expect_ev(2, 0, 1, "post-process");
        expect_ev(3, 0, 1, "IFFT load");
        expect_ev(4, lk, imask, "inverse FFT");
        expect_ev(5, (j == 0), wbase + (i * q + j) * (k / 2 + 1), "accumulate");
      end
      expect_ev(6, i * k, 0, "write back");
    end
    checks++;
    if (ev.size() != 0) begin failures++; $display("FAIL %0d extra events", ev.size()); end
  endtask

  initial begin
    cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    layer(7, 2, 3, 1000, 0);
    layer(4, 3, 1, 0, 2);
    layer(2, 1, 5, 77, 1);
    layer(5, 4, 7, 476, 3);
    layer(7, 1, 2, 9, 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
