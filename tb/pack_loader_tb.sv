// Self-checking testbench for pack_loader. A model activation memory here
// answers the two read ports; the testbench records every FFT load-port
// write and checks that segment j of size k produced exactly k/2 writes,
// t_i = x[jk+2i] + j*x[jk+2i+1] at address i, with inputs at or beyond
// n_in read as zero, and that done follows k/2 cycles after start.
module pack_loader_tb;
  import bc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [3:0] logk;
  logic [15:0] seg_base, n_in;
  logic start = 0, busy, done;
  logic [11:0] act_addr0, act_addr1;
  data_t act_data0, act_data1;
  logic load_en;
  logic [6:0] load_addr;
  cplx_t load_data;
  data_t amem [4096];
  cplx_t got [128];
  int nwr;

  always #5 clk = ~clk;
  pack_loader dut (.*);

  assign act_data0 = amem[act_addr0];
  assign act_data1 = amem[act_addr1];

  always @(posedge clk) if (load_en) begin
    got[load_addr] <= load_data;
    nwr <= nwr + 1;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic seg(input int lk, input int j, input int nin);
    int k, cyc, base;
    k = 1 << lk;
    base = j * k;
    @(negedge clk);
    logk = 4'(lk); seg_base = 16'(base); n_in = 16'(nin);
    nwr = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 2;
    if (cyc != k / 2 + 1) begin failures++; $display("FAIL k=%0d: done after %0d cycles", k, cyc); end
    if (nwr != k / 2)     begin failures++; $display("FAIL k=%0d: %0d writes", k, nwr); end
    for (int i = 0; i < k / 2; i++) begin
      data_t er, ei;
      er = (base + 2*i     < nin) ? amem[base + 2*i]     : '0;
      ei = (base + 2*i + 1 < nin) ? amem[base + 2*i + 1] : '0;
      checks++;
      if (got[i].re !== er || got[i].im !== ei) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d j=%0d i=%0d: (%0d,%0d) want (%0d,%0d)", k, j, i, got[i].re, got[i].im, er, ei);
      end
    end
  endtask

  initial begin
    for (int a = 0; a < 4096; a++) amem[a] = data_t'($urandom);
    logk = 7; seg_base = 0; n_in = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    seg(7, 0, 1024);
    seg(7, 6, 784);     // 784 = 6*128 + 16: padded segment
    seg(5, 3, 200);     // 200 = 6*32 + 8
    seg(5, 6, 200);
    seg(4, 2, 37);      // odd length: a pair with only its real part
    seg(2, 5, 4096);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
