// Self-checking testbench for bc_memory: checks that each of the BF+1
// twiddle ports returns cos/-sin of its own index, that weight words come
// back as written, and that engine writes land in the bank the engine read
// ports of the other bank do not see.
module bc_memory_tb;
  import bc_pkg::*;
  localparam real PI = 3.14159265358979323846;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [6:0] tw_idx [4];
  tw_cplx_t   tw_val [4];
  logic [6:0] pp_tw_idx;
  tw_cplx_t   pp_tw_val;
  logic w_we = 0;
  logic [16:0] w_waddr = '0, w_raddr = '0;
  cplx_t w_wdata = '0, w_rdata;
  logic host_we = 0, host_bank = 0, eng_rbank = 0, eng_we = 0, eng_wbank = 0;
  logic [11:0] host_addr = '0, eng_raddr0 = '0, eng_raddr1 = '0, eng_waddr = '0;
  data_t host_wdata = '0, host_rdata, eng_rdata0, eng_rdata1, eng_wdata = '0;

  always #5 clk = ~clk;
  bc_memory dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(input real v);
    return $rtoi($floor(v + 0.5));
  endfunction

  initial begin
    // twiddle ports
    for (int k = 0; k <= 64; k++) begin
      for (int u = 0; u < 4; u++) tw_idx[u] = 7'((k + 7 * u) % 65);
      pp_tw_idx = 7'(64 - k);
      #1;
      for (int u = 0; u <= 4; u++) begin
        int kk;
        tw_cplx_t v;
        kk = (u < 4) ? (k + 7 * u) % 65 : 64 - k;
        v = (u < 4) ? tw_val[u] : pp_tw_val;
        checks++;
        if (int'(v.re) != rnd(1024.0 * $cos(2.0 * PI * kk / 128.0)) ||
            int'(v.im) != rnd(-1024.0 * $sin(2.0 * PI * kk / 128.0))) begin
          failures++;
          $display("FAIL twiddle port %0d index %0d", u, kk);
        end
      end
    end
    // weight RAM
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      w_we = 1; w_waddr = 17'(a * 1499); w_wdata = cplx_t'(a * 40503 + 7);
    end
    @(negedge clk);
    w_we = 0;
    for (int a = 0; a < 64; a++) begin
      w_raddr = 17'(a * 1499);
      #1;
      checks++;
      if (w_rdata !== cplx_t'(a * 40503 + 7)) begin
        failures++;
        $display("FAIL weight word %0d", a);
      end
    end
    // activation banks: host fills bank 0, engine writes bank 1
    for (int a = 0; a < 32; a++) begin
      @(negedge clk);
      host_we = 1; host_bank = 0; host_addr = 12'(a); host_wdata = data_t'(a + 100);
      eng_we = 1; eng_wbank = 1; eng_waddr = 12'(a); eng_wdata = data_t'(-a - 5);
    end
    @(negedge clk);
    host_we = 0; eng_we = 0;
    for (int a = 0; a < 32; a++) begin
      eng_rbank = 0; eng_raddr0 = 12'(a); eng_raddr1 = 12'(31 - a);
      host_bank = 1; host_addr = 12'(a);
      #1;
      checks += 3;
      if (eng_rdata0 !== data_t'(a + 100))      begin failures++; $display("FAIL eng read 0 %0d", a); end
      if (eng_rdata1 !== data_t'(31 - a + 100)) begin failures++; $display("FAIL eng read 1 %0d", a); end
      if (host_rdata !== data_t'(-a - 5))       begin failures++; $display("FAIL host read %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
