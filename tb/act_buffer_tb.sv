// Self-checking testbench for act_buffer: random host and engine writes to
// both banks against a model kept here, read back through the host port
// and both engine read ports. Checks that the banks are independent and
// that an engine write wins over a host write to the same word.
module act_buffer_tb;
  import bc_pkg::*;
  localparam int DEPTH = 3072;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic host_we = 0, host_bank = 0, eng_rbank = 0, eng_we = 0, eng_wbank = 0;
  logic [11:0] host_addr = '0, eng_raddr0 = '0, eng_raddr1 = '0, eng_waddr = '0;
  data_t host_wdata = '0, host_rdata, eng_rdata0, eng_rdata1, eng_wdata = '0;
  data_t model [2][DEPTH];

  always #5 clk = ~clk;
  act_buffer dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input data_t got, input data_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %0d want %0d", what, got, exp);
    end
  endtask

  initial begin
    // fill both banks through the host port
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        host_we = 1; host_bank = b[0]; host_addr = 12'(a);
        host_wdata = data_t'($urandom);
        model[b][a] = host_wdata;
      end
    // engine writes to bank 1 while the host writes either bank
    for (int n = 0; n < 500; n++) begin
      int a;
      a = int'($urandom_range(0, DEPTH - 1));
      @(negedge clk);
      eng_we = 1; eng_wbank = 1; eng_waddr = 12'(a); eng_wdata = data_t'($urandom);
      host_we = (n % 3 == 0); host_bank = n[0]; host_addr = 12'(a); host_wdata = data_t'($urandom);
      if (host_we) model[n % 2][a] = host_wdata;
      model[1][a] = eng_wdata;
    end
    @(negedge clk);
    eng_we = 0; host_we = 0;
    for (int n = 0; n < 2000; n++) begin
      int a0, a1, b;
      a0 = int'($urandom_range(0, DEPTH - 1));
      a1 = int'($urandom_range(0, DEPTH - 1));
      b = n % 2;
      host_bank = b[0]; host_addr = 12'(a0);
      eng_rbank = !b[0]; eng_raddr0 = 12'(a0); eng_raddr1 = 12'(a1);
      #1;
      check("host read", host_rdata, model[b][a0]);
      check("engine read 0", eng_rdata0, model[1-b][a0]);
      check("engine read 1", eng_rdata1, model[1-b][a1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
