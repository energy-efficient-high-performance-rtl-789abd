// Self-checking testbench for weight_ram: writes random complex words to
// random addresses (including the first and last), keeps a copy here, and
// reads every written address back; a write must not disturb other words.
module weight_ram_tb;
  import bc_pkg::*;
  localparam int DEPTH = 95940;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [16:0] waddr = '0, raddr = '0;
  cplx_t wdata = '0, rdata;
  cplx_t model [int];

  always #5 clk = ~clk;
  weight_ram dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    for (int n = 0; n < 400; n++) begin
      a = (n == 0) ? 0 : (n == 1) ? DEPTH - 1 : int'($urandom_range(0, DEPTH - 1));
      @(negedge clk);
      we = 1; waddr = 17'(a);
      wdata = cplx_t'($urandom);
      model[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    foreach (model[k]) begin
      raddr = 17'(k);
      #1;
      checks++;
      if (rdata !== model[k]) begin
        failures++;
        $display("FAIL addr %0d: %h want %h", k, rdata, model[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
