// Self-checking testbench for twiddle_rom: every entry on every port must
// equal round(1024*cos(2*pi*k/N)) - j*round(1024*sin(2*pi*k/N)), computed
// here independently, for N = 128 and for a small N = 8.
module twiddle_rom_tb;
  import bc_pkg::*;
  localparam real PI = 3.14159265358979323846;
  int checks = 0, failures = 0;

  logic [6:0] idx  [5];
  tw_cplx_t   val  [5];
  logic [2:0] idx8 [2];
  tw_cplx_t   val8 [2];

  twiddle_rom #(.N(128), .NP(5)) dut  (.idx(idx),  .val(val));
  twiddle_rom #(.N(8),   .NP(2)) dut8 (.idx(idx8), .val(val8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(input real v);
    return $rtoi($floor(v + 0.5));
  endfunction

  initial begin
    for (int k = 0; k <= 64; k++) begin
      for (int p = 0; p < 5; p++) idx[p] = 7'((k + p * 13) % 65);
      #1;
      for (int p = 0; p < 5; p++) begin
        int kk, er, ei;
        kk = (k + p * 13) % 65;
        er = rnd(1024.0 * $cos(2.0 * PI * kk / 128.0));
        ei = rnd(-1024.0 * $sin(2.0 * PI * kk / 128.0));
        checks++;
        if (int'(val[p].re) != er || int'(val[p].im) != ei) begin
          failures++;
          $display("FAIL N=128 k=%0d port %0d: (%0d,%0d) want (%0d,%0d)", kk, p, val[p].re, val[p].im, er, ei);
        end
      end
    end
    for (int k = 0; k <= 4; k++) begin
      idx8[0] = 3'(k); idx8[1] = 3'(4 - k);
      #1;
      checks++;
      if (int'(val8[0].re) != rnd(1024.0 * $cos(2.0 * PI * k / 8.0)) ||
          int'(val8[0].im) != rnd(-1024.0 * $sin(2.0 * PI * k / 8.0))) begin
        failures++;
        $display("FAIL N=8 k=%0d", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
