// tb_twiddle_rom: checks every entry of the twiddle ROM for N = 8 (default)
// and N = 64 against cos(2*pi*k/N) - j*sin(2*pi*k/N) in Q2.14 computed here,
// allowing at most one LSB of rounding difference, plus the exact values of
// the trivial factors W^0 = 1 and W^(N/4) = -j.
module tb_twiddle_rom;
  import fft_pkg::*;

  logic [1:0] k8;
  logic [4:0] k64;
  twiddle_t   w8, w64;

  int checks = 0, failures = 0;

  twiddle_rom           dut8  (.k(k8),  .w(w8));
  twiddle_rom #(.N(64)) dut64 (.k(k64), .w(w64));

  function automatic real absr(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  task automatic cmp(input int n, input int k, input twiddle_t w);
    real er, ei;
    er = $cos(2.0 * 3.14159265358979 * k / n) * 16384.0;
    ei = -$sin(2.0 * 3.14159265358979 * k / n) * 16384.0;
    checks++;
    if (absr(real'(w.re) - er) > 1.0 || absr(real'(w.im) - ei) > 1.0) begin
      failures++;
      $display("FAIL N=%0d k=%0d: (%0d,%0d) expected (%f,%f)", n, k, w.re, w.im, er, ei);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) begin
      k8 = 2'(k); #1; cmp(8, k, w8);
    end
    for (int k = 0; k < 32; k++) begin
      k64 = 5'(k); #1; cmp(64, k, w64);
    end
    k8 = 0; k64 = 0; #1;
    checks++;
    if (w8.re != 16384 || w8.im != 0 || w64.re != 16384 || w64.im != 0) failures++;
    k8 = 2; k64 = 16; #1;
    checks++;
    if (w8.re != 0 || w8.im != -16384 || w64.re != 0 || w64.im != -16384) failures++;
    k8 = 1; #1;
    checks++;
    if (w8.re != 11585 || w8.im != -11585) begin failures++; $display("FAIL W8^1 = (%0d,%0d)", w8.re, w8.im); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
