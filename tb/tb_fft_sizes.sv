// tb_fft_sizes: runs the FFT processor at two of the other transform sizes
// the design reports results for, 4 and 16 points, each instance checked
// end to end against a floating-point DFT by fft_size_run (ROM frames and
// random port frames, result order, latency log2(N)*5 + 1, butterfly types
// used). The 32- and 64-point sizes are left out because building them for
// simulation takes many minutes.
module tb_fft_sizes;

  int  c4, f4, c16, f16;
  bit  d4, d16;
  int  checks, failures;

  fft_size_run #(.N(4),  .FRAMES(12)) u4  (.checks(c4),  .failures(f4),  .finished(d4));
  fft_size_run #(.N(16), .FRAMES(12)) u16 (.checks(c16), .failures(f16), .finished(d16));

  initial begin
    failures = 0;
    fork
      begin
        wait (d4 && d16);
      end
      begin
        #5000000;
        $display("watchdog expired");
        failures = 1;
      end
    join_any
    checks   = c4 + c16;
    failures = failures + f4 + f16;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
