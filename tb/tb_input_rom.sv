// tb_input_rom: reads every sample of every stored frame (N = 8 and N = 64)
// and compares it with the documented content formula
//   re = 16*(((n*(2f+3) + 5f) mod 32) - 16), im = 16*(((n*(f+5) + 3f+1) mod 32) - 16).
module tb_input_rom;
  import fft_pkg::*;

  logic [1:0] frame;
  logic [2:0] addr8;
  logic [5:0] addr64;
  cplx_t      d8, d64;

  int checks = 0, failures = 0;

  input_rom           dut8  (.frame(frame), .addr(addr8),  .data(d8));
  input_rom #(.N(64)) dut64 (.frame(frame), .addr(addr64), .data(d64));

  function automatic cplx_t expect_s(input int f, input int n);
    cplx_t s;
    s.re = 16'(16 * (((n * (2 * f + 3) + 5 * f) % 32) - 16));
    s.im = 16'(16 * (((n * (f + 5) + 3 * f + 1) % 32) - 16));
    return s;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 4; f++) begin
      frame = 2'(f);
      for (int n = 0; n < 64; n++) begin
        addr8 = 3'(n); addr64 = 6'(n); #1;
        if (n < 8) begin
          checks++;
          if (d8 !== expect_s(f, n)) begin failures++; $display("FAIL N=8 f=%0d n=%0d", f, n); end
        end
        checks++;
        if (d64 !== expect_s(f, n)) begin failures++; $display("FAIL N=64 f=%0d n=%0d", f, n); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
