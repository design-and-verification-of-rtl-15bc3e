// tb_operand_regs: checks that the operand registers capture A, B, the
// twiddle and the type of every butterfly on load, hold them while load is
// low, and raise valid for exactly the clock after each load.
module tb_operand_regs;
  import fft_pkg::*;

  localparam int NB = 4;
  logic     clk = 0, rst_n = 0, load, valid;
  cplx_t    a_in [NB], b_in [NB], a_q [NB], b_q [NB];
  twiddle_t w_in [NB], w_q [NB];
  bf_type_t type_in [NB], type_q [NB];
  cplx_t    ea [NB], eb [NB];
  twiddle_t ew [NB];
  bf_type_t et [NB];

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  operand_regs dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0;
    for (int j = 0; j < NB; j++) begin a_in[j] = '0; b_in[j] = '0; w_in[j] = '0; type_in[j] = BF_TYPE2; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      logic ld;
      ld = ($urandom % 3) == 0;
      for (int j = 0; j < NB; j++) begin
        a_in[j] = cplx_t'($urandom); b_in[j] = cplx_t'($urandom); w_in[j] = twiddle_t'($urandom);
        type_in[j] = bf_type_t'(2'(1 + $urandom % 3));
        if (ld) begin ea[j] = a_in[j]; eb[j] = b_in[j]; ew[j] = w_in[j]; et[j] = type_in[j]; end
      end
      load = ld;
      @(negedge clk);
      load = 0;
      checks++;
      if (valid !== ld) begin failures++; $display("FAIL valid=%0b after load=%0b", valid, ld); end
      if (i > 0 || ld) begin
        for (int j = 0; j < NB; j++) begin
          checks++;
          if (a_q[j] !== ea[j] || b_q[j] !== eb[j] || w_q[j] !== ew[j] || type_q[j] !== et[j]) begin
            failures++; $display("FAIL register %0d, iteration %0d", j, i);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
