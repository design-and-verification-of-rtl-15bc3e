// tb_timing_gen: drives the timing signal generator through the phases of
// an 8-point transform (load with gaps in step, three stages, output) and
// checks the counter and the issue/phase_end strobes clock by clock against
// the expected phase lengths: N steps, 5 clocks per stage (operand load,
// three butterfly stages, write-back), N output clocks.
module tb_timing_gen;
  import fft_pkg::*;

  localparam int N = 8;
  logic       clk = 0, rst_n = 0, step, issue, phase_end;
  phase_t     phase;
  logic [6:0] count;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  timing_gen dut (.*);

  task automatic expect_now(input int c, input logic iss, input logic pe, input string what);
    #1;
    checks++;
    if (count != 7'(c) || issue !== iss || phase_end !== pe) begin
      failures++;
      $display("FAIL %s: count=%0d issue=%0b end=%0b, expected %0d %0b %0b",
               what, count, issue, phase_end, c, iss, pe);
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
    phase = PH_IDLE; step = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 5; rep++) begin
      int c;
      phase = PH_IDLE; step = 0;
      repeat (3) begin @(negedge clk); expect_now(0, 0, 0, "idle"); end
      // load with random gaps
      phase = PH_LOAD;
      c = 0;
      while (c < N) begin
        step = $urandom % 2;
        expect_now(c, 0, step && c == N - 1, "load");
        @(negedge clk);
        if (step) c++;
      end
      step = 0;
      // three stages back to back
      phase = PH_STAGE;
      for (int s = 0; s < 3; s++)
        for (int t = 0; t < 5; t++) begin
          expect_now(t, t == 0, t == 4, "stage");
          @(negedge clk);
        end
      phase = PH_OUT;
      for (int t = 0; t < N; t++) begin
        expect_now(t, 0, t == N - 1, "out");
        @(negedge clk);
      end
      phase = PH_IDLE;
      expect_now(0, 0, 0, "back to idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
