// fft_size_run: test harness that runs an N-point FFT processor instance
// through ROM frames and random port frames and compares the results with a
// direct floating-point DFT. Used by tb_fft_sizes for the transform sizes
// other than the default; it reports its counts on its ports and raises
// finished when done instead of ending the simulation.
//
// Transforms frames from the input port (random samples, with and without
// gaps in in_valid, plus an impulse, a constant and a single tone) and every
// frame of the input ROM, and compares each result with a direct DFT
// computed here in floating point, allowing a few LSBs of rounding error.
// Also checks the result order (natural order, out_index 0..N-1), the
// latency from the last accepted sample to the first result
// (log2(N)*5 + 1 clocks), done/busy, and a start issued in the very clock
// done pulses. It counts how often each mechanism of the design occurred:
// butterflies of type 1, 2 and 3, ROM-sourced and port-sourced frames,
// input gaps, and back-to-back frames; one that never happened counts as a
// failure.
module fft_size_run
  import fft_pkg::*;
#(
  parameter int N      = 16,
  parameter int FRAMES = 12
) (
  output int checks,
  output int failures,
  output bit finished
);

  localparam int M = $clog2(N);
  localparam int AMP = 32767 / (2 * N);   // headroom: no overflow possible
  localparam real TOL = 2.0 + N / 4;

  logic       clk = 0, rst_n = 0;
  logic       start, src_rom, in_valid, in_ready, out_valid, busy, done;
  logic [1:0] rom_frame;
  cplx_t      in_data, out_data;
  logic [$clog2(N)-1:0] out_index;

  int n_type1 = 0, n_type2 = 0, n_type3 = 0;
  int n_rom = 0, n_port = 0, n_gap = 0, n_b2b = 0;
  int cycle = 0, last_in_cycle, first_out_cycle;
  int n_out;
  cplx_t got [N];
  logic  seen [N];

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  fft_top #(.N(N)) dut (.*);

  // mechanism counters, observed at the butterfly inputs
  always @(posedge clk) if (rst_n && dut.op_valid)
    for (int j = 0; j < N / 2; j++)
      case (dut.op_t[j])
        BF_TYPE1: n_type1++;
        BF_TYPE2: n_type2++;
        BF_TYPE3: n_type3++;
        default: ;
      endcase

  // result capture (at the falling edge, between two rising edges)
  always @(negedge clk) if (rst_n && out_valid) begin
    if (n_out == 0) first_out_cycle = cycle;
    checks++;
    if (int'(out_index) != n_out) begin
      failures++; $display("FAIL: out_index %0d, expected %0d", out_index, n_out);
    end
    got[out_index]  = out_data;
    seen[out_index] = 1'b1;
    n_out++;
  end

  function automatic cplx_t rom_sample(input int f, input int n);
    cplx_t s;
    s.re = 16'(16 * (((n * (2 * f + 3) + 5 * f) % 32) - 16));
    s.im = 16'(16 * (((n * (f + 5) + 3 * f + 1) % 32) - 16));
    return s;
  endfunction

  function automatic real absr(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  // one frame: x holds the samples; rom selects the ROM as source
  task automatic run_frame(input cplx_t x [N], input logic rom, input int frame,
                           input bit gaps, input bit b2b);
    real xr, xi, ang;
    int  n;
    if (b2b) begin
      // start in the clock in which done of the previous frame is high
      while (!done) @(negedge clk);
      n_b2b++;
    end else begin
      while (busy) @(negedge clk);
      @(negedge clk);
    end
    for (int k = 0; k < N; k++) seen[k] = 0;
    n_out = 0;
    start = 1; src_rom = rom; rom_frame = 2'(frame);
    @(negedge clk);
    start = 0;
    if (rom) n_rom++; else n_port++;
    n = 0;
    while (n < N) begin
      if (rom) begin
        #1;
        if (dut.ld_en) begin last_in_cycle = cycle + 1; n++; end
        @(negedge clk);
      end else begin
        in_valid = gaps ? 1'($urandom % 3 != 0) : 1'b1;
        in_data  = x[n];
        #1;
        if (!in_valid && in_ready) n_gap++;
        if (in_valid && in_ready) begin last_in_cycle = cycle + 1; n++; end
        @(negedge clk);
      end
    end
    in_valid = 0;
    while (!done) @(negedge clk);
    #1;
    checks++;
    if (first_out_cycle - last_in_cycle != M * STAGE_LEN + 1) begin
      failures++;
      $display("FAIL: latency %0d, expected %0d", first_out_cycle - last_in_cycle, M * STAGE_LEN + 1);
    end
    checks++;
    if (n_out != N) begin failures++; $display("FAIL: %0d results, expected %0d", n_out, N); end
    // reference DFT
    for (int k = 0; k < N; k++) begin
      xr = 0.0; xi = 0.0;
      for (int m = 0; m < N; m++) begin
        ang = -2.0 * 3.14159265358979323846 * real'(m * k % N) / real'(N);
        xr += real'(x[m].re) * $cos(ang) - real'(x[m].im) * $sin(ang);
        xi += real'(x[m].re) * $sin(ang) + real'(x[m].im) * $cos(ang);
      end
      checks++;
      if (!seen[k] || absr(real'(got[k].re) - xr) > TOL || absr(real'(got[k].im) - xi) > TOL) begin
        failures++;
        if (failures < 20)
          $display("FAIL: X[%0d] = (%0d,%0d), expected (%.2f,%.2f)", k, got[k].re, got[k].im, xr, xi);
      end
    end
  endtask

  initial begin
    cplx_t x [N];
    checks = 0; failures = 0; finished = 0;
    start = 0; src_rom = 0; rom_frame = 0; in_valid = 0; in_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    for (int f = 0; f < 4; f++) begin
      for (int n = 0; n < N; n++) x[n] = rom_sample(f, n);
      run_frame(x, 1, f, 0, f % 2 == 1);
    end
    for (int i = 0; i < FRAMES; i++) begin
      for (int n = 0; n < N; n++) begin
        x[n].re = 16'(int'($urandom % (2 * AMP + 1)) - AMP);
        x[n].im = 16'(int'($urandom % (2 * AMP + 1)) - AMP);
      end
      run_frame(x, 0, 0, i % 2 == 0, i % 3 == 0);
    end
    $display("N=%0d mechanisms: type1=%0d type2=%0d type3=%0d rom_frames=%0d port_frames=%0d input_gaps=%0d back_to_back=%0d",
             N, n_type1, n_type2, n_type3, n_rom, n_port, n_gap, n_b2b);
    checks++; if (N > 4 && n_type1 == 0) begin failures++; $display("FAIL: no type-1 butterfly"); end
    checks++; if (n_type2 == 0) begin failures++; $display("FAIL: no type-2 butterfly"); end
    checks++; if (n_type3 == 0) begin failures++; $display("FAIL: no type-3 butterfly"); end
    finished = 1;
  end

endmodule
