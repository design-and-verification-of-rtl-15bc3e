// tb_fft_control: runs the control unit together with its timing signal
// generator for an 8-point transform, as the processor does, and checks:
// the Mealy load handshake (in_ready, ld_en follows in_valid, ld_addr counts
// accepted samples), ROM-sourced loading, the three stages with their
// operand-load and write-back strobes, the read addresses, twiddle
// exponents and butterfly types of every butterfly in every stage against
// the radix-2 DIF schedule worked out here, the bit-reversed output read
// order, out_valid/out_index and done.
module tb_fft_control;
  import fft_pkg::*;

  localparam int N = 8, NB = 4, M = 3;
  logic       clk = 0, rst_n = 0;
  logic       start, src_rom, in_valid, in_ready, busy, done;
  phase_t     phase;
  logic       step, t_issue, t_end;
  logic [6:0] t_count;
  logic       ld_en, ld_from_rom, wr_en, out_rd_en, op_load, out_valid;
  logic [2:0] ld_addr, out_addr, out_index;
  logic [2:0] rd_addr [N];
  logic [1:0] tw_k [NB];
  bf_type_t   bf_type [NB];
  logic [1:0] stage;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fft_control dut (.*);
  timing_gen  u_tg (.clk, .rst_n, .phase, .step, .count(t_count), .issue(t_issue), .phase_end(t_end));

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // expected schedule of 8-point DIF: stage s, butterfly j -> top, bottom, k
  function automatic void sched(input int s, input int j, output int top, output int bot, output int k);
    int half;
    half = 4 >> s;                   // 4, 2, 1
    top  = (j / half) * (2 * half) + (j % half);
    bot  = top + half;
    k    = (j % half) * (1 << s);
  endfunction

  task automatic run_frame(input logic rom);
    int n, s, top, bot, k, cyc;
    bf_type_t et;
    @(negedge clk);
    start = 1; src_rom = rom;
    @(negedge clk);
    start = 0;
    chk(busy, "busy after start");
    // load
    n = 0;
    while (n < N) begin
      in_valid = rom ? 1'b0 : 1'($urandom % 2);
      #1;
      chk(in_ready == !rom, "in_ready");
      chk(ld_en == (rom || in_valid), "ld_en Mealy");
      chk(ld_from_rom == rom, "source");
      if (ld_en) begin chk(ld_addr == 3'(n), "ld_addr"); n++; end
      @(negedge clk);
    end
    in_valid = 0;
    // stages
    for (s = 0; s < M; s++) begin
      for (cyc = 0; cyc < STAGE_LEN; cyc++) begin
        #1;
        chk(op_load == (cyc == 0), "op_load timing");
        chk(wr_en == (cyc == STAGE_LEN - 1), "wr_en timing");
        chk(!ld_en && !out_rd_en, "no load/out during stage");
        for (int j = 0; j < NB; j++) begin
          sched(s, j, top, bot, k);
          et = (k == 0) ? BF_TYPE2 : (k == 2) ? BF_TYPE3 : BF_TYPE1;
          chk(rd_addr[2*j] == 3'(top) && rd_addr[2*j+1] == 3'(bot), "butterfly addresses");
          chk(tw_k[j] == 2'(k), "twiddle index");
          chk(bf_type[j] == et, "butterfly type");
        end
        @(negedge clk);
      end
    end
    // output: bit-reversed reads, valid one clock later
    for (n = 0; n < N; n++) begin
      #1;
      chk(out_rd_en, "out_rd_en");
      chk(out_addr == 3'((n & 1) * 4 + ((n >> 1) & 1) * 2 + ((n >> 2) & 1)), "bit-reversed address");
      if (n > 0) chk(out_valid && out_index == 3'(n - 1), "out_valid/out_index");
      @(negedge clk);
    end
    #1;
    chk(out_valid && out_index == 3'(N - 1), "last out_valid");
    chk(done, "done pulse");
    chk(!busy, "idle after done");
    @(negedge clk);
    chk(!done && !out_valid, "done is one clock");
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; src_rom = 0; in_valid = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    chk(!busy && !in_ready, "idle");
    run_frame(1'b0);
    run_frame(1'b1);
    run_frame(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
