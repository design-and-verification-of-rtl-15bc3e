// tb_data_ram: self-checking test of the FFT working RAM (N = 8).
// Loads a frame through the load port, reads it on the parallel read ports,
// writes all words at once through the stage ports with a permuted address
// set, and reads back through the registered output port (one clock
// latency, holds when out_rd_en is low).
module tb_data_ram;
  import fft_pkg::*;

  localparam int N = 8;
  logic          clk = 0, rst_n = 0;
  logic          ld_en, wr_en, out_rd_en;
  logic [2:0]    ld_addr, out_addr;
  cplx_t         ld_data, out_data;
  logic [2:0]    rd_addr [N];
  logic [2:0]    wr_addr [N];
  cplx_t         rd_data [N];
  cplx_t         wr_data [N];
  cplx_t         model   [N];

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  data_ram dut (.*);

  task automatic check_all_reads();
    for (int p = 0; p < N; p++) rd_addr[p] = 3'(N - 1 - p);
    #1;
    for (int p = 0; p < N; p++) begin
      checks++;
      if (rd_data[p] !== model[N - 1 - p]) begin
        failures++; $display("FAIL read port %0d", p);
      end
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
    ld_en = 0; wr_en = 0; out_rd_en = 0; ld_addr = 0; out_addr = 0; ld_data = '0;
    for (int p = 0; p < N; p++) begin rd_addr[p] = 0; wr_addr[p] = 0; wr_data[p] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      // load port, one word per clock
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        ld_en = 1; ld_addr = 3'(i); ld_data = cplx_t'($urandom);
        model[i] = ld_data;
      end
      @(negedge clk);
      ld_en = 0;
      check_all_reads();
      // stage write through a random permutation of addresses
      begin
        int perm [N];
        for (int i = 0; i < N; i++) perm[i] = i;
        perm.shuffle();
        for (int p = 0; p < N; p++) begin
          wr_addr[p] = 3'(perm[p]);
          wr_data[p] = cplx_t'($urandom);
        end
        wr_en = 1;
        @(negedge clk);
        wr_en = 0;
        for (int p = 0; p < N; p++) model[perm[p]] = wr_data[p];
      end
      check_all_reads();
      // registered output port
      for (int i = 0; i < N; i++) begin
        out_rd_en = 1; out_addr = 3'(i);
        #1;
        checks++;
        if (i > 0 && out_data !== model[i - 1]) begin failures++; $display("FAIL out port early/late at %0d", i); end
        @(negedge clk);
        checks++;
        if (out_data !== model[i]) begin failures++; $display("FAIL out port %0d", i); end
      end
      out_rd_en = 0; out_addr = 0;
      @(negedge clk);
      checks++;
      if (out_data !== model[N - 1]) begin failures++; $display("FAIL out port hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
