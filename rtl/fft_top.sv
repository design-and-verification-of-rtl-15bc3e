// fft_top: memory-based radix-2 decimation-in-frequency FFT processor.
//
// N/2 butterfly units work in parallel on one stage of the transform; their
// outputs go back into the RAM and are fed into the same butterflies for the
// next stage, so log2(N) passes over the hardware complete an N-point FFT
// (for N = 8: four butterflies used three times instead of twelve). Units:
//   fft_control   Mealy FSM: sequencing, addressing, butterfly type choice
//   timing_gen    7-bit counter timing each phase for the FSM
//   data_ram      N complex words, holds the samples and each stage's results
//   input_rom     stored test frames, an alternative to the input port
//   twiddle_rom   W_N^k, one lookup per butterfly
//   operand_regs  operands captured from RAM for the butterflies
//   butterfly     N/2 three-stage pipelined butterflies, types 1/2/3, the
//                 type-1 product with three multipliers
//
// Operation: pulse start (with src_rom choosing the source and rom_frame the
// stored frame). From the port, samples are taken in natural order whenever
// in_valid and in_ready are both high; from the ROM one per clock. Then
// log2(N) stages of STAGE_LEN = 5 clocks each run, and the N results leave
// on out_data in natural frequency order, one per clock with out_valid and
// out_index (X[k] = sum x[n] * exp(-j*2*pi*n*k/N), unscaled). done pulses
// after the last one; busy is high from start to done.
// Clock edges from the one that takes the last sample to the one that
// raises out_valid for the first result: log2(N) * 5 + 1 (16 for N = 8).
//
// Data words are 16+16-bit two's complement; there is no scaling between
// stages, so samples must leave log2(N) bits of headroom. The default N = 8
// is the case the design works through; other powers of two (4..64) are
// parameter changes.
module fft_top
  import fft_pkg::*;
#(
  parameter int unsigned N          = 8,
  parameter int unsigned ROM_FRAMES = 4,
  localparam int unsigned AW = $clog2(N),
  localparam int unsigned FW = (ROM_FRAMES > 1) ? $clog2(ROM_FRAMES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          src_rom,
  input  logic [FW-1:0] rom_frame,
  input  logic          in_valid,
  input  cplx_t         in_data,
  output logic          in_ready,
  output logic          out_valid,
  output logic [AW-1:0] out_index,
  output cplx_t         out_data,
  output logic          busy,
  output logic          done
);

  localparam int unsigned NB      = N / 2;
  localparam int unsigned M       = $clog2(N);
  localparam int unsigned KW      = (N > 4) ? $clog2(N / 2) : 1;
  localparam int unsigned SW      = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned COUNT_W = 7;

  // control <-> timing
  phase_t             phase;
  logic               step, t_issue, t_end;
  logic [COUNT_W-1:0] t_count;

  // control <-> datapath
  logic          ld_en, ld_from_rom, wr_en, out_rd_en, op_load;
  logic [AW-1:0] ld_addr, out_addr;
  logic [AW-1:0] rd_addr [N];
  logic [KW-1:0] tw_k    [NB];
  bf_type_t      bf_type [NB];
  logic [SW-1:0] stage;

  fft_control #(.N(N), .COUNT_W(COUNT_W)) u_ctrl (
    .clk, .rst_n, .start, .src_rom, .in_valid, .in_ready, .busy, .done,
    .phase, .step, .t_count, .t_issue, .t_end,
    .ld_en, .ld_from_rom, .ld_addr, .rd_addr, .wr_en, .out_rd_en, .out_addr,
    .op_load, .tw_k, .bf_type, .stage, .out_valid, .out_index
  );

  timing_gen #(.N(N), .COUNT_W(COUNT_W)) u_timing (
    .clk, .rst_n, .phase, .step,
    .count(t_count), .issue(t_issue), .phase_end(t_end)
  );

  // input source: port or ROM
  cplx_t rom_data, ld_data;

  input_rom #(.N(N), .FRAMES(ROM_FRAMES)) u_in_rom (
    .frame(rom_frame), .addr(ld_addr), .data(rom_data)
  );

  assign ld_data = ld_from_rom ? rom_data : in_data;

  // RAM
  cplx_t rd_data [N];
  cplx_t wr_data [N];

  data_ram #(.N(N)) u_ram (
    .clk, .rst_n,
    .ld_en, .ld_addr, .ld_data,
    .rd_addr, .rd_data, .wr_en, .wr_addr(rd_addr), .wr_data,
    .out_rd_en, .out_addr, .out_data
  );

  // twiddles and operand registers
  twiddle_t w     [NB];
  cplx_t    op_a  [NB];
  cplx_t    op_b  [NB];
  twiddle_t op_w  [NB];
  bf_type_t op_t  [NB];
  cplx_t    sel_a [NB];
  cplx_t    sel_b [NB];
  logic     op_valid;

  for (genvar j = 0; j < NB; j++) begin : g_tw
    twiddle_rom #(.N(N)) u_tw (.k(tw_k[j]), .w(w[j]));
    assign sel_a[j] = rd_data[2*j];
    assign sel_b[j] = rd_data[2*j+1];
  end

  operand_regs #(.NB(NB)) u_opregs (
    .clk, .rst_n, .load(op_load),
    .a_in(sel_a), .b_in(sel_b), .w_in(w), .type_in(bf_type),
    .valid(op_valid), .a_q(op_a), .b_q(op_b), .w_q(op_w), .type_q(op_t)
  );

  // butterflies
  logic [NB-1:0] bu_valid;

  for (genvar j = 0; j < NB; j++) begin : g_bu
    butterfly u_bu (
      .clk, .rst_n,
      .in_valid (op_valid),
      .a        (op_a[j]),
      .b        (op_b[j]),
      .w        (op_w[j]),
      .bf_type  (op_t[j]),
      .out_valid(bu_valid[j]),
      .y0       (wr_data[2*j]),
      .y1       (wr_data[2*j+1])
    );
  end

  // the write-back strobe of the timing generator must meet the butterfly
  // results
  always_ff @(posedge clk) begin
    if (rst_n && wr_en) a_wb_aligned: assert (&bu_valid);
  end

endmodule
