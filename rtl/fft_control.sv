// fft_control: control unit of the memory-based FFT processor.
//
// A Mealy state machine that runs one N-point radix-2 decimation-in-
// frequency transform on the N/2 butterflies, M = log2(N) times over:
//   S_IDLE    wait for start; latch the source (input port or input ROM)
//   S_LOAD    write N samples into RAM in natural order; from the input
//             port one per accepted in_valid (in_ready is high), from the
//             ROM one per clock
//   S_STAGE   one pass of all butterflies per stage: on the timing
//             generator's issue strobe the operand registers capture the
//             pairs picked from RAM, on phase_end the butterfly results are
//             written back in place; after stage M-1 go to S_OUT
//   S_OUT     read the RAM in bit-reversed address order, so results leave
//             in natural frequency order, one per clock; then done
// Phase lengths come from timing_gen (count, issue, phase_end).
//
// Addressing in stage s (span = N >> (s+1)): butterfly j works on
//   top = (j / span) * 2 * span + (j mod span),  bottom = top + span,
// with twiddle exponent k = (j mod span) << s. The control unit also chooses
// each butterfly's type from k: k = 0 gives type 2 (W = 1), k = N/4 type 3
// (W = -j), any other k type 1.
//
// The FSM, its Mealy form, the states' purpose and the type selection follow
// the design; state encoding, the port handshake (in_valid/in_ready) and
// the bit-reversed unload are this design's choices.
module fft_control
  import fft_pkg::*;
#(
  parameter int unsigned N       = 8,
  parameter int unsigned COUNT_W = 7,
  localparam int unsigned AW = $clog2(N),
  localparam int unsigned M  = $clog2(N),
  localparam int unsigned NB = N / 2,
  localparam int unsigned KW = (N > 4) ? $clog2(N / 2) : 1,
  localparam int unsigned SW = (M > 1) ? $clog2(M) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // command
  input  logic               start,
  input  logic               src_rom,
  input  logic               in_valid,
  output logic               in_ready,
  output logic               busy,
  output logic               done,
  // timing signal generator
  output phase_t             phase,
  output logic               step,
  input  logic [COUNT_W-1:0] t_count,
  input  logic               t_issue,
  input  logic               t_end,
  // RAM
  output logic               ld_en,
  output logic               ld_from_rom,
  output logic [AW-1:0]      ld_addr,
  output logic [AW-1:0]      rd_addr [N],
  output logic               wr_en,
  output logic               out_rd_en,
  output logic [AW-1:0]      out_addr,
  // operand registers / butterflies
  output logic               op_load,
  output logic [KW-1:0]      tw_k    [NB],
  output bf_type_t           bf_type [NB],
  output logic [SW-1:0]      stage,
  // result strobe, aligned with the RAM's registered output
  output logic               out_valid,
  output logic [AW-1:0]      out_index
);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_STAGE, S_OUT} state_t;

  state_t state, state_n;
  logic   src_q;

  always_comb begin
    state_n = state;
    unique case (state)
      S_IDLE:  if (start) state_n = S_LOAD;
      S_LOAD:  if (t_end) state_n = S_STAGE;
      S_STAGE: if (t_end && stage == SW'(M - 1)) state_n = S_OUT;
      S_OUT:   if (t_end) state_n = S_IDLE;
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      src_q     <= 1'b0;
      stage     <= '0;
      done      <= 1'b0;
      out_valid <= 1'b0;
      out_index <= '0;
    end else begin
      state     <= state_n;
      done      <= (state == S_OUT) && t_end;
      out_valid <= out_rd_en;
      out_index <= AW'(t_count);
      if (state == S_IDLE && start) src_q <= src_rom;
      if (state == S_LOAD)          stage <= '0;
      else if (state == S_STAGE && t_end)
        stage <= (stage == SW'(M - 1)) ? '0 : stage + 1'b1;
    end
  end

  // Mealy outputs
  always_comb begin
    phase       = PH_IDLE;
    in_ready    = 1'b0;
    ld_en       = 1'b0;
    step        = 1'b0;
    wr_en       = 1'b0;
    op_load     = 1'b0;
    out_rd_en   = 1'b0;
    unique case (state)
      S_LOAD: begin
        phase    = PH_LOAD;
        in_ready = !src_q;
        ld_en    = src_q || in_valid;
        step     = ld_en;
      end
      S_STAGE: begin
        phase   = PH_STAGE;
        op_load = t_issue;
        wr_en   = t_end;
      end
      S_OUT: begin
        phase     = PH_OUT;
        out_rd_en = 1'b1;
      end
      default: ;
    endcase
    busy        = (state != S_IDLE);
    ld_from_rom = src_q;
    ld_addr     = AW'(t_count);
    out_addr    = AW'(bitrev(int'(t_count), M));
  end

  // butterfly addressing and type selection for the current stage
  always_comb begin
    int unsigned span, grp, pos, top, k;
    span = N >> (int'(stage) + 1);
    for (int unsigned j = 0; j < NB; j++) begin
      grp            = j / span;
      pos            = j % span;
      top            = grp * 2 * span + pos;
      k              = pos << stage;
      rd_addr[2*j]   = AW'(top);
      rd_addr[2*j+1] = AW'(top + span);
      tw_k[j]        = KW'(k);
      bf_type[j]     = bf_type_of(k, N);
    end
  end

endmodule
