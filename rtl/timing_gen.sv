// timing_gen: timing signal generator of the FFT processor.
//
// A 7-bit counter, kept apart from the control FSM, that times every phase
// of a transform and tells the FSM when the phase is over:
//   PH_LOAD   counts accepted samples (step); phase_end with the N-th
//   PH_STAGE  counts clocks; issue on count 0 (operand registers load),
//             phase_end on count STAGE_LEN-1 (butterfly results are valid
//             and are written back to RAM)
//   PH_OUT    counts clocks; phase_end on count N-1
//   PH_IDLE   counter held at zero
// The counter returns to zero after phase_end, so consecutive stages are
// timed without the FSM touching it. All outputs are combinational from the
// counter and the inputs (count is a register); the FSM samples them on the
// same clock edge.
// The separate generator and the 7-bit counter follow the design; which
// strobes it makes is this design's choice.
module timing_gen
  import fft_pkg::*;
#(
  parameter int unsigned N       = 8,
  parameter int unsigned COUNT_W = 7
) (
  input  logic               clk,
  input  logic               rst_n,
  input  phase_t             phase,
  input  logic               step,
  output logic [COUNT_W-1:0] count,
  output logic               issue,
  output logic               phase_end
);

  logic inc;

  always_comb begin
    issue     = 1'b0;
    phase_end = 1'b0;
    inc       = 1'b0;
    unique case (phase)
      PH_LOAD: begin
        inc       = step;
        phase_end = step && (count == COUNT_W'(N - 1));
      end
      PH_STAGE: begin
        inc       = 1'b1;
        issue     = (count == '0);
        phase_end = (count == COUNT_W'(STAGE_LEN - 1));
      end
      PH_OUT: begin
        inc       = 1'b1;
        phase_end = (count == COUNT_W'(N - 1));
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                             count <= '0;
    else if (phase == PH_IDLE || phase_end) count <= '0;
    else if (inc)                           count <= count + 1'b1;
  end

  initial assert (N <= (1 << COUNT_W) && STAGE_LEN <= (1 << COUNT_W))
    else $error("timing_gen: counter too narrow for N");

endmodule
