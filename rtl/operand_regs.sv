// operand_regs: register bank between the control unit and the butterflies.
//
// When load is high the operands the control unit has picked out of the RAM
// for each of the NB butterflies (A, B), together with that butterfly's
// twiddle factor and type, are captured; the registers then hold them and
// present them to the butterfly unit with valid high for exactly one clock
// per load. This keeps the RAM read, the address arithmetic and the twiddle
// lookup out of the butterfly's first pipeline stage.
//
// Interface: arrays indexed by butterfly number; outputs are registered
// (one clock after load). Reset clears the registers and valid.
module operand_regs
  import fft_pkg::*;
#(
  parameter int unsigned NB = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     load,
  input  cplx_t    a_in    [NB],
  input  cplx_t    b_in    [NB],
  input  twiddle_t w_in    [NB],
  input  bf_type_t type_in [NB],
  output logic     valid,
  output cplx_t    a_q     [NB],
  output cplx_t    b_q     [NB],
  output twiddle_t w_q     [NB],
  output bf_type_t type_q  [NB]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
      for (int j = 0; j < NB; j++) begin
        a_q[j]    <= '0;
        b_q[j]    <= '0;
        w_q[j]    <= '0;
        type_q[j] <= BF_TYPE2;
      end
    end else begin
      valid <= load;
      if (load) begin
        for (int j = 0; j < NB; j++) begin
          a_q[j]    <= a_in[j];
          b_q[j]    <= b_in[j];
          w_q[j]    <= w_in[j];
          type_q[j] <= type_in[j];
        end
      end
    end
  end

endmodule
