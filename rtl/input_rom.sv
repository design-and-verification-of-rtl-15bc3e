// input_rom: read-only store of test input frames for the FFT processor.
//
// The design keeps its input samples in ROM because an FPGA has too few
// pins to bring a whole frame in parallel. This ROM holds FRAMES frames of
// N complex samples. The contents are a fixed integer pattern of this
// design's own choosing, computed at elaboration:
//   re(f, n) = 16 * (((n*(2f+3) + 5f) mod 32) - 16)
//   im(f, n) = 16 * (((n*(f+5) + 3f + 1) mod 32) - 16)
// i.e. Q12.4 values in [-16, 15], which leave the 16-bit datapath enough
// headroom for transforms up to 64 points without overflow.
//
// Interface: frame and addr select the sample; data is combinational
// (asynchronous read).
module input_rom
  import fft_pkg::*;
#(
  parameter int unsigned N      = 8,
  parameter int unsigned FRAMES = 4,
  localparam int unsigned AW = $clog2(N),
  localparam int unsigned FW = (FRAMES > 1) ? $clog2(FRAMES) : 1
) (
  input  logic [FW-1:0] frame,
  input  logic [AW-1:0] addr,
  output cplx_t         data
);

  function automatic cplx_t sample(input int unsigned f, input int unsigned n);
    cplx_t s;
    s.re = DATA_W'(16 * (int'((n * (2 * f + 3) + 5 * f) % 32) - 16));
    s.im = DATA_W'(16 * (int'((n * (f + 5) + 3 * f + 1) % 32) - 16));
    return s;
  endfunction

  cplx_t table_q [FRAMES * N];

  for (genvar f = 0; f < FRAMES; f++) begin : g_f
    for (genvar n = 0; n < N; n++) begin : g_n
      localparam cplx_t ENTRY = sample(f, n);
      assign table_q[f * N + n] = ENTRY;
    end
  end

  always_comb begin
    data = '0;
    if (32'(frame) < FRAMES) data = table_q[32'(frame) * N + 32'(addr)];
  end

endmodule
