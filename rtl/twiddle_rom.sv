// twiddle_rom: read-only table of the twiddle factors W_N^k, k = 0..N/2-1.
//
//   W_N^k = cos(2*pi*k/N) - j*sin(2*pi*k/N)
// stored as twiddle_t in Q2.14 (TW_FRAC fraction bits), rounded to nearest.
// The table is computed when the design is elaborated, so a change of N
// needs no data file. The design keeps the twiddle factors in ROM because
// each butterfly position uses a fixed one; its format is this design's
// choice.
//
// Interface: k selects the entry; w is the factor, combinational (an
// asynchronous-read ROM). Parameter N is the transform length (power of
// two, at least 4).
module twiddle_rom
  import fft_pkg::*;
#(
  parameter int unsigned N = 8,
  localparam int unsigned KW = (N > 4) ? $clog2(N / 2) : 1
) (
  input  logic [KW-1:0] k,
  output twiddle_t      w
);

  localparam real PI = 3.14159265358979323846;

  function automatic int round_to_int(input real x);
    if (x >= 0.0) return $rtoi(x + 0.5);
    else          return -$rtoi(0.5 - x);
  endfunction

  function automatic twiddle_t tw_value(input int unsigned idx);
    twiddle_t t;
    real      ang;
    ang  = 2.0 * PI * real'(idx) / real'(N);
    t.re = TW_W'(round_to_int($cos(ang) * real'(1 << TW_FRAC)));
    t.im = TW_W'(round_to_int(-$sin(ang) * real'(1 << TW_FRAC)));
    return t;
  endfunction

  twiddle_t table_q [N/2];

  for (genvar i = 0; i < N / 2; i++) begin : g_tab
    localparam twiddle_t ENTRY = tw_value(i);
    assign table_q[i] = ENTRY;
  end

  assign w = table_q[k];

endmodule
