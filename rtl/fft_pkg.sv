// fft_pkg: types and constants shared by the memory-based FFT processor.
//
// Samples are complex words of two DATA_W-bit two's-complement halves
// (16-bit real, 16-bit imaginary, i.e. one 32-bit RAM word per sample).
// The worked multiplication example of the design uses 4 fractional bits
// (Q12.4) for data; the FFT datapath itself is format-agnostic, only the
// twiddle factors carry a fixed format, Q2.14 (TW_FRAC = 14), which is this
// design's own choice.
//
// The butterfly "type" encodes which twiddle factor a butterfly applies:
//   BF_TYPE1: general complex twiddle, uses the 3-multiplier product
//   BF_TYPE2: twiddle = 1, no multiplication
//   BF_TYPE3: twiddle = -j, swap/negate only, no multiplication
package fft_pkg;

  localparam int unsigned DATA_W  = 16;
  localparam int unsigned TW_W    = 16;
  localparam int unsigned TW_FRAC = 14;

  typedef struct packed {
    logic signed [DATA_W-1:0] re;
    logic signed [DATA_W-1:0] im;
  } cplx_t;

  typedef struct packed {
    logic signed [TW_W-1:0] re;
    logic signed [TW_W-1:0] im;
  } twiddle_t;

  typedef enum logic [1:0] {
    BF_TYPE1 = 2'd1,
    BF_TYPE2 = 2'd2,
    BF_TYPE3 = 2'd3
  } bf_type_t;

  // Phases of one transform, shared by the control unit and the timing
  // signal generator.
  typedef enum logic [1:0] {
    PH_IDLE  = 2'd0,
    PH_LOAD  = 2'd1,
    PH_STAGE = 2'd2,
    PH_OUT   = 2'd3
  } phase_t;

  // Latency of the butterfly pipeline and length of one stage in clocks:
  // operand register load, BU_LAT butterfly stages, RAM write-back.
  localparam int unsigned BU_LAT    = 3;
  localparam int unsigned STAGE_LEN = BU_LAT + 2;

  // Reverse the low `bits` bits of `v`.
  function automatic int unsigned bitrev(input int unsigned v, input int unsigned bits);
    int unsigned r;
    r = 0;
    for (int unsigned i = 0; i < bits; i++)
      if (((v >> i) & 1) != 0) r |= (1 << (bits - 1 - i));
    return r;
  endfunction

  // Butterfly type for twiddle exponent k of an n-point transform (W_n^k).
  function automatic bf_type_t bf_type_of(input int unsigned k, input int unsigned n);
    if (k == 0) return BF_TYPE2;
    else if (4 * k == n) return BF_TYPE3;
    else return BF_TYPE1;
  endfunction

endpackage
