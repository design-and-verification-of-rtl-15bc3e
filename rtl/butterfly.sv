// butterfly: radix-2 decimation-in-frequency butterfly with the three
// butterfly types of the design, as a three-stage pipeline.
//
//   y0 = A + B
//   y1 = (A - B) * W
// where the butterfly type selected by the control unit says what W is:
//   BF_TYPE1  W general (x1 + j*y1): (A - B) goes through the 3-multiplier
//             complex multiplier (complex_mult)
//   BF_TYPE2  W = 1: y1 = A - B, no multiplication
//   BF_TYPE3  W = -j: y1 = Im(A-B) - j*Re(A-B), no multiplication
//
// Pipeline (LATENCY = 3 clocks from in_valid to out_valid):
//   stage 1  A+B and A-B, registered together with W and the type
//   stage 2  the complex multiplier's product register; A+B and A-B delayed
//   stage 3  final subtractions of the multiplier, rounding of the product
//            back to the data format, type selection; output register
// A new operand pair may be accepted every clock.
//
// Number format: W is Q2.14 (TW_FRAC fraction bits, the design's own
// choice); the product is rounded half-up and shifted right by TW_FRAC so
// y1 has the fraction bits of the data. No scaling between stages: y0 and
// y1 are truncated to DATA_W bits, so the caller leaves log2(N) bits of
// headroom in its input samples (not specified by the design; chosen here).
module butterfly
  import fft_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  cplx_t    a,
  input  cplx_t    b,
  input  twiddle_t w,
  input  bf_type_t bf_type,
  output logic     out_valid,
  output cplx_t    y0,
  output cplx_t    y1
);

  localparam int unsigned EW  = DATA_W + 1;                       // A+B, A-B width
  localparam int unsigned MW  = ((TW_W > EW) ? TW_W : EW) + 1;
  localparam int unsigned P_W = 2 * MW + 1;

  // ---- stage 1 ----
  logic signed [EW-1:0] s1_sum_re, s1_sum_im, s1_dif_re, s1_dif_im;
  twiddle_t             s1_w;
  bf_type_t             s1_type;
  logic                 s1_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_sum_re <= '0; s1_sum_im <= '0;
      s1_dif_re <= '0; s1_dif_im <= '0;
      s1_w      <= '0;
      s1_type   <= BF_TYPE2;
      s1_valid  <= 1'b0;
    end else begin
      s1_sum_re <= EW'(a.re) + EW'(b.re);
      s1_sum_im <= EW'(a.im) + EW'(b.im);
      s1_dif_re <= EW'(a.re) - EW'(b.re);
      s1_dif_im <= EW'(a.im) - EW'(b.im);
      s1_w      <= w;
      s1_type   <= bf_type;
      s1_valid  <= in_valid;
    end
  end

  // ---- stage 2: multiplier product register lives in complex_mult ----
  logic signed [P_W-1:0] prod_re, prod_im;

  complex_mult #(.Z1_W(TW_W), .Z2_W(EW)) u_cmul (
    .clk    (clk),
    .rst_n  (rst_n),
    .z1_re  (s1_w.re),
    .z1_im  (s1_w.im),
    .z2_re  (s1_dif_re),
    .z2_im  (s1_dif_im),
    .prod_re(prod_re),
    .prod_im(prod_im)
  );

  logic signed [EW-1:0] s2_sum_re, s2_sum_im, s2_dif_re, s2_dif_im;
  bf_type_t             s2_type;
  logic                 s2_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_sum_re <= '0; s2_sum_im <= '0;
      s2_dif_re <= '0; s2_dif_im <= '0;
      s2_type   <= BF_TYPE2;
      s2_valid  <= 1'b0;
    end else begin
      s2_sum_re <= s1_sum_re; s2_sum_im <= s1_sum_im;
      s2_dif_re <= s1_dif_re; s2_dif_im <= s1_dif_im;
      s2_type   <= s1_type;
      s2_valid  <= s1_valid;
    end
  end

  // ---- stage 3: rounding, type selection, output register ----
  localparam logic signed [P_W-1:0] HALF = P_W'(1) <<< (TW_FRAC - 1);
  logic signed [P_W-1:0] rnd_re, rnd_im;
  cplx_t                 y1_next;

  always_comb begin
    rnd_re = (prod_re + HALF) >>> TW_FRAC;
    rnd_im = (prod_im + HALF) >>> TW_FRAC;
    unique case (s2_type)
      BF_TYPE1: begin
        y1_next.re = DATA_W'(rnd_re);
        y1_next.im = DATA_W'(rnd_im);
      end
      BF_TYPE3: begin
        y1_next.re = DATA_W'(s2_dif_im);
        y1_next.im = DATA_W'(-s2_dif_re);
      end
      default: begin
        y1_next.re = DATA_W'(s2_dif_re);
        y1_next.im = DATA_W'(s2_dif_im);
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y0        <= '0;
      y1        <= '0;
      out_valid <= 1'b0;
    end else begin
      y0.re     <= DATA_W'(s2_sum_re);
      y0.im     <= DATA_W'(s2_sum_im);
      y1        <= y1_next;
      out_valid <= s2_valid;
    end
  end

endmodule
