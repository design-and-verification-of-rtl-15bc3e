// complex_mult: complex product with three real multiplications.
//
// For Z1 = x1 + j*y1 (the twiddle factor) and Z2 = x2 + j*y2 (the data),
//   m1 = x1*(x2 + y2),  m2 = y2*(x1 + y1),  m3 = x2*(x1 - y1)
//   Re = m1 - m2 = x1*x2 - y1*y2
//   Im = m1 - m3 = x1*y2 + y1*x2
// i.e. three multipliers, two adders and three subtracters instead of four
// multipliers, one adder and one subtracter. This rearrangement is the one
// the design proposes; each multiplier is a signed Vedic/Wallace multiplier
// (vedic_mult).
//
// Timing: the pre-additions and the three multiplications form one pipeline
// stage ending in a register; the two final subtractions are combinational
// after it, so re/im follow the inputs by one clock (LATENCY = 1). The
// caller registers the result. The output is the exact, unscaled product:
// its fraction bits are those of x1 plus those of x2.
//
// Interface: z1_re/z1_im are Z1_W bits, z2_re/z2_im Z2_W bits, all signed;
// prod_re/prod_im are P_W = 2*(max(Z1_W, Z2_W) + 1) + 1 bits.
module complex_mult #(
  parameter int unsigned Z1_W = 16,
  parameter int unsigned Z2_W = 16,
  localparam int unsigned MW  = ((Z1_W > Z2_W) ? Z1_W : Z2_W) + 1,
  localparam int unsigned P_W = 2 * MW + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [Z1_W-1:0] z1_re,
  input  logic signed [Z1_W-1:0] z1_im,
  input  logic signed [Z2_W-1:0] z2_re,
  input  logic signed [Z2_W-1:0] z2_im,
  output logic signed [P_W-1:0]  prod_re,
  output logic signed [P_W-1:0]  prod_im
);

  logic signed [MW-1:0]   x1, y1, x2, y2;
  logic signed [MW-1:0]   s_x2y2, s_x1y1, d_x1y1;
  logic signed [2*MW-1:0] m1, m2, m3;
  logic signed [2*MW-1:0] m1_q, m2_q, m3_q;

  always_comb begin
    x1     = MW'(z1_re);
    y1     = MW'(z1_im);
    x2     = MW'(z2_re);
    y2     = MW'(z2_im);
    s_x2y2 = x2 + y2;
    s_x1y1 = x1 + y1;
    d_x1y1 = x1 - y1;
  end

  vedic_mult #(.W(MW)) u_m1 (.a(x1), .b(s_x2y2), .p(m1));
  vedic_mult #(.W(MW)) u_m2 (.a(y2), .b(s_x1y1), .p(m2));
  vedic_mult #(.W(MW)) u_m3 (.a(x2), .b(d_x1y1), .p(m3));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m1_q <= '0;
      m2_q <= '0;
      m3_q <= '0;
    end else begin
      m1_q <= m1;
      m2_q <= m2;
      m3_q <= m3;
    end
  end

  always_comb begin
    prod_re = P_W'(m1_q) - P_W'(m2_q);
    prod_im = P_W'(m1_q) - P_W'(m3_q);
  end

endmodule
