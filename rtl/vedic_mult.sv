// vedic_mult: signed W x W multiplier on top of the unsigned Vedic/Wallace
// core (vedic_core).
//
// The operands are two's complement. Their magnitudes are multiplied by the
// unsigned core and the product is negated when the operand signs differ
// (sign-magnitude handling is this implementation's choice; the design only
// states that its multiplier is signed). The most negative input, -2^(W-1),
// has a magnitude that still fits W unsigned bits, so every input pair is
// exact.
//
// Interface: a, b signed W bits; p signed 2W bits. Combinational, no clock.
// Default W = 16, the word length the design sizes its multiplier for.
module vedic_mult #(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0]   a,
  input  logic signed [W-1:0]   b,
  output logic signed [2*W-1:0] p
);

  logic [W-1:0]   mag_a, mag_b;
  logic [2*W-1:0] mag_p;
  logic           neg;

  always_comb begin
    mag_a = a[W-1] ? W'(-a) : W'(a);
    mag_b = b[W-1] ? W'(-b) : W'(b);
    neg   = a[W-1] ^ b[W-1];
  end

  vedic_core #(.W(W)) u_core (.a(mag_a), .b(mag_b), .p(mag_p));

  assign p = neg ? -$signed(mag_p) : $signed(mag_p);

endmodule
