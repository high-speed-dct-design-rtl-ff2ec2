// vedic_mult_signed: two's complement W x W multiplier around the unsigned
// Urdhva-Tiryak core (vedic_mult).
//
// Each operand is reduced to its magnitude (a W-bit unsigned value, so the
// most negative number -2^(W-1) is represented exactly), the magnitudes are
// multiplied by vedic_mult, and the product is negated when the operand signs
// differ. |x*y| <= 2^(2W-2), so the 2W-bit signed result never overflows.
//
// Interface: x, y (signed, W bits) -> p (signed, 2W bits).
// Timing: purely combinational.
//
// The document multiplies two's complement DCT coefficients but does not say
// how signs are handled; the sign-magnitude wrapper is this design's choice.
module vedic_mult_signed #(
  parameter int unsigned W = 8
) (
  input  logic signed [W-1:0]   x,
  input  logic signed [W-1:0]   y,
  output logic signed [2*W-1:0] p
);
  logic [W-1:0]   mag_x, mag_y;
  logic [2*W-1:0] mag_p;
  logic           neg;

  always_comb begin
    mag_x = x[W-1] ? W'(-x) : W'(x);
    mag_y = y[W-1] ? W'(-y) : W'(y);
    neg   = x[W-1] ^ y[W-1];
  end

  vedic_mult #(.W(W)) u_core (.a(mag_x), .b(mag_y), .p(mag_p));

  assign p = neg ? -$signed(mag_p) : $signed(mag_p);
endmodule
