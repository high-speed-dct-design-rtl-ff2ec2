// dct8_vedic: 8-point one-dimensional discrete cosine transform whose 64
// multiplications are done by Urdhva-Tiryak (Vedic) multipliers.
//
// It computes Y(k) = sum_i M[k][i] * X(i), k = 0..7, the direct
// matrix-vector form of the DCT. M holds the 8-bit Q1.7 cosine coefficients
// of dct_pkg (M[0][i] = C4, the 1/sqrt(2)-scaled DC row). Every product
// M[k][i] * X(i) is formed by its own vedic_mult_signed instance with the
// coefficient as a constant operand; the eight 16-bit products of a row are
// added exactly in ACCW = 19 bits and the sum is shifted right by one bit
// (floor) to fit the 16-bit output.
//
// Number formats: X(i) is a signed 8-bit integer sample (for image data,
// the level-shifted pixel p - 128). A product carries 7 fraction bits, so
// Y(k) is a signed 16-bit value with 6 fraction bits: Y(k) / 64 is the
// transform coefficient. |Y| <= 128 * 360 / 2 = 23040, so nothing saturates.
//
// Interface: x[0..7] (sample_t) -> y[0..7] (16-bit signed).
// Timing: purely combinational (no clock or registers); a new vector can be
// applied as soon as the previous outputs have been taken.
//
// Follows the document: 8-point DCT matrix, its two's complement coefficient
// table, one Vedic multiplier per matrix entry, combinational structure,
// 64 input and 128 output pins. This design's own choices: signed input
// samples, the sign-magnitude multiplier wrapper, the plain adder for the
// row sums and the one-bit output shift.
module dct8_vedic
  import dct_pkg::*;
(
  input  sample_t  x [N],
  output coefout_t y [N]
);
  localparam int ACCW = PW + $clog2(N);  // exact sum of N products

  logic signed [PW-1:0] prod [N][N];

  for (genvar k = 0; k < N; k++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_col
      localparam coef_t COEF = dct_coef(k, i);
      vedic_mult_signed #(.W(XW)) u_mul (
        .x(x[i]),
        .y(COEF),
        .p(prod[k][i])
      );
    end

    logic signed [ACCW-1:0] acc;
    always_comb begin
      acc = '0;
      for (int i = 0; i < N; i++) acc += ACCW'(prod[k][i]);
      y[k] = coefout_t'(acc >>> 1);
    end
  end
endmodule
