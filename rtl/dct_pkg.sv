// dct_pkg: sizes, types and cosine coefficients of the 8-point DCT.
//
// Coefficients are C_m = cos(m*pi/16) / 2 for m = 1..7, rounded toward zero
// to 8-bit two's complement with 7 fraction bits (Q1.7): the stored integer
// is trunc(128 * C_m). The values (62, 59, 53, 45, 35, 24, 12) and their
// negations are the published coefficient table. The 8x8 DCT matrix entry
// for output k and input i is
//     k == 0 : C_4
//     k  > 0 : cos((2i+1)*k*pi/16) / 2, written as +/- C_m by folding the
//              angle m = (2i+1)*k mod 32 into the range 0..8,
// which reproduces the usual matrix (row 1: C1 C3 C5 C7 -C7 -C5 -C3 -C1 ...).
package dct_pkg;
  localparam int N    = 8;   // points per transform
  localparam int XW   = 8;   // input sample width (signed)
  localparam int CW   = 8;   // coefficient width (signed Q1.7)
  localparam int PW   = 16;  // product width
  localparam int YW   = 16;  // output width (signed Q10.6)

  typedef logic signed [XW-1:0] sample_t;
  typedef logic signed [CW-1:0] coef_t;
  typedef logic signed [YW-1:0] coefout_t;

  // Published coefficient magnitudes, index m = 1..7 (index 0 unused).
  localparam coef_t C_TAB [8] = '{8'sd0, 8'sd62, 8'sd59, 8'sd53,
                                   8'sd45, 8'sd35, 8'sd24, 8'sd12};

  // Matrix entry for output k, input i.
  function automatic coef_t dct_coef(input int k, input int i);
    int m;
    bit neg;
    if (k == 0) return C_TAB[4];
    m = ((2 * i + 1) * k) % 32;
    if (m > 16) m = 32 - m;        // cos(2pi - t) = cos(t)
    neg = 1'b0;
    if (m > 8) begin                // cos(pi - t) = -cos(t)
      m   = 16 - m;
      neg = 1'b1;
    end
    return neg ? -C_TAB[m] : C_TAB[m];
  endfunction
endpackage
