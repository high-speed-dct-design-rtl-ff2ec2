// tb_dct8_vedic: end-to-end test of the 8-point Vedic DCT at its default
// sizes (no parameter overrides).
//
// Reference model, worked out here independently of the design:
//  * coefficients c_m = trunc(128 * cos(m*pi/16) / 2), m = 1..7, computed
//    with $cos; they are also compared with the published table
//    (62, 59, 53, 45, 35, 24, 12);
//  * matrix entry (k, i) = c_4 for k = 0, else the Q1.7 value of
//    cos((2i+1)k*pi/16)/2 rounded toward zero, obtained from $cos directly;
//  * Y(k) = floor(sum_i entry(k,i) * X(i) / 2), compared bit-exactly.
// In addition each Y(k)/64 is compared with the exact real-valued DCT
// (unquantised coefficients); the difference must stay within the error the
// 7-bit coefficients allow, sum|X(i)|/128 + 1/64.
//
// Stimulus: constant (DC) vectors, single impulses, alternating-sign vectors
// that drive every output to its largest magnitude, and random vectors.
// Events counted (each must occur at least once): an input of -128, a DC
// vector whose AC outputs are all exactly zero, an output at the extreme
// magnitude 23040, a negative output, a positive output.
module tb_dct8_vedic;
  import dct_pkg::*;

  sample_t  x [N];
  coefout_t y [N];
  int checks = 0, failures = 0;
  int ev_min_input = 0, ev_dc_zero_ac = 0, ev_extreme = 0, ev_neg = 0, ev_pos = 0;
  int cref [N][N];

  dct8_vedic dut (.x(x), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int q17(input real v);
    return int'($rtoi(v * 128.0));   // rounds toward zero
  endfunction

  task automatic check_vector(input string tag);
    int   acc, expy;
    bit   ac_zero;
    real  exact, tol, sabs;
    #1;
    sabs = 0.0;
    for (int i = 0; i < N; i++) begin
      sabs += (x[i] < 0) ? -real'(x[i]) : real'(x[i]);
      if (x[i] == -8'sd128) ev_min_input++;
    end
    ac_zero = 1'b1;
    for (int k = 0; k < N; k++) begin
      acc = 0;
      exact = 0.0;
      for (int i = 0; i < N; i++) begin
        acc += cref[k][i] * int'(x[i]);
        exact += ((k == 0) ? 0.5 / $sqrt(2.0)
                           : 0.5 * $cos(real'((2 * i + 1) * k) * 3.14159265358979 / 16.0))
                 * real'(x[i]);
      end
      expy = acc >>> 1;
      checks++;
      if (int'(y[k]) != expy) begin
        failures++;
        if (failures < 20) $display("FAIL %s Y(%0d): got %0d expected %0d", tag, k, y[k], expy);
      end
      tol = sabs / 128.0 + 1.0 / 64.0 + 1e-9;
      checks++;
      if ((real'(y[k]) / 64.0 - exact) > tol || (exact - real'(y[k]) / 64.0) > tol) begin
        failures++;
        if (failures < 20) $display("FAIL %s Y(%0d): %f vs exact %f", tag, k, real'(y[k]) / 64.0, exact);
      end
      if (k > 0 && y[k] != 0) ac_zero = 1'b0;
      if (y[k] == 16'sd23040 || y[k] == -16'sd23040) ev_extreme++;
      if (y[k] < 0) ev_neg++;
      if (y[k] > 0) ev_pos++;
    end
    if (tag == "dc") begin
      checks++;
      if (!ac_zero) begin
        failures++;
        $display("FAIL dc: AC outputs not zero");
      end else ev_dc_zero_ac++;
    end
  endtask

  initial begin
    static int tab [8] = '{0, 62, 59, 53, 45, 35, 24, 12};
    // Reference coefficient matrix from $cos.
    for (int k = 0; k < N; k++)
      for (int i = 0; i < N; i++)
        cref[k][i] = (k == 0) ? q17(0.5 * $cos(4.0 * 3.14159265358979 / 16.0))
                              : q17(0.5 * $cos(real'((2 * i + 1) * k) * 3.14159265358979 / 16.0));
    // Published table against the cosine formula and against the package.
    for (int m = 1; m < 8; m++) begin
      checks++;
      if (q17(0.5 * $cos(real'(m) * 3.14159265358979 / 16.0)) != tab[m] ||
          int'(C_TAB[m]) != tab[m]) begin
        failures++;
        $display("FAIL coefficient C%0d", m);
      end
    end

    // DC vectors.
    foreach (x[i]) x[i] = 8'sd0;
    check_vector("dc");
    foreach (x[i]) x[i] = 8'sd100;
    check_vector("dc");
    foreach (x[i]) x[i] = -8'sd128;
    check_vector("dc");
    foreach (x[i]) x[i] = 8'sd127;
    check_vector("dc");
    // Impulses: output column i of the matrix.
    for (int i = 0; i < N; i++) begin
      foreach (x[j]) x[j] = 8'sd0;
      x[i] = 8'sd64;
      check_vector("impulse");
      x[i] = -8'sd128;
      check_vector("impulse");
    end
    // Sign patterns matching each row: largest output magnitude.
    for (int k = 0; k < N; k++) begin
      foreach (x[i]) x[i] = (cref[k][i] < 0) ? 8'sd127 : -8'sd128;
      check_vector("extreme");
    end
    // Random vectors.
    for (int n = 0; n < 5000; n++) begin
      foreach (x[i]) x[i] = sample_t'($urandom);
      check_vector("random");
    end

    $display("events: min_input=%0d dc_zero_ac=%0d extreme=%0d neg=%0d pos=%0d",
             ev_min_input, ev_dc_zero_ac, ev_extreme, ev_neg, ev_pos);
    checks++;
    if (ev_min_input == 0 || ev_dc_zero_ac == 0 || ev_extreme == 0 || ev_neg == 0 || ev_pos == 0) begin
      failures++;
      $display("FAIL an event never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
