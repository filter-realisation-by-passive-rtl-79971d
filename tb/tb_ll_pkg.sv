// tb_ll_pkg: self-checking testbench for the arithmetic of ll_pkg.
//
// coef_fixed(): coefficient truncation to 8 and 4 mantissa bits against
// values worked out by hand (e.g. 0.5651 to 4 bits: 0.5625; -0.9668 to 4
// bits: -1.0; 0.3541 to 4 bits: 0.34375; -0.01587 to 4 bits: -9 * 2^-9).
// cmul(): random products against a floor computed in real arithmetic.
// to_sample(): saturation at both ends.
module tb_ll_pkg;
  import ll_pkg::*;

  int checks = 0;
  int failures = 0;

  task automatic expect_coef(real c, int mant, real want);
    real got;
    got = real'(coef_fixed(c, mant, COEF_FRAC)) / 65536.0;
    checks++;
    if (got != want) begin
      failures++;
      $display("coef_fixed(%f, %0d) = %f, expected %f", c, mant, got, want);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sig_t  x, y;
    coef_t k;
    real   e;
    // 0.5651 = 0.10010000101...b
    expect_coef(0.5651, 4, 0.5625);
    expect_coef(0.5651, 8, 0.5625);                   // 0.10010000b
    expect_coef(-0.9668, 4, -1.0);
    expect_coef(-0.9668, 8, -0.96875);                // -0.11111000b
    expect_coef(0.3541, 4, 0.34375);                  // 0.010110b
    expect_coef(-0.01587, 4, -0.017578125);           // -9 * 2^-9
    expect_coef(2.0, 4, 2.0);
    expect_coef(-2.0, 4, -2.0);
    expect_coef(0.9225, 4, 0.875);
    expect_coef(1.657, 4, 1.625);
    expect_coef(0.2056, 0, 13474.0 / 65536.0);        // floor(0.2056 * 2^16)
    for (int n = 0; n < 2000; n++) begin
      x = sig_t'($urandom) >>> 8;
      k = coef_t'($urandom);
      y = cmul(x, k);
      e = $floor(real'(x) * real'(k) / 65536.0);
      checks++;
      if (real'(y) != e) begin
        failures++;
        if (failures < 10) $display("cmul(%0d,%0d)=%0d expected %f", x, k, y, e);
      end
    end
    checks++;
    if (to_sample(sig_t'(32'sh0800_0000)) !== 16'sh7fff) failures++;
    checks++;
    if (to_sample(-sig_t'(32'sh0800_0000)) !== -16'sh8000) failures++;
    checks++;
    if (to_sample(sig_t'(32'sh0004_0000)) !== 16'sh2000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
