// tb_ll_highpass: the four structures turned into highpass filters.
//
// ll_filter_top with HIGHPASS = 1 replaces every delay z^-1 by -z^-1, so each
// structure realises H(-z): the lowpass response mirrored about a quarter of
// the sampling rate (passband from about 12.6 kHz to 16 kHz at 32 kHz).
// Checks:
//   * random input: every output against the floating-point ladder reference
//     evaluated as (-1)^n * H_lp applied to (-1)^n x[n], which equals H(-z);
//   * gains, by correlation of settled sine responses: within -0.45..+0.15 dB
//     at 15 kHz and 13 kHz, below -60 dB at 8 kHz and at 100 Hz.
module tb_ll_highpass;
  import ll_pkg::*;
  import ll_ref_pkg::*;

  localparam real TOL    = 0.01;
  localparam real FS     = 32000.0;
  localparam real AMP    = 0.5;
  localparam int  SETTLE = 3000;
  localparam int  MEAS   = 3200;
  localparam real PI     = 3.14159265358979;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  logic     in_valid = 1'b0;
  logic     in_ready;
  sample_t  in_sample = '0;
  ll_type_e sel = LL_STANDARD;
  logic     out_valid;
  sample_t  out_sample;
  sample_t  out_all [4];

  int  checks = 0;
  int  failures = 0;
  real gains [4][4];
  real freqs [4] = '{15000.0, 13000.0, 8000.0, 100.0};

  ladder_ref lref = new();

  always #5 clk = ~clk;

  ll_filter_top #(.HIGHPASS(1'b1)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real db(real g);
    if (g < 1.0e-9) return -180.0;
    return 20.0 * $log10(g);
  endfunction

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0;
    in_valid = 1'b0;
    @(negedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    lref.reset();
  endtask

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic measure_sine(real f, int fi);
    real sn [4], cs [4], ph_prev;
    foreach (sn[t]) begin sn[t] = 0.0; cs[t] = 0.0; end
    do_reset();
    ph_prev = 0.0;
    for (int n = 0; n < SETTLE + MEAS + 1; n++) begin
      @(negedge clk);
      if (n > SETTLE)
        for (int t = 0; t < 4; t++) begin
          sn[t] += real'(out_all[t]) / 32768.0 * $sin(ph_prev);
          cs[t] += real'(out_all[t]) / 32768.0 * $cos(ph_prev);
        end
      ph_prev = 2.0 * PI * f * real'(n) / FS;
      in_valid  = 1'b1;
      in_sample = sample_t'($rtoi(AMP * 32767.0 * $sin(ph_prev)));
    end
    for (int t = 0; t < 4; t++)
      gains[fi][t] = db(2.0 / real'(MEAS) * $sqrt(sn[t] * sn[t] + cs[t] * cs[t]) / AMP);
  endtask

  initial begin
    string nm [4] = '{"Standard LL", "M1", "M2", "M3"};
    real   exp_out, e, sgn, max_err;
    logic  pend;
    // Random input against the mirrored reference.
    do_reset();
    pend = 1'b0;
    exp_out = 0.0;
    max_err = 0.0;
    sgn = 1.0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      if (pend)
        for (int t = 0; t < 4; t++) begin
          e = real'(out_all[t]) / 32768.0 - exp_out;
          if (e < 0.0) e = -e;
          if (e > max_err) max_err = e;
          checks++;
          if (e > TOL) begin
            failures++;
            if (failures < 10) $display("%s: got %f expected %f", nm[t], real'(out_all[t]) / 32768.0, exp_out);
          end
        end
      in_valid  = 1'b1;
      in_sample = sample_t'($signed($urandom_range(16383)) - 8192);
      exp_out = sgn * lref.step(sgn * real'(in_sample) / 32768.0);
      sgn = -sgn;
      pend = 1'b1;
    end
    $display("max error against the reference: %f", max_err);
    for (int fi = 0; fi < 4; fi++) measure_sine(freqs[fi], fi);
    for (int t = 0; t < 4; t++) begin
      $display("%-11s highpass: 15 kHz %7.3f  13 kHz %7.3f  8 kHz %8.2f  100 Hz %8.2f dB",
               nm[t], gains[0][t], gains[1][t], gains[2][t], gains[3][t]);
      check(gains[0][t] > -0.45 && gains[0][t] < 0.15, $sformatf("%s gain at 15 kHz", nm[t]));
      check(gains[1][t] > -0.45 && gains[1][t] < 0.15, $sformatf("%s gain at 13 kHz", nm[t]));
      check(gains[2][t] < -60.0, $sformatf("%s gain at 8 kHz", nm[t]));
      check(gains[3][t] < -60.0, $sformatf("%s gain at 100 Hz", nm[t]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
