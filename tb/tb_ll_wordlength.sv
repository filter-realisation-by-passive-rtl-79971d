// tb_ll_wordlength: the four structures with short coefficient wordlengths.
//
// Two copies of ll_filter_top run side by side, one with every coefficient
// truncated to 8 mantissa bits and one to 4 bits, on the same input. At a
// sampling rate of 32 kHz the ideal filter has a 3.4 kHz passband with 0.1 dB
// ripple and about 82 dB of stopband attenuation. The testbench measures each
// output's gain at 100 Hz, 1 kHz and 3 kHz (passband) and 8 kHz (stopband) by
// correlating a settled sine response with sine and cosine, and the gain at
// DC as the end value of a long step response. Checks, per the expected
// behaviour of the structures:
//   8 bits: Standard LL, M1, M2 keep their passband within -0.45..+0.15 dB and
//           show no droop at DC (DC gain within 0.05 dB of the 100 Hz gain);
//           M3 droops at DC by more than 0.5 dB.
//   4 bits: M1 keeps its passband within +-0.6 dB and has no DC droop; M3
//           droops at DC by more than 3 dB.
//   both:   every structure attenuates 8 kHz by more than 60 dB.
module tb_ll_wordlength;
  import ll_pkg::*;

  localparam real FS      = 32000.0;
  localparam real AMP     = 0.5;
  localparam int  SETTLE  = 3000;
  localparam int  MEAS    = 3200;  // whole periods of every test frequency
  localparam int  STEP_N  = 20000;
  localparam real PI      = 3.14159265358979;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  logic     in_valid = 1'b0;
  sample_t  in_sample = '0;
  ll_type_e sel = LL_STANDARD;
  logic     ov8, ov4, rdy8, rdy4;
  sample_t  os8, os4;
  sample_t  o8 [4];
  sample_t  o4 [4];

  int checks = 0;
  int failures = 0;

  real g8 [5][4];   // gain in dB: index 0..3 frequencies, 4 = DC
  real g4 [5][4];
  real freqs [4] = '{100.0, 1000.0, 3000.0, 8000.0};

  always #5 clk = ~clk;

  ll_filter_top #(.COEF_MANT(8)) dut8 (.clk, .rst_n, .in_valid, .in_ready(rdy8), .in_sample, .sel,
                                       .out_valid(ov8), .out_sample(os8), .out_all(o8));
  ll_filter_top #(.COEF_MANT(4)) dut4 (.clk, .rst_n, .in_valid, .in_ready(rdy4), .in_sample, .sel,
                                       .out_valid(ov4), .out_sample(os4), .out_all(o4));

  initial begin
    repeat (200000) @(posedge clk);
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
  endtask

  // Drive n samples of s(t); the output for sample k appears one cycle later.
  task automatic measure_sine(real f, int fi);
    real s8 [4], c8 [4], s4 [4], c4 [4], ph, ph_prev;
    foreach (s8[t]) begin s8[t] = 0.0; c8[t] = 0.0; s4[t] = 0.0; c4[t] = 0.0; end
    do_reset();
    ph_prev = 0.0;
    for (int n = 0; n < SETTLE + MEAS + 1; n++) begin
      @(negedge clk);
      if (n > SETTLE) begin
        for (int t = 0; t < 4; t++) begin
          s8[t] += real'(o8[t]) / 32768.0 * $sin(ph_prev);
          c8[t] += real'(o8[t]) / 32768.0 * $cos(ph_prev);
          s4[t] += real'(o4[t]) / 32768.0 * $sin(ph_prev);
          c4[t] += real'(o4[t]) / 32768.0 * $cos(ph_prev);
        end
      end
      ph = 2.0 * PI * f * real'(n) / FS;
      ph_prev = ph;
      in_valid  = 1'b1;
      in_sample = sample_t'($rtoi(AMP * 32767.0 * $sin(ph)));
    end
    for (int t = 0; t < 4; t++) begin
      g8[fi][t] = db(2.0 / real'(MEAS) * $sqrt(s8[t] * s8[t] + c8[t] * c8[t]) / AMP);
      g4[fi][t] = db(2.0 / real'(MEAS) * $sqrt(s4[t] * s4[t] + c4[t] * c4[t]) / AMP);
    end
  endtask

  task automatic measure_dc();
    do_reset();
    for (int n = 0; n < STEP_N; n++) begin
      @(negedge clk);
      in_valid  = 1'b1;
      in_sample = 16'sh2000;
    end
    @(negedge clk);
    for (int t = 0; t < 4; t++) begin
      g8[4][t] = db(-real'(o8[t]) / 32768.0 / 0.25);
      g4[4][t] = db(-real'(o4[t]) / 32768.0 / 0.25);
    end
  endtask

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    string nm [4] = '{"Standard LL", "M1", "M2", "M3"};
    for (int fi = 0; fi < 4; fi++) measure_sine(freqs[fi], fi);
    measure_dc();
    for (int t = 0; t < 4; t++) begin
      $display("%-11s  8 bits: DC %8.3f  100 Hz %7.3f  1 kHz %7.3f  3 kHz %7.3f  8 kHz %8.2f dB",
               nm[t], g8[4][t], g8[0][t], g8[1][t], g8[2][t], g8[3][t]);
      $display("%-11s  4 bits: DC %8.3f  100 Hz %7.3f  1 kHz %7.3f  3 kHz %7.3f  8 kHz %8.2f dB",
               nm[t], g4[4][t], g4[0][t], g4[1][t], g4[2][t], g4[3][t]);
    end
    for (int t = 0; t < 3; t++) begin
      for (int fi = 0; fi < 3; fi++)
        check(g8[fi][t] > -0.45 && g8[fi][t] < 0.15, $sformatf("%s 8-bit passband", nm[t]));
      check(g8[4][t] - g8[0][t] > -0.05 && g8[4][t] - g8[0][t] < 0.05, $sformatf("%s 8-bit DC", nm[t]));
    end
    check(g8[4][3] < g8[0][3] - 0.5, "M3 8-bit DC droop");
    for (int fi = 0; fi < 3; fi++)
      check(g4[fi][1] > -0.6 && g4[fi][1] < 0.6, "M1 4-bit passband");
    check(g4[4][1] - g4[0][1] > -0.05 && g4[4][1] - g4[0][1] < 0.05, "M1 4-bit DC");
    check(g4[4][3] < g4[0][3] - 3.0, "M3 4-bit DC droop");
    for (int t = 0; t < 4; t++) begin
      check(g8[3][t] < -60.0, $sformatf("%s 8-bit stopband", nm[t]));
      check(g4[3][t] < -60.0, $sformatf("%s 4-bit stopband", nm[t]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
