// tb_ll_filter_top: end-to-end testbench of ll_filter_top at its default
// parameters (full-precision coefficients).
//
// Phase 1 drives random samples with random idle cycles (in_valid low) and
// steps sel through all four structures; every cycle it checks out_valid
// latency and out_sample = out_all[sel], and every output of every structure
// is compared with the floating-point ladder reference of ll_ref_pkg
// (clipped to the output range). Phase 2 drives a full-scale negative step,
// whose overshoot drives the outputs into saturation. Phase 3 drives a long
// 0.25 step: Standard LL, M1 and M2 must hold the ladder's DC gain (1.0,
// inverted) for the whole step, because their inductor matrix stays singular,
// while Type M3, whose zero at DC comes from its coefficient errors, must
// droop away from it. Each of these events is counted, and one that never
// happened counts as a failure.
module tb_ll_filter_top;
  import ll_pkg::*;
  import ll_ref_pkg::*;

  localparam real TOL     = 0.03;   // M2's 3-digit coefficients err by 2% at full scale
  localparam real DC_GAIN = -1.0;
  localparam real DC_TOL  = 0.03;
  localparam int  STEP_N  = 30000;

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
  logic prev_valid = 1'b0;
  real exp_out = 0.0;
  real max_err [4] = '{0.0, 0.0, 0.0, 0.0};

  // event counters
  int n_sel [4] = '{0, 0, 0, 0};
  int n_idle = 0;
  int n_sat = 0;
  int n_dc_held [4] = '{0, 0, 0, 0};
  int n_droop = 0;

  ladder_ref lref = new();

  always #5 clk = ~clk;

  ll_filter_top dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real to_real(sample_t s);
    return real'(s) / 32768.0;
  endfunction

  function automatic real clip(real v);
    if (v > 32767.0 / 32768.0) return 32767.0 / 32768.0;
    if (v < -1.0) return -1.0;
    return v;
  endfunction

  task automatic cycle(logic valid, sample_t s, logic compare);
    real e;
    @(negedge clk);
    checks++;
    if (in_ready !== 1'b1) begin
      failures++;
      $display("in_ready low without time sharing");
    end
    checks++;
    if (out_valid !== prev_valid) begin
      failures++;
      $display("latency: out_valid=%0b expected %0b", out_valid, prev_valid);
    end
    checks++;
    if (out_sample !== out_all[sel]) begin
      failures++;
      $display("select: out_sample differs from out_all[%0d]", sel);
    end
    if (prev_valid) begin
      n_sel[sel]++;
      for (int t = 0; t < 4; t++) begin
        if (out_all[t] == 16'sh7fff || out_all[t] == -16'sh8000) n_sat++;
        if (compare) begin
          e = to_real(out_all[t]) - clip(exp_out);
          if (e < 0.0) e = -e;
          if (e > max_err[t]) max_err[t] = e;
          checks++;
          if (e > TOL) begin
            failures++;
            if (failures < 10) $display("type %0d: got %f expected %f", t, to_real(out_all[t]), exp_out);
          end
        end
      end
    end else begin
      n_idle++;
    end
    in_valid  = valid;
    in_sample = s;
    prev_valid = valid;
    if (valid) exp_out = lref.step(to_real(s));
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0;
    in_valid = 1'b0;
    prev_valid = 1'b0;
    @(negedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    lref.reset();
  endtask

  initial begin
    real g, g300;
    do_reset();
    // Phase 1: random input, all structures, sel switching.
    for (int n = 0; n < 800; n++) begin
      if (n % 100 == 0) sel = ll_type_e'((n / 100) % 4);
      if ($urandom_range(4) == 0) cycle(1'b0, '0, 1'b1);
      cycle(1'b1, sample_t'($signed($urandom_range(16383)) - 8192), 1'b1);
    end
    // Phase 2: full-scale negative step; the overshoot saturates the output.
    do_reset();
    for (int n = 0; n < 300; n++) cycle(1'b1, -16'sh8000, 1'b1);
    // Phase 3: long step of 0.25.
    do_reset();
    g300 = 0.0;
    for (int n = 0; n < STEP_N; n++) begin
      cycle(1'b1, 16'sh2000, 1'b0);
      if (n >= 300 && n % 1000 == 300) begin
        for (int t = 0; t < 3; t++) begin
          g = to_real(out_all[t]) / 0.25;
          checks++;
          if (g < DC_GAIN - DC_TOL || g > DC_GAIN + DC_TOL) begin
            failures++;
            $display("type %0d: gain %f at step sample %0d", t, g, n);
          end else n_dc_held[t]++;
        end
        g = to_real(out_all[LL_M3]) / 0.25;
        if (n == 300) g300 = g;
        if (g > DC_GAIN + 0.1) n_droop++;
        if (n % 5000 == 300) $display("step sample %0d: gains %f %f %f %f", n,
          to_real(out_all[0]) / 0.25, to_real(out_all[1]) / 0.25, to_real(out_all[2]) / 0.25, g);
      end
    end
    checks++;
    if (g300 < DC_GAIN - DC_TOL || g300 > DC_GAIN + DC_TOL) begin
      failures++;
      $display("M3 gain %f after 300 samples", g300);
    end
    $display("max error: std %f m1 %f m2 %f m3 %f", max_err[0], max_err[1], max_err[2], max_err[3]);
    $display("events: sel %0d %0d %0d %0d, idle %0d, saturated %0d, dc held %0d %0d %0d, m3 droop %0d",
             n_sel[0], n_sel[1], n_sel[2], n_sel[3], n_idle, n_sat, n_dc_held[0], n_dc_held[1], n_dc_held[2], n_droop);
    for (int t = 0; t < 4; t++) begin
      checks++;
      if (n_sel[t] == 0) failures++;
    end
    for (int t = 0; t < 3; t++) begin
      checks++;
      if (n_dc_held[t] == 0) failures++;
    end
    checks += 3;
    if (n_idle == 0) failures++;
    if (n_sat == 0) failures++;
    if (n_droop == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
