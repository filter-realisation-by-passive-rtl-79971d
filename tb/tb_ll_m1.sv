// tb_ll_m1: self-checking testbench for ll_m1.
//
// Drives the filter with an impulse, then (after a reset) random samples with
// random idle cycles between them, then a step. Every output is compared with
// the floating-point ladder reference of ll_ref_pkg, which solves the nodal
// equations of the analog prototype and shares no code with the filter. The
// step response is compared with the ladder's DC gain worked out by hand from
// the nodal matrices (Cramer's rule: 2 * 0.017244 / (0.017243 + 0.017242) =
// 1.000, output sign inverted because the filter's V_4 is -v_4). Each cycle it also checks
// that out_valid follows in_valid by exactly one clock.
module tb_ll_m1;
  import ll_pkg::*;
  import ll_ref_pkg::*;

  localparam real TOL     = 0.01;   // allowed error against the reference
  localparam real DC_GAIN = -1.0;
  localparam real DC_TOL  = 0.03;
  localparam int  STEP_N  = 1000;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    in_valid = 1'b0;
  logic    in_ready;
  sample_t in_sample = '0;
  logic    out_valid;
  sample_t out_sample;

  int  checks = 0;
  int  failures = 0;
  logic prev_valid = 1'b0;
  real exp_out = 0.0;
  real max_err = 0.0;

  ladder_ref lref = new();

  always #5 clk = ~clk;

  ll_m1 dut (.*);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real to_real(sample_t s);
    return real'(s) / 32768.0;
  endfunction

  // Check the outputs of the previous cycle's input, then drive a new one.
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
    if (prev_valid && compare) begin
      e = to_real(out_sample) - exp_out;
      if (e < 0.0) e = -e;
      if (e > max_err) max_err = e;
      checks++;
      if (e > TOL) begin
        failures++;
        if (failures < 10) $display("mismatch: got %f expected %f", to_real(out_sample), exp_out);
      end
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
    real dc;
    do_reset();
    // Impulse response.
    cycle(1'b1, 16'sh4000, 1'b1);
    for (int n = 0; n < 250; n++) cycle(1'b1, '0, 1'b1);
    // Random samples in +-0.25 with idle cycles.
    do_reset();
    for (int n = 0; n < 400; n++) begin
      if ($urandom_range(3) == 0) cycle(1'b0, '0, 1'b1);
      cycle(1'b1, sample_t'($signed($urandom_range(16383)) - 8192), 1'b1);
    end
    cycle(1'b0, '0, 1'b1);
    // Step of 0.25: settled output against the DC gain of the ladder.
    do_reset();
    for (int n = 0; n < STEP_N; n++) cycle(1'b1, 16'sh2000, 1'b0);
    cycle(1'b0, '0, 1'b0);
    dc = to_real(out_sample) / 0.25;
    checks++;
    if (dc < DC_GAIN - DC_TOL || dc > DC_GAIN + DC_TOL) begin
      failures++;
      $display("DC gain %f, expected %f", dc, DC_GAIN);
    end
    $display("max error %f, DC gain %f", max_err, dc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
