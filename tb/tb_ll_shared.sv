// tb_ll_shared: ll_filter_top with SHARE_C = 1, where Types M1 and M2 compute
// their two identical c products on one multiplier per coefficient over two
// cycles.
//
// A second top with SHARE_C = 0 is fed exactly the samples the shared top
// accepts (in_valid and in_ready both high). Every cycle the testbench checks
// that
//   - in_ready is low exactly in the cycle after an accepted sample,
//   - out_valid of both tops agree and follow the accepted sample by a cycle,
//   - all four outputs of the two tops are bit-identical,
// and it compares the shared M1 and M2 outputs with the floating-point ladder
// reference. Phase 1 drives random samples with random idle cycles; phase 2
// holds in_valid high for a long run, which must be accepted at exactly half
// the clock rate. Accepted samples, refused samples (in_valid high while
// in_ready is low), idle ready cycles and reference comparisons are counted,
// and one that never happened counts as a failure.
module tb_ll_shared;
  import ll_pkg::*;
  import ll_ref_pkg::*;

  localparam real TOL     = 0.03;
  localparam int  RUN_N   = 2000;   // cycles with in_valid held high

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  logic     in_valid = 1'b0;
  sample_t  in_sample = '0;
  ll_type_e sel = LL_M1;
  logic     rdy_s, rdy_d;
  logic     ov_s, ov_d;
  sample_t  os_s, os_d;
  sample_t  oa_s [4];
  sample_t  oa_d [4];
  logic     take;

  int  checks = 0;
  int  failures = 0;
  logic prev_take = 1'b0;
  real exp_out = 0.0;
  real max_err [2] = '{0.0, 0.0};

  // event counters
  int n_accept = 0;
  int n_refused = 0;
  int n_idle = 0;
  int n_ref = 0;

  ladder_ref lref = new();

  always #5 clk = ~clk;

  assign take = in_valid && rdy_s;

  ll_filter_top #(.SHARE_C(1'b1)) dut_s (.clk, .rst_n, .in_valid, .in_ready(rdy_s), .in_sample,
                                         .sel, .out_valid(ov_s), .out_sample(os_s), .out_all(oa_s));
  ll_filter_top #(.SHARE_C(1'b0)) dut_d (.clk, .rst_n, .in_valid(take), .in_ready(rdy_d), .in_sample,
                                         .sel, .out_valid(ov_d), .out_sample(os_d), .out_all(oa_d));

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

  // Check the results of the previous cycle, then drive a new input.
  task automatic cycle(logic valid, sample_t s);
    real e;
    @(negedge clk);
    checks++;
    if (rdy_s !== !prev_take) begin
      failures++;
      $display("in_ready=%0b after accepted=%0b", rdy_s, prev_take);
    end
    checks++;
    if (rdy_d !== 1'b1) begin
      failures++;
      $display("in_ready low on the two-multiplier top");
    end
    checks++;
    if (ov_s !== prev_take || ov_d !== prev_take) begin
      failures++;
      $display("out_valid shared=%0b direct=%0b expected %0b", ov_s, ov_d, prev_take);
    end
    checks++;
    if (oa_s !== oa_d || os_s !== os_d) begin
      failures++;
      if (failures < 10)
        $display("shared/direct differ: M1 %0d/%0d M2 %0d/%0d", oa_s[LL_M1], oa_d[LL_M1],
                 oa_s[LL_M2], oa_d[LL_M2]);
    end
    if (prev_take) begin
      for (int t = 0; t < 2; t++) begin
        e = to_real(oa_s[int'(LL_M1) + t]) - exp_out;
        if (e < 0.0) e = -e;
        if (e > max_err[t]) max_err[t] = e;
        checks++;
        n_ref++;
        if (e > TOL) begin
          failures++;
          if (failures < 10)
            $display("type %0d: got %f expected %f", t + 1, to_real(oa_s[int'(LL_M1) + t]), exp_out);
        end
      end
    end
    in_valid  = valid;
    in_sample = s;
    #1;
    prev_take = take;
    if (take) begin
      n_accept++;
      exp_out = lref.step(to_real(s));
    end else if (valid) n_refused++;
    else if (rdy_s) n_idle++;
  endtask

  function automatic sample_t rnd_sample();
    return sample_t'($signed(16'($urandom)) >>> 1);
  endfunction

  int run_accept;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // Phase 1: random samples, random idle cycles, sel toggling.
    for (int n = 0; n < 6000; n++) begin
      if (n % 500 == 0) sel = (sel == LL_M1) ? LL_M2 : LL_M1;
      cycle(($urandom % 4) != 0, rnd_sample());
    end

    // Phase 2: in_valid held high; exactly every other cycle is accepted.
    run_accept = n_accept;
    for (int n = 0; n < RUN_N; n++) cycle(1'b1, rnd_sample());
    run_accept = n_accept - run_accept;
    checks++;
    if (run_accept != RUN_N / 2) begin
      failures++;
      $display("continuous run: %0d accepted of %0d cycles, expected %0d", run_accept, RUN_N, RUN_N / 2);
    end
    cycle(1'b0, '0);
    cycle(1'b0, '0);

    $display("max error M1 %f M2 %f", max_err[0], max_err[1]);
    $display("events: accepted %0d refused %0d idle %0d reference compares %0d",
             n_accept, n_refused, n_idle, n_ref);
    checks++;
    if (n_accept == 0) failures++;
    checks++;
    if (n_refused == 0) failures++;
    checks++;
    if (n_idle == 0) failures++;
    checks++;
    if (n_ref == 0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
