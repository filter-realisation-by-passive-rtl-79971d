// tb_ll_m1_serial: testbench of ll_m1_serial, the Type M1 filter with
// time-shared adders.
//
// An ll_m1 with all its adders in parallel is fed exactly the samples the
// serial filter accepts (in_valid and in_ready both high). The testbench
// checks, every cycle, that
//   - in_ready is low for exactly the 11 schedule steps after an accepted
//     sample and high otherwise,
//   - out_valid of both follows the accepted sample by one cycle,
//   - the two outputs are bit-identical,
// and it compares each output with the floating-point ladder reference.
// Random samples are driven with in_valid high about two cycles in three,
// then a 0.25 step checks the DC gain of the ladder (1.0, inverted). Accepted
// samples, refused samples (in_valid high while busy) and idle ready cycles
// are counted; one that never happened counts as a failure.
module tb_ll_m1_serial;
  import ll_pkg::*;
  import ll_ref_pkg::*;

  localparam real TOL     = 0.01;
  localparam real DC_GAIN = -1.0;
  localparam real DC_TOL  = 0.03;
  localparam int  NSTEP   = 11;
  localparam int  N_RAND  = 1200;   // random samples accepted
  localparam int  N_STEP  = 1000;   // step samples accepted

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    in_valid = 1'b0;
  sample_t in_sample = '0;
  logic    rdy_s, rdy_p;
  logic    ov_s, ov_p;
  sample_t os_s, os_p;
  logic    take;

  int  checks = 0;
  int  failures = 0;
  int  busy_left = 0;       // cycles in_ready must still stay low
  logic prev_take = 1'b0;
  real exp_out = 0.0;
  real max_err = 0.0;
  real last_out = 0.0;

  int n_accept = 0;
  int n_refused = 0;
  int n_idle = 0;

  ladder_ref lref = new();

  always #5 clk = ~clk;

  assign take = in_valid && rdy_s;

  ll_m1_serial dut (.clk, .rst_n, .in_valid, .in_ready(rdy_s), .in_sample,
                    .out_valid(ov_s), .out_sample(os_s));
  ll_m1 par (.clk, .rst_n, .in_valid(take), .in_ready(rdy_p), .in_sample,
             .out_valid(ov_p), .out_sample(os_p));

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real to_real(sample_t s);
    return real'(s) / 32768.0;
  endfunction

  task automatic cycle(logic valid, sample_t s);
    real e;
    @(negedge clk);
    checks++;
    if (rdy_s !== (busy_left == 0)) begin
      failures++;
      $display("in_ready=%0b with %0d busy cycles left", rdy_s, busy_left);
    end
    checks++;
    if (rdy_p !== 1'b1) begin
      failures++;
      $display("in_ready low on ll_m1");
    end
    checks++;
    if (ov_s !== prev_take || ov_p !== prev_take) begin
      failures++;
      $display("out_valid serial=%0b parallel=%0b expected %0b", ov_s, ov_p, prev_take);
    end
    if (prev_take) begin
      checks++;
      if (os_s !== os_p) begin
        failures++;
        if (failures < 10) $display("serial %0d parallel %0d", os_s, os_p);
      end
      e = to_real(os_s) - exp_out;
      if (e < 0.0) e = -e;
      if (e > max_err) max_err = e;
      last_out = to_real(os_s);
      checks++;
      if (e > TOL) begin
        failures++;
        if (failures < 10) $display("got %f expected %f", to_real(os_s), exp_out);
      end
    end
    in_valid  = valid;
    in_sample = s;
    #1;
    prev_take = take;
    if (busy_left > 0) busy_left--;
    if (take) begin
      n_accept++;
      busy_left = NSTEP;
      exp_out = lref.step(to_real(s));
    end else if (valid) n_refused++;
    else if (rdy_s) n_idle++;
  endtask

  int target;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    while (n_accept < N_RAND)
      cycle(($urandom % 3) != 0, sample_t'($signed(16'($urandom)) >>> 1));

    target = n_accept + N_STEP;
    while (n_accept < target) cycle(1'b1, 16'sh2000);
    repeat (NSTEP + 2) cycle(1'b0, '0);
    checks++;
    if (last_out / 0.25 > DC_GAIN + DC_TOL || last_out / 0.25 < DC_GAIN - DC_TOL) begin
      failures++;
      $display("DC gain %f", last_out / 0.25);
    end

    $display("max error %f, DC gain %f", max_err, last_out / 0.25);
    $display("events: accepted %0d refused %0d idle %0d", n_accept, n_refused, n_idle);
    checks++;
    if (n_accept == 0) failures++;
    checks++;
    if (n_refused == 0) failures++;
    checks++;
    if (n_idle == 0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
