// tb_ll_input_section: self-checking testbench for ll_input_section, the
// (1 + z^-1) input function. Random samples with random enables; the expected
// value J[n] + J[n-1], scaled by 2^(FRAC - DATA_W + 1) into the internal
// format, is computed in plain integers in the testbench. A second copy with
// HIGHPASS = 1 must give J[n] - J[n-1].
module tb_ll_input_section;
  import ll_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    en = 1'b0;
  sample_t j = '0;
  sig_t    u;
  sig_t    u_hp;
  int      prev = 0;
  int      expv;
  int      checks = 0;
  int      failures = 0;

  always #5 clk = ~clk;

  ll_input_section dut (.*);
  ll_input_section #(.HIGHPASS(1'b1)) dut_hp (.clk, .rst_n, .en, .j, .u(u_hp));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      en = ($urandom_range(3) != 0);
      j  = sample_t'($urandom);
      #1;
      expv = (int'(j) + prev) * 32;
      checks++;
      if (u !== sig_t'(expv)) begin
        failures++;
        if (failures < 10) $display("n=%0d u=%0d expected %0d", n, u, expv);
      end
      checks++;
      if (u_hp !== sig_t'((int'(j) - prev) * 32)) begin
        failures++;
        if (failures < 10) $display("n=%0d highpass u=%0d expected %0d", n, u_hp, (int'(j) - prev) * 32);
      end
      if (en) prev = int'(j);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
