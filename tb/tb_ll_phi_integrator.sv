// tb_ll_phi_integrator: self-checking testbench for ll_phi_integrator, the
// delay-free integrator: y[n] is x[n] plus the sum of x over all earlier enabled cycles.
// Random inputs and random enables; a running sum kept in the testbench gives
// the expected output, checked every cycle, including after reset. A second
// copy with HIGHPASS = 1 (delay z^-1 replaced by -z^-1) is checked against a
// model whose stored value changes sign at every update.
module tb_ll_phi_integrator;
  import ll_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  sig_t x = '0;
  sig_t y;
  sig_t y_hp;
  sig_t acc_hp = '0;
  sig_t acc_model = '0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  ll_phi_integrator dut (.*);
  ll_phi_integrator #(.HIGHPASS(1'b1)) dut_hp (.clk, .rst_n, .en, .x, .y(y_hp));

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
      if (n == 1000) begin
        rst_n = 1'b0;
        @(negedge clk);
        rst_n = 1'b1;
        acc_model = '0;
        acc_hp = '0;
      end
      en = ($urandom_range(3) != 0);
      x  = sig_t'($urandom) >>> 4;
      #1;
      checks++;
      if (y !== sig_t'(acc_model + x)) begin
        failures++;
        if (failures < 10) $display("n=%0d y=%0d expected %0d", n, y, sig_t'(acc_model + x));
      end
      checks++;
      if (y_hp !== sig_t'(acc_hp + x)) begin
        failures++;
        if (failures < 10) $display("n=%0d highpass y=%0d expected %0d", n, y_hp, sig_t'(acc_hp + x));
      end
      if (en) acc_model = acc_model + x;
      if (en) acc_hp = -(acc_hp + x);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
