// ll_phi_integrator: delay-free LDI integrator Phi(z) = 1 / (1 - z^-1).
//
// y = x + (sum of all earlier x): the output is combinational in x, the
// register stores the output on every cycle with en high. In the ladder
// filters it sits on every inductor branch (and, in Type M3, on the extra
// node branches). Synchronous active-low reset clears the register (reset is
// this design's choice). Overflow wraps.
//
// HIGHPASS = 1 applies the lowpass-to-highpass transformation z^-1 -> -z^-1
// to the delay: the register then stores -y, giving 1/(1 + z^-1).
module ll_phi_integrator
  import ll_pkg::*;
#(
  parameter bit HIGHPASS = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  sig_t x,
  output sig_t y
);
  sig_t acc;

  assign y = x + acc;

  always_ff @(posedge clk) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= HIGHPASS ? -y : y;
  end
endmodule
