// ll_psi_integrator: delayed LDI integrator Psi(z) = z^-1 / (1 - z^-1).
//
// The output is the accumulator register itself, so it holds the sum of all
// inputs before the current sample and has no combinational path from x to y.
// On every cycle with en high the register adds x. In the ladder filters it
// sits in each node column between X_i and the a_i multiplier, and it is what
// breaks every loop of the signal-flow graph. Synchronous active-low reset
// clears it (reset is this design's choice). Overflow wraps.
//
// HIGHPASS = 1 applies the lowpass-to-highpass transformation z^-1 -> -z^-1
// to the delay: the register then takes -(acc + x), giving -z^-1/(1 + z^-1).
module ll_psi_integrator
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

  always_ff @(posedge clk) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= HIGHPASS ? -(acc + x) : acc + x;
  end

  assign y = acc;
endmodule
