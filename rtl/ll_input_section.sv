// ll_input_section: the input function (1 + z^-1) of the LL filters.
//
// The ideal input term (1 + z)J of the discrete ladder equations is made
// causal by one extra period of delay, giving u[n] = J[n] + J[n-1]. The sample
// is first widened from the port format (Q1.(DATA_W-1)) to the internal format
// (FRAC fraction bits); u is combinational in j, and the previous sample is
// stored on every cycle with en high. Synchronous active-low reset clears the
// stored sample (reset is this design's choice). HIGHPASS = 1 applies the
// transformation z^-1 -> -z^-1, giving u[n] = J[n] - J[n-1].
module ll_input_section
  import ll_pkg::*;
#(
  parameter bit HIGHPASS = 1'b0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  sample_t j,
  output sig_t    u
);
  sample_t j_d;

  always_ff @(posedge clk) begin
    if (!rst_n)  j_d <= '0;
    else if (en) j_d <= j;
  end

  assign u = HIGHPASS ? from_sample(j) - from_sample(j_d) : from_sample(j) + from_sample(j_d);
endmodule
