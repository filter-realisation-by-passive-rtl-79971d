// ll_filter_top: the four LUD-leapfrog realisations of the 7th-order elliptic
// lowpass ladder, side by side.
//
// Standard LL, Type M1, Type M2 and Type M3 all simulate the same doubly
// terminated LC ladder and have the same ideal response; they differ in how
// the scaled nodal matrices are factored, and so in their speed (multipliers
// on the longest path), their number of adders and delays, and their
// sensitivity to coefficient errors near DC. All four run in parallel on the
// same input samples, and every output is brought out on out_all (index =
// ll_type_e). The sel input, this design's own addition, picks the output
// driven on out_sample.
//
// Interface and timing: a sample (Q1.15, DATA_W bits) is taken in every cycle
// with in_valid and in_ready high; every filter registers its output, so
// out_valid follows the accepted sample by one cycle. sel acts combinationally on out_sample. COEF_MANT is
// passed to all four filters: 0 keeps the full coefficients, 8 or 4 truncate
// them to that many mantissa bits. HIGHPASS = 1 turns all four into the
// mirrored highpass H(-z). SHARE_C = 1 makes Types M1 and M2 compute their
// two identical c products on one multiplier over two cycles; in_ready then
// drops for one cycle after every accepted sample, and a sample is taken by
// all four filters only when in_valid and in_ready are both high (with
// SHARE_C = 0, in_ready is always high). M1_SERIAL = 1 replaces Type M1 by
// ll_m1_serial, whose additions are time-shared on three adders over 11 steps;
// in_ready then stays low for those steps, and all four filters take a sample
// at most every 12 cycles (lowpass only). Reset is synchronous, active low.
module ll_filter_top
  import ll_pkg::*;
#(
  parameter int COEF_MANT = 0,
  parameter bit HIGHPASS  = 1'b0,
  parameter bit SHARE_C   = 1'b0,
  parameter bit M1_SERIAL = 1'b0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  output logic     in_ready,
  input  sample_t  in_sample,
  input  ll_type_e sel,
  output logic     out_valid,
  output sample_t  out_sample,
  output sample_t  out_all [4]
);
  logic [3:0] valid;
  logic       take;          // sample accepted by all four filters
  logic       ready_m1, ready_m2;

  assign in_ready = ready_m1 && ready_m2;
  assign take     = in_valid && in_ready;

  ll_standard #(.COEF_MANT(COEF_MANT), .HIGHPASS(HIGHPASS)) u_std (
    .clk, .rst_n, .in_valid(take), .in_sample, .out_valid(valid[LL_STANDARD]), .out_sample(out_all[LL_STANDARD]));
  if (M1_SERIAL) begin : g_m1_serial
    ll_m1_serial #(.COEF_MANT(COEF_MANT)) u_m1 (
      .clk, .rst_n, .in_valid(take), .in_ready(ready_m1), .in_sample, .out_valid(valid[LL_M1]), .out_sample(out_all[LL_M1]));
  end else begin : g_m1
    ll_m1 #(.COEF_MANT(COEF_MANT), .HIGHPASS(HIGHPASS), .SHARE_C(SHARE_C)) u_m1 (
      .clk, .rst_n, .in_valid(take), .in_ready(ready_m1), .in_sample, .out_valid(valid[LL_M1]), .out_sample(out_all[LL_M1]));
  end
  ll_m2 #(.COEF_MANT(COEF_MANT), .HIGHPASS(HIGHPASS), .SHARE_C(SHARE_C)) u_m2 (
    .clk, .rst_n, .in_valid(take), .in_ready(ready_m2), .in_sample, .out_valid(valid[LL_M2]), .out_sample(out_all[LL_M2]));
  ll_m3 #(.COEF_MANT(COEF_MANT), .HIGHPASS(HIGHPASS)) u_m3 (
    .clk, .rst_n, .in_valid(take), .in_sample, .out_valid(valid[LL_M3]), .out_sample(out_all[LL_M3]));

  assign out_valid  = valid[sel];
  assign out_sample = out_all[sel];
endmodule
