// ll_m3: Type M3 modified LUD-leapfrog digital ladder filter.
//
// Scaled like Type M1, so the upper and lower lines use power-of-two branches
// (right shifts by 4, 2 and 3 bits, subtracting). The scaled inductor matrix
// is split as B_s = A_b D_b A_b^T + D_m: inductor branches with all-ones
// incidence A_b (b_k = -D_b,k) plus one extra delay-free integrator per node
// for the diagonal remainder D_m (c_i = -D_m,i). No multiplier then follows a
// shift chain, which shortens the critical path by one multiplication, but
// B_s is no longer forced singular: coefficient errors give the filter a zero
// at DC (a droop near zero frequency). Node by node (a_i = 1/D_s,i):
//   lower line (right to left):  V_i = a_i * Psi(X_i) - 2^-k_i * V_(i+1)
//   inductor branch k:           Y_k = Phi( b_k * (V_k + V_(k+1)) )
//   node branch i:               Z_i = Phi( c_i * V_i )
//   upper line (left to right):  X_i = Y_(i-1) + Y_i + Z_i - 2^-k_(i-1) * X_(i-1)
//                                with u + d_1*V_1 added at node 1 and d_2*V_4
//                                at node 4
//   output:                      f_SC * V_4
// c_1 = -0.05907 is the D_m entry that the scaled decomposition gives. The
// power-of-two branches subtract, as the -U_offd terms require.
//
// Timing: one sample per clock cycle with in_valid high; the whole graph is
// evaluated in that cycle. V depends only on the Psi registers, so the output
// for sample n is V_4 before sample n enters; it is registered and appears
// with out_valid one cycle after in_valid. COEF_MANT > 0 truncates every
// multiplier coefficient to that many mantissa bits. HIGHPASS = 1 replaces
// every delay z^-1 by -z^-1 (integrators and input section), which turns the
// lowpass into the highpass mirrored about a quarter of the sampling rate,
// H_hp(z) = H_lp(-z). Fixed-point widths,
// truncation of products, output saturation and the reset are this design's
// own choices.
module ll_m3
  import ll_pkg::*;
#(
  parameter int COEF_MANT = 0,
  parameter bit HIGHPASS  = 1'b0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in_sample,
  output logic    out_valid,
  output sample_t out_sample
);
  localparam ll_type_e T = LL_M3;

  localparam coef_t KA [N_NODES] = '{coef_q(coef_a(T, 0), COEF_MANT), coef_q(coef_a(T, 1), COEF_MANT),
                                     coef_q(coef_a(T, 2), COEF_MANT), coef_q(coef_a(T, 3), COEF_MANT)};
  localparam coef_t KB [N_IND] = '{coef_q(coef_b(T, 0), COEF_MANT), coef_q(coef_b(T, 1), COEF_MANT),
                                   coef_q(coef_b(T, 2), COEF_MANT)};
  localparam coef_t KC [N_NODES] = '{coef_q(coef_c(T, 0), COEF_MANT), coef_q(coef_c(T, 1), COEF_MANT),
                                     coef_q(coef_c(T, 2), COEF_MANT), coef_q(coef_c(T, 3), COEF_MANT)};
  localparam coef_t KD1 = coef_q(coef_d(T, 0), COEF_MANT);
  localparam coef_t KD2 = coef_q(coef_d(T, 1), COEF_MANT);
  localparam coef_t KF  = coef_q(coef_f(T), COEF_MANT);

  sig_t u;                   // (1 + z^-1) J
  sig_t r  [N_NODES];        // Psi(X_i)
  sig_t v  [N_NODES];        // lower-line nodes V_i
  sig_t bw [N_IND];          // inputs of the inductor-branch Phi integrators
  sig_t y  [N_IND];          // their outputs
  sig_t x  [N_NODES];        // upper-line nodes X_i
  sig_t mw [N_NODES];        // inputs of the node-branch Phi integrators
  sig_t z  [N_NODES];        // their outputs

  ll_input_section #(.HIGHPASS(HIGHPASS)) u_in (.clk, .rst_n, .en(in_valid), .j(in_sample), .u);

  for (genvar i = 0; i < N_NODES; i++) begin : g_node
    ll_psi_integrator #(.HIGHPASS(HIGHPASS)) u_psi (.clk, .rst_n, .en(in_valid), .x(x[i]), .y(r[i]));
  end

  for (genvar k = 0; k < N_IND; k++) begin : g_ind
    ll_phi_integrator #(.HIGHPASS(HIGHPASS)) u_phi (.clk, .rst_n, .en(in_valid), .x(bw[k]), .y(y[k]));
  end

  for (genvar i = 0; i < N_NODES; i++) begin : g_dm
    ll_phi_integrator #(.HIGHPASS(HIGHPASS)) u_phi_m (.clk, .rst_n, .en(in_valid), .x(mw[i]), .y(z[i]));
  end

  // Lower line, right to left, through the power-of-two branches.
  always_comb begin
    v[N_NODES-1] = cmul(r[N_NODES-1], KA[N_NODES-1]);
    for (int i = N_NODES - 2; i >= 0; i--)
      v[i] = cmul(r[i], KA[i]) - (v[i+1] >>> hshift(i));
  end

  // Inductor-branch and node-branch integrator inputs.
  always_comb begin
    for (int k = 0; k < N_IND; k++) bw[k] = cmul(v[k] + v[k+1], KB[k]);
    for (int i = 0; i < N_NODES; i++) mw[i] = cmul(v[i], KC[i]);
  end

  // Upper line, left to right.
  always_comb begin
    x[0] = u + cmul(v[0], KD1) + y[0] + z[0];
    for (int i = 1; i < N_NODES - 1; i++)
      x[i] = y[i-1] + y[i] + z[i] - (x[i-1] >>> hshift(i-1));
    x[N_NODES-1] = y[N_IND-1] + cmul(v[N_NODES-1], KD2) + z[N_NODES-1]
                 - (x[N_NODES-2] >>> hshift(N_NODES-2));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_sample <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_sample <= to_sample(cmul(v[N_NODES-1], KF));
    end
  end
endmodule
