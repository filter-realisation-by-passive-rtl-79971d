// ll_standard: Standard LUD-leapfrog (LL) digital ladder filter.
//
// Simulates a doubly terminated 7th-order LC lowpass ladder (4 nodes, 3
// inductors) through the bilinear-transformed nodal equation, written as
//   X = -U_offd^T X - (Phi*4*Gamma + 2G) V + (1+z^-1) J
//   V =  Psi * D^-1 X - U_offd V
// where A = C + Gamma + G = U^T D U, Psi = z^-1/(1-z^-1), Phi = 1/(1-z^-1) and
// 4*Gamma = A_L * diag(4/L) * A_L^T. The structure, node by node:
//   lower line (right to left):  V_i = a_i * Psi(X_i) + c_i * V_(i+1)
//   inductor branch k:           Y_k = Phi( b_k * (V_k + V_(k+1)) )
//   upper line (left to right):  X_i = c_(i-1) * X_(i-1) + Y_(i-1) + Y_i,
//                                with u = J + z^-1 J and d_1*V_1 added at node 1
//                                and d_2*V_4 at node 4
//   output:                      2 * V_4
// The coefficients are those of the example filter; a_i = 1/D_i, b_k = -4/L_k,
// c_i = -u_(i,i+1), d = -2 g. The horizontal multipliers c_i make the upper
// and lower lines serial chains of multiplications.
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
module ll_standard
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
  localparam ll_type_e T = LL_STANDARD;

  localparam coef_t KA [N_NODES] = '{coef_q(coef_a(T, 0), COEF_MANT), coef_q(coef_a(T, 1), COEF_MANT),
                                     coef_q(coef_a(T, 2), COEF_MANT), coef_q(coef_a(T, 3), COEF_MANT)};
  localparam coef_t KB [N_IND]   = '{coef_q(coef_b(T, 0), COEF_MANT), coef_q(coef_b(T, 1), COEF_MANT),
                                     coef_q(coef_b(T, 2), COEF_MANT)};
  localparam coef_t KC [N_IND]   = '{coef_q(coef_c(T, 0), COEF_MANT), coef_q(coef_c(T, 1), COEF_MANT),
                                     coef_q(coef_c(T, 2), COEF_MANT)};
  localparam coef_t KD1 = coef_q(coef_d(T, 0), COEF_MANT);
  localparam coef_t KD2 = coef_q(coef_d(T, 1), COEF_MANT);
  localparam coef_t KF  = coef_q(coef_f(T), COEF_MANT);

  sig_t u;                   // (1 + z^-1) J
  sig_t r  [N_NODES];        // Psi(X_i)
  sig_t v  [N_NODES];        // lower-line nodes V_i
  sig_t bw [N_IND];          // b_k * (V_k + V_(k+1))
  sig_t y  [N_IND];          // Phi(bw_k)
  sig_t x  [N_NODES];        // upper-line nodes X_i

  ll_input_section #(.HIGHPASS(HIGHPASS)) u_in (.clk, .rst_n, .en(in_valid), .j(in_sample), .u);

  for (genvar i = 0; i < N_NODES; i++) begin : g_node
    ll_psi_integrator #(.HIGHPASS(HIGHPASS)) u_psi (.clk, .rst_n, .en(in_valid), .x(x[i]), .y(r[i]));
  end

  for (genvar k = 0; k < N_IND; k++) begin : g_ind
    ll_phi_integrator #(.HIGHPASS(HIGHPASS)) u_phi (.clk, .rst_n, .en(in_valid), .x(bw[k]), .y(y[k]));
  end

  // Lower line, right to left.
  always_comb begin
    v[N_NODES-1] = cmul(r[N_NODES-1], KA[N_NODES-1]);
    for (int i = N_NODES - 2; i >= 0; i--)
      v[i] = cmul(r[i], KA[i]) + cmul(v[i+1], KC[i]);
  end

  // Inductor branches: inputs of the Phi integrators.
  always_comb begin
    for (int k = 0; k < N_IND; k++)
      bw[k] = cmul(v[k] + v[k+1], KB[k]);
  end

  // Upper line, left to right.
  always_comb begin
    x[0] = u + cmul(v[0], KD1) + y[0];
    for (int i = 1; i < N_NODES - 1; i++)
      x[i] = cmul(x[i-1], KC[i-1]) + y[i-1] + y[i];
    x[N_NODES-1] = cmul(x[N_NODES-2], KC[N_NODES-2]) + y[N_IND-1] + cmul(v[N_NODES-1], KD2);
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
