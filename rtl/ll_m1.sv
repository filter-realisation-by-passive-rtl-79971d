// ll_m1: Type M1 modified LUD-leapfrog digital ladder filter.
//
// Same ladder and equations as ll_standard, but the system is first scaled by
// a diagonal matrix S (A_s = S A S, B_s = S 4Gamma S, G_s = S 2G S, V_s =
// S^-1 V) chosen so that A_s = U_s^T D_s U_s has power-of-two off-diagonals.
// The horizontal multipliers of the standard structure become right shifts
// by 4, 2 and 3 bits, so the serial chains along the upper and lower lines
// hold only adders, and at most three multiplications lie on any path in one
// sample period. B_s keeps the inductor decomposition S A_L 4D_L A_L^T S,
// which keeps it singular whatever the coefficient errors (exact response at
// DC). Node by node (c_i = S_i, a_i = 1/D_s,i):
//   lower line (right to left):  V_i = a_i * Psi(X_i) - 2^-k_i * V_(i+1)
//   scaled nodes:                W_i = c_i * V_i
//   inductor branch k:           Y_k = Phi( b_k * (W_k + W_(k+1)) )
//   upper line (left to right):  X_i = c_i * (Y_(i-1) + Y_i) - 2^-k_(i-1) * X_(i-1)
//                                with u added at node 1, d_1*W_1 inside the
//                                node-1 sum and d_2*W_4 inside the node-4 sum
//   output:                      f_SC * V_4
// The power-of-two branches subtract, as the -U_offd terms of the equations
// require; the figure of the structure prints only their magnitudes.
//
// Timing: with SHARE_C = 0, one sample per clock cycle with in_valid high
// (in_ready is always 1), and the whole graph is evaluated in that cycle. V
// depends only on the Psi registers, so the output for sample n is V_4 before
// sample n enters; it is registered and appears with out_valid one cycle after
// the sample is taken. SHARE_C = 1 computes the two identical
// c_i products of each node serially on one multiplier: in the cycle a
// sample is taken the lower-line product, in the next the upper-line product,
// when the delays advance. in_ready is low for that second cycle, so a sample
// is taken at most every two cycles; the results are bit-identical to the
// two-multiplier form.
//
// COEF_MANT > 0 truncates every multiplier coefficient to that many mantissa
// bits. HIGHPASS = 1 replaces every delay z^-1 by -z^-1 (integrators and input
// section), which turns the lowpass into the highpass mirrored about a quarter
// of the sampling rate, H_hp(z) = H_lp(-z). Fixed-point widths, truncation of
// products, output saturation and the reset are this design's own choices.
module ll_m1
  import ll_pkg::*;
#(
  parameter int COEF_MANT = 0,
  parameter bit HIGHPASS  = 1'b0,
  parameter bit SHARE_C   = 1'b0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  sample_t in_sample,
  output logic    out_valid,
  output sample_t out_sample
);
  localparam ll_type_e T = LL_M1;

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
  sig_t w  [N_NODES];        // scaled nodes c_i * V_i used by the branches
  sig_t bw [N_IND];          // inputs of the inductor-branch Phi integrators
  sig_t y  [N_IND];          // their outputs
  sig_t s  [N_NODES];        // node sums of branch outputs and terminations
  sig_t cs [N_NODES];        // c_i * s_i
  sig_t x  [N_NODES];        // upper-line nodes X_i

  logic    accept;           // a sample is taken this cycle
  logic    step;             // the delays advance this cycle
  sample_t j_step;           // the sample that enters the delays

  assign accept = in_valid && in_ready;

  if (SHARE_C) begin : g_seq
    logic    busy;           // second cycle of a sample
    sample_t j_reg;
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        busy  <= 1'b0;
        j_reg <= '0;
      end else begin
        busy <= accept;
        if (accept) j_reg <= in_sample;
      end
    end
    assign in_ready = !busy;
    assign step     = busy;
    assign j_step   = j_reg;
  end else begin : g_direct
    assign in_ready = 1'b1;
    assign step     = in_valid;
    assign j_step   = in_sample;
  end

  ll_input_section #(.HIGHPASS(HIGHPASS)) u_in (.clk, .rst_n, .en(step), .j(j_step), .u);

  for (genvar i = 0; i < N_NODES; i++) begin : g_node
    ll_psi_integrator #(.HIGHPASS(HIGHPASS)) u_psi (.clk, .rst_n, .en(step), .x(x[i]), .y(r[i]));
  end

  for (genvar k = 0; k < N_IND; k++) begin : g_ind
    ll_phi_integrator #(.HIGHPASS(HIGHPASS)) u_phi (.clk, .rst_n, .en(step), .x(bw[k]), .y(y[k]));
  end

  // Lower line, right to left, through the power-of-two branches.
  always_comb begin
    v[N_NODES-1] = cmul(r[N_NODES-1], KA[N_NODES-1]);
    for (int i = N_NODES - 2; i >= 0; i--)
      v[i] = cmul(r[i], KA[i]) - (v[i+1] >>> hshift(i));
  end

  // The two c_i products of every node: c_i * V_i (lower) and c_i * s_i
  // (upper). Shared: one multiplier per node, V_i in the first cycle (result
  // held in w) and s_i in the second. Direct: two multipliers per node.
  if (SHARE_C) begin : g_share
    sig_t cm    [N_NODES];
    sig_t w_reg [N_NODES];
    always_comb begin
      for (int i = 0; i < N_NODES; i++) cm[i] = cmul(g_seq.busy ? s[i] : v[i], KC[i]);
    end
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < N_NODES; i++) w_reg[i] <= '0;
      end else if (accept) begin
        w_reg <= cm;
      end
    end
    assign w  = w_reg;
    assign cs = cm;
  end else begin : g_two_mult
    always_comb begin
      for (int i = 0; i < N_NODES; i++) begin
        w[i]  = cmul(v[i], KC[i]);
        cs[i] = cmul(s[i], KC[i]);
      end
    end
  end

  // Inductor branches and node sums.
  always_comb begin
    for (int k = 0; k < N_IND; k++) bw[k] = cmul(w[k] + w[k+1], KB[k]);
    s[0] = cmul(w[0], KD1) + y[0];
    for (int i = 1; i < N_NODES - 1; i++) s[i] = y[i-1] + y[i];
    s[N_NODES-1] = y[N_IND-1] + cmul(w[N_NODES-1], KD2);
  end

  // Upper line, left to right.
  always_comb begin
    x[0] = u + cs[0];
    for (int i = 1; i < N_NODES; i++)
      x[i] = cs[i] - (x[i-1] >>> hshift(i-1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_sample <= '0;
    end else begin
      out_valid <= accept;
      if (accept) out_sample <= to_sample(cmul(v[N_NODES-1], KF));
    end
  end
endmodule
