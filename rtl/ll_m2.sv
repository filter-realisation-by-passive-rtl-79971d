// ll_m2: Type M2 modified LUD-leapfrog digital ladder filter.
//
// Scaled like Type M1, so the upper and lower lines use power-of-two branches
// (right shifts by 4, 2 and 3 bits, subtracting). The scaled inductor matrix
// is factored as B_s = U_b^T D_b U_b, with U_b a 3x4 unit upper bidiagonal
// matrix whose off-diagonals are c_1..c_3 and D_b = -diag(b_k). Its rank can
// never exceed 3, so the structure keeps the exact response at DC. Node by
// node (a_i = 1/D_s,i):
//   lower line (right to left):  V_i = a_i * Psi(X_i) - 2^-k_i * V_(i+1)
//   inductor branch k:           Y_k = Phi( b_k * (V_k + c_k * V_(k+1)) )
//   upper line (left to right):  X_i = Y_i + c_(i-1) * Y_(i-1) - 2^-k_(i-1) * X_(i-1)
//                                with u + d_1*V_1 added at node 1 and d_2*V_4
//                                at node 4 (which has no Y_4)
//   output:                      f_SC * V_4
// The power-of-two branches subtract, as the -U_offd terms of the equations
// require; the figure of the structure prints only their magnitudes.
//
// Timing: with SHARE_C = 0, one sample per clock cycle with in_valid high
// (in_ready is always 1), and the whole graph is evaluated in that cycle. V
// depends only on the Psi registers, so the output for sample n is V_4 before
// sample n enters; it is registered and appears with out_valid one cycle after
// the sample is taken. SHARE_C = 1 computes the two identical
// c_k products of each off-diagonal serially on one multiplier: in the cycle a
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
module ll_m2
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
  localparam ll_type_e T = LL_M2;

  localparam coef_t KA [N_NODES] = '{coef_q(coef_a(T, 0), COEF_MANT), coef_q(coef_a(T, 1), COEF_MANT),
                                     coef_q(coef_a(T, 2), COEF_MANT), coef_q(coef_a(T, 3), COEF_MANT)};
  localparam coef_t KB [N_IND] = '{coef_q(coef_b(T, 0), COEF_MANT), coef_q(coef_b(T, 1), COEF_MANT),
                                   coef_q(coef_b(T, 2), COEF_MANT)};
  localparam coef_t KC [N_IND] = '{coef_q(coef_c(T, 0), COEF_MANT), coef_q(coef_c(T, 1), COEF_MANT),
                                   coef_q(coef_c(T, 2), COEF_MANT)};
  localparam coef_t KD1 = coef_q(coef_d(T, 0), COEF_MANT);
  localparam coef_t KD2 = coef_q(coef_d(T, 1), COEF_MANT);
  localparam coef_t KF  = coef_q(coef_f(T), COEF_MANT);

  sig_t u;                   // (1 + z^-1) J
  sig_t r  [N_NODES];        // Psi(X_i)
  sig_t v  [N_NODES];        // lower-line nodes V_i
  sig_t cv [N_IND];          // c_k * V_(k+1)
  sig_t bw [N_IND];          // inputs of the inductor-branch Phi integrators
  sig_t y  [N_IND];          // their outputs
  sig_t cy [N_IND];          // c_k * Y_k
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

  // The two c_k products of every off-diagonal: c_k * V_(k+1) (lower) and
  // c_k * Y_k (upper). Shared: one multiplier per c_k, V_(k+1) in the first
  // cycle (result held in cv) and Y_k in the second. Direct: two multipliers.
  if (SHARE_C) begin : g_share
    sig_t cm     [N_IND];
    sig_t cv_reg [N_IND];
    always_comb begin
      for (int k = 0; k < N_IND; k++) cm[k] = cmul(g_seq.busy ? y[k] : v[k+1], KC[k]);
    end
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int k = 0; k < N_IND; k++) cv_reg[k] <= '0;
      end else if (accept) begin
        cv_reg <= cm;
      end
    end
    assign cv = cv_reg;
    assign cy = cm;
  end else begin : g_two_mult
    always_comb begin
      for (int k = 0; k < N_IND; k++) begin
        cv[k] = cmul(v[k+1], KC[k]);
        cy[k] = cmul(y[k], KC[k]);
      end
    end
  end

  // Inductor-branch inputs: rows of U_b applied to V.
  always_comb begin
    for (int k = 0; k < N_IND; k++) bw[k] = cmul(v[k] + cv[k], KB[k]);
  end

  // Upper line, left to right: columns of U_b^T applied to Y.
  always_comb begin
    x[0] = u + cmul(v[0], KD1) + y[0];
    for (int i = 1; i < N_NODES - 1; i++)
      x[i] = y[i] + cy[i-1] - (x[i-1] >>> hshift(i-1));
    x[N_NODES-1] = cy[N_IND-1] + cmul(v[N_NODES-1], KD2)
                 - (x[N_NODES-2] >>> hshift(N_NODES-2));
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
