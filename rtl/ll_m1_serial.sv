// ll_m1_serial: Type M1 LUD-leapfrog filter with time-shared adders.
//
// Computes exactly what ll_m1 computes (same equations, same truncations,
// bit-identical output), but all 22 additions of a sample (3m + 1 for m = 7)
// are scheduled onto a bank of NADD = 3 adder/subtractors over 11 steps,
// instead of one adder per addition. The Psi and Phi integrators, the
// (1 + z^-1) input and the power-of-two branches become steps of that
// schedule; the constant multipliers stay as in ll_m1 and act on registered
// operands. The order of the steps follows the data dependences:
//   step 1   V_3 = a_3 Psi_3 - 2^-3 V_4          u = J + J_prev
//   step 2   V_2 = a_2 Psi_2 - 2^-2 V_3          P_3 = W_3 + W_4
//   step 3   V_1 = a_1 Psi_1 - 2^-4 V_2          P_2 = W_2 + W_3   Y_3 = b_3 P_3 + Y_3
//   step 4   P_1 = W_1 + W_2                     Y_2 = b_2 P_2 + Y_2   S_4 = Y_3 + d_2 W_4
//   step 5   Y_1 = b_1 P_1 + Y_1                 S_3 = Y_2 + Y_3
//   step 6   S_1 = d_1 W_1 + Y_1                 S_2 = Y_1 + Y_2
//   step 7   X_1 = u + c_1 S_1
//   step 8   X_2 = c_2 S_2 - 2^-4 X_1            Psi_1 += X_1
//   step 9   X_3 = c_3 S_3 - 2^-2 X_2            Psi_2 += X_2
//   step 10  X_4 = c_4 S_4 - 2^-3 X_3            Psi_3 += X_3
//   step 11  Psi_4 += X_4
// (W_i = c_i V_i, V_4 = a_4 Psi_4, and each Phi register holds its own output
// Y_k.) The longest chain of dependent additions is 11 long, so no schedule
// is shorter, and at most three additions share a step.
//
// Interface and timing: a sample is accepted when in_valid and in_ready are
// both high. The output for it is V_4 before the sample enters, scaled by
// f_SC; it is registered and appears with out_valid one cycle after the
// sample is accepted. in_ready then stays low for the 11 steps, so a sample is
// taken at most every 12 cycles. Lowpass only: HIGHPASS is not provided.
//
// The adder count and the schedule are this design's own: the method states
// only that time-shared adders for M1 can be reduced to (m + 1) / 2 = 4 while
// keeping the other costs, and gives no schedule. This schedule needs only
// three, at the price of a longer sample period than ll_m1. Widths,
// truncation, saturation and reset follow ll_pkg as in ll_m1.
module ll_m1_serial
  import ll_pkg::*;
#(
  parameter int COEF_MANT = 0
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
  localparam int NADD  = 3;
  localparam int NSTEP = 11;

  localparam coef_t KA [N_NODES] = '{coef_q(coef_a(T, 0), COEF_MANT), coef_q(coef_a(T, 1), COEF_MANT),
                                     coef_q(coef_a(T, 2), COEF_MANT), coef_q(coef_a(T, 3), COEF_MANT)};
  localparam coef_t KB [N_IND] = '{coef_q(coef_b(T, 0), COEF_MANT), coef_q(coef_b(T, 1), COEF_MANT),
                                   coef_q(coef_b(T, 2), COEF_MANT)};
  localparam coef_t KC [N_NODES] = '{coef_q(coef_c(T, 0), COEF_MANT), coef_q(coef_c(T, 1), COEF_MANT),
                                     coef_q(coef_c(T, 2), COEF_MANT), coef_q(coef_c(T, 3), COEF_MANT)};
  localparam coef_t KD1 = coef_q(coef_d(T, 0), COEF_MANT);
  localparam coef_t KD2 = coef_q(coef_d(T, 1), COEF_MANT);
  localparam coef_t KF  = coef_q(coef_f(T), COEF_MANT);

  // Filter state (kept across samples).
  sig_t    psi [N_NODES];    // Psi integrator registers
  sig_t    y   [N_IND];      // Phi integrator registers = branch outputs Y_k
  sample_t j_prev;           // input delay of (1 + z^-1)

  // Intermediate results of one sample.
  sample_t j_reg;            // accepted sample
  sig_t    u;
  sig_t    v   [N_NODES-1];  // V_1..V_3 (V_4 is a_4 Psi_4)
  sig_t    p   [N_IND];      // W_k + W_(k+1)
  sig_t    s   [N_NODES];    // node sums
  sig_t    x   [N_NODES];    // upper-line nodes

  logic [3:0] step;          // 0 idle, 1..NSTEP busy
  logic       accept;

  // Constant multipliers on registered operands.
  sig_t vv [N_NODES];
  sig_t ap [N_NODES];        // a_i * Psi_i
  sig_t w  [N_NODES];        // c_i * V_i
  sig_t bp [N_IND];          // b_k * P_k
  sig_t cs [N_NODES];        // c_i * S_i
  sig_t dw1, dw4;            // d_1 W_1, d_2 W_4

  always_comb begin
    for (int i = 0; i < N_NODES; i++) ap[i] = cmul(psi[i], KA[i]);
    for (int i = 0; i < N_NODES - 1; i++) vv[i] = v[i];
    vv[N_NODES-1] = ap[N_NODES-1];
    for (int i = 0; i < N_NODES; i++) begin
      w[i]  = cmul(vv[i], KC[i]);
      cs[i] = cmul(s[i], KC[i]);
    end
    for (int k = 0; k < N_IND; k++) bp[k] = cmul(p[k], KB[k]);
    dw1 = cmul(w[0], KD1);
    dw4 = cmul(w[N_NODES-1], KD2);
  end

  // The adder bank: operand selection per step.
  sig_t opa [NADD];
  sig_t opb [NADD];
  logic sub [NADD];
  sig_t sum [NADD];

  always_comb begin
    for (int k = 0; k < NADD; k++) begin
      opa[k] = '0;
      opb[k] = '0;
      sub[k] = 1'b0;
    end
    unique case (step)
      4'd1: begin
        opa[0] = ap[2]; opb[0] = vv[3] >>> hshift(2); sub[0] = 1'b1;
        opa[1] = from_sample(j_reg); opb[1] = from_sample(j_prev);
      end
      4'd2: begin
        opa[0] = ap[1]; opb[0] = v[2] >>> hshift(1); sub[0] = 1'b1;
        opa[1] = w[2];  opb[1] = w[3];
      end
      4'd3: begin
        opa[0] = ap[0]; opb[0] = v[1] >>> hshift(0); sub[0] = 1'b1;
        opa[1] = w[1];  opb[1] = w[2];
        opa[2] = bp[2]; opb[2] = y[2];
      end
      4'd4: begin
        opa[0] = w[0];  opb[0] = w[1];
        opa[1] = bp[1]; opb[1] = y[1];
        opa[2] = y[2];  opb[2] = dw4;
      end
      4'd5: begin
        opa[0] = bp[0]; opb[0] = y[0];
        opa[1] = y[1];  opb[1] = y[2];
      end
      4'd6: begin
        opa[0] = dw1;   opb[0] = y[0];
        opa[1] = y[0];  opb[1] = y[1];
      end
      4'd7: begin
        opa[0] = u;     opb[0] = cs[0];
      end
      4'd8, 4'd9, 4'd10: begin
        opa[0] = cs[step - 7]; opb[0] = x[step - 8] >>> hshift(int'(step) - 8); sub[0] = 1'b1;
        opa[1] = psi[step - 8]; opb[1] = x[step - 8];
      end
      4'd11: begin
        opa[0] = psi[3]; opb[0] = x[3];
      end
      default: ;
    endcase
    for (int k = 0; k < NADD; k++) sum[k] = sub[k] ? opa[k] - opb[k] : opa[k] + opb[k];
  end

  assign in_ready = (step == 4'd0);
  assign accept   = in_valid && in_ready;

  // Result write-back and sequencing.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      step   <= 4'd0;
      j_prev <= '0;
      j_reg  <= '0;
      u      <= '0;
      for (int i = 0; i < N_NODES; i++) begin
        psi[i] <= '0;
        s[i]   <= '0;
        x[i]   <= '0;
      end
      for (int i = 0; i < N_NODES - 1; i++) v[i] <= '0;
      for (int k = 0; k < N_IND; k++) begin
        y[k] <= '0;
        p[k] <= '0;
      end
    end else begin
      if (accept) begin
        j_reg <= in_sample;
        step  <= 4'd1;
      end else if (step == 4'(NSTEP)) begin
        step <= 4'd0;
      end else if (step != 4'd0) begin
        step <= step + 4'd1;
      end
      unique case (step)
        4'd1:  begin v[2] <= sum[0]; u <= sum[1]; j_prev <= j_reg; end
        4'd2:  begin v[1] <= sum[0]; p[2] <= sum[1]; end
        4'd3:  begin v[0] <= sum[0]; p[1] <= sum[1]; y[2] <= sum[2]; end
        4'd4:  begin p[0] <= sum[0]; y[1] <= sum[1]; s[3] <= sum[2]; end
        4'd5:  begin y[0] <= sum[0]; s[2] <= sum[1]; end
        4'd6:  begin s[0] <= sum[0]; s[1] <= sum[1]; end
        4'd7:  x[0] <= sum[0];
        4'd8, 4'd9, 4'd10: begin x[step - 7] <= sum[0]; psi[step - 8] <= sum[1]; end
        4'd11: psi[3] <= sum[0];
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_sample <= '0;
    end else begin
      out_valid <= accept;
      if (accept) out_sample <= to_sample(cmul(ap[N_NODES-1], KF));
    end
  end
endmodule
