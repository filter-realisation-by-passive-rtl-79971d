// ll_ref_pkg: floating-point reference for the LL filter testbenches.
//
// Computes the response of the 7th-order elliptic lowpass ladder directly
// from its nodal matrices, independently of any filter structure. With the
// bilinear transform s = (1 - z^-1)/(1 + z^-1), the nodal equation
// (sC + Gamma/s + G) V = J becomes, in the time domain,
//   (C + Gamma + G) V[n] = 2(C - Gamma) V[n-1] - (C + Gamma - G) V[n-2]
//                          + J[n-1] - J[n-3]
// where the extra delay on J is the one period that the (1 + z^-1) input
// section of the filters adds. C, Gamma, G are the 4x4 tridiagonal matrices of
// the normalised ladder (g_in = g_L = 1). Each diagonal entry of Gamma is the
// sum of its two off-diagonal neighbours (every node connects only to
// inductors in series along the ladder), so Gamma is exactly singular and the
// ladder passes DC with gain 1/2 (2 * V_4 = -1). Each step solves the tridiagonal
// system by Gaussian elimination. step() returns 2 * V_4 (the filter output,
// unit gain in the passband).
package ll_ref_pkg;

  class ladder_ref;
    real cd[4]  = '{3.62, 6.57, 6.71, 3.66};    // C diagonal
    real co[3]  = '{0.171, 0.802, 0.577};       // C off-diagonal
    real gd[4]  = '{0.242, 0.503, 0.534, 0.273}; // Gamma diagonal
    real go[3]  = '{0.242, 0.261, 0.273};       // Gamma off-diagonal
    real gg[4]  = '{1.0, 0.0, 0.0, 1.0};        // G diagonal
    real v1[4], v2[4];  // V[n-1], V[n-2]
    real h[3];          // J[n-1], J[n-2], J[n-3]

    function new();
      reset();
    endfunction

    function void reset();
      foreach (v1[i]) begin v1[i] = 0.0; v2[i] = 0.0; end
      foreach (h[i]) h[i] = 0.0;
    endfunction

    // Advance by one sample with input j; returns 2 * V_4[n].
    function real step(real j);
      real dg[4], rhs[4], vn[4], m;
      for (int i = 0; i < 4; i++) begin
        dg[i]  = cd[i] + gd[i] + gg[i];
        rhs[i] = 2.0 * (cd[i] - gd[i]) * v1[i] - (cd[i] + gd[i] - gg[i]) * v2[i];
        if (i > 0) rhs[i] += 2.0 * (co[i-1] - go[i-1]) * v1[i-1] - (co[i-1] + go[i-1]) * v2[i-1];
        if (i < 3) rhs[i] += 2.0 * (co[i] - go[i]) * v1[i+1] - (co[i] + go[i]) * v2[i+1];
      end
      rhs[0] += h[0] - h[2];
      // Tridiagonal elimination; off-diagonal of C + Gamma + G is co + go.
      for (int i = 1; i < 4; i++) begin
        m = (co[i-1] + go[i-1]) / dg[i-1];
        dg[i]  -= m * (co[i-1] + go[i-1]);
        rhs[i] -= m * rhs[i-1];
      end
      vn[3] = rhs[3] / dg[3];
      for (int i = 2; i >= 0; i--) vn[i] = (rhs[i] - (co[i] + go[i]) * vn[i+1]) / dg[i];
      v2 = v1;
      v1 = vn;
      h[2] = h[1]; h[1] = h[0]; h[0] = j;
      return 2.0 * vn[3];
    endfunction
  endclass

endpackage
