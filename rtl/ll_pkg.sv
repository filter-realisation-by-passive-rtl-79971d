// ll_pkg: shared constants, types and coefficient sets for the LUD-leapfrog
// (LL) digital ladder filters.
//
// All four filter structures (Standard LL, Types M1, M2, M3) simulate the same
// 7th-order elliptic lowpass LC ladder with 4 nodes and 3 inductors. Their
// signals are two's complement fixed point: INT_W bits with FRAC fraction bits
// inside the filter, DATA_W bits (Q1.15) at the ports. These widths are this
// design's own choice; the filter coefficients below are those of the
// realisations of the example filter, 4 significant digits each.
//
// Coefficients are held as signed fixed point with COEF_FRAC fraction bits.
// coef_fixed() can first truncate a coefficient, as a binary floating-point
// number, to a given number of mantissa bits, always towards minus infinity
// ("the nearest smaller number"). This reproduces short coefficient
// wordlengths such as 8 or 4 bits; mant = 0 keeps the full value.
// cmul() is the constant multiplier used everywhere: exact product, then
// truncation (floor) back to FRAC fraction bits.
package ll_pkg;

  localparam int DATA_W    = 16;  // port sample width, Q1.(DATA_W-1)
  localparam int INT_W     = 32;  // internal word width
  localparam int FRAC      = 20;  // internal fraction bits
  localparam int COEF_FRAC = 16;  // coefficient fraction bits
  localparam int COEF_W    = COEF_FRAC + 4;  // coefficient width, range +-8
  localparam int N_NODES   = 4;   // ladder nodes (filter order 2*N_NODES-1)
  localparam int N_IND     = N_NODES - 1;  // inductor branches

  typedef logic signed [INT_W-1:0]  sig_t;
  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  typedef enum logic [1:0] {
    LL_STANDARD = 2'd0,
    LL_M1       = 2'd1,
    LL_M2       = 2'd2,
    LL_M3       = 2'd3
  } ll_type_e;

  // Right shifts of the power-of-two horizontal branches of Types M1-M3
  // (U_s off-diagonals 2^-4, 2^-2, 2^-3); the branches subtract.
  function automatic int hshift(int k);
    case (k)
      0: return 4;
      1: return 2;
      default: return 3;
    endcase
  endfunction

  // a_i: gain after the delayed integrator of node i (1/D_i).
  function automatic real coef_a(ll_type_e t, int i);
    case (t)
      LL_STANDARD: case (i) 0: return 0.2056; 1: return 0.1420; 2: return 0.1412; default: return 0.2070; endcase
      LL_M1:       case (i) 0: return 0.5651; 1: return 0.7219; 2: return 0.2616; default: return 0.3541; endcase
      LL_M2:       case (i) 0: return 0.8807; 1: return 1.125;  2: return 0.4078; default: return 0.5519; endcase
      default:     case (i) 0: return 0.8911; 1: return 1.138;  2: return 0.4126; default: return 0.5583; endcase
    endcase
  endfunction

  // b_k: gain of inductor branch k (in front of its delay-free integrator).
  function automatic real coef_b(ll_type_e t, int k);
    case (t)
      LL_STANDARD, LL_M1: case (k) 0: return -0.9668; 1: return -1.045; default: return -1.093; endcase
      LL_M2:              case (k) 0: return -0.226;  1: return -0.131; default: return -0.379; endcase
      default:            case (k) 0: return -0.1640; 1: return -0.2159; default: return -0.3894; endcase
    endcase
  endfunction

  // c_i: Standard LL horizontal branches (i = 0..2), M1 node scale factors
  // (i = 0..3), M2 factors of U_b (i = 0..2), M3 diagonal terms D_m (i = 0..3).
  function automatic real coef_c(ll_type_e t, int i);
    case (t)
      LL_STANDARD: case (i) 0: return -0.0850; 1: return -0.1509; default: return -0.1201; endcase
      LL_M1:       case (i) 0: return 0.6032; 1: return 0.4435; 2: return 0.7347; default: return 0.7646; endcase
      LL_M2:       case (i) 0: return 0.7352; 1: return 1.657;  default: return 1.041; endcase
      default:     case (i) 0: return -0.05907; 1: return 0.1290; 2: return -0.1265; default: return -0.01587; endcase
    endcase
  endfunction

  // d_1, d_2: terminations (conductances) at the first and last node.
  function automatic real coef_d(ll_type_e t, int i);
    case (t)
      LL_STANDARD, LL_M1: return -2.0;
      LL_M2:              return (i == 0) ? -0.4670 : -0.7502;
      default:            return (i == 0) ? -0.4615 : -0.7416;
    endcase
  endfunction

  // Output scale factor (2 for Standard LL, f_SC for the scaled types).
  function automatic real coef_f(ll_type_e t);
    case (t)
      LL_STANDARD: return 2.0;
      LL_M1:       return 0.9225;
      LL_M2:       return 0.5787;
      default:     return 0.585;
    endcase
  endfunction

  // Truncate c to mant significant bits (mant = 0: no truncation), then
  // return it as an integer in units of 2^-cf, rounded down.
  function automatic longint coef_fixed(real c, int mant, int cf);
    real mag, g, q;
    int  e;
    q = c;
    if (mant > 0 && c != 0.0) begin
      mag = (c < 0.0) ? -c : c;
      e = 0;
      while (mag >= 1.0) begin mag = mag / 2.0; e = e + 1; end
      while (mag < 0.5)  begin mag = mag * 2.0; e = e - 1; end
      // |c| = mag * 2^e with 0.5 <= mag < 1
      g = 2.0 ** (e - mant);
      q = $floor(c / g) * g;
    end
    return longint'($floor(q * (2.0 ** cf)));
  endfunction

  function automatic coef_t coef_q(real c, int mant);
    return coef_t'(coef_fixed(c, mant, COEF_FRAC));
  endfunction

  // x * k with k in units of 2^-COEF_FRAC, result floored to FRAC bits.
  function automatic sig_t cmul(sig_t x, coef_t k);
    longint p;
    p = longint'(x) * longint'(k);
    return sig_t'(p >>> COEF_FRAC);
  endfunction

  // Internal value to port sample, truncated and saturated.
  function automatic sample_t to_sample(sig_t x);
    sig_t t;
    t = x >>> (FRAC - (DATA_W - 1));
    if (t > sig_t'((1 << (DATA_W - 1)) - 1)) return sample_t'((1 << (DATA_W - 1)) - 1);
    if (t < -sig_t'(1 << (DATA_W - 1)))      return sample_t'(-(1 << (DATA_W - 1)));
    return sample_t'(t);
  endfunction

  // Port sample to internal value.
  function automatic sig_t from_sample(sample_t s);
    return sig_t'(s) <<< (FRAC - (DATA_W - 1));
  endfunction

endpackage
