// sc_pkg -- shared types, constants and coefficient tables for the stochastic
// function units.
//
// Each function f(x), x in [0,1), is split into s equal segments selected by the
// log2(s) MSBs of the 10-bit input, and in segment i it is approximated by the
// straight line a_i*x + b_i with a_i, b_i integers N meaning N/1024.
// For s = 8 (the reference configuration) the line coefficients are the
// published piecewise-linear / Lagrange (Chebyshev-node) fit listed below.
// For s = 16 no coefficients are published; fit_coef() then computes them at
// elaboration by linear Lagrange interpolation through the two Chebyshev
// nodes of each segment, x = m +/- (h/2) cos(pi/4) for a segment with centre m
// and width h, rounded to 1/1024. That reproduces the printed 8-segment table
// within a few LSBs for most functions (not for sin x and e^-x, whose printed
// coefficients come from a further optimisation that cannot be recomputed). The look-up tables that the hardware actually holds are
// not the line coefficients themselves but ratios derived from them so that
// every stored value is a probability in [0,1]; lut_value() computes those at
// elaboration time:
//
//   one-NAND form    (e^-x, cos x, upper half of sin(pi x)/pi and e^-2x):
//                       LUT-A = |a_i| / b_i
//   two-NAND form    (ln(1+x), tanh, sigmoid, sin, lower half of sin(pi x)/pi):
//                       c_i = 1 - b_i,  LUT-A = a_i / c_i,  LUT-B = c_i
//                       (the ratio uses the exact c_i, LUT-B the clipped one)
//   AND/XOR form     (lower half of e^-2x):
//                       LUT-A = |a_i| / (2 b_i)
//
// Every ratio r is stored as round(r*1024) and clipped to 1023, the largest
// value a 10-bit stochastic number generator can express. Clipping is needed
// for a few entries (e.g. sin x segment 1, where a_1 > c_1). Rounding and
// clipping are choices of this implementation.
package sc_pkg;

  localparam int unsigned DATA_W          = 10;        // binary word / LUT width
  localparam int unsigned NSEG       = 8;         // segments of the printed table, s = 2^3
  localparam int unsigned STREAM_LEN = 1 << DATA_W;    // stochastic bits per value

  typedef enum logic [2:0] {
    FN_LN1P    = 3'd0,   // ln(1+x)
    FN_TANH    = 3'd1,   // tanh(x)
    FN_SIGMOID = 3'd2,   // 1/(1+e^-x)
    FN_SIN     = 3'd3,   // sin(x)
    FN_EXP2    = 3'd4,   // e^-2x
    FN_COS     = 3'd5,   // cos(x)
    FN_EXP1    = 3'd6,   // e^-x
    FN_SINPI   = 3'd7    // sin(pi x)/pi
  } func_e;

  localparam int unsigned NFUNC = 8;

  typedef enum logic {
    LUT_A = 1'b0,
    LUT_B = 1'b1
  } lut_sel_e;

  typedef int coef_row_t [NSEG];

  // Line slopes a_i (units of 2^-10), per function, segments 0..7.
  localparam coef_row_t A_LN1P    = '{ 964,  861,  780,  713,  655,  606,  565,  529};
  localparam coef_row_t A_TANH    = '{1023,  988,  929,  850,  758,  660,  563,  472};
  localparam coef_row_t A_SIGMOID = '{ 256,  254,  250,  244,  237,  228,  218,  207};
  localparam coef_row_t A_SIN     = '{1023, 1023, 1023,  974,  927,  866,  791,  704};
  localparam coef_row_t A_EXP2    = '{-1809,-1409,-1097, -855, -665, -518, -403, -314};
  localparam coef_row_t A_COS     = '{ -63, -190, -315, -433, -545, -649, -743, -825};
  localparam coef_row_t A_EXP1    = '{-962, -849, -748, -661, -582, -517, -453, -394};
  localparam coef_row_t A_SINPI   = '{1001,  846,  567,  199, -199, -567, -846,-1001};

  // Line offsets b_i (units of 2^-10).
  localparam coef_row_t B_LN1P    = '{   1,   14,   34,   60,   88,  118,  150,  181};
  localparam coef_row_t B_TANH    = '{   1,    4,   19,   49,   95,  156,  229,  308};
  localparam coef_row_t B_SIGMOID = '{ 512,  512,  513,  515,  519,  524,  532,  542};
  localparam coef_row_t B_SIN     = '{   0,    2,    2,   10,   28,   58,  105,  170};
  localparam coef_row_t B_EXP2    = '{1023,  970,  893,  802,  708,  616,  530,  452};
  localparam coef_row_t B_COS     = '{1025, 1041, 1072, 1116, 1172, 1237, 1307, 1379};
  localparam coef_row_t B_EXP1    = '{1005,  988,  926,  859,  773,  723,  682,  611};
  localparam coef_row_t B_SINPI   = '{   0,   20,   91,  229,  428,  658,  868, 1001};

  function automatic int coef_a(func_e fn, int seg);
    case (fn)
      FN_LN1P:    return A_LN1P[seg];
      FN_TANH:    return A_TANH[seg];
      FN_SIGMOID: return A_SIGMOID[seg];
      FN_SIN:     return A_SIN[seg];
      FN_EXP2:    return A_EXP2[seg];
      FN_COS:     return A_COS[seg];
      FN_EXP1:    return A_EXP1[seg];
      default:    return A_SINPI[seg];
    endcase
  endfunction

  function automatic int coef_b(func_e fn, int seg);
    case (fn)
      FN_LN1P:    return B_LN1P[seg];
      FN_TANH:    return B_TANH[seg];
      FN_SIGMOID: return B_SIGMOID[seg];
      FN_SIN:     return B_SIN[seg];
      FN_EXP2:    return B_EXP2[seg];
      FN_COS:     return B_COS[seg];
      FN_EXP1:    return B_EXP1[seg];
      default:    return B_SINPI[seg];
    endcase
  endfunction

  // The function itself, for the elaboration-time fit.
  function automatic real eval_fn(func_e fn, real x);
    case (fn)
      FN_LN1P:    return $ln(1.0 + x);
      FN_TANH:    return $tanh(x);
      FN_SIGMOID: return 1.0 / (1.0 + $exp(-x));
      FN_SIN:     return $sin(x);
      FN_EXP2:    return $exp(-2.0 * x);
      FN_COS:     return $cos(x);
      FN_EXP1:    return $exp(-x);
      default:    return $sin(3.14159265358979 * x) / 3.14159265358979;
    endcase
  endfunction

  // Chebyshev-node linear fit of segment seg out of segs; returns a_i (want_b
  // = 0) or b_i (want_b = 1) in units of 2^-10, rounded to nearest.
  function automatic int fit_coef(func_e fn, int seg, int segs, bit want_b);
    real lo, hi, mid, half, x0, x1, a, b, v;
    lo   = real'(seg) / real'(segs);
    hi   = real'(seg + 1) / real'(segs);
    mid  = (lo + hi) / 2.0;
    half = (hi - lo) / 2.0;
    x0   = mid + half * $cos(3.14159265358979 / 4.0);
    x1   = mid - half * $cos(3.14159265358979 / 4.0);
    a    = (eval_fn(fn, x0) - eval_fn(fn, x1)) / (x0 - x1);
    b    = eval_fn(fn, x0) - a * x0;
    v    = (want_b ? b : a) * real'(STREAM_LEN);
    return (v < 0.0) ? -int'(-v + 0.5) : int'(v + 0.5);
  endfunction

  // Line coefficients of segment seg for an s = segs division.
  function automatic int line_a(func_e fn, int seg, int segs);
    if (segs == int'(NSEG)) return coef_a(fn, seg);
    return fit_coef(fn, seg, segs, 1'b0);
  endfunction

  function automatic int line_b(func_e fn, int seg, int segs);
    if (segs == int'(NSEG)) return coef_b(fn, seg);
    return fit_coef(fn, seg, segs, 1'b1);
  endfunction

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  // round(num/den * 2^W), clipped to 2^W - 1.
  function automatic int ratio_q(int num, int den);
    int q;
    q = (num * int'(STREAM_LEN) + den / 2) / den;
    return (q > int'(STREAM_LEN) - 1) ? int'(STREAM_LEN) - 1 : q;
  endfunction

  // c_i = 1 - b_i, clipped to 2^W - 1.
  function automatic int comp_q(int b);
    int c;
    c = int'(STREAM_LEN) - b;
    return (c > int'(STREAM_LEN) - 1) ? int'(STREAM_LEN) - 1 : c;
  endfunction

  // Architecture used in each half of the input range.
  function automatic bit uses_two_nand(func_e fn, int seg, int segs);
    case (fn)
      FN_LN1P, FN_TANH, FN_SIGMOID, FN_SIN: return 1'b1;
      FN_SINPI:                             return seg < segs / 2;
      default:                              return 1'b0;
    endcase
  endfunction

  // Stored LUT word for function fn, table sel, segment seg of segs.
  function automatic logic [DATA_W-1:0] lut_value(func_e fn, lut_sel_e sel, int seg, int segs);
    int a, b, v;
    a = line_a(fn, seg, segs);
    b = line_b(fn, seg, segs);
    if (uses_two_nand(fn, seg, segs)) begin
      v = (sel == LUT_A) ? ratio_q(a, int'(STREAM_LEN) - b) : comp_q(b);
    end else if (sel == LUT_B) begin
      v = 0;                                       // unused half: zeros
    end else if (fn == FN_EXP2 && seg < segs / 2) begin
      v = ratio_q(iabs(a), 2 * b);                 // |a_i| / (2 b_i)
    end else begin
      v = ratio_q(iabs(a), b);                     // |a_i| / b_i
    end
    return DATA_W'(v);
  endfunction

endpackage
