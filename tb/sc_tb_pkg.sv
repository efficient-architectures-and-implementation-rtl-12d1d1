// sc_tb_pkg -- reference model shared by the stochastic-unit testbenches.
//
// It recomputes, independently of the RTL, what each function unit must count:
// it steps its own copies of the three random sequences (Fibonacci shift
// registers x^10+x^7+1, x^10+x^3+1 and x^10+x^9+x^8+x^5+1, each extended with
// the all-zero state, seeded with 1), builds the stochastic bits from hand-
// computed coefficient tables, applies the gate network of each architecture
// and counts the ones over 1024 cycles, saturating at 1023.
//
// The tables below were worked out by hand from the piecewise-linear line
// coefficients (a_i, b_i in units of 1/1024):
//   ratio r -> round(r*1024) clipped to 1023; c_i = 1024 - b_i clipped to 1023.
// It also gives the ideal (infinite-stream, uncorrelated) value of each
// circuit and the exact mathematical function, for tolerance checks.
package sc_tb_pkg;

  typedef int row_t [8];

  // Index order: ln1p, tanh, sigmoid, sin, exp(-2x), cos, exp(-x), sin(pi x)/pi
  localparam row_t LUTA [8] = '{
    '{ 965,  873,  807,  757,  717,  685,  662,  643},
    '{1023,  992,  947,  893,  836,  779,  725,  675},
    '{ 512,  508,  501,  491,  481,  467,  454,  440},
    '{1023, 1023, 1023,  984,  953,  918,  881,  844},
    '{ 905,  744,  629,  546,  962,  861,  779,  711},
    '{  63,  187,  301,  397,  476,  537,  582,  613},
    '{ 980,  880,  827,  788,  771,  732,  680,  660},
    '{1001,  863,  622,  256,  476,  882,  998, 1023}};

  localparam row_t LUTB [8] = '{
    '{1023, 1010,  990,  964,  936,  906,  874,  843},
    '{1023, 1020, 1005,  975,  929,  868,  795,  716},
    '{ 512,  512,  511,  509,  505,  500,  492,  482},
    '{1023, 1022, 1022, 1014,  996,  966,  919,  854},
    '{   0,    0,    0,    0,    0,    0,    0,    0},
    '{   0,    0,    0,    0,    0,    0,    0,    0},
    '{   0,    0,    0,    0,    0,    0,    0,    0},
    '{1023, 1004,  933,  795,    0,    0,    0,    0}};

  // One step of a 10-bit shift register, feedback taps given as bit numbers
  // 1..10 in a mask (bit t-1 set for tap t), plus the zero-state splice.
  function automatic int step(int s, int tapmask);
    int fb;
    fb = 0;
    for (int t = 0; t < 10; t++) if (tapmask[t]) fb ^= (s >> t) & 1;
    if ((s & 'h1ff) == 0) fb ^= 1;
    return ((s << 1) & 'h3ff) | fb;
  endfunction

  localparam int TAP_X = (1 << 9) | (1 << 6);                       // 10,7
  localparam int TAP_A = (1 << 9) | (1 << 2);                       // 10,3
  localparam int TAP_B = (1 << 9) | (1 << 8) | (1 << 7) | (1 << 4); // 10,9,8,5

  // ---- 16-segment tables -------------------------------------------------
  // No printed coefficients exist for 16 segments. The testbench derives its
  // own: the line through the function at the two Chebyshev nodes of each
  // segment (centre +/- 0.3536 * width), rounded to 1/1024, then the same
  // ratio formulas as above.
  function automatic real fval(int fn, real xv);
    return true_f(fn, xv);
  endfunction

  function automatic int rnd(real v);
    return (v < 0.0) ? -int'(-v + 0.5) : int'(v + 0.5);
  endfunction

  function automatic void line16(int fn, int seg, output int a, output int b);
    real w, xa, xb, sl;
    w  = 1.0 / 16.0;
    xa = (real'(seg) + 0.5) * w + 0.5 * w * 0.70710678118654752;
    xb = (real'(seg) + 0.5) * w - 0.5 * w * 0.70710678118654752;
    sl = (fval(fn, xa) - fval(fn, xb)) / (xa - xb);
    a  = rnd(sl * 1024.0);
    b  = rnd((fval(fn, xa) - sl * xa) * 1024.0);
  endfunction

  function automatic int qdiv(int n, int d);
    int q;
    q = (n * 1024 + d / 2) / d;
    return (q > 1023) ? 1023 : q;
  endfunction

  function automatic int lut16(int fn, bit sel_b, int seg);
    int a, b;
    bit two;
    line16(fn, seg, a, b);
    two = (fn <= 3) || (fn == 7 && seg < 8);
    if (two) return sel_b ? ((1024 - b > 1023) ? 1023 : 1024 - b) : qdiv(a, 1024 - b);
    if (sel_b) return 0;
    if (a < 0) a = -a;
    if (fn == 4 && seg < 8) return qdiv(a, 2 * b);
    return qdiv(a, b);
  endfunction

  function automatic int lut_word(int fn, bit sel_b, int seg, int segs);
    if (segs == 16) return lut16(fn, sel_b, seg);
    return sel_b ? LUTB[fn][seg] : LUTA[fn][seg];
  endfunction

  function automatic int ref_count(int fn, int x, int segs = 8);
    int rx, ra, rb, seg, la, lb, cnt, d;
    bit bx, ba, bb, o, p, lower;
    rx = 1; ra = 1; rb = 1; cnt = 0; d = 0;
    seg = (segs == 16) ? (x >> 6) : (x >> 7);
    lower = x < 512;
    la = lut_word(fn, 1'b0, seg, segs);
    lb = lut_word(fn, 1'b1, seg, segs);
    for (int t = 0; t < 1024; t++) begin
      bx = rx < x; ba = ra < la; bb = rb < lb;
      case (fn)
        0, 1, 2, 3: o = !(!(bx && ba) && bb);
        5, 6:       o = !(bx && ba);
        7:          o = lower ? !(!(bx && ba) && bb) : !(bx && ba);
        default: begin
          p = bx && ba;
          o = lower ? (p ^ d[0]) : !p;
          d = int'(p);
        end
      endcase
      cnt += int'(o);
      rx = step(rx, TAP_X); ra = step(ra, TAP_A); rb = step(rb, TAP_B);
    end
    return (cnt > 1023) ? 1023 : cnt;
  endfunction

  // Expected value of the circuit's output, as a count out of 1024.
  function automatic real ideal(int fn, int x, int segs = 8);
    real xv, a, b, p;
    int seg;
    bit lower;
    seg = (segs == 16) ? (x >> 6) : (x >> 7);
    lower = x < 512;
    xv = real'(x) / 1024.0;
    a = real'(lut_word(fn, 1'b0, seg, segs)) / 1024.0;
    b = real'(lut_word(fn, 1'b1, seg, segs)) / 1024.0;
    case (fn)
      0, 1, 2, 3: p = 1.0 - b * (1.0 - a * xv);
      5, 6:       p = 1.0 - a * xv;
      7:          p = lower ? 1.0 - b * (1.0 - a * xv) : 1.0 - a * xv;
      default:    p = lower ? 2.0 * a * xv * (1.0 - a * xv) : 1.0 - a * xv;
    endcase
    return p * 1024.0;
  endfunction

  // The mathematical function being approximated.
  function automatic real true_f(int fn, real xv);
    case (fn)
      0: return $ln(1.0 + xv);
      1: return $tanh(xv);
      2: return 1.0 / (1.0 + $exp(-xv));
      3: return $sin(xv);
      4: return $exp(-2.0 * xv);
      5: return $cos(xv);
      6: return $exp(-xv);
      default: return $sin(3.14159265358979 * xv) / 3.14159265358979;
    endcase
  endfunction

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

endpackage
