// nlf_ref_pkg: reference models for the testbenches of the non-linear
// function engine, written independently of the RTL.
//
//  - act():      the eight activation functions in double precision;
//  - fit_pwl():  derives the engine parameters of a function from chords over
//                uniform segments of [lo, hi] (slopes alpha_j, boundaries h_j,
//                intercept terms beta_j with alpha_j*beta_j = c_{j+1} - c_j,
//                baseline intercept lambda = c_0), quantised to FRAC bits;
//  - pwl_ref():  the value the engine must produce for one input, from the
//                quantised parameters, with exact integer arithmetic,
//                half-up rounding and saturation;
//  - dot_ref():  rounding and saturation of an exact linear-combination sum.
package nlf_ref_pkg;

  typedef logic signed [127:0] wide_t;

  localparam int NUM_ACT = 8;

  function automatic string act_name(int f);
    case (f)
      0: return "Sigmoid";
      1: return "LogSigmoid";
      2: return "Tanh";
      3: return "Tanhshrink";
      4: return "ELU";
      5: return "SELU";
      6: return "Softplus";
      default: return "Softsign";
    endcase
  endfunction

  function automatic real act(int f, real x);
    real ax;
    ax = (x < 0.0) ? -x : x;
    case (f)
      0: return 1.0 / (1.0 + $exp(-x));
      1: return (x > 0.0) ? -$ln(1.0 + $exp(-x)) : x - $ln(1.0 + $exp(x));
      2: return $tanh(x);
      3: return x - $tanh(x);
      4: return (x > 0.0) ? x : $exp(x) - 1.0;
      5: return 1.0507009873554805 * ((x > 0.0) ? x : 1.6732632423543772 * ($exp(x) - 1.0));
      6: return (x > 0.0) ? x + $ln(1.0 + $exp(-x)) : $ln(1.0 + $exp(x));
      default: return x / (1.0 + ax);
    endcase
  endfunction

  function automatic longint quant(real r, int frac);
    real s;
    s = r * (2.0 ** frac);
    return (s >= 0.0) ? longint'($floor(s + 0.5)) : -longint'($floor(-s + 0.5));
  endfunction

  function automatic real unq(longint q, int frac);
    return real'(q) / (2.0 ** frac);
  endfunction

  // Parameters of a function for S uniform segments over [lo, hi]. Arrays are
  // sized B (h has B-1 entries: h_1 .. h_{B-1}; unused ones hold the largest
  // word so they behave as +inf). beta_j is chosen against the intercept
  // actually reached with the quantised values so that errors do not pile up.
  function automatic void fit_pwl(int f, int S, int B, int N, int frac, real lo, real hi,
                                  output longint h[], output longint alpha[],
                                  output longint beta[], output longint lambda);
    real    w, c_next, reached;
    real    a_r [];
    real    c_r [];
    longint maxw;
    maxw  = (longint'(1) <<< (N - 1)) - 1;
    h     = new[B - 1];
    alpha = new[B];
    beta  = new[B];
    a_r   = new[S];
    c_r   = new[S];
    w = (hi - lo) / S;
    for (int j = 0; j < S; j++) begin
      real x0, x1;
      x0 = lo + j * w;
      x1 = x0 + w;
      a_r[j] = (act(f, x1) - act(f, x0)) / w;
      c_r[j] = act(f, x0) - a_r[j] * x0;
    end
    for (int j = 1; j < B; j++) h[j-1] = (j < S) ? quant(lo + j * w, frac) : maxw;
    for (int j = 0; j < B; j++) begin
      alpha[j] = (j < S) ? quant(a_r[j], frac) : 0;
      beta[j]  = 0;
    end
    lambda  = quant(c_r[0], frac);
    reached = unq(lambda, frac);
    for (int j = 0; j + 1 < S; j++) begin
      c_next  = c_r[j+1];
      if (alpha[j] != 0) beta[j] = quant((c_next - reached) / unq(alpha[j], frac), frac);
      reached = reached + unq(alpha[j], frac) * unq(beta[j], frac);
    end
  endfunction

  function automatic longint round_sat(wide_t acc, int N, int frac, output bit sat);
    wide_t r, mx, mn;
    mx  = (wide_t'(1) <<< (N - 1)) - 1;
    mn  = -(wide_t'(1) <<< (N - 1));
    r   = (acc + (wide_t'(1) <<< (frac - 1))) >>> frac;
    sat = 1'b0;
    if (r > mx) begin r = mx; sat = 1'b1; end
    if (r < mn) begin r = mn; sat = 1'b1; end
    return longint'(r);
  endfunction

  // Expected engine output for one entry x in non-linear mode.
  function automatic longint pwl_ref(longint x, longint h[], longint alpha[],
                                     longint beta[], longint lambda,
                                     int S, int N, int frac, output bit sat);
    int    seg;
    wide_t acc;
    seg = 0;
    for (int j = 1; j < S; j++) if (x >= h[j-1]) seg = j;
    acc = wide_t'(lambda) <<< frac;
    for (int j = 0; j < seg; j++) acc += wide_t'(alpha[j]) * wide_t'(beta[j]);
    acc += wide_t'(alpha[seg]) * wide_t'(x);
    return round_sat(acc, N, frac, sat);
  endfunction

  // Sign extension of an N-bit field.
  function automatic longint sext(logic [63:0] v, int N);
    longint r;
    r = longint'(v << (64 - N)) >>> (64 - N);
    return r;
  endfunction

endpackage
