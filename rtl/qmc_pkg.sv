// qmc_pkg: types, constants and elaboration-time helpers shared by the
// quasi-random Brownian motion accelerator.
//
// fp64_t is an IEEE-754 double held as a bit vector. The pipelined operators
// fp64_add and fp64_mul have the fixed latencies FP_ADD_LAT and FP_MUL_LAT.
// fp64_from_uint converts an unsigned integer, scaled by a power of two,
// exactly into a double (used by range reduction and the tail unit).
//
// The remaining functions use `real` arithmetic and are evaluated only at
// elaboration: they build the coefficient tables of the inverse normal CDF
// (per-segment cubics and the tail polynomial) and of the Brownian bridge.
// Phi^-1 is obtained by Newton iteration on Phi, where Phi comes from its
// Taylor series near the centre and from the Laplace continued fraction in
// the tail. Each polynomial interpolates Phi^-1 at Chebyshev nodes of its
// interval, a near-minimax fit; the fitting method is a choice of this design.
package qmc_pkg;

  typedef logic [63:0] fp64_t;

  localparam int unsigned FP_MUL_LAT = 3;
  localparam int unsigned FP_ADD_LAT = 3;

  // Region selected by ICDF range reduction.
  typedef enum logic [1:0] {
    RG_CENTRAL = 2'd0,
    RG_TAIL    = 2'd1,
    RG_HALF    = 2'd2
  } icdf_region_e;

  localparam fp64_t FP_ZERO    = 64'h0000_0000_0000_0000;
  localparam fp64_t FP_ONE     = 64'h3FF0_0000_0000_0000;
  localparam fp64_t FP_NEG_ONE = 64'hBFF0_0000_0000_0000;
  localparam fp64_t FP_LN2     = 64'h3FE6_2E42_FEFA_39EF;

  function automatic fp64_t fp64_neg(input fp64_t a);
    return {~a[63], a[62:0]};
  endfunction

  // Exact conversion of v * 2^-shift to double (v has at most 53 significant bits).
  function automatic fp64_t fp64_from_uint(input logic [52:0] v, input int shift);
    int lead;
    logic [52:0] m;
    lead = -1;
    for (int i = 0; i < 53; i++) if (v[i]) lead = i;
    if (lead < 0) return FP_ZERO;
    m = v << (52 - lead);
    return {1'b0, 11'(1023 + lead - shift), m[51:0]};
  endfunction

  // ---------------------------------------------------------------------
  // Elaboration-time real arithmetic
  // ---------------------------------------------------------------------
  localparam real PI = 3.14159265358979323846;

  function automatic real pdf(input real x);
    return $exp(-0.5 * x * x) / $sqrt(2.0 * PI);
  endfunction

  // Standard normal CDF for x <= 0.
  function automatic real cdf_neg(input real x);
    real s, term, f;
    if (x > -3.6) begin
      // Phi(x) = 1/2 + pdf(x) * sum x^(2n+1)/(2n+1)!!
      term = x;
      s = x;
      for (int n = 1; n < 64; n++) begin
        term = term * x * x / (2.0 * n + 1.0);
        s = s + term;
      end
      return 0.5 + pdf(x) * s;
    end
    // Laplace continued fraction for the Mills ratio, evaluated bottom-up.
    f = -x;
    for (int n = 100; n >= 1; n--) f = -x + n / f;
    return pdf(x) / f;
  endfunction

  // Phi^-1(u) for 0 < u <= 0.5.
  function automatic real icdf_real(input real u);
    real t, x;
    t = $sqrt(-2.0 * $ln(u));
    x = -(t - (2.515517 + 0.802853 * t + 0.010328 * t * t) /
              (1.0 + 1.432788 * t + 0.189269 * t * t + 0.001308 * t * t * t));
    for (int it = 0; it < 4; it++) x = x - (cdf_neg(x) - u) / pdf(x);
    return x;
  endfunction

  typedef real rvec8_t[8];

  // Monomial coefficients of the degree-k polynomial through (xs[i], ys[i]).
  function automatic rvec8_t interp_coeffs(input rvec8_t xs, input rvec8_t ys, input int k);
    rvec8_t d, c, basis, nb;
    d = ys;
    for (int j = 1; j <= k; j++)
      for (int i = k; i >= j; i--) d[i] = (d[i] - d[i-1]) / (xs[i] - xs[i-j]);
    for (int i = 0; i < 8; i++) begin c[i] = 0.0; basis[i] = 0.0; end
    basis[0] = 1.0;
    for (int j = 0; j <= k; j++) begin
      for (int i = 0; i <= k; i++) c[i] = c[i] + d[j] * basis[i];
      // basis *= (x - xs[j])
      for (int i = 0; i < 8; i++) nb[i] = 0.0;
      for (int i = 0; i < 7; i++) begin
        nb[i+1] = nb[i+1] + basis[i];
        nb[i]   = nb[i] - xs[j] * basis[i];
      end
      basis = nb;
    end
    return c;
  endfunction

  // Cubic (order kc) for central segment j of octave i, in t in [0,1):
  //   u = 2^-(i+2) + (j + t) * 2^-(i+2+r)
  function automatic rvec8_t central_coeffs(input int i, input int j, input int r, input int kc);
    rvec8_t xs, ys;
    real lo, dl;
    lo = 2.0 ** (-(i + 2));
    dl = 2.0 ** (-(i + 2 + r));
    for (int n = 0; n < 8; n++) begin xs[n] = 0.0; ys[n] = 0.0; end
    for (int n = 0; n <= kc; n++) begin
      xs[n] = 0.5 - 0.5 * $cos((2.0 * n + 1.0) * PI / (2.0 * (kc + 1)));
      ys[n] = icdf_real(lo + (j + xs[n]) * dl);
    end
    return interp_coeffs(xs, ys, kc);
  endfunction

  // Tail polynomial in s = ln(-ln x) - tail_centre, x in [2^-32, 2^-(m+1)).
  function automatic real tail_y(input real x);
    return $ln(-$ln(x));
  endfunction
  function automatic real tail_centre(input int m);
    return 0.5 * (tail_y(2.0 ** (-(m + 1))) + tail_y(2.0 ** (-32)));
  endfunction
  function automatic rvec8_t tail_coeffs(input int m, input int kt);
    rvec8_t xs, ys;
    real ylo, yhi, yc, h, y;
    ylo = tail_y(2.0 ** (-(m + 1)));
    yhi = tail_y(2.0 ** (-32));
    yc = 0.5 * (ylo + yhi);
    h = 0.5 * (ylo - yhi);
    for (int n = 0; n < 8; n++) begin xs[n] = 0.0; ys[n] = 0.0; end
    for (int n = 0; n <= kt; n++) begin
      xs[n] = h * $cos((2.0 * n + 1.0) * PI / (2.0 * (kt + 1)));
      y = yc + xs[n];
      ys[n] = icdf_real($exp(-$exp(y)));
    end
    return interp_coeffs(xs, ys, kt);
  endfunction

endpackage
