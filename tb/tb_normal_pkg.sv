// tb_normal_pkg: reference normal-distribution arithmetic for testbenches.
// Phi(x) is computed by composite Simpson integration of the density from
// -14 to x, a method independent of the series / continued fraction used to
// build the design's tables. icdf_err returns the implied error in z of a
// claimed z = Phi^-1(u): (Phi(z) - u) / pdf(z), folded to u <= 0.5.
package tb_normal_pkg;
  localparam real PI = 3.14159265358979323846;

  function automatic real npdf(input real x);
    return $exp(-0.5 * x * x) / $sqrt(2.0 * PI);
  endfunction

  function automatic real ncdf(input real x);
    real a, h, s;
    int n;
    if (x > 0.0) return 1.0 - ncdf(-x);
    a = -14.0;
    n = 16384;
    h = (x - a) / n;
    s = npdf(a) + npdf(x);
    for (int i = 1; i < n; i++) s = s + ((i % 2 == 1) ? 4.0 : 2.0) * npdf(a + i * h);
    return s * h / 3.0;
  endfunction

  function automatic real rabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic real icdf_err(input real u, input real z);
    real uf, zf;
    uf = (u < 0.5) ? u : 1.0 - u;
    zf = (u < 0.5) ? z : -z;
    return (ncdf(zf) - uf) / npdf(zf);
  endfunction
endpackage
