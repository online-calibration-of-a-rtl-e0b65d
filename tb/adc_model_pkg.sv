// adc_model_pkg: behavioural models used by the testbenches (not hardware).
//
// adc_model is a static model of a q-bit converter: a gain, an offset (in
// LSB at the output) and random DNL with a normal distribution. Its code
// transitions are kept as real numbers: 'edge_v[k]' is the lower edge of code
// k in output LSB units (ideal value k - N/2). An input u (LSB) is converted
// by x = gain*u + offset and code = number of edges at or below x, clipped
// to 0 .. N-1. 'midpoint(k)' is the centre of code k's edges minus the
// offset: the value a perfect static correction (blind to gain error)
// assigns to code k.
//
// The package also has a normal random source (Box-Muller on $urandom) and
// the normal CDF (erf after Abramowitz & Stegun 7.1.26), for drawing samples
// and for computing noise-free expected histograms.
package adc_model_pkg;

  function automatic real urand01();
    return (real'($urandom) + 0.5) / 4294967296.0;
  endfunction

  function automatic real randn();
    real u1, u2;
    u1 = urand01();
    u2 = urand01();
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  function automatic real erf_approx(input real x);
    real t, y, ax;
    ax = (x < 0.0) ? -x : x;
    t  = 1.0 / (1.0 + 0.3275911 * ax);
    y  = 1.0 - (((((1.061405429 * t - 1.453152027) * t) + 1.421413741) * t
               - 0.284496736) * t + 0.254829592) * t * $exp(-ax * ax);
    return (x < 0.0) ? -y : y;
  endfunction

  // P(X < x) for X ~ N(0, sigma^2)
  function automatic real norm_cdf(input real x, input real sigma);
    return 0.5 * (1.0 + erf_approx(x / (sigma * 1.4142135623730951)));
  endfunction

  class adc_model;
    int  n_levels;
    real gain;
    real offset;
    real edge_v[];

    function new(int q, real g, real off, real dnl_sigma);
      real acc;
      n_levels = 1 << q;
      gain     = g;
      offset   = off;
      edge_v   = new[n_levels + 1];
      acc      = 0.0;
      for (int k = 0; k <= n_levels; k++) begin
        if (k > 1) acc += dnl_sigma * randn();
        edge_v[k] = real'(k - n_levels / 2) + acc;
      end
      // remove the linear trend of the random walk so that the DNL adds
      // INL only, not a further gain or offset
      begin
        real slope;
        slope = acc / real'(n_levels - 1);
        for (int k = 1; k <= n_levels; k++) edge_v[k] -= slope * real'(k - 1);
      end
    endfunction

    function int convert(real u);
      real x;
      int lo, hi, mid;
      x  = gain * u + offset;
      // largest k in 1..N-1 with edge_v[k] <= x, else 0
      lo = 0;
      hi = n_levels - 1;
      while (lo < hi) begin
        mid = (lo + hi + 1) / 2;
        if (edge_v[mid] <= x) lo = mid;
        else hi = mid - 1;
      end
      return lo;
    endfunction

    // input (LSB) at which the code-k lower edge lies
    function real edge_in(int k);
      return (edge_v[k] - offset) / gain;
    endfunction

    function real midpoint(int k);
      return 0.5 * (edge_v[k] + edge_v[k + 1]) - offset;
    endfunction

    // expected hits on code k for 'total' samples of N(0, sigma) at the input
    function real expected_hits(int k, real total, real sigma, real atten);
      real lo, hi;
      lo = (k == 0) ? -1.0e30 : edge_in(k) / atten;
      hi = (k == n_levels - 1) ? 1.0e30 : edge_in(k + 1) / atten;
      return total * (norm_cdf(hi, sigma) - norm_cdf(lo, sigma));
    endfunction
  endclass

endpackage
