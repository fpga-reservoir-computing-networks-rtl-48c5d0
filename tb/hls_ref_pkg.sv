// hls_ref_pkg: double-precision software model of the floating-point DFR
// core (50 nodes, gain 0.5, feedback 0.4, Mackey-Glass x/(1+x^16), I/Q scaled
// by 1/2047), used as the expected-value source by testbenches.
package hls_ref_pkg;
  class hls_dfr_ref;
    int  n;
    real mask[], w[], res[];
    real last_mag;

    function new(input int nodes);
      n = nodes;
      mask = new[n]; w = new[n]; res = new[n];
      foreach (res[k]) res[k] = 0.0;
    endfunction

    // random mask in [-0.5, 0.5] and weights in [-2, 2], multiples of 2^-12
    function void randomize_params();
      foreach (mask[k]) begin
        mask[k] = real'($urandom_range(0, 4096)) / 4096.0 - 0.5;
        w[k]    = real'($urandom_range(0, 16384)) / 4096.0 - 2.0;
      end
    endfunction

    function real step(input int i, input int q);
      real e, xin, xn, score, term;
      e = $sqrt((real'(i) / 2047.0) ** 2 + (real'(q) / 2047.0) ** 2);
      score = 0.0; last_mag = 0.0;
      for (int k = n - 1; k >= 0; k--) begin
        xin = 0.5 * (mask[k] * e) + 0.4 * res[k];
        xn  = xin / (1.0 + xin ** 16);
        res[k] = xn;
        term = w[k] * xn;
        score += term;
        last_mag += (term < 0.0) ? -term : term;
      end
      return score;
    endfunction

    function bit close(input real got, input real expv);
      real tol;
      tol = 1e-3 * last_mag + 1e-6;
      return (got - expv <= tol) && (expv - got <= tol);
    endfunction
  endclass
endpackage
