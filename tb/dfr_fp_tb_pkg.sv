// dfr_fp_tb_pkg: conversions between the core's 26-bit float and real
// numbers for testbenches, with round to nearest even.
package dfr_fp_tb_pkg;
  import dfr_fp_pkg::*;

  function automatic real fp_to_real(input fp_t a);
    real m;
    if (a.exp == 0) return 0.0;
    m = 1.0 + real'(a.man) / 131072.0;
    m = m * (2.0 ** (real'(a.exp) - 127.0));
    return a.sign ? -m : m;
  endfunction

  function automatic fp_t real_to_fp(input real r);
    real a, m, f;
    int e;
    longint mi;
    fp_t x;
    if (r == 0.0) return FP_ZERO;
    a = (r < 0.0) ? -r : r;
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    m  = (a - 1.0) * 131072.0;
    mi = longint'($floor(m));
    f  = m - real'(mi);
    if (f > 0.5 || (f == 0.5 && mi[0])) mi++;
    if (mi == 131072) begin mi = 0; e++; end
    if (e + 127 <= 0) return FP_ZERO;
    if (e + 127 >= 255) return '{sign: (r < 0.0), exp: 8'd254, man: '1};
    x.sign = (r < 0.0);
    x.exp  = 8'(e + 127);
    x.man  = 17'(mi);
    return x;
  endfunction
endpackage
