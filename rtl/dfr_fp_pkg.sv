// dfr_fp_pkg: the reduced-precision floating-point format of the software
// radio DFR core and its arithmetic.
//
// Format: 1 sign bit, 8 exponent bits (bias 127) and 17 stored mantissa bits
// with a hidden leading one, 26 bits in all, as chosen for the core. All
// operations round to nearest, ties to even. This design's own
// simplifications: no subnormals (results below the smallest normal number
// become zero), no infinities or NaNs (overflow saturates to the largest
// finite number, division by zero returns it too), square root of a negative
// number returns zero.
package dfr_fp_pkg;

  localparam int unsigned FP_EXP = 8;
  localparam int unsigned FP_MAN = 17;
  localparam int unsigned FP_W   = 1 + FP_EXP + FP_MAN;
  localparam int unsigned BIAS   = 127;

  typedef struct packed {
    logic              sign;
    logic [FP_EXP-1:0] exp;
    logic [FP_MAN-1:0] man;
  } fp_t;

  localparam fp_t FP_ZERO = '{sign: 1'b0, exp: '0, man: '0};
  localparam fp_t FP_ONE  = '{sign: 1'b0, exp: 8'd127, man: '0};

  // Round to nearest even and pack. `e` is the biased exponent of a value
  // 1.m; guard and sticky are the bits below m.
  function automatic fp_t fp_pack(input logic s, input logic signed [11:0] e,
                                  input logic [FP_MAN-1:0] m, input logic guard,
                                  input logic sticky);
    logic [FP_MAN:0]     mr;
    logic signed [11:0]  er;
    fp_t                 r;
    mr = {1'b0, m};
    er = e;
    if (guard && (sticky || m[0])) mr = mr + 1'b1;
    if (mr[FP_MAN]) er = er + 1;          // mantissa rounded up to 2.0
    if (er <= 0) begin
      r = FP_ZERO;
    end else if (er >= 255) begin
      r = '{sign: s, exp: 8'd254, man: '1};
    end else begin
      r = '{sign: s, exp: er[7:0], man: mr[FP_MAN-1:0]};
    end
    return r;
  endfunction

  function automatic fp_t fp_mul(input fp_t a, input fp_t b);
    logic [FP_MAN:0]       ma, mb;
    logic [2*FP_MAN+1:0]   p;
    logic signed [11:0]    e;
    logic                  s;
    s = a.sign ^ b.sign;
    if (a.exp == '0 || b.exp == '0) return FP_ZERO;
    ma = {1'b1, a.man};
    mb = {1'b1, b.man};
    p  = ma * mb;                                   // in [1, 4)
    e  = $signed({4'b0, a.exp}) + $signed({4'b0, b.exp}) - 12'sd127;
    if (p[2*FP_MAN+1])
      return fp_pack(s, e + 1, p[2*FP_MAN:FP_MAN+1], p[FP_MAN], |p[FP_MAN-1:0]);
    else
      return fp_pack(s, e, p[2*FP_MAN-1:FP_MAN], p[FP_MAN-1], |p[FP_MAN-2:0]);
  endfunction

  // Mantissas with hidden bit at position FP_MAN+3 and three guard bits.
  localparam int unsigned AW = FP_MAN + 4;

  function automatic fp_t fp_add(input fp_t a, input fp_t b);
    fp_t                 x, y;
    logic [AW-1:0]       mx, my, lost_mask;
    logic [AW:0]         sum;
    logic signed [11:0]  e;
    int unsigned         d, lz;
    logic                sticky;
    if (a.exp == '0) return b;
    if (b.exp == '0) return a;
    // x: larger magnitude
    if ({a.exp, a.man} >= {b.exp, b.man}) begin x = a; y = b; end
    else begin x = b; y = a; end
    mx = {1'b1, x.man, 3'b000};
    my = {1'b1, y.man, 3'b000};
    d  = 32'(x.exp) - 32'(y.exp);
    if (d >= AW) begin
      my = {{(AW-1){1'b0}}, 1'b1};                  // only sticky remains
    end else if (d > 0) begin
      lost_mask = (AW'(1) << d) - 1'b1;
      sticky    = |(my & lost_mask);
      my        = (my >> d) | {{(AW-1){1'b0}}, sticky};
    end
    e = $signed({4'b0, x.exp});
    if (x.sign == y.sign) begin
      sum = {1'b0, mx} + {1'b0, my};
      if (sum[AW]) begin
        sum = {1'b0, sum[AW:2], sum[1] | sum[0]};
        e   = e + 1;
      end
    end else begin
      sum = {1'b0, mx} - {1'b0, my};
      if (sum == '0) return FP_ZERO;
      lz = 0;
      for (int i = AW - 1; i >= 0; i--) begin
        if (sum[i]) break;
        lz++;
      end
      sum = sum << lz;
      e   = e - 12'(lz);
    end
    return fp_pack(x.sign, e, sum[AW-2:3], sum[2], sum[1] | sum[0]);
  endfunction

  function automatic fp_t fp_div(input fp_t a, input fp_t b);
    logic [FP_MAN:0]         ma, mb;
    logic [2*FP_MAN+4:0]     num, q, rem;
    logic signed [11:0]      e;
    logic                    s;
    s = a.sign ^ b.sign;
    if (b.exp == '0) return '{sign: s, exp: 8'd254, man: '1};
    if (a.exp == '0) return FP_ZERO;
    ma  = {1'b1, a.man};
    mb  = {1'b1, b.man};
    num = (2*FP_MAN+5)'({ma, 20'b0});
    q   = num / (2*FP_MAN+5)'(mb);                   // ma/mb * 2^20, in (2^19, 2^21)
    rem = num % (2*FP_MAN+5)'(mb);
    e   = $signed({4'b0, a.exp}) - $signed({4'b0, b.exp}) + 12'sd127;
    if (q[20])
      return fp_pack(s, e, q[19:3], q[2], (|q[1:0]) || (rem != '0));
    else
      return fp_pack(s, e - 1, q[18:2], q[1], q[0] || (rem != '0));
  endfunction

  function automatic fp_t fp_sqrt(input fp_t a);
    logic [39:0]         m, rem, trial;
    logic [19:0]         r;
    logic signed [11:0]  eu;
    if (a.exp == '0 || a.sign) return FP_ZERO;
    eu = $signed({4'b0, a.exp}) - 12'sd127;
    m  = {22'b0, 1'b1, a.man};                      // 1.man * 2^17
    if (eu[0]) m = m << 1;                           // odd exponent: value in [2, 4)
    m  = m << 19;                                    // sqrt then carries 18 fraction bits
    // bit-by-bit integer square root
    r   = '0;
    rem = '0;
    for (int i = 19; i >= 0; i--) begin
      rem   = (rem << 2) | 40'((m >> (2*i)) & 40'd3);
      trial = {18'b0, r, 2'b01};
      if (rem >= trial) begin
        rem = rem - trial;
        r   = (r << 1) | 20'd1;
      end else begin
        r   = r << 1;
      end
    end
    // r = sqrt(value) * 2^18, hidden bit at r[18]
    return fp_pack(1'b0, (eu >>> 1) + 12'sd127, r[17:1], r[0], rem != '0);
  endfunction

  // Exact conversion of a signed 16-bit integer.
  function automatic fp_t fp_from_int16(input logic signed [15:0] v);
    logic [16:0] mag;
    int unsigned p;
    logic [33:0] sh;
    if (v == 16'sd0) return FP_ZERO;
    mag = (v < 0) ? 17'(-$signed({v[15], v})) : 17'(v);
    p = 0;
    for (int i = 0; i < 17; i++) if (mag[i]) p = i;
    sh = 34'(mag) << (FP_MAN - p);
    return '{sign: v[15], exp: 8'(BIAS + p), man: sh[FP_MAN-1:0]};
  endfunction

endpackage
