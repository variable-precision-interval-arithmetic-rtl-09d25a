// vp_ref_pkg: reference arithmetic for the testbenches, independent of the
// design. A variable-precision number (num_t) is turned into an exact triple
// (sign, integer magnitude of up to BIGW bits, power-of-two scale); sums and
// products are formed exactly with wide integer arithmetic, and ex_round
// rounds an exact value to (pr+1) words of M = 32 bits with a given IEEE
// rounding direction, giving the header fields and words the coprocessor
// should produce. num_t holds up to 4 significand words, F[0] in bits 127:96.
package vp_ref_pkg;
  import vpiac_pkg::*;

  localparam int M    = 32;
  localparam int BIGW = 1024;

  typedef struct packed {
    logic         sign;
    logic [1:0]   typ;
    logic [31:0]  e;       // unbiased exponent of the leading bit (signed)
    logic [4:0]   len;     // words - 1
    logic [127:0] f;       // F[0] in bits 127:96
  } num_t;

  typedef struct packed {
    logic            sign;
    logic [BIGW-1:0] mag;
    logic [31:0]     e0;   // value = mag * 2^e0 (signed)
  } ex_t;

  function automatic ex_t to_ex(num_t a);
    ex_t r;
    int n;
    n = int'(a.len) + 1;
    r.sign = a.sign;
    r.mag  = '0;
    if (a.typ == T_NORMAL) r.mag = BIGW'(a.f >> (32 * (4 - n)));
    r.e0 = 32'($signed(a.e) - (n * M - 1));
    return r;
  endfunction

  function automatic ex_t ex_add(ex_t x, ex_t y);
    ex_t r;
    logic [BIGW-1:0] xm, ym;
    int d;
    if (x.mag == '0) return y;
    if (y.mag == '0) return x;
    d = $signed(x.e0) - $signed(y.e0);
    xm = x.mag; ym = y.mag;
    if (d > 0) begin xm = xm << d; r.e0 = y.e0; end
    else begin ym = ym << (-d); r.e0 = x.e0; end
    if (x.sign == y.sign) begin r.mag = xm + ym; r.sign = x.sign; end
    else if (xm >= ym) begin r.mag = xm - ym; r.sign = x.sign; end
    else begin r.mag = ym - xm; r.sign = y.sign; end
    if (r.mag == '0) r.sign = 1'b0;
    return r;
  endfunction

  function automatic ex_t ex_neg(ex_t x);
    x.sign = ~x.sign;
    return x;
  endfunction

  function automatic ex_t ex_mul(ex_t x, ex_t y);
    ex_t r;
    r.sign = x.sign ^ y.sign;
    r.mag  = x.mag * y.mag;
    r.e0   = 32'($signed(x.e0) + $signed(y.e0));
    if (r.mag == '0) r.sign = 1'b0;
    return r;
  endfunction

  // -1, 0, 1
  function automatic int ex_cmp(ex_t x, ex_t y);
    ex_t d;
    d = ex_add(x, ex_neg(y));
    if (d.mag == '0) return 0;
    return d.sign ? -1 : 1;
  endfunction

  // quotient x / y to more bits than any rounding needs, the remainder
  // folded into the lowest bit as a sticky bit
  function automatic ex_t ex_div(ex_t x, ex_t y);
    ex_t r;
    logic [BIGW-1:0] n, qt;
    n  = x.mag << 400;
    qt = n / y.mag;
    r.sign = x.sign ^ y.sign;
    r.mag  = (qt << 1) | BIGW'((n % y.mag) != '0);
    r.e0   = 32'($signed(x.e0) - $signed(y.e0) - 401);
    return r;
  endfunction

  // square root of x (x > 0) by bitwise integer square root, with a sticky bit
  function automatic ex_t ex_sqrt(ex_t x);
    ex_t r;
    logic [BIGW-1:0] n, rt, t;
    int sh;
    sh = ((($signed(x.e0) - 400) % 2) != 0) ? 401 : 400;
    n  = x.mag << sh;
    rt = '0;
    for (int b = 300; b >= 0; b--) begin
      t = rt | (BIGW'(1) << b);
      if (t * t <= n) rt = t;
    end
    r.sign = 1'b0;
    r.mag  = (rt << 1) | BIGW'((rt * rt) != n);
    r.e0   = 32'(($signed(x.e0) - sh) / 2 - 1);
    return r;
  endfunction

  int rnd_carry_ref;   // reference saw a rounding carry into a new bit
  function automatic num_t ex_round(ex_t x, int pr, vp_rmode_e rm, int mid);
    num_t r;
    int p, h, sh;
    logic [BIGW-1:0] kept;
    logic g, s, up;
    p = (pr + 1) * M;
    r = '0;
    r.len = 5'(pr);
    if (x.mag == '0) begin r.typ = T_ZERO; return r; end
    r.typ = T_NORMAL;
    r.sign = x.sign;
    h = 0;
    for (int i = 0; i < BIGW; i++) if (x.mag[i]) h = i;
    if (h + 1 <= p) begin
      kept = x.mag << (p - 1 - h);
      sh = -(p - 1 - h);
    end else begin
      sh = h + 1 - p;
      kept = x.mag >> sh;
      g = x.mag[sh - 1];
      s = (sh >= 2) ? ((x.mag & ((BIGW'(1) << (sh - 1)) - 1)) != '0) : 1'b0;
      case (rm)
        RM_NEAREST: up = g & (s | kept[0]);
        RM_ZERO:    up = 1'b0;
        RM_UP:      up = !x.sign & (g | s);
        default:    up = x.sign & (g | s);
      endcase
      if (up) kept = kept + 1;
      if (kept[p]) begin kept = kept >> 1; sh++; rnd_carry_ref++; end
    end
    r.e = 32'($signed(x.e0) + sh + p - 1 - mid);
    r.f = 128'(kept) << (32 * (4 - (pr + 1)));
    return r;
  endfunction

  function automatic num_t rand_num(int maxlen);
    num_t a;
    a = '0;
    a.typ  = T_NORMAL;
    a.sign = 1'($urandom);
    a.e    = 32'(int'($urandom_range(80)) - 40);
    a.len  = 5'($urandom_range(maxlen - 1));
    for (int k = 0; k < 4; k++) a.f[127 - 32 * k -: 32] = (k <= int'(a.len)) ? $urandom : 32'd0;
    a.f[127] = 1'b1;
    return a;
  endfunction

  function automatic num_t zero_num();
    num_t a;
    a = '0; a.typ = T_ZERO;
    return a;
  endfunction
endpackage
