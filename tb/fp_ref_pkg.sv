// fp_ref_pkg: reference model for the testbenches of the floating point units.
//
// Computes the expected result of add, subtract, multiply and divide with
// exact wide-integer arithmetic instead of the hardware's datapath: every
// finite operand is turned into an integer times a power of two, the exact
// sum, product or (sufficiently long, floored) quotient is formed, and the
// leading MAN_W bits after its most significant one are kept, which is
// rounding toward zero. The exponent field width and mantissa width are
// arguments, so the model covers binary32 and reduced formats. Operand
// classes follow the units' rules: exponent 0 is zero, all-ones exponent is
// infinity or NaN, results outside the normal range become +-inf (overflow)
// or +-0 (underflow), invalid operations give the quiet NaN.
package fp_ref_pkg;

  typedef logic [511:0] wide_t;

  typedef struct {
    logic [63:0] result;
    logic        overflow;
    logic        underflow;
    logic        invalid;
  } fp_ref_t;

  function automatic int msb(wide_t x);
    int p = -1;
    for (int i = 0; i < 512; i++) if (x[i]) p = i;
    return p;
  endfunction

  // Pack the nonzero magnitude x * 2^k with the given sign.
  function automatic fp_ref_t pack(int ew, int mw, logic s, wide_t x, int k);
    fp_ref_t r;
    int      p    = msb(x);
    int      bias = (1 << (ew - 1)) - 1;
    int      be   = p + k + bias;
    wide_t   t    = x << (511 - p);
    logic [63:0] frac = 64'(t[510 -: 63] >> (63 - mw));
    r.overflow  = 1'b0;
    r.underflow = 1'b0;
    r.invalid   = 1'b0;
    if (be >= (1 << ew) - 1) begin
      r.overflow = 1'b1;
      r.result   = (64'(s) << (ew + mw)) | (64'((1 << ew) - 1) << mw);
    end else if (be <= 0) begin
      r.underflow = 1'b1;
      r.result    = 64'(s) << (ew + mw);
    end else begin
      r.result = (64'(s) << (ew + mw)) | (64'(be) << mw) | frac;
    end
    return r;
  endfunction

  // op: 0 add, 1 subtract, 2 multiply, 3 divide.
  function automatic fp_ref_t fp_ref(int ew, int mw, int op, logic [63:0] a, logic [63:0] b);
    fp_ref_t r;
    int          emax = (1 << ew) - 1;
    int          bias = (1 << (ew - 1)) - 1;
    logic        sa = a[ew+mw];
    logic        sb = b[ew+mw] ^ (op == 1);
    int          ea = int'((a >> mw) & 64'(emax));
    int          eb = int'((b >> mw) & 64'(emax));
    logic [63:0] fa = a & ((64'd1 << mw) - 1);
    logic [63:0] fb = b & ((64'd1 << mw) - 1);
    logic [63:0] qnan = (64'(emax) << mw) | (64'd1 << (mw - 1));
    logic [63:0] inf_w = 64'(emax) << mw;
    logic [63:0] sgn = 64'd1 << (ew + mw);
    logic        az = (ea == 0), bz = (eb == 0);
    logic        ai = (ea == emax) && (fa == 0), bi = (eb == emax) && (fb == 0);
    logic        an = (ea == emax) && (fa != 0), bn = (eb == emax) && (fb != 0);
    wide_t       ma = wide_t'(fa | (64'd1 << mw));
    wide_t       mb = wide_t'(fb | (64'd1 << mw));
    wide_t       xa, xb;
    logic        s = sa ^ sb;
    r.overflow = 0; r.underflow = 0; r.invalid = 0; r.result = '0;
    if (op <= 1) begin
      if (an || bn || (ai && bi && sa != sb)) begin r.result = qnan; r.invalid = 1; end
      else if (ai) r.result = (sa ? sgn : 0) | inf_w;
      else if (bi) r.result = (sb ? sgn : 0) | inf_w;
      else if (az && bz) r.result = (sa && sb) ? sgn : 0;
      else if (az) r.result = (sb ? sgn : 0) | (b & ~sgn);
      else if (bz) r.result = a;
      else begin
        xa = ma << (ea - 1);
        xb = mb << (eb - 1);
        if (sa == sb) r = pack(ew, mw, sa, xa + xb, 1 - bias - mw);
        else if (xa > xb) r = pack(ew, mw, sa, xa - xb, 1 - bias - mw);
        else if (xb > xa) r = pack(ew, mw, sb, xb - xa, 1 - bias - mw);
        else r.result = 0;
      end
    end else if (op == 2) begin
      if (an || bn || (az && bi) || (ai && bz)) begin r.result = qnan; r.invalid = 1; end
      else if (ai || bi) r.result = (s ? sgn : 0) | inf_w;
      else if (az || bz) r.result = s ? sgn : 0;
      else r = pack(ew, mw, s, ma * mb, (ea - bias - mw) + (eb - bias - mw));
    end else begin
      if (an || bn || (az && bz) || (ai && bi)) begin r.result = qnan; r.invalid = 1; end
      else if (ai || bz) r.result = (s ? sgn : 0) | inf_w;
      else if (az || bi) r.result = s ? sgn : 0;
      else r = pack(ew, mw, s, (ma << 200) / mb, ea - eb - 200);
    end
    return r;
  endfunction

  // Random operand word: mostly normal numbers near 1.0 so that results stay
  // in range, some over the whole exponent range (to reach overflow and
  // underflow), and a few zeros, infinities and NaNs.
  function automatic logic [63:0] rand_word(int ew, int mw);
    int          emax = (1 << ew) - 1;
    int          bias = (1 << (ew - 1)) - 1;
    int unsigned sel  = $urandom_range(99);
    logic [63:0] f    = {$urandom, $urandom} & ((64'd1 << mw) - 1);
    logic [63:0] s    = 64'($urandom_range(1)) << (ew + mw);
    int          e;
    if (sel < 4)       e = 0;
    else if (sel < 7)  begin e = emax; f = 0; end
    else if (sel < 9)  begin e = emax; f = f | 1; end
    else if (sel < 60) e = bias - 8 + int'($urandom_range(16));
    else               e = 1 + int'($urandom_range(emax - 2));
    if (e == 0) f = 0;
    return s | (64'(e) << mw) | f;
  endfunction

endpackage
