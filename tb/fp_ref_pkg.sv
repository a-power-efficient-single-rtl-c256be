// fp_ref_pkg: reference models for the testbenches. They compute results
// independently of the RTL: products and sums are formed exactly in double
// precision and then truncated (round toward zero) to single precision;
// square roots use an integer bisection. Range rules match the datapath:
// exponent 0 reads as zero, underflow flushes to zero, overflow gives inf.
package fp_ref_pkg;

  // exact value of a normal single (0 for exponent field 0)
  function automatic real fp_val(input logic [31:0] f);
    logic [10:0] e;
    if (f[30:23] == 0) return 0.0;
    e = 11'(int'(f[30:23]) - 127 + 1023);
    return $bitstoreal({f[31], e, f[22:0], 29'h0});
  endfunction

  // round a double toward zero to single, with flush / saturate
  function automatic logic [31:0] rz_single(input real r);
    logic [63:0] d;
    int          e;
    if (r == 0.0) return 32'h0;
    d = $realtobits(r);
    e = int'(d[62:52]) - 1023 + 127;
    if (e <= 0)   return {d[63], 31'h0};
    if (e >= 255) return {d[63], 8'hff, 23'h0};
    return {d[63], 8'(e), d[51:29]};
  endfunction

  function automatic logic [31:0] ref_mul(input logic [31:0] a, input logic [31:0] b);
    if (a[30:23] == 0 || b[30:23] == 0) return {a[31] ^ b[31], 31'h0};
    return rz_single(fp_val(a) * fp_val(b));
  endfunction

  // exact only when the exponent difference is at most 28
  function automatic logic [31:0] ref_add(input logic [31:0] a, input logic [31:0] b);
    real s;
    if (a[30:23] == 0 && b[30:23] == 0) return 32'h0;
    if (b[30:23] == 0) return a;
    if (a[30:23] == 0) return b;
    s = fp_val(a) + fp_val(b);
    if (s == 0.0) return 32'h0;
    return rz_single(s);
  endfunction

  function automatic logic [31:0] ref_div(input logic [31:0] a, input logic [31:0] b);
    if (a[30:23] == 0) return {a[31] ^ b[31], 31'h0};
    if (b[30:23] == 0) return {a[31] ^ b[31], 8'hff, 23'h0};
    return rz_single(fp_val(a) / fp_val(b));
  endfunction

  // floor(sqrt(v)) by bisection
  function automatic longint unsigned isqrt(input longint unsigned v);
    longint unsigned lo, hi, mid;
    lo = 0; hi = 64'd1 << 32;
    while (hi - lo > 1) begin
      mid = (lo + hi) >> 1;
      if (mid * mid <= v) lo = mid; else hi = mid;
    end
    return lo;
  endfunction

  // square root: value = 1.f * 2^(e-127); scale so the root has 24 bits
  function automatic logic [31:0] ref_sqrt(input logic [31:0] a);
    int              k, er;
    longint unsigned m, r;
    if (a[30:23] == 0) return 32'h0;
    k = int'(a[30:23]) - 127;
    m = {40'h0, 1'b1, a[22:0]};                 // 1.f * 2^23
    // sqrt(m * 2^(k-23)); make (k - 23 - sh) even with m * 2^sh ~ 2^46..2^48
    if ((k % 2) == 0) begin m = m << 23; er = k / 2; end
    else              begin m = m << 24; er = (k - 1) / 2; end
    if (k < 0 && (k % 2) != 0) er = (k - 1) / 2;
    r = isqrt(m);                               // in [2^23, 2^24)
    return {a[31], 8'(er + 127), r[22:0]};
  endfunction

  function automatic logic [31:0] rand_fp(input int elo, input int ehi);
    logic [31:0] f;
    f[31]    = 1'($urandom);
    f[30:23] = 8'(elo + int'($urandom % (ehi - elo + 1)));
    f[22:0]  = 23'($urandom);
    return f;
  endfunction

endpackage
