// Test helpers: build IEEE-754 single-precision bit patterns from integers
// (exact for magnitudes below 2^24), and turn bit patterns into reals, so
// that testbenches can compute expected floating-point results on their own.
package tb_fp_pkg;

  // v * 2^-sh as a float32; exact when |v| < 2^24 and the result is normal.
  function automatic logic [31:0] i2f(longint v, int sh = 0);
    logic        s;
    longint      a;
    int          p;
    logic [63:0] m;
    if (v == 0) return 32'd0;
    s = (v < 0);
    a = s ? -v : v;
    p = 0;
    for (int i = 0; i < 63; i++) if (a >= (longint'(1) << i)) p = i;
    m = 64'(a) << (40 - p);             // hidden bit at position 40
    return {s, 8'(127 + p - sh), m[39:17]};
  endfunction

  function automatic real f2r(logic [31:0] f);
    real r;
    int  e;
    e = int'(f[30:23]);
    if (e == 0) return 0.0;
    r = (1.0 + real'(f[22:0]) / 8388608.0) * (2.0 ** (e - 127));
    return f[31] ? -r : r;
  endfunction

  // Round a real (held exactly as a double) to float32, nearest-even;
  // for results in the normal float32 range.
  function automatic logic [31:0] r2f(real r);
    logic [63:0] d;
    logic [23:0] keep;
    int          e;
    if (r == 0.0) return 32'd0;
    d    = $realtobits(r);
    e    = int'(d[62:52]) - 1023 + 127;
    keep = {1'b0, d[51:29]};
    if (d[28] && ((|d[27:0]) || keep[0])) keep = keep + 24'd1;
    if (keep[23]) begin
      keep = '0;
      e    = e + 1;
    end
    return {d[63], 8'(e), keep[22:0]};
  endfunction

  // A random float32 with a full random fraction and exponent in [lo, hi].
  function automatic logic [31:0] rnd_float(int lo, int hi);
    return {1'($urandom), 8'(lo + int'($urandom_range(32'(hi - lo)))), 23'($urandom)};
  endfunction

  function automatic int rnd_range(int lo, int hi);
    return lo + int'($urandom_range(32'(hi - lo)));
  endfunction

endpackage
