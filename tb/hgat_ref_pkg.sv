// hgat_ref_pkg: reference arithmetic for the testbenches, written from the
// number format's definition (Q8.8 data, Q16.16 products, 32-bit wrapping
// accumulation, floor shift and saturation) rather than from the RTL.
package hgat_ref_pkg;

  function automatic int sat(longint x);
    if (x > 32767) return 32767;
    if (x < -32768) return -32768;
    return int'(x);
  endfunction

  // 32-bit wrapping accumulator value to Q8.8
  function automatic int to_q88(longint acc);
    int a32;
    a32 = int'(acc);
    return sat(longint'(a32) >>> 8);
  endfunction

  function automatic int floordiv256(int x);
    return (x >= 0) ? x / 256 : -((-x + 255) / 256);
  endfunction

  // 2^z as (1 + frac) * 2^int in Q16.16, int clamped to [-16, 14]
  function automatic longint pow2(int z);
    int i, f;
    longint mant;
    i = floordiv256(z);
    f = z - i * 256;
    if (i > 14)  begin i = 14; f = 255; end
    if (i < -16) begin i = -16; f = 0; end
    mant = 256 + f;
    if (i + 8 >= 0) return mant * (longint'(1) << (i + 8));
    else            return mant / (longint'(1) << (-(i + 8)));
  endfunction

  // leakyrelu(sat(a + b)) with slope 51/256, floor rounding
  function automatic int lrelu(int a, int b);
    int s;
    longint p;
    s = sat(longint'(a) + b);
    if (s >= 0) return s;
    p = longint'(s) * 51;
    return sat(-((-p + 255) / 256));
  endfunction

  function automatic int rnd16(int lo, int hi);
    return $urandom_range(0, hi - lo) + lo;
  endfunction

endpackage
