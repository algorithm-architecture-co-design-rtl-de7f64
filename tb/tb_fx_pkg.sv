// tb_fx_pkg: reference arithmetic for the testbenches.
//
// Signed fixed point with FRAC fraction bits in 32-bit words: products are
// taken at 64 bits, shifted right arithmetically and truncated; the
// reciprocal is 2^(2*FRAC) / a rounded toward zero and saturated. These are
// the number rules the core is specified to follow, written independently of
// the RTL so that the testbenches can compute expected results.
// The fixed-point format is this design's choice; the core is described
// for 32-bit values without a stated binary point.
package tb_fx_pkg;
  localparam int FRAC = 16;
  localparam int ONE  = 1 << FRAC;

  function automatic int fxmul(int a, int b);
    longint p;
    p = longint'(a) * longint'(b);
    p = p >>> FRAC;
    return int'(p);
  endfunction

  function automatic int fxrecip(int a);
    longint q;
    if (a == 0) return 32'h7fff_ffff;
    q = (longint'(1) <<< (2 * FRAC)) / longint'(a);
    if (q > 64'sh7fff_ffff) return 32'h7fff_ffff;
    if (q < -64'sh8000_0000) return 32'h8000_0000;
    return int'(q);
  endfunction

  function automatic int fx(real r);
    return int'($rtoi(r * ONE));
  endfunction

  function automatic real tor(int a);
    return real'(a) / ONE;
  endfunction

  // Random value with a small integer part: range about +-(2^ibits) in Q16.16.
  function automatic int rnd(int ibits);
    int v;
    v = int'($urandom_range((1 << (ibits + FRAC)) - 1, 0));
    return ($urandom_range(1, 0) == 1) ? -v : v;
  endfunction
endpackage
