// nus_ref_pkg -- reference models shared by the testbenches.
//
// These compute the expected results without the RTL's structure: the
// segment index by comparing against the boundary values themselves, the
// datapath with 64-bit integer arithmetic, and the functions with real math.
package nus_ref_pkg;

  // Number of taken boundaries at or below s: OR tap k is the boundary 2^k,
  // AND tap k the boundary 2^SB - 2^k.
  function automatic int ref_seg(longint unsigned s, int sb,
                                 logic [63:0] or_en, logic [63:0] and_en);
    int n = 0;
    for (int k = 0; k < sb - 1; k++)
      if (or_en[k] && s >= (64'd1 << k)) n++;
    for (int k = 0; k < sb; k++)
      if (and_en[k] && s >= ((64'd1 << sb) - (64'd1 << k))) n++;
    return n;
  endfunction

  function automatic longint sext(longint unsigned v, int w);
    longint r = longint'(v & ((64'd1 << w) - 1));
    if (v[w-1]) r = r - (longint'(1) << w);
    return r;
  endfunction

  function automatic longint pow2_scale(longint v, longint s);
    return (s >= 0) ? (v <<< s) : (v >>> (-s));
  endfunction

  // y = clamp(round((c1*X*2^s1 + c0*2^s0) / 2^(F-YF)), 0, 2^YW-1)
  function automatic longint ref_lin(longint X, longint c1, longint s1,
                                     longint c0, longint s0,
                                     int f, int yw, int yf);
    longint acc, r;
    acc = pow2_scale(c1 * X, s1) + pow2_scale(c0, s0);
    r   = (acc + (longint'(1) <<< (f - yf - 1))) >>> (f - yf);
    if (r < 0) r = 0;
    if (r > (longint'(1) <<< yw) - 1) r = (longint'(1) <<< yw) - 1;
    return r;
  endfunction

  // Evaluate one ROM word {c1,s1,c0,s0}.
  function automatic longint ref_word(longint X, logic [63:0] w,
                                      int c1w, int s1w, int c0w, int s0w,
                                      int f, int yw, int yf);
    longint c1, s1, c0, s0;
    s0 = sext(w, s0w);
    c0 = sext(w >> s0w, c0w);
    s1 = sext(w >> (s0w + c0w), s1w);
    c1 = sext(w >> (s0w + c0w + s1w), c1w);
    return ref_lin(X, c1, s1, c0, s0, f, yw, yf);
  endfunction

  localparam real PI = 3.14159265358979323846;

  function automatic real f_sqrtln(longint unsigned X);
    real x = real'(X) / 4294967296.0;
    return $sqrt(-$ln(x));
  endfunction

  function automatic real f_cos(longint unsigned X);
    return $cos(2.0 * PI * real'(X) / 65536.0);
  endfunction

  function automatic real f_sin(longint unsigned X);
    return $sin(2.0 * PI * real'(X) / 65536.0);
  endfunction

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

endpackage
