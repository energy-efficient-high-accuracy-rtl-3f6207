// approx_ref_pkg -- arithmetic reference models used by the testbenches.
//
// The models compute the approximate product from its defining formula with
// integer arithmetic (leading-one search by loop, fraction by subtraction and
// division) rather than by the bit selections of the RTL, so that a wrong bit
// index in the hardware shows up as a mismatch. ref_ann evaluates the whole
// character network from a flat parameter array laid out as in ann_pkg.
package approx_ref_pkg;

  localparam int RN = 16;
  localparam int RT = 7;
  localparam int RH = 3;

  function automatic int rf(int t, int h);
    return (t > 2 * h + 2) ? t : 2 * h + 2;
  endfunction

  // One's-complement magnitude on n-1 bits.
  function automatic longint ref_abs(longint a, int n);
    longint m;
    m = (a < 0) ? (-a - 1) : a;
    return m;
  endfunction

  function automatic int ref_lead(longint m);
    int k;
    k = 0;
    for (int i = 0; i < 62; i++) if (m >= (longint'(1) << i)) k = i;
    return k;
  endfunction

  // Fraction below the leading one, truncated to t bits: floor((m-2^k)*2^t/2^k).
  function automatic longint ref_trunc(longint m, int t);
    int k;
    if (m == 0) return 0;
    k = ref_lead(m);
    return ((m - (longint'(1) << k)) * (longint'(1) << t)) / (longint'(1) << k);
  endfunction

  // 1 + ya + yb + yaapx*ybapx scaled by 2^F.
  function automatic longint ref_arith(longint ya, longint yb, int t, int h);
    int f;
    longint aa, ab;
    f  = rf(t, h);
    aa = (ya / (longint'(1) << (t - h))) * 2 + 1;
    ab = (yb / (longint'(1) << (t - h))) * 2 + 1;
    return (longint'(1) << f) + ya * (longint'(1) << (f - t)) + yb * (longint'(1) << (f - t))
           + aa * ab * (longint'(1) << (f - 2 * h - 2));
  endfunction

  // Signed approximate product of two n-bit operands, returned sign-extended.
  function automatic longint ref_mul(longint a, longint b, int n, int t, int h);
    longint ma, mb, p, mag;
    int ka, kb, f;
    f  = rf(t, h);
    ma = ref_abs(a, n);
    mb = ref_abs(b, n);
    if (ma == 0 || mb == 0) return 0;
    ka = ref_lead(ma);
    kb = ref_lead(mb);
    p  = ref_arith(ref_trunc(ma, t), ref_trunc(mb, t), t, h);
    mag = (p * (longint'(1) << (ka + kb))) / (longint'(1) << f);
    if ((a < 0) != (b < 0)) return -mag - 1;
    return mag;
  endfunction

  // Piecewise-linear sigmoid in Q8.8 (segments 1/4, 1/8, 1/32, constant 1).
  function automatic longint ref_sigmoid(longint v);
    longint ax, f;
    ax = (v < 0) ? -v : v;
    if (real'(ax) >= 5.0 * 256)        f = 256;
    else if (real'(ax) >= 2.375 * 256) f = ax / 32 + 216;
    else if (real'(ax) >= 1.0 * 256)   f = ax / 8 + 160;
    else                               f = ax / 4 + 128;
    return (v < 0) ? 256 - f : f;
  endfunction

  // Neuron: sum of products + bias*2^8, floor-divided by 2^8, then ReLU with
  // saturation (act = 0) or the sigmoid (act = 1).
  function automatic longint ref_neuron(longint x[], longint w[], longint bias,
                                        output bit clipped, output bit saturated,
                                        input int act = 0);
    longint acc, s;
    acc = bias * 256;
    for (int i = 0; i < x.size(); i++) acc += ref_mul(x[i], w[i], RN, RT, RH);
    s = (acc >= 0) ? acc / 256 : -((-acc + 255) / 256);
    clipped = 0;
    saturated = 0;
    if (act == 1) return ref_sigmoid(s);
    if (s < 0) begin clipped = 1; return 0; end
    if (s > 32767) begin saturated = 1; return 32767; end
    return s;
  endfunction


  // Character encoding: letter index c = code - 'a' spread as c[1:0], c[3:2],
  // c[4] and a letter-present 1; all zero for other codes.
  function automatic void ref_encode(int code, output longint x[4]);
    int c;
    for (int j = 0; j < 4; j++) x[j] = 0;
    if (code >= 97 && code <= 122) begin
      c = code - 97;
      x[0] = longint'(c % 4) * 256;
      x[1] = longint'((c / 4) % 4) * 256;
      x[2] = longint'(c / 16) * 256;
      x[3] = 256;
    end
  endfunction

  // Whole network; prm is the 42-word parameter memory (signed values).
  function automatic void ref_ann(int data_in, longint prm[42], output longint yo[4],
                                  inout int n_clip, inout int n_sat, input int act = 0);
    longint x[4], h1[4], h2[2];
    longint xi[], wi[];
    bit c, s;
    ref_encode(data_in, x);
    for (int i = 0; i < 4; i++) begin
      xi = new[4]; wi = new[4];
      for (int j = 0; j < 4; j++) begin xi[j] = x[j]; wi[j] = prm[i * 4 + j]; end
      h1[i] = ref_neuron(xi, wi, prm[32 + i], c, s, act);
      n_clip += c; n_sat += s;
    end
    for (int i = 0; i < 2; i++) begin
      xi = new[4]; wi = new[4];
      for (int j = 0; j < 4; j++) begin xi[j] = h1[j]; wi[j] = prm[16 + i * 4 + j]; end
      h2[i] = ref_neuron(xi, wi, prm[36 + i], c, s, act);
      n_clip += c; n_sat += s;
    end
    for (int i = 0; i < 4; i++) begin
      xi = new[2]; wi = new[2];
      for (int j = 0; j < 2; j++) begin xi[j] = h2[j]; wi[j] = prm[24 + i * 2 + j]; end
      yo[i] = ref_neuron(xi, wi, prm[38 + i], c, s, act);
      n_clip += c; n_sat += s;
    end
  endfunction

endpackage
