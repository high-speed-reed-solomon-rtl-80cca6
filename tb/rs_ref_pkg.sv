// rs_ref_pkg: reference model used by the testbenches.
//
// GF(16) arithmetic through exponent/logarithm lookup (a root of x^4 + x + 1),
// written independently of the RTL's shift-and-add multiplier, a systematic
// encoder for the (n, n-4) Reed-Solomon code with generator
// g(X) = (X + a)(X + a^2)(X + a^3)(X + a^4), and a generator of received words
// with a chosen number of errors and erasures.
package rs_ref_pkg;

  typedef logic [3:0] sym_t;

  function automatic sym_t r_exp(int e);
    logic [4:0] v = 5'd1;
    int ee = ((e % 15) + 15) % 15;
    for (int i = 0; i < ee; i++) begin
      v = v << 1;
      if (v[4]) v = v ^ 5'b10011;
    end
    return v[3:0];
  endfunction

  function automatic int r_log(sym_t a);
    for (int e = 0; e < 15; e++) if (r_exp(e) == a) return e;
    return -1;
  endfunction

  function automatic sym_t r_mul(sym_t a, sym_t b);
    if (a == 0 || b == 0) return 4'd0;
    return r_exp(r_log(a) + r_log(b));
  endfunction

  function automatic sym_t r_div(sym_t a, sym_t b);
    if (a == 0 || b == 0) return 4'd0;
    return r_exp(r_log(a) - r_log(b));
  endfunction

  // r(a^i), word given as coefficients w[0] (X^0) .. w[n-1]
  function automatic sym_t r_eval(sym_t w [], int i);
    sym_t acc = 0;
    for (int j = w.size() - 1; j >= 0; j--) acc = r_mul(acc, r_exp(i)) ^ w[j];
    return acc;
  endfunction

  // systematic codeword of length n, message in positions 4..n-1
  function automatic void r_encode(int n, output sym_t c []);
    sym_t g [5];
    sym_t rem [4];
    g = '{default: 0};
    g[0] = 1;                                   // g[j] = coefficient of X^j
    for (int i = 1; i <= 4; i++) begin
      for (int j = 4; j >= 1; j--) g[j] = g[j-1] ^ r_mul(g[j], r_exp(i));
      g[0] = r_mul(g[0], r_exp(i));
    end
    c = new[n];
    for (int j = 4; j < n; j++) c[j] = sym_t'($urandom_range(0, 15));
    rem = '{default: 0};
    for (int j = n - 1; j >= 4; j--) begin      // long division, top symbol first
      sym_t fb = c[j] ^ rem[3];
      for (int q = 3; q >= 1; q--) rem[q] = rem[q-1] ^ r_mul(fb, g[q]);
      rem[0] = r_mul(fb, g[0]);
    end
    for (int j = 0; j < 4; j++) c[j] = rem[j];
  endfunction

  // one test word
  class word_t;
    int   n;
    sym_t cw [];     // transmitted codeword
    sym_t rx [];     // received symbols
    bit   fl [];     // erasure flags
    bit   fail;      // decoder must give up (word passes unchanged)
    int   n_err, n_era;

    function new(int n_in);
      n = n_in;
    endfunction

    // w errors, s erasures at distinct random positions
    function void make(int w, int s);
      int pos [$];
      int p;
      r_encode(n, cw);
      rx = new[n];
      fl = new[n];
      foreach (rx[j]) begin rx[j] = cw[j]; fl[j] = 0; end
      while (pos.size() < w + s) begin
        p = $urandom_range(0, n - 1);
        if (!(p inside {pos})) pos.push_back(p);
      end
      for (int e = 0; e < w; e++) rx[pos[e]] = cw[pos[e]] ^ sym_t'($urandom_range(1, 15));
      for (int e = w; e < w + s; e++) begin
        rx[pos[e]] = sym_t'($urandom_range(0, 15));
        fl[pos[e]] = 1;
      end
      n_err = w;
      n_era = s;
      fail  = (s > 4) || (s == 0 && w == 2);
    endfunction

    // the worked example: r(X) = 6 X^4 + 7 X^7 + 5 X^11, X^7 and X^4 erased
    function void make_example();
      cw = new[n];
      rx = new[n];
      fl = new[n];
      foreach (rx[j]) begin cw[j] = 0; rx[j] = 0; fl[j] = 0; end
      rx[11] = 5;
      rx[7]  = 7;  fl[7] = 1;
      rx[4]  = 6;  fl[4] = 1;
      n_err = 1;
      n_era = 2;
      fail  = 0;
    endfunction
  endclass

endpackage
