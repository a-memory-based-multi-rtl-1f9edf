// tb_rs_pkg: reference Reed-Solomon arithmetic for the testbenches.
//
// Written independently of the RTL: field multiplication by shift-and-add
// with the primitive polynomials 0x11D (GF(2^8)) and 0x89 (GF(2^7)), a
// systematic encoder by long division with g(x) = prod (x + alpha^i), and
// the annex B extended parity C_ = C(alpha^6). Codewords are returned in
// transmission order (index 0 = highest power of x).
package tb_rs_pkg;

  function automatic int gmul(int a, int b, int m);
    int r, poly, top;
    poly = (m == 7) ? 'h89 : 'h11D;
    top  = 1 << m;
    r = 0;
    while (b != 0) begin
      if (b & 1) r ^= a;
      b >>= 1;
      a <<= 1;
      if (a & top) a ^= poly;
    end
    return r;
  endfunction

  function automatic int gpow(int e, int m);
    int v;
    v = 1;
    for (int i = 0; i < e; i++) v = gmul(v, 2, m);
    return v;
  endfunction

  function automatic int ginv(int a, int m);
    for (int b = 1; b < (1 << m); b++)
      if (gmul(a, b, m) == 1) return b;
    return 0;
  endfunction

  // Mode codes: 0 = A, 1 = B, 2 = C, 3 = D.
  function automatic int code_n(int md); return md == 1 ? 128 : (md == 3 ? 207 : 204); endfunction
  function automatic int code_k(int md); return md == 1 ? 122 : (md == 3 ? 187 : 188); endfunction
  function automatic int code_t(int md); return md == 1 ? 3 : (md == 3 ? 10 : 8); endfunction

  // Systematic encoding of msg[0..K-1] (msg[0] = highest power).
  function automatic void encode(int md, int msg[], ref int cw[]);
    int m, k, n, nr, h;
    int g[];
    int rem[];
    int fb;
    m  = (md == 1) ? 7 : 8;
    k  = code_k(md);
    n  = code_n(md);
    h  = (md == 1) ? 1 : 0;
    nr = (md == 1) ? 5 : 2 * code_t(md);
    // g(x) coefficients, g[0] = constant term
    g = new[nr + 1];
    foreach (g[i]) g[i] = 0;
    g[0] = 1;
    for (int r = 0; r < nr; r++) begin
      int root;
      root = gpow(h + r, m);
      for (int i = nr; i >= 1; i--) g[i] = g[i-1] ^ gmul(g[i], root, m);
      g[0] = gmul(g[0], root, m);
    end
    rem = new[nr];
    foreach (rem[i]) rem[i] = 0;
    for (int i = 0; i < k; i++) begin
      fb = msg[i] ^ rem[nr-1];
      for (int j = nr - 1; j >= 1; j--) rem[j] = rem[j-1] ^ gmul(fb, g[j], m);
      rem[0] = gmul(fb, g[0], m);
    end
    cw = new[n];
    for (int i = 0; i < k; i++) cw[i] = msg[i];
    for (int j = 0; j < nr; j++) cw[k + j] = rem[nr - 1 - j];
    if (md == 1) begin
      // C_ = C(alpha^6) over the 127 inner symbols, appended last
      int acc, a6;
      a6 = gpow(6, 7);
      acc = 0;
      for (int i = 0; i < 127; i++) acc = gmul(acc, a6, 7) ^ cw[i];
      cw[127] = acc;
    end
  endfunction

  // Syndromes as the decoder numbers them: s[j] = r(alpha^(h+j)), j < 2t,
  // with h = 0 (annexes A/C/D) or h = 1 (annex B, first 127 symbols, the
  // extended symbol added to s[5]); s[j] = 0 for j >= 2t.
  function automatic void syndromes(int md, int cw[], ref int s[20]);
    int m, n, h, nt;
    m  = (md == 1) ? 7 : 8;
    n  = (md == 1) ? 127 : code_n(md);
    h  = (md == 1) ? 1 : 0;
    nt = 2 * code_t(md);
    for (int j = 0; j < 20; j++) begin
      int a, acc;
      acc = 0;
      if (j < nt) begin
        a = gpow(h + j, m);
        for (int i = 0; i < n; i++) acc = gmul(acc, a, m) ^ cw[i];
        if (md == 1 && j == 5) acc ^= cw[127];
      end
      s[j] = acc;
    end
  endfunction

  // Locator sigma(x) = prod (1 + alpha^l x) for error powers l (index 0 =
  // constant term).
  function automatic void locator(int md, int locs[$], ref int sg[11]);
    int m;
    m = (md == 1) ? 7 : 8;
    foreach (sg[i]) sg[i] = 0;
    sg[0] = 1;
    foreach (locs[k]) begin
      int x;
      x = gpow(locs[k], m);
      for (int i = 10; i >= 1; i--) sg[i] ^= gmul(sg[i-1], x, m);
    end
  endfunction

  // Evaluate polynomial c (index 0 = constant term) at x.
  function automatic int peval(int c[], int x, int m);
    int acc;
    acc = 0;
    for (int i = c.size() - 1; i >= 0; i--) acc = gmul(acc, x, m) ^ c[i];
    return acc;
  endfunction

endpackage
