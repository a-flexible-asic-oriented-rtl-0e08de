// ntru_ref_pkg: software reference models used by the testbenches: SHA3-256
// (Keccak-f[1600] written from its definition, round constants from the LFSR),
// cyclic convolution mod (q, x^n - 1), and the byte formats of packed
// polynomials. Polynomials are int arrays in ascending order of degree;
// ternary values are -1, 0, 1.
package ntru_ref_pkg;
  typedef logic [63:0] lane_t;
  typedef byte unsigned bytes_t[$];
  typedef int poly_t[];

  function automatic bit rc_bit(int t);
    logic [7:0] r;
    if (t % 255 == 0) return 1'b1;
    r = 8'h01;
    for (int i = 1; i <= t % 255; i++) r = {r[6:0], 1'b0} ^ (r[7] ? 8'h71 : 8'h00);
    return r[0];
  endfunction
  function automatic lane_t rol(lane_t v, int r);
    r = r % 64;
    return (r == 0) ? v : ((v << r) | (v >> (64 - r)));
  endfunction
  function automatic void keccak_f(ref lane_t a[5][5]);
    lane_t c[5], d, b[5][5];
    int rot[5][5];
    int x, y, nx;
    x = 1; y = 0; rot[0][0] = 0;
    for (int t = 0; t < 24; t++) begin
      rot[x][y] = ((t + 1) * (t + 2) / 2) % 64;
      nx = y; y = (2 * x + 3 * y) % 5; x = nx;
    end
    for (int rnd = 0; rnd < 24; rnd++) begin
      for (int i = 0; i < 5; i++) c[i] = a[i][0] ^ a[i][1] ^ a[i][2] ^ a[i][3] ^ a[i][4];
      for (int i = 0; i < 5; i++) begin
        d = c[(i + 4) % 5] ^ rol(c[(i + 1) % 5], 1);
        for (int j = 0; j < 5; j++) a[i][j] ^= d;
      end
      for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++)
        b[j][(2 * i + 3 * j) % 5] = rol(a[i][j], rot[i][j]);
      for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++)
        a[i][j] = b[i][j] ^ (~b[(i + 1) % 5][j] & b[(i + 2) % 5][j]);
      for (int j = 0; j < 7; j++)
        if (rc_bit(j + 7 * rnd)) a[0][0][(1 << j) - 1] ^= 1'b1;
    end
  endfunction
  function automatic logic [255:0] sha3_256(bytes_t msg);
    lane_t a[5][5];
    bytes_t m;
    logic [255:0] h;
    m = msg;
    m.push_back(8'h06);
    while (m.size() % 136 != 0) m.push_back(8'h00);
    m[m.size() - 1] |= 8'h80;
    for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) a[i][j] = '0;
    for (int blk = 0; blk < m.size() / 136; blk++) begin
      for (int p = 0; p < 136; p++)
        a[(p / 8) % 5][(p / 8) / 5][8 * (p % 8) +: 8] ^= m[blk * 136 + p];
      keccak_f(a);
    end
    for (int p = 0; p < 32; p++) h[8 * p +: 8] = a[(p / 8) % 5][(p / 8) / 5][8 * (p % 8) +: 8];
    return h;
  endfunction

  function automatic int modp(int v, int m);
    return ((v % m) + m) % m;
  endfunction

  // c = a * b mod (q, x^n - 1)
  function automatic poly_t cyc_mul(poly_t a, poly_t b, int q);
    poly_t c;
    int n;
    n = a.size();
    c = new[n];
    for (int k = 0; k < n; k++) c[k] = 0;
    for (int i = 0; i < n; i++) if (a[i] != 0)
      for (int j = 0; j < n; j++) c[(i + j) % n] = modp(c[(i + j) % n] + a[i] * b[j], q);
    return c;
  endfunction

  // pack the first n-1 coefficients (values mod 2^logq), LSB first
  function automatic bytes_t pack_q(poly_t a, int logq);
    bytes_t r;
    int nbits;
    nbits = (a.size() - 1) * logq;
    for (int by = 0; by < (nbits + 7) / 8; by++) begin
      byte unsigned v;
      v = 0;
      for (int k = 0; k < 8; k++) begin
        int bi;
        bi = by * 8 + k;
        if (bi < nbits) v[k] = 1'(modp(a[bi / logq], 1 << logq) >> (bi % logq));
      end
      r.push_back(v);
    end
    return r;
  endfunction

  // pack the first n-1 ternary coefficients, five per byte (-1 -> 2)
  function automatic bytes_t pack_3(poly_t a);
    bytes_t r;
    int m;
    m = a.size() - 1;
    for (int by = 0; by < (m + 4) / 5; by++) begin
      int v, w;
      v = 0; w = 1;
      for (int k = 0; k < 5; k++) if (by * 5 + k < m) begin v += modp(a[by * 5 + k], 3) * w; w *= 3; end
      r.push_back(byte'(v));
    end
    return r;
  endfunction
endpackage
