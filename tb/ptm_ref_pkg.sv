// ptm_ref_pkg -- reference models used by the testbenches.
//
// Bit-serial, loop-based models written independently of the RTL:
//   eta_ref      error-tolerant addition of two W-bit numbers, accurate part
//                by integer addition, inaccurate part by an MSB-to-LSB scan
//   term_ref     one gated modified Baugh-Wooley partial-product term
//   matrix_ref   sum of all enabled terms plus the two constants, mod 2**2N
//                (the exact value of the truncated matrix)
//   ptm_ref      value produced by the row-array of ETAs
package ptm_ref_pkg;

  function automatic longint unsigned eta_ref(longint unsigned a,
                                              longint unsigned b,
                                              int W, int M);
    longint unsigned hi, lo;
    bit hit;
    hi  = ((a >> M) + (b >> M)) << M;
    lo  = 0;
    hit = 0;
    for (int i = M - 1; i >= 0; i--) begin
      if (a[i] && b[i]) hit = 1;
      if (hit || (a[i] != b[i])) lo |= (64'd1 << i);
    end
    return hi + lo;
  endfunction

  function automatic bit term_ref(longint unsigned x, longint unsigned y,
                                  longint unsigned t, int N, int i, int j);
    bit v;
    v = x[i] & y[j];
    if ((i == N - 1) ^ (j == N - 1)) v = !v;
    return v & t[i+j];
  endfunction

  function automatic longint unsigned mask(int bits);
    return (bits >= 64) ? '1 : ((64'd1 << bits) - 1);
  endfunction

  function automatic longint unsigned matrix_ref(longint unsigned x,
                                                 longint unsigned y,
                                                 longint unsigned t, int N);
    longint unsigned s;
    s = (64'd1 << N) + (64'd1 << (2 * N - 1));
    for (int j = 0; j < N; j++)
      for (int i = 0; i < N; i++)
        if (term_ref(x, y, t, N, i, j)) s += (64'd1 << (i + j));
    return s & mask(2 * N);
  endfunction

  function automatic longint unsigned ptm_ref(longint unsigned x,
                                              longint unsigned y,
                                              longint unsigned t,
                                              int N, int M);
    longint unsigned row [64];
    longint unsigned acc, p;
    for (int j = 0; j < N; j++) begin
      row[j] = 0;
      for (int i = 0; i < N; i++)
        if (term_ref(x, y, t, N, i, j)) row[j] |= (64'd1 << i);
    end
    acc = row[0] | (64'd1 << N);
    p   = 0;
    for (int k = 1; k < N; k++) begin
      p  |= (acc & 1) << (k - 1);
      acc = eta_ref(acc >> 1, row[k], N, M);
    end
    p |= acc << (N - 1);
    p ^= 64'd1 << (2 * N - 1);
    return p & mask(2 * N);
  endfunction

  // Signed N-bit product, as a 2N-bit two's complement pattern.
  function automatic longint unsigned smul_ref(longint unsigned x,
                                               longint unsigned y, int N);
    longint sx, sy;
    sx = longint'(x);
    sy = longint'(y);
    if (x[N-1]) sx -= (64'sd1 <<< N);
    if (y[N-1]) sy -= (64'sd1 <<< N);
    return longint'(sx * sy) & mask(2 * N);
  endfunction

endpackage
