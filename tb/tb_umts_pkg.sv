// tb_umts_pkg -- behavioural model of the 3GPP (UMTS / HSPA) turbo-code
// internal interleaver, for testbenches only.
//
// umts_pi(K) returns the interleaved order: element k of the result is the
// index of the input bit read out in position k.  Written from the
// standard's description (R rows of C columns, prime p with primitive
// root v, base sequence s, row primes q / r, intra-row permutations U,
// inter-row pattern T, column-wise read-out with pruning).  The primitive
// root is computed as the least primitive root of p.  Valid for
// 40 <= K <= 5114.
package tb_umts_pkg;

  typedef int unsigned uq_t [$];

  function automatic bit is_prime(int unsigned x);
    if (x < 2) return 0;
    for (int unsigned d = 2; d * d <= x; d++) if (x % d == 0) return 0;
    return 1;
  endfunction

  function automatic int unsigned gcd(int unsigned a, int unsigned b);
    int unsigned t;
    while (b != 0) begin t = a % b; a = b; b = t; end
    return a;
  endfunction

  function automatic int unsigned powmod(int unsigned b, int unsigned e, int unsigned m);
    longint unsigned r, x;
    r = 1; x = b % m;
    while (e != 0) begin
      if (e & 1) r = (r * x) % m;
      x = (x * x) % m;
      e >>= 1;
    end
    return int'(r);
  endfunction

  function automatic int unsigned least_prim_root(int unsigned p);
    for (int unsigned g = 2; g < p; g++) begin
      bit ok;
      ok = 1;
      for (int unsigned f = 2; f < p; f++)
        if (is_prime(f) && ((p - 1) % f == 0) && powmod(g, (p - 1) / f, p) == 1) ok = 0;
      if (ok) return g;
    end
    return 0;
  endfunction

  function automatic uq_t umts_pi(int unsigned k);
    int unsigned rr, p, c, v;
    int unsigned s [260];
    int unsigned q [20], r [20], t [20];
    int unsigned u [20][260];
    int unsigned tmp, val;
    int unsigned t5 [5]   = '{4, 3, 2, 1, 0};
    int unsigned t10 [10] = '{9, 8, 7, 6, 5, 4, 3, 2, 1, 0};
    int unsigned t20a [20] = '{19, 9, 14, 4, 0, 2, 5, 7, 12, 18, 16, 13, 17, 15, 3, 1, 6, 11, 8, 10};
    int unsigned t20b [20] = '{19, 9, 14, 4, 0, 2, 5, 7, 12, 18, 10, 8, 13, 17, 3, 1, 16, 6, 15, 11};
    uq_t res;

    if (k <= 159) rr = 5;
    else if (k <= 200 || (k >= 481 && k <= 530)) rr = 10;
    else rr = 20;

    if (k >= 481 && k <= 530) begin
      p = 53; c = 53;
    end else begin
      p = 7;
      while (!(is_prime(p) && k <= rr * (p + 1))) p++;
      if (k <= rr * (p - 1)) c = p - 1;
      else if (k <= rr * p) c = p;
      else c = p + 1;
    end

    v = least_prim_root(p);
    s[0] = 1;
    for (int unsigned j = 1; j <= p - 2; j++) s[j] = (v * s[j-1]) % p;

    q[0] = 1;
    for (int unsigned i = 1; i < rr; i++) begin
      tmp = q[i-1] + 1;
      while (!(is_prime(tmp) && tmp > 6 && gcd(tmp, p - 1) == 1)) tmp++;
      q[i] = tmp;
    end

    for (int unsigned i = 0; i < rr; i++) begin
      if (rr == 5) t[i] = t5[i];
      else if (rr == 10) t[i] = t10[i];
      else if ((k >= 2281 && k <= 2480) || (k >= 3161 && k <= 3210)) t[i] = t20a[i];
      else t[i] = t20b[i];
    end
    for (int unsigned i = 0; i < rr; i++) r[t[i]] = q[i];

    for (int unsigned i = 0; i < rr; i++) begin
      for (int unsigned j = 0; j <= p - 2; j++)
        u[i][j] = (c == p - 1) ? s[(j * r[i]) % (p - 1)] - 1 : s[(j * r[i]) % (p - 1)];
      if (c >= p) u[i][p-1] = 0;
      if (c == p + 1) u[i][p] = p;
    end
    if (c == p + 1 && k == rr * c) begin
      tmp = u[rr-1][p]; u[rr-1][p] = u[rr-1][0]; u[rr-1][0] = tmp;
    end

    // row i of the output matrix is input row t[i], permuted by u[t[i]]
    for (int unsigned j = 0; j < c; j++)
      for (int unsigned i = 0; i < rr; i++) begin
        val = t[i] * c + u[t[i]][j];
        if (val < k) res.push_back(val);
      end
    return res;
  endfunction

endpackage
