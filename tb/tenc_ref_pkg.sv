// tenc_ref_pkg: reference models for the turbo encoder testbenches.
//
// Written independently of the RTL, straight from the 3GPP TS 25.212
// description: the interleaver is built by filling an explicit R x C matrix,
// permuting its rows' contents and then its rows, and reading it out column by
// column; the primitive root is found with the prime-factor test; the RSC
// encoder works on a tap vector of the generator polynomials.
package tenc_ref_pkg;

  typedef int int_q[$];
  typedef bit bit_q[$];

  function automatic bit ref_prime(int n);
    if (n < 2) return 0;
    for (int d = 2; d < n; d++) if (n % d == 0) return 0;
    return 1;
  endfunction

  function automatic int ref_powmod(int b, int e, int m);
    longint r = 1;
    for (int i = 0; i < e; i++) r = (r * b) % m;
    return int'(r);
  endfunction

  // least g with g^((p-1)/f) != 1 mod p for every prime factor f of p-1
  function automatic int ref_prim_root(int p);
    for (int g = 2; g < p; g++) begin
      bit ok = 1;
      for (int f = 2; f <= p - 1; f++)
        if (ref_prime(f) && ((p - 1) % f == 0) && ref_powmod(g, (p - 1) / f, p) == 1) ok = 0;
      if (ok) return g;
    end
    return -1;
  endfunction

  function automatic int ref_gcd(int a, int b);
    if (b == 0) return a;
    return ref_gcd(b, a % b);
  endfunction

  // interleaver: result[k] = input position that goes to output position k
  function automatic int_q ref_interleaver(int K);
    int R, p, C, v;
    int s[];
    int q[20], rr[20], T[20];
    int U[20][260];
    int m[20][260], y[20][260], z[20][260];
    int PA[20] = '{19, 9, 14, 4, 0, 2, 5, 7, 12, 18, 10, 8, 13, 17, 3, 1, 16, 6, 15, 11};
    int PB[20] = '{19, 9, 14, 4, 0, 2, 5, 7, 12, 18, 16, 13, 17, 15, 3, 1, 6, 11, 8, 10};
    int_q out;

    if (K >= 40 && K <= 159) R = 5;
    else if ((K >= 160 && K <= 200) || (K >= 481 && K <= 530)) R = 10;
    else R = 20;

    if (K >= 481 && K <= 530) begin
      p = 53; C = p;
    end else begin
      p = 7;
      while (!(ref_prime(p) && K <= R * (p + 1))) p = p + 1;
      if (K <= R * (p - 1)) C = p - 1;
      else if (K <= R * p) C = p;
      else C = p + 1;
    end
    v = ref_prim_root(p);

    s = new[p - 1];
    s[0] = 1;
    for (int j = 1; j < p - 1; j++) s[j] = (v * s[j - 1]) % p;

    q[0] = 1;
    for (int i = 1; i < R; i++) begin
      int cand = q[i - 1] + 1;
      while (!(ref_prime(cand) && cand > 6 && ref_gcd(cand, p - 1) == 1)) cand++;
      q[i] = cand;
    end

    for (int i = 0; i < R; i++) begin
      if (R == 5) T[i] = 4 - i;
      else if (R == 10) T[i] = 9 - i;
      else if ((K >= 2281 && K <= 2480) || (K >= 3161 && K <= 3210)) T[i] = PB[i];
      else T[i] = PA[i];
    end
    for (int i = 0; i < R; i++) rr[T[i]] = q[i];

    for (int i = 0; i < R; i++) begin
      if (C == p) begin
        for (int j = 0; j <= p - 2; j++) U[i][j] = s[(j * rr[i]) % (p - 1)];
        U[i][p - 1] = 0;
      end else if (C == p + 1) begin
        for (int j = 0; j <= p - 2; j++) U[i][j] = s[(j * rr[i]) % (p - 1)];
        U[i][p - 1] = 0;
        U[i][p] = p;
      end else begin
        for (int j = 0; j <= p - 2; j++) U[i][j] = s[(j * rr[i]) % (p - 1)] - 1;
      end
    end
    if (C == p + 1 && K == R * C) begin
      int tmp = U[R - 1][p];
      U[R - 1][p] = U[R - 1][0];
      U[R - 1][0] = tmp;
    end

    for (int i = 0; i < R; i++)
      for (int j = 0; j < C; j++) m[i][j] = i * C + j;          // >= K marks a dummy
    for (int i = 0; i < R; i++)
      for (int j = 0; j < C; j++) y[i][j] = m[i][U[i][j]];
    for (int i = 0; i < R; i++)
      for (int j = 0; j < C; j++) z[i][j] = y[T[i]][j];
    for (int j = 0; j < C; j++)
      for (int i = 0; i < R; i++) if (z[i][j] < K) out.push_back(z[i][j]);
    return out;
  endfunction

  // RSC encoder: w[0] is the feedback sum, w[1..3] the register.
  // g0 = 1 + D^2 + D^3 -> taps {1,0,1,1}; g1 = 1 + D + D^3 -> taps {1,1,0,1}
  function automatic void ref_rsc(input bit_q x, output bit_q par,
                                  output bit_q tsys, output bit_q tpar);
    bit w[4] = '{0, 0, 0, 0};
    bit G0[4] = '{1, 0, 1, 1};
    bit G1[4] = '{1, 1, 0, 1};
    par = {}; tsys = {}; tpar = {};
    for (int n = 0; n < x.size() + 3; n++) begin
      bit fb = 0, u, z = 0;
      for (int i = 1; i < 4; i++) fb ^= w[i] & G0[i];
      u    = (n < x.size()) ? x[n] : fb;
      w[0] = u ^ fb;
      for (int i = 0; i < 4; i++) z ^= w[i] & G1[i];
      if (n < x.size()) par.push_back(z);
      else begin tsys.push_back(u); tpar.push_back(z); end
      w[3] = w[2]; w[2] = w[1]; w[1] = w[0];
    end
  endfunction

  // complete coded block in transmission order
  function automatic bit_q ref_turbo(input bit_q x);
    bit_q xi, p1, p2, ts1, tp1, ts2, tp2, y;
    int_q pi = ref_interleaver(x.size());
    foreach (pi[k]) xi.push_back(x[pi[k]]);
    ref_rsc(x, p1, ts1, tp1);
    ref_rsc(xi, p2, ts2, tp2);
    y = {x, ts1, ts2, p1, tp1, p2, tp2};
    return y;
  endfunction

endpackage
