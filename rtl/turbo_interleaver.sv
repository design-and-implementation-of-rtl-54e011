// turbo_interleaver: the 3GPP turbo code internal interleaver (prime
// interleaver of 3GPP TS 25.212) for a block length K from 40 to 5114.
//
// The permutation pi is computed at elaboration by a constant function and
// held as a ROM of K addresses; the interleaved sequence is x'[k] = x[pi(k)].
// Construction, for reference:
//   1. Rows R = 5 (K <= 159), 10 (K <= 200 or 481 <= K <= 530), else 20.
//   2. Prime p: 53 for 481 <= K <= 530, else the smallest prime >= 7 with
//      K <= R*(p+1).  Columns C = p-1, p or p+1, the smallest with K <= R*C
//      (C = p when p = 53 is forced).  v is the least primitive root of p.
//   3. Base sequence s(0) = 1, s(j) = v*s(j-1) mod p, j = 1..p-2.
//   4. q(0) = 1, q(i) the smallest prime > q(i-1) and > 6 with
//      gcd(q(i), p-1) = 1.  The row pattern T is <4..0> for R = 5, <9..0> for
//      R = 10, and for R = 20 pattern B for 2281..2480 and 3161..3210, else
//      pattern A (lists below).  r(T(i)) = q(i).
//   5. Intra-row permutation of original row i, position j:
//        C = p  : U(j) = s(j*r(i) mod (p-1)), j < p-1; U(p-1) = 0
//        C = p+1: as C = p, plus U(p) = p; if K = R*C, U(0) and U(p) of the
//                 last row are exchanged
//        C = p-1: U(j) = s(j*r(i) mod (p-1)) - 1
//   6. The K bits fill the R x C matrix row by row (dummy bits after the
//      last); the output is read column by column over permuted rows T(i),
//      skipping dummies: pi = T(i)*C + U_T(i)(j) where that is below K.
// The published design only says that a 3GPP interleaver is used; following
// TS 25.212, which accepts the 1148-bit block, is this implementation's reading.
//
// Interfaces (both combinational, from the same table):
//   rd_idx -> rd_addr : pi(rd_idx), used by the serial encoder
//   blk_in -> blk_out : blk_out[k] = blk_in[pi(k)], used by the parallel one
module turbo_interleaver #(
  parameter int unsigned K  = 1148,
  parameter int unsigned AW = (K > 1) ? $clog2(K) : 1
) (
  input  logic [AW-1:0] rd_idx,
  output logic [AW-1:0] rd_addr,
  input  logic [K-1:0]  blk_in,
  output logic [K-1:0]  blk_out
);

  function automatic bit is_prime(int n);
    if (n < 2) return 1'b0;
    for (int d = 2; d * d <= n; d++)
      if (n % d == 0) return 1'b0;
    return 1'b1;
  endfunction

  function automatic int gcd(int a, int b);
    int t;
    while (b != 0) begin
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  // Least primitive root: the smallest g whose powers take p-1 steps to return to 1.
  function automatic int prim_root(int p);
    int g, x, ord;
    for (g = 2; g < p; g++) begin
      x   = g;
      ord = 1;
      while (x != 1) begin
        x   = (x * g) % p;
        ord = ord + 1;
      end
      if (ord == p - 1) return g;
    end
    return 0;
  endfunction

  function automatic logic [K*AW-1:0] build_pi();
    int r, p, c, v, kk, u, row, pos, qq;
    int s [0:256];
    int q [0:19];
    int rp[0:19];
    int pat [0:19];
    int pat_a [0:19];
    int pat_b [0:19];
    logic [K*AW-1:0] tab;

    pat_a = '{19, 9, 14, 4, 0, 2, 5, 7, 12, 18, 10, 8, 13, 17, 3, 1, 16, 6, 15, 11};
    pat_b = '{19, 9, 14, 4, 0, 2, 5, 7, 12, 18, 16, 13, 17, 15, 3, 1, 6, 11, 8, 10};
    // every one of the K entries of tab is written exactly once below

    if (K <= 159)                                  r = 5;
    else if (K <= 200 || (K >= 481 && K <= 530))   r = 10;
    else                                           r = 20;

    if (K >= 481 && K <= 530) begin
      p = 53;
      c = 53;
    end else begin
      p = 7;
      while (!is_prime(p) || int'(K) > r * (p + 1)) p++;
      if (int'(K) <= r * (p - 1))  c = p - 1;
      else if (int'(K) <= r * p)   c = p;
      else                         c = p + 1;
    end
    v = prim_root(p);

    s[0] = 1;
    for (int j = 1; j <= p - 2; j++) s[j] = (v * s[j-1]) % p;

    q[0] = 1;
    qq   = 1;
    for (int i = 1; i < r; i++) begin
      qq = qq + 1;
      while (!(is_prime(qq) && qq > 6 && gcd(qq, p - 1) == 1)) qq++;
      q[i] = qq;
    end

    for (int i = 0; i < r; i++) begin
      if (r == 5)       pat[i] = 4 - i;
      else if (r == 10) pat[i] = 9 - i;
      else if ((K >= 2281 && K <= 2480) || (K >= 3161 && K <= 3210)) pat[i] = pat_b[i];
      else              pat[i] = pat_a[i];
    end
    for (int i = 0; i < r; i++) rp[pat[i]] = q[i];

    kk = 0;
    for (int j = 0; j < c; j++) begin
      for (int i = 0; i < r; i++) begin
        row = pat[i];
        // intra-row position U_row(j)
        if (c == p - 1) begin
          u = s[(j * rp[row]) % (p - 1)] - 1;
        end else if (j == p - 1) begin
          u = 0;
        end else if (j == p) begin
          u = p;
        end else begin
          u = s[(j * rp[row]) % (p - 1)];
        end
        if (c == p + 1 && int'(K) == r * c && row == r - 1) begin
          if (j == 0)      u = p;
          else if (j == p) u = s[0];
        end
        pos = row * c + u;
        if (pos < int'(K)) begin
          tab[kk*AW +: AW] = AW'(pos);
          kk = kk + 1;
        end
      end
    end
    return tab;
  endfunction

  localparam logic [K*AW-1:0] PI = build_pi();

  assign rd_addr = PI[rd_idx*AW +: AW];

  for (genvar k = 0; k < int'(K); k++) begin : g_perm
    assign blk_out[k] = blk_in[PI[k*AW +: AW]];
  end

endmodule
