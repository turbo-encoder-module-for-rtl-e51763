// turbo_interleaver: the 3GPP turbo code internal interleaver (TS 25.212,
// section 4.2.3.2.3) for a block of K bits, 40 <= K <= 5114.
//
// The K input bits are written row by row into an R x C matrix (for
// K = 1148: R = 20 rows, C = 58 columns, prime p = 59, primitive root v = 2,
// 12 padding positions). Each row is permuted by the intra-row pattern
//   C = p-1:  U_i(j) = s((j * r_i) mod (p-1)) - 1
//   C = p  :  U_i(j) = s((j * r_i) mod (p-1)),  U_i(p-1) = 0
//   C = p+1:  as C = p, U_i(p) = p (U_i(0) and U_i(p) of the last row
//             swapped when K = R*C)
// with s(0) = 1, s(j) = v*s(j-1) mod p and r_T(i) = q_i, q_0 = 1 and q_i the
// smallest primes above 6 coprime to p-1. The rows are then reordered by the
// inter-row pattern T, and the matrix is read column by column, skipping the
// padding positions. pi(k) is the input index of interleaved bit k.
//
// The whole pi table is computed at elaboration by a constant function, so
// it costs no file and follows K. A table lookup (rd_idx -> rd_addr, the
// serial method) and the full-block permutation dout[k] = din[pi(k)] (fixed
// wiring, the parallel method) are both provided. Combinational. The
// described design reads the same table from a hex file; computing it here
// is this design's choice.
module turbo_interleaver #(
  parameter int unsigned K  = 1148,
  localparam int unsigned AW = $clog2(K)
) (
  input  logic [AW-1:0] rd_idx,
  output logic [AW-1:0] rd_addr,
  input  logic [K-1:0]  din,
  output logic [K-1:0]  dout
);

  typedef logic [K-1:0][AW-1:0] pi_table_t;

  function automatic bit is_prime(int n);
    if (n < 2) return 1'b0;
    for (int d = 2; d * d <= n; d++)
      if (n % d == 0) return 1'b0;
    return 1'b1;
  endfunction

  // Smallest primitive root of the prime p.
  function automatic int prim_root(int p);
    for (int g = 2; g < p; g++) begin
      int  x;
      bit  ok;
      x  = 1;
      ok = 1'b1;
      for (int i = 1; i < p - 1; i++) begin
        x = (x * g) % p;
        if (x == 1) begin
          ok = 1'b0;
          break;
        end
      end
      if (ok) return g;
    end
    return 0;
  endfunction

  function automatic int gcd(int a, int b);
    while (b != 0) begin
      int t;
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  function automatic pi_table_t build_table();
    pi_table_t tab;
    int R, C, p, v, cand, n, row, u, addr;
    int s [0:256];
    int q [0:19];
    int r [0:19];
    int T [0:19];
    int pat_a [0:19];
    int pat_b [0:19];

    pat_a = '{19, 9, 14, 4, 0, 2, 5, 7, 12, 18, 10, 8, 13, 17, 3, 1, 16, 6, 15, 11};
    pat_b = '{19, 9, 14, 4, 0, 2, 5, 7, 12, 18, 16, 13, 17, 15, 3, 1, 6, 11, 8, 10};
    for (int k = 0; k < K; k++) tab[k] = '0;

    // Number of rows.
    if (K <= 159)                                R = 5;
    else if (K <= 200 || (K >= 481 && K <= 530)) R = 10;
    else                                         R = 20;

    // Prime p and number of columns.
    if (K >= 481 && K <= 530) begin
      p = 53;
      C = p;
    end else begin
      p = 7;
      while (!(is_prime(p) && K <= R * (p + 1))) p++;
      if (K <= R * (p - 1))  C = p - 1;
      else if (K <= R * p)   C = p;
      else                   C = p + 1;
    end

    // Base sequence for the intra-row permutation.
    v = prim_root(p);
    s[0] = 1;
    for (int j = 1; j < p - 1; j++) s[j] = (v * s[j-1]) % p;

    // Prime sequence q.
    q[0] = 1;
    cand = 6;
    for (int i = 1; i < R; i++) begin
      do cand++; while (!(is_prime(cand) && gcd(cand, p - 1) == 1));
      q[i] = cand;
    end

    // Inter-row pattern.
    for (int i = 0; i < R; i++) begin
      if (R == 20 && ((K >= 2281 && K <= 2480) || (K >= 3161 && K <= 3210)))
        T[i] = pat_a[i];
      else if (R == 20)
        T[i] = pat_b[i];
      else
        T[i] = R - 1 - i;
    end
    for (int i = 0; i < R; i++) r[T[i]] = q[i];

    // Read out column by column, pruning padding positions.
    n = 0;
    for (int j = 0; j < C; j++) begin
      for (int i = 0; i < R; i++) begin
        row = T[i];
        if (C == p - 1) begin
          u = s[(j * r[row]) % (p - 1)] - 1;
        end else if (j < p - 1) begin
          u = s[(j * r[row]) % (p - 1)];
          if (C == p + 1 && K == R * C && row == R - 1 && j == 0) u = p;
        end else if (j == p - 1) begin
          u = 0;
        end else begin
          u = (K == R * C && row == R - 1) ? 1 : p;
        end
        addr = row * C + u;
        if (addr < K) begin
          tab[n] = AW'(addr);
          n++;
        end
      end
    end
    return tab;
  endfunction

  localparam pi_table_t PI = build_table();

  assign rd_addr = (int'(rd_idx) < K) ? PI[rd_idx] : '0;

  for (genvar k = 0; k < K; k++) begin : g_perm
    assign dout[k] = din[PI[k]];
  end

  initial begin
    assert (K >= 40 && K <= 5114)
      else $error("turbo_interleaver: K must be in 40..5114");
  end

endmodule
