// tb_turbo_ref_pkg: reference model used by the testbenches.
//
// It computes the 3GPP internal interleaver and the turbo coded block in a
// different form from the RTL: the interleaver builds the R x C matrix
// explicitly, pads it, permutes rows and columns as 2-D arrays and prunes on
// read-out; the constituent encoder is written as the recursion
//   a_k = x_k ^ a_(k-2) ^ a_(k-3),   z_k = a_k ^ a_(k-1) ^ a_(k-3)
// (g0 = 1 + D^2 + D^3, g1 = 1 + D + D^3), terminated by choosing x_k so
// that a_k = 0. Also a 16-bit Galois LFSR (taps 0xB400) for test data.
package tb_turbo_ref_pkg;

  typedef int int_da_t[];
  typedef bit bit_da_t[];

  function automatic bit prime(int n);
    if (n < 2) return 0;
    for (int d = 2; d < n; d++) if (n % d == 0) return 0;
    return 1;
  endfunction

  function automatic int_da_t interleaver(int K);
    int R, C, p, v, nrow;
    int s[], q[], r[], T[], mat[][], out[];
    int pa[20] = '{19, 9, 14, 4, 0, 2, 5, 7, 12, 18, 10, 8, 13, 17, 3, 1, 16, 6, 15, 11};
    int pb[20] = '{19, 9, 14, 4, 0, 2, 5, 7, 12, 18, 16, 13, 17, 15, 3, 1, 6, 11, 8, 10};
    int n;
    R = (K <= 159) ? 5 : ((K <= 200 || (K >= 481 && K <= 530)) ? 10 : 20);
    if (K >= 481 && K <= 530) begin p = 53; C = 53; end
    else begin
      for (p = 7; !(prime(p) && K <= R * (p + 1)); p++) ;
      C = (K <= R * (p - 1)) ? p - 1 : ((K <= R * p) ? p : p + 1);
    end
    // primitive root: smallest v whose powers reach p-1 distinct values
    for (v = 2; v < p; v++) begin
      int x, ord;
      x = v; ord = 1;
      while (x != 1) begin x = (x * v) % p; ord++; end
      if (ord == p - 1) break;
    end
    s = new[p - 1];
    s[0] = 1;
    foreach (s[j]) if (j > 0) s[j] = (v * s[j-1]) % p;
    q = new[R];
    q[0] = 1;
    n = 7;
    for (int i = 1; i < R; i++) begin
      while (!(prime(n) && ((p - 1) % n != 0))) n++;
      q[i] = n; n++;
    end
    T = new[R];
    foreach (T[i])
      T[i] = (R == 20) ? ((((K >= 2281) && (K <= 2480)) || ((K >= 3161) && (K <= 3210))) ? pa[i] : pb[i])
                       : R - 1 - i;
    r = new[R];
    foreach (T[i]) r[T[i]] = q[i];
    // matrix of input indices, -1 for padding
    mat = new[R];
    foreach (mat[i]) begin
      mat[i] = new[C];
      foreach (mat[i][j]) mat[i][j] = (i * C + j < K) ? i * C + j : -1;
    end
    // intra-row then inter-row permutation into a new matrix
    begin
      int pm[][];
      pm = new[R];
      for (int i = 0; i < R; i++) begin
        int U[];
        U = new[C];
        for (int j = 0; j < C; j++) begin
          if (C == p - 1)      U[j] = s[(j * r[i]) % (p - 1)] - 1;
          else if (j < p - 1)  U[j] = s[(j * r[i]) % (p - 1)];
          else if (j == p - 1) U[j] = 0;
          else                 U[j] = p;
        end
        if (C == p + 1 && K == R * C && i == R - 1) begin
          int t; t = U[0]; U[0] = U[p]; U[p] = t;
        end
        pm[i] = new[C];
        for (int j = 0; j < C; j++) pm[i][j] = mat[i][U[j]];
      end
      out = new[K];
      n = 0;
      for (int j = 0; j < C; j++)
        for (int i = 0; i < R; i++)
          if (pm[T[i]][j] >= 0) begin out[n] = pm[T[i]][j]; n++; end
    end
    return out;
  endfunction

  // Parity, tail and parity-tail bits of one constituent encoder.
  function automatic bit_da_t rsc(bit_da_t x);
    bit_da_t o;
    bit a1, a2, a3, ak;
    int K;
    K = x.size();
    o = new[K + 6];   // K parity, 3 tail, 3 parity tail
    a1 = 0; a2 = 0; a3 = 0;
    for (int k = 0; k < K; k++) begin
      ak = x[k] ^ a2 ^ a3;
      o[k] = ak ^ a1 ^ a3;
      a3 = a2; a2 = a1; a1 = ak;
    end
    for (int t = 0; t < 3; t++) begin
      o[K + t]     = a2 ^ a3;          // x chosen so that a_k = 0
      o[K + 3 + t] = a1 ^ a3;
      a3 = a2; a2 = a1; a1 = 0;
    end
    return o;
  endfunction

  // Coded block: MSD+CRC, tail1, tail2, parity1, ptail1, parity2, ptail2.
  function automatic bit_da_t encode(bit_da_t msd);
    int K;
    int_da_t pi;
    bit_da_t xi, e1, e2, cw;
    K  = msd.size();
    pi = interleaver(K);
    xi = new[K];
    foreach (xi[k]) xi[k] = msd[pi[k]];
    e1 = rsc(msd);
    e2 = rsc(xi);
    cw = new[3 * K + 12];
    for (int k = 0; k < K; k++) begin
      cw[k]         = msd[k];
      cw[K + 6 + k] = e1[k];
      cw[2*K + 9 + k] = e2[k];
    end
    for (int t = 0; t < 3; t++) begin
      cw[K + t]         = e1[K + t];
      cw[K + 3 + t]     = e2[K + t];
      cw[2*K + 6 + t]   = e1[K + 3 + t];
      cw[3*K + 9 + t]   = e2[K + 3 + t];
    end
    return cw;
  endfunction

  // LFSR test pattern, output bit = lsb of the state.
  function automatic bit_da_t lfsr_bits(int K, bit [15:0] seed);
    bit_da_t b;
    bit [15:0] s;
    b = new[K];
    s = seed;
    for (int k = 0; k < K; k++) begin
      b[k] = s[0];
      s = s[0] ? ((s >> 1) ^ 16'hB400) : (s >> 1);
    end
    return b;
  endfunction

  // 32 (or fewer) bits of a bit array starting at lo, bit lo in bit 0.
  function automatic bit [31:0] word(bit_da_t b, int lo, int n = 32);
    bit [31:0] w;
    w = '0;
    for (int i = 0; i < n; i++) w[i] = b[lo + i];
    return w;
  endfunction

endpackage
