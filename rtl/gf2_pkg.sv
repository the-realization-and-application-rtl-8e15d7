// gf2_pkg -- elaboration-time GF(2) matrix algebra for parallel LFSRs.
//
// A linear sequential machine over GF(2) is s(t+1) = T s(t) + B i(t), w(t) = C s(t) + D i(t).
// Its f-channel analog advances f serial steps per clock:
//   T' = T^f,  B' = [T^(f-1)B ... TB B],  C' = [C; CT; ...; CT^(f-1)],
//   D'(r,c) = D for r == c, C T^(r-c-1) B for r > c, 0 for r < c.
// For an LFSR that divides by g(x) = a0 + a1 x + ... + x^k, T is the companion matrix of g:
// ones on the sub-diagonal and a0..a(k-1) in the last column, B = e0 and C = e(k-1).
//
// A decoder may be relabelled by a nonsingular Q (sigma = Q s): T* = Q T' Q^-1, B* = Q B',
// C* = C' Q^-1. q_sample() enumerates the self-inverse matrices of the simplification
// algorithm: for every row kk, row kk of the identity is added cumulatively to the k-1 rows
// after it (cyclically), then added to them a second time, which returns to the identity.
// That gives 2k(k-1) matrices, each its own inverse. The cost of a next-state network is the
// number of two-input XOR gates, counted as (ones in T) + (ones in B) - k.
//
// All matrices are stored at a fixed maximum size; only the top-left k x k (k x f, f x k,
// f x f) part is used. Matrix element M[r][c] is row r, column c. Bit j of a state vector is
// the coefficient of x^j. The maximum sizes (32 states, 64 channels) are this design's choice.
package gf2_pkg;

  localparam int unsigned MAXK = 32;  // largest number of state bits
  localparam int unsigned MAXF = 64;  // largest number of parallel channels

  typedef logic [MAXK-1:0] kvec_t;    // state-sized row or column
  typedef logic [MAXF-1:0] fvec_t;    // channel-sized row
  typedef kvec_t [MAXK-1:0] kmat_t;   // k x k
  typedef fvec_t [MAXK-1:0] kfmat_t;  // k x f (B')
  typedef kvec_t [MAXF-1:0] fkmat_t;  // f x k (C')
  typedef fvec_t [MAXF-1:0] ffmat_t;  // f x f (D')

  // How a parallel machine chooses its state labelling.
  typedef enum logic [1:0] {
    Q_IDENTITY = 2'd0,  // unrelabelled machine (required for an encoder)
    Q_EXPLICIT = 2'd1,  // use the Q given as a parameter
    Q_BEST     = 2'd2   // cheapest Q of the self-inverse sample
  } q_mode_e;

  function automatic kmat_t identity(int unsigned k);
    kmat_t m = '0;
    for (int unsigned i = 0; i < k; i++) m[i][i] = 1'b1;
    return m;
  endfunction

  // Companion matrix of g(x) = g[0] + g[1] x + ... + g[k-1] x^(k-1) + x^k.
  function automatic kmat_t companion(int unsigned k, kvec_t g);
    kmat_t m = '0;
    for (int unsigned i = 1; i < k; i++) m[i][i-1] = 1'b1;
    for (int unsigned i = 0; i < k; i++) m[i][k-1] = g[i];
    return m;
  endfunction

  function automatic kmat_t mat_mul(int unsigned k, kmat_t a, kmat_t b);
    kmat_t m = '0;
    for (int unsigned r = 0; r < k; r++)
      for (int unsigned c = 0; c < k; c++)
        for (int unsigned l = 0; l < k; l++)
          m[r][c] ^= a[r][l] & b[l][c];
    return m;
  endfunction

  function automatic kmat_t mat_pow(int unsigned k, kmat_t t, int unsigned e);
    kmat_t m = identity(k);
    for (int unsigned n = 0; n < e; n++) m = mat_mul(k, m, t);
    return m;
  endfunction

  // y = M x
  function automatic kvec_t mat_vec(int unsigned k, kmat_t m, kvec_t x);
    kvec_t y = '0;
    for (int unsigned r = 0; r < k; r++)
      for (int unsigned c = 0; c < k; c++)
        y[r] ^= m[r][c] & x[c];
    return y;
  endfunction

  // y = x M  (row vector times matrix)
  function automatic kvec_t vec_mat(int unsigned k, kvec_t x, kmat_t m);
    kvec_t y = '0;
    for (int unsigned c = 0; c < k; c++)
      for (int unsigned r = 0; r < k; r++)
        y[c] ^= x[r] & m[r][c];
    return y;
  endfunction

  // B' = [T^(f-1)B ... TB B]: column c is T^(f-1-c) B.
  function automatic kfmat_t b_prime(int unsigned k, int unsigned f, kmat_t t, kvec_t b);
    kfmat_t m = '0;
    kvec_t col = b;
    for (int unsigned n = 0; n < f; n++) begin
      for (int unsigned r = 0; r < k; r++) m[r][f-1-n] = col[r];
      col = mat_vec(k, t, col);
    end
    return m;
  endfunction

  // C': row r is C T^r.
  function automatic fkmat_t c_prime(int unsigned k, int unsigned f, kmat_t t, kvec_t c);
    fkmat_t m = '0;
    kvec_t row = c;
    for (int unsigned n = 0; n < f; n++) begin
      m[n] = row;
      row = vec_mat(k, row, t);
    end
    return m;
  endfunction

  // D': lower triangular, D on the diagonal, C T^(r-c-1) B below it.
  function automatic ffmat_t d_prime(int unsigned k, int unsigned f, kmat_t t, kvec_t b,
                                     kvec_t c, logic d);
    ffmat_t m = '0;
    kvec_t col;
    logic bit_v;
    for (int unsigned r = 0; r < f; r++) begin
      m[r][r] = d;
      col = b;                       // T^(r-c-1) B, for c = r-1 down to 0
      for (int unsigned n = 1; n <= r; n++) begin
        bit_v = 1'b0;
        for (int unsigned j = 0; j < k; j++) bit_v ^= c[j] & col[j];
        m[r][r-n] = bit_v;
        col = mat_vec(k, t, col);
      end
    end
    return m;
  endfunction

  // Inverse by Gauss-Jordan elimination; returns the identity if q is singular.
  function automatic kmat_t mat_inv(int unsigned k, kmat_t q);
    kmat_t a = q;
    kmat_t v = identity(k);
    kvec_t tmp;
    int    piv;
    for (int unsigned c = 0; c < k; c++) begin
      piv = -1;
      for (int unsigned r = c; r < k; r++)
        if (piv < 0 && a[r][c]) piv = int'(r);
      if (piv < 0) return identity(k);
      tmp = a[c]; a[c] = a[piv]; a[piv] = tmp;
      tmp = v[c]; v[c] = v[piv]; v[piv] = tmp;
      for (int unsigned r = 0; r < k; r++)
        if (r != c && a[r][c]) begin
          a[r] ^= a[c];
          v[r] ^= v[c];
        end
    end
    return v;
  endfunction

  function automatic bit is_nonsingular(int unsigned k, kmat_t q);
    return mat_mul(k, q, mat_inv(k, q)) == identity(k);
  endfunction

  // Number of matrices in the self-inverse sample.
  function automatic int unsigned q_sample_size(int unsigned k);
    return 2 * k * (k - 1);
  endfunction

  // The idx-th matrix (0-based) of the self-inverse sample.
  function automatic kmat_t q_sample(int unsigned k, int unsigned idx);
    kmat_t       q = identity(k);
    int unsigned n = 0;
    for (int unsigned kk = 0; kk < k; kk++)
      for (int unsigned pass = 0; pass < 2; pass++)
        for (int unsigned j = 1; j < k; j++) begin
          q[(kk + j) % k] ^= q[kk];
          if (n == idx) return q;
          n++;
        end
    return q;
  endfunction

  // Two-input XOR gates of a next-state network: ones(T) + ones(B) - k.
  function automatic int unsigned adders(int unsigned k, int unsigned f, kmat_t t, kfmat_t b);
    int unsigned n = 0;
    for (int unsigned r = 0; r < k; r++) begin
      for (int unsigned c = 0; c < k; c++) n += t[r][c];
      for (int unsigned c = 0; c < f; c++) n += b[r][c];
    end
    return (n >= k) ? n - k : 0;
  endfunction

  function automatic kfmat_t q_times_b(int unsigned k, int unsigned f, kmat_t q, kfmat_t b);
    kfmat_t m = '0;
    for (int unsigned r = 0; r < k; r++)
      for (int unsigned c = 0; c < f; c++)
        for (int unsigned l = 0; l < k; l++)
          m[r][c] ^= q[r][l] & b[l][c];
    return m;
  endfunction

  function automatic fkmat_t c_times_q(int unsigned k, int unsigned f, fkmat_t c, kmat_t q);
    fkmat_t m = '0;
    for (int unsigned r = 0; r < f; r++) m[r] = vec_mat(k, c[r], q);
    return m;
  endfunction

  // Index of the first cheapest matrix of the sample for T' and B'.
  function automatic int unsigned best_q_index(int unsigned k, int unsigned f, kmat_t tp,
                                                kfmat_t bp);
    int unsigned best   = 0;
    int unsigned best_n = 0;
    int unsigned n;
    kmat_t       q;
    for (int unsigned i = 0; i < q_sample_size(k); i++) begin
      q = q_sample(k, i);
      n = adders(k, f, mat_mul(k, mat_mul(k, q, tp), mat_inv(k, q)), q_times_b(k, f, q, bp));
      if (i == 0 || n < best_n) begin
        best   = i;
        best_n = n;
      end
    end
    return best;
  endfunction

endpackage
