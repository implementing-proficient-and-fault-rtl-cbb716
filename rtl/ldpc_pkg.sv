// ldpc_pkg: constants, types and helper functions shared by the (15,7) EG-LDPC
// fault-secure memory system.
//
// The code is the cyclic (15,7) Euclidean-geometry LDPC code with minimum
// distance 5. Its cyclic generator matrix has rows that are cyclic shifts of
// g(x) = 1 + x^4 + x^6 + x^7 + x^8. The encoder uses the systematic form
// G = [I : X], with the information bits in c0..c6 and the parity bits in
// c7..c14; X is derived here from g(x) by Gauss-Jordan elimination at
// elaboration time, not typed in. The parity-check matrix H is the 15x15
// circulant whose row r has ones at columns r, r+1, r+3 and r+7 (mod 15):
// every row and column has weight 4, and any two rows share at most one
// column, so the four rows that contain a bit are orthogonal on that bit.
// That is what lets a one-step majority vote correct up to two errors.
//
// Bit j of a cw_t is code bit c_j throughout the design.
package ldpc_pkg;

  localparam int N = 15;          // code length
  localparam int K = 7;           // information bits
  localparam int P = N - K;       // parity bits
  localparam int J = 4;           // parity-check sums orthogonal on each bit
  localparam int ROW_W = 4;       // ones per row of H

  typedef logic [N-1:0] cw_t;
  typedef logic [K-1:0] info_t;

  // Cyclic generator polynomial, bit i = coefficient of x^i (bits 0,4,6,7,8).
  localparam cw_t G_POLY = 15'h01D1;
  // First row of the circulant parity-check matrix (bits 0,1,3,7).
  localparam cw_t H_ROW0 = 15'h008B;

  // Column offsets of the ones in H_ROW0; row r holds ones at r + H_OFFS[t].
  localparam int H_OFFS [ROW_W] = '{0, 1, 3, 7};

  // Index of the t-th row of H that contains code bit j. The J rows
  // (j - H_OFFS[t]) mod N, t = 0..J-1, are the check sums orthogonal on bit j.
  function automatic int orth_row(int j, int t);
    return (j - H_OFFS[t] + N) % N;
  endfunction

  // Rotate a code-word towards higher indices by s positions (cyclic shift).
  function automatic cw_t rotl(cw_t v, int s);
    cw_t r;
    for (int i = 0; i < N; i++) r[(i + s) % N] = v[i];
    return r;
  endfunction

  // Row r of H.
  function automatic cw_t h_row(int r);
    return rotl(H_ROW0, r);
  endfunction

  // Systematic generator matrix [I : X]: start from the cyclic rows g(x)*x^r
  // and bring the first K columns to the identity by Gauss-Jordan elimination.
  function automatic logic [K-1:0][N-1:0] sys_gen();
    logic [K-1:0][N-1:0] m;
    cw_t t;
    int piv;
    for (int r = 0; r < K; r++) m[r] = rotl(G_POLY, r);
    for (int c = 0; c < K; c++) begin
      piv = c;
      for (int r = K - 1; r >= c; r--) if (m[r][c]) piv = r;
      t = m[c]; m[c] = m[piv]; m[piv] = t;
      for (int r = 0; r < K; r++)
        if (r != c && m[r][c]) m[r] = m[r] ^ m[c];
    end
    return m;
  endfunction

  localparam logic [K-1:0][N-1:0] G_SYS = sys_gen();

  // Column j of the parity part X: which information bits feed parity c_(K+j).
  function automatic info_t x_col(int j);
    info_t v;
    for (int r = 0; r < K; r++) v[r] = G_SYS[r][K + j];
    return v;
  endfunction

endpackage
