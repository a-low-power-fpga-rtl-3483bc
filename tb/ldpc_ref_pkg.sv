// ldpc_ref_pkg: reference model of the systematic quasi-cyclic encoder, for
// the testbenches.
//
// Computes the codeword directly from the definition, independently of the
// RCE structure: parity p = u * W, where block (r,c) of W is the circulant
// whose row j is the first row g[r][c] cyclically shifted by j (element (j,k)
// = g[r][c][(k-j) mod Z]). Codeword bit i < K is message bit i; codeword bit
// K + c*Z + k is parity bit k of block column c.
package ldpc_ref_pkg;
  localparam int Z = 128, NROW = 32, NCOL = 8;
  localparam int K = Z*NROW, M = Z*NCOL, N = K + M;

  typedef logic [Z-1:0] row_t;
  typedef row_t         gmat_t [NROW][NCOL];

  // first row of block (r,c) shifted by j towards higher indices
  function automatic row_t circ_row(input row_t g, input int j);
    return (g << j) | (g >> (Z - j));
  endfunction

  function automatic logic [N-1:0] encode(input logic [K-1:0] u, input gmat_t g);
    logic [M-1:0] p;
    p = '0;
    for (int r = 0; r < NROW; r++)
      for (int j = 0; j < Z; j++)
        if (u[r*Z + j])
          for (int c = 0; c < NCOL; c++)
            p[c*Z +: Z] ^= (j == 0) ? g[r][c] : circ_row(g[r][c], j);
    return {p, u};
  endfunction

  function automatic row_t rand_row();
    row_t v;
    for (int w = 0; w < Z/32; w++) v[w*32 +: 32] = $urandom;
    return v;
  endfunction
endpackage
