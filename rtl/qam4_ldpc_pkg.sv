// qam4_ldpc_pkg -- shared types, constants and functions of the QAM-4 / QC-LDPC transceiver.
//
// The code is a rate-1/2 quasi-cyclic LDPC code of length 16. Its parity-check matrix H (8x16)
// is expanded from a 2x4 base matrix of circulant shift values with expansion factor Z = 4:
// a shift s >= 0 stands for the 4x4 identity rotated so that row r has its 1 in column
// (r + s) mod 4, and -1 stands for the 4x4 zero matrix. The expanded H has the form [P I8], so
// the systematic generator is G = [I8 P^T]: a codeword is the 8 message bits followed by 8
// parity bits, parity j being the XOR of the message bits that check j covers.
//
// Bit numbering follows the usual matrix notation: codeword bits Y1..Y16 are the vector
// indices [1:16] and message bits m1..m8 are [1:8], so cw[3] is Y3.
//
// The base matrix, Z, the [P I] structure and G = [I P^T] are the code's definition; the
// packing into SystemVerilog types is this design's own.
package qam4_ldpc_pkg;

  localparam int Z  = 4;       // expansion factor
  localparam int MB = 2;       // base matrix rows
  localparam int NB = 4;       // base matrix columns
  localparam int K  = 8;       // message bits
  localparam int N  = NB * Z;  // codeword bits (16)
  localparam int M  = MB * Z;  // parity checks (8)

  typedef logic [1:K] msg_t;       // m1..m8
  typedef logic [1:N] cw_t;        // Y1..Y16
  typedef logic [1:M] syn_t;       // S1..S8
  typedef cw_t        hmat_t [1:M];
  typedef msg_t       gtmat_t [1:N]; // column j of G, as a set of message bits

  // Circulant shift values of the base matrix; -1 is the all-zero block.
  typedef int base_t [MB][NB];
  localparam base_t BASE = '{'{2, 3, 0, -1}, '{1, 0, -1, 0}};

  // Expand the base matrix into the 8x16 parity-check matrix.
  function automatic hmat_t expand_h(base_t b);
    hmat_t h;
    cw_t   row;
    for (int br = 0; br < MB; br++)
      for (int i = 0; i < Z; i++) begin
        row = '0;
        for (int bc = 0; bc < NB; bc++)
          if (b[br][bc] >= 0) row[bc*Z + ((i + b[br][bc]) % Z) + 1] = 1'b1;
        h[br*Z + i + 1] = row;
      end
    return h;
  endfunction

  localparam hmat_t H = expand_h(BASE);

  // Column j of G = [I P^T]: which message bits are XORed into codeword bit j.
  // For j <= K it is the identity; for parity bit j = K + r it is row r of P (the first K
  // columns of H), because H = [P I] makes every check r contain exactly one parity bit.
  function automatic gtmat_t make_gcols(hmat_t h);
    gtmat_t g;
    for (int j = 1; j <= K; j++) g[j] = msg_t'(1 << (K - j));
    for (int r = 1; r <= M; r++) g[K + r] = msg_t'(h[r] >> (N - K));
    return g;
  endfunction

  localparam gtmat_t GCOL = make_gcols(H);

  // X = m x G over GF(2).
  function automatic cw_t ldpc_encode(msg_t m);
    cw_t x;
    for (int j = 1; j <= N; j++) x[j] = ^(m & GCOL[j]);
    return x;
  endfunction

  // S = Y x H^T over GF(2).
  function automatic syn_t ldpc_syndrome(cw_t y);
    syn_t s;
    for (int r = 1; r <= M; r++) s[r] = ^(y & H[r]);
    return s;
  endfunction

  // One-hot mask of the t-th (t = 0, 1, 2) bit that parity check row hrow covers, counting
  // in ascending bit order; these are the bits a bit-flipping decoder tries for that check.
  function automatic cw_t trial_mask(cw_t hrow, int t);
    cw_t m;
    int  n;
    m = '0;
    n = 0;
    for (int c = 1; c <= N; c++)
      if (hrow[c]) begin
        if (n == t) m[c] = 1'b1;
        n++;
      end
    return m;
  endfunction

endpackage
