// sbf_pkg: constants shared by the soft bit flip LDPC decoder.
//
// The decoder works on a 64-bit, rate-1/2 regular LDPC code with a 32x64
// parity-check matrix H. H is built here, at elaboration time, by lifting the
// 4x8 example matrix of the code's Tanner graph (4 check nodes c1..c4, 8
// variable nodes v1..v8, every variable of degree 2 and every check of degree 4):
// each 1 at base row r, base column c becomes an 8x8 identity matrix cyclically
// shifted by (r*(c+1)) mod 8, and each 0 becomes an 8x8 zero block. The base
// matrix is the published example; the lifting size and the shift rule are this
// design's own choice, picked so that the lifted graph has no 4-cycles.
//
// Indexing: H[m][n] is the entry for check node m and variable node n, both
// counted from 0. Bit n of a codeword is variable node n.
package sbf_pkg;

  // Base (example) matrix, 4 rows x 8 columns. Row 0 is c1, bit 0 is v1.
  localparam int BASE_M = 4;
  localparam int BASE_N = 8;
  localparam logic [BASE_M-1:0][BASE_N-1:0] H_BASE = {
    8'b0101_1001,   // c4: v1 v4 v5 v7
    8'b1110_0100,   // c3: v3 v6 v7 v8
    8'b0010_0111,   // c2: v1 v2 v3 v6
    8'b1001_1010    // c1: v2 v4 v5 v8
  };

  // Lifting size and the resulting code size.
  localparam int Z       = 8;
  localparam int N_CODE  = BASE_N * Z;   // 64 variable nodes (code length)
  localparam int M_CODE  = BASE_M * Z;   // 32 check nodes (rate 1/2)

  typedef logic [M_CODE-1:0][N_CODE-1:0] hmat_t;

  // Cyclic shift of the circulant at base position (r, c).
  function automatic int circ_shift(int r, int c);
    return (r * (c + 1)) % Z;
  endfunction

  // Expand the base matrix into the full parity-check matrix.
  function automatic hmat_t expand_h();
    hmat_t h;
    h = '0;
    for (int r = 0; r < BASE_M; r++)
      for (int c = 0; c < BASE_N; c++)
        if (H_BASE[r][c])
          for (int i = 0; i < Z; i++)
            h[r*Z + i][c*Z + ((i + circ_shift(r, c)) % Z)] = 1'b1;
    return h;
  endfunction

  localparam hmat_t H_DEFAULT = expand_h();

  // The helpers below take a parity-check matrix of m rows and n columns as a
  // flat vector, row r in bits r*n .. r*n+n-1, at most M_CODE*N_CODE bits.
  localparam int HFLAT_W = M_CODE * N_CODE;
  typedef logic [HFLAT_W-1:0] hflat_t;

  // Largest variable node degree (column weight).
  function automatic int max_col_weight(int m, int n, hflat_t h);
    int best, w;
    best = 0;
    for (int c = 0; c < n; c++) begin
      w = 0;
      for (int r = 0; r < m; r++) w += int'(h[r*n + c]);
      if (w > best) best = w;
    end
    return best;
  endfunction

  // Largest check node degree (row weight).
  function automatic int max_row_weight(int m, int n, hflat_t h);
    int best, w;
    best = 0;
    for (int r = 0; r < m; r++) begin
      w = 0;
      for (int c = 0; c < n; c++) w += int'(h[r*n + c]);
      if (w > best) best = w;
    end
    return best;
  endfunction

  // Column of the k-th 1 (counted from 0) in row r, or -1 if the row has fewer.
  function automatic int var_of_check(int n, hflat_t h, int r, int k);
    int seen;
    seen = 0;
    for (int c = 0; c < n; c++)
      if (h[r*n + c]) begin
        if (seen == k) return c;
        seen++;
      end
    return -1;
  endfunction

  // Row of the k-th 1 (counted from 0) in column c, or -1 if the column has fewer.
  function automatic int check_of_var(int m, int n, hflat_t h, int c, int k);
    int seen;
    seen = 0;
    for (int r = 0; r < m; r++)
      if (h[r*n + c]) begin
        if (seen == k) return r;
        seen++;
      end
    return -1;
  endfunction

  // Node degrees of the default code: 4 variables per check, 2 checks per variable.
  localparam int DC_DEFAULT = max_row_weight(M_CODE, N_CODE, hflat_t'(H_DEFAULT));
  localparam int DV_DEFAULT = max_col_weight(M_CODE, N_CODE, hflat_t'(H_DEFAULT));

  // Decoder defaults.
  localparam int N_IT     = 4;   // decoding iterations per frame
  localparam int SOFT_W   = 4;   // soft value width, signed
  localparam int INIT_MAG = 3;   // magnitude given to a received bit
  localparam int LMAX     = 7;   // saturation bound, |soft| <= LMAX
  localparam int T_STRONG = 2;   // unsatisfied checks for a strong flip
  localparam int T_WEAK   = 1;   // unsatisfied checks for a weak flip
  localparam int P_STRONG = 4;   // step of a strong flip
  localparam int P_WEAK   = 2;   // step of a weak flip
  localparam int P_KEEP   = 2;   // step that reinforces a bit whose checks agree
  localparam int POW_W    = 3;   // width of a step value

endpackage
