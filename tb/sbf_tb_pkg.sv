// sbf_tb_pkg: reference models shared by the decoder testbenches.
//
// - ref_h builds the parity-check matrix on its own, from the 4x8 example
//   matrix written out row by row as text and the circulant shift rule
//   (r*(c+1)) mod 8, so that tests do not rely on the RTL's construction.
// - ref_decode runs the soft bit flip algorithm on integers.
// - make_codeword draws a random codeword by Gaussian elimination of H.
package sbf_tb_pkg;

  localparam int N = 64;
  localparam int M = 32;
  localparam int Z = 8;

  typedef logic [M-1:0][N-1:0] hmat_t;

  // Rows c1..c4 of the example matrix; character k is variable node v(k+1).
  localparam string BASE_ROWS [4] = '{"01011001", "11100100", "00100111", "10011010"};

  function automatic hmat_t ref_h();
    hmat_t h;
    h = '0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 8; c++)
        if (BASE_ROWS[r][c] == "1")
          for (int i = 0; i < Z; i++)
            h[r*Z + i][c*Z + (i + r*(c+1)) % Z] = 1'b1;
    return h;
  endfunction

  // Decoder settings of the default configuration.
  localparam int N_IT = 4, INIT = 3, LMAX = 7;
  localparam int T_STRONG = 2, T_WEAK = 1, P_STRONG = 4, P_WEAK = 2, P_KEEP = 2;

  function automatic logic [M-1:0] syndrome(hmat_t h, logic [N-1:0] x);
    logic [M-1:0] s;
    for (int m = 0; m < M; m++) begin
      s[m] = 1'b0;
      for (int n = 0; n < N; n++) if (h[m][n]) s[m] ^= x[n];
    end
    return s;
  endfunction

  // Integer model of the whole decoder for one frame.
  function automatic logic [N-1:0] ref_decode(hmat_t h, logic [N-1:0] y);
    int L [N];
    logic [N-1:0] d;
    logic [M-1:0] s;
    for (int n = 0; n < N; n++) L[n] = y[n] ? -INIT : INIT;
    for (int it = 0; it < N_IT; it++) begin
      for (int n = 0; n < N; n++) d[n] = (L[n] < 0);
      s = syndrome(h, d);
      for (int n = 0; n < N; n++) begin
        int u, sg;
        u = 0;
        for (int m = 0; m < M; m++) if (h[m][n] && s[m]) u++;
        sg = (L[n] < 0) ? -1 : 1;
        if (u >= T_STRONG)    L[n] -= sg * P_STRONG;
        else if (u >= T_WEAK) L[n] -= sg * P_WEAK;
        else                  L[n] += sg * P_KEEP;
        if (L[n] > LMAX)  L[n] = LMAX;
        if (L[n] < -LMAX) L[n] = -LMAX;
      end
    end
    for (int n = 0; n < N; n++) d[n] = (L[n] < 0);
    return d;
  endfunction

  // Random codeword: reduce H to row echelon form, choose the free bits at
  // random and solve for the pivot bits.
  function automatic logic [N-1:0] make_codeword(hmat_t h);
    hmat_t r;
    int pivcol [M];
    int rank, p;
    logic [N-1:0] x, is_piv, tmp;
    logic b;
    r = h;
    rank = 0;
    x = '0;
    is_piv = '0;
    for (int c = 0; c < N && rank < M; c++) begin
      p = -1;
      for (int i = rank; i < M; i++) if (r[i][c] && p < 0) p = i;
      if (p >= 0) begin
        tmp = r[p];
        r[p] = r[rank];
        r[rank] = tmp;
        for (int i = 0; i < M; i++)
          if (i != rank && r[i][c]) r[i] ^= r[rank];
        pivcol[rank] = c;
        is_piv[c] = 1'b1;
        rank++;
      end
    end
    for (int c = 0; c < N; c++) if (!is_piv[c]) x[c] = 1'($urandom_range(0, 1));
    for (int i = 0; i < rank; i++) begin
      b = 1'b0;
      for (int c = 0; c < N; c++) if (!is_piv[c] && r[i][c]) b ^= x[c];
      x[pivcol[i]] = b;
    end
    return x;
  endfunction

endpackage
