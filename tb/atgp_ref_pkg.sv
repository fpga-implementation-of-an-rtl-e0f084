// atgp_ref_pkg: software reference of the ATGP-OSP accelerator for the
// testbenches, written as plain loops over matrices.
//
// It computes, in the same Q15.16 fixed-point arithmetic as the hardware
// (full-precision dot products rounded once, Gauss-Jordan with a row
// permutation table, 1/a_ii normalisation), the target indices the
// accelerator must report for an image held in img[][], and it generates test
// images: a low-level pseudo-random background with strong "planted" targets,
// each confined to its own block of bands, whose detection order is known
// without any arithmetic model (largest amplitude first).
package atgp_ref_pkg;
  import atgp_pkg::*;

  localparam int MAXR = 64;    // pixels
  localparam int MAXB = 256;   // bands
  localparam int MAXT = 32;    // targets

  typedef logic signed [2*DATA_W+15:0] wide_t;

  fx_t img [MAXR][MAXB];
  int  planted_idx [4];

  // Dot product over len lanes, rounded once like the multiplier unit.
  function automatic fx_t dot(input fx_t a [MAXB], input fx_t b [MAXB], input int len);
    wide_t s = '0;
    for (int x = 0; x < len; x++) s += wide_t'(a[x]) * wide_t'(b[x]);
    return fx_sat(s >>> FRAC_W);
  endfunction

  // Build a test image: background values in [0, 1/4), targets planted at
  // the pixels in planted_idx with amplitude 1.0, 0.9, ... in disjoint band
  // blocks. zero_image gives an all-zero image instead.
  function automatic void make_image(input int r, input int nb, input int n_planted,
                                     input int seed, input bit zero_image);
    int unsigned st = seed;
    int blk = nb / 4;
    for (int p = 0; p < r; p++)
      for (int b = 0; b < MAXB; b++) begin
        st = st * 1103515245 + 12345;
        img[p][b] = (zero_image || b >= nb) ? '0 : fx_t'((st >> 16) & 16'h3FFF);
      end
    for (int q = 0; q < n_planted; q++) begin
      planted_idx[q] = (7 * q + 3) % r;
      for (int b = q * blk; b < (q + 1) * blk; b++)
        img[planted_idx[q]][b] = fx_t'(FX_ONE - q * (FX_ONE / 10));
    end
  endfunction

  // ATGP-OSP on img: writes the expected indices to idx[0..t-1]. Returns 0,
  // or 1 if U^T U is singular at some step (then idx holds those found).
  function automatic int run_atgp(input int r, input int nb, input int t,
                                  output int idx [MAXT]);
    fx_t U   [MAXT][MAXB];   // U^T: target k in row k
    fx_t A   [MAXT][MAXT];
    fx_t Ai  [MAXT][MAXT];
    fx_t M   [MAXT][MAXB];   // (U^T U)^-1 U^T
    fx_t P   [MAXB][MAXB];
    fx_t v, ratio, rc;
    int  rowp [MAXT];
    wide_t len_best, len;
    int best;

    for (int q = 0; q < MAXT; q++) idx[q] = -1;
    // step 1: longest pixel
    best = 0; len_best = '0;
    for (int p = 0; p < r; p++) begin
      len = '0;
      for (int b = 0; b < nb; b++) len += wide_t'(img[p][b]) * wide_t'(img[p][b]);
      if (p == 0 || len > len_best) begin best = p; len_best = len; end
    end
    idx[0] = best;

    for (int k = 1; k < t; k++) begin
      for (int b = 0; b < MAXB; b++) U[k-1][b] = img[idx[k-1]][b];
      // Gram matrix and identity
      for (int i = 0; i < k; i++) begin
        rowp[i] = i;
        for (int j = 0; j < k; j++) begin
          A[i][j]  = dot(U[i], U[j], nb);
          Ai[i][j] = (i == j) ? FX_ONE : '0;
        end
      end
      // Gauss-Jordan
      for (int i = 0; i < k; i++) begin
        if (A[rowp[i]][i] == '0) begin
          int sw = -1;
          for (int j = i + 1; j < k; j++)
            if (sw < 0 && A[rowp[j]][i] != '0) sw = j;
          if (sw < 0) return 1;
          begin int tmp = rowp[i]; rowp[i] = rowp[sw]; rowp[sw] = tmp; end
        end
        for (int j = i + 1; j < k; j++) begin
          ratio = fx_div(A[rowp[j]][i], A[rowp[i]][i]);
          for (int x = 0; x < k; x++) begin
            A[rowp[j]][x]  = A[rowp[j]][x]  - fx_mul(A[rowp[i]][x],  ratio);
            Ai[rowp[j]][x] = Ai[rowp[j]][x] - fx_mul(Ai[rowp[i]][x], ratio);
          end
        end
      end
      for (int i = k - 1; i > 0; i--)
        for (int j = i - 1; j >= 0; j--) begin
          ratio = fx_div(A[rowp[j]][i], A[rowp[i]][i]);
          for (int x = 0; x < k; x++) begin
            A[rowp[j]][x]  = A[rowp[j]][x]  - fx_mul(A[rowp[i]][x],  ratio);
            Ai[rowp[j]][x] = Ai[rowp[j]][x] - fx_mul(Ai[rowp[i]][x], ratio);
          end
        end
      for (int i = 0; i < k; i++) begin
        rc = fx_div(FX_ONE, A[rowp[i]][i]);
        for (int x = 0; x < k; x++) Ai[rowp[i]][x] = fx_mul(Ai[rowp[i]][x], rc);
      end
      // M = inv * U^T (row i of the inverse is physical row rowp[i])
      for (int i = 0; i < k; i++)
        for (int c = 0; c < nb; c++) begin
          wide_t s = '0;
          for (int x = 0; x < k; x++) s += wide_t'(Ai[rowp[i]][x]) * wide_t'(U[x][c]);
          M[i][c] = fx_sat(s >>> FRAC_W);
        end
      // P = I - U M
      for (int a = 0; a < nb; a++)
        for (int c = 0; c < nb; c++) begin
          wide_t s = '0;
          for (int x = 0; x < k; x++) s += wide_t'(U[x][a]) * wide_t'(M[x][c]);
          P[a][c] = ((a == c) ? FX_ONE : fx_t'('0)) - fx_sat(s >>> FRAC_W);
        end
      // projections
      best = 0; len_best = '0;
      for (int p = 0; p < r; p++) begin
        len = '0;
        for (int a = 0; a < nb; a++) begin
          v = dot(P[a], img[p], nb);
          len += wide_t'(v) * wide_t'(v);
        end
        if (p == 0 || len > len_best) begin best = p; len_best = len; end
      end
      idx[k] = best;
    end
    return 0;
  endfunction
endpackage
