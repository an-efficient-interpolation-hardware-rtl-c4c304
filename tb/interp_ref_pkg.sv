// Reference model of HEVC fractional sample interpolation for the testbenches.
//
// It evaluates the standard filter definitions directly, as multiply-add over
// coefficient tables, so it shares nothing with the shift-and-add PEs it
// checks. Luma windows are 11x11 with the block's first integer sample at
// (3,3); chroma windows are 5x5 with it at (1,1). Results are the 14-bit
// precision prediction samples (first stage >> bd-8, second stage >> 6,
// integer samples << 14-bd).
package interp_ref_pkg;

  typedef int luma_win_t   [11][11];
  typedef int chroma_win_t [5][5];

  function automatic int luma_coef(int frac, int k);
    int t [4][8] = '{'{0, 0, 0, 64, 0, 0, 0, 0},
                     '{-1, 4, -10, 58, 17, -5, 1, 0},
                     '{-1, 4, -11, 40, 40, -11, 4, -1},
                     '{0, 1, -5, 17, 58, -10, 4, -1}};
    return t[frac][k];
  endfunction

  function automatic int chroma_coef(int frac, int k);
    int t [8][4] = '{'{0, 64, 0, 0}, '{-2, 58, 10, -2}, '{-4, 54, 16, -2},
                     '{-6, 46, 28, -4}, '{-4, 36, 36, -4}, '{-4, 28, 46, -6},
                     '{-2, 16, 54, -4}, '{-2, 10, 58, -2}};
    return t[frac][k];
  endfunction

  function automatic int luma_ref(luma_win_t w, int fx, int fy, int i, int j, int bd);
    int tmp [8];
    int s;
    if (fx == 0 && fy == 0) return w[i + 3][j + 3] <<< (14 - bd);
    if (fy == 0) begin
      s = 0;
      for (int k = 0; k < 8; k++) s += luma_coef(fx, k) * w[i + 3][j + k];
      return s >>> (bd - 8);
    end
    if (fx == 0) begin
      s = 0;
      for (int k = 0; k < 8; k++) s += luma_coef(fy, k) * w[i + k][j + 3];
      return s >>> (bd - 8);
    end
    for (int r = 0; r < 8; r++) begin
      s = 0;
      for (int k = 0; k < 8; k++) s += luma_coef(fx, k) * w[i + r][j + k];
      tmp[r] = s >>> (bd - 8);
    end
    s = 0;
    for (int k = 0; k < 8; k++) s += luma_coef(fy, k) * tmp[k];
    return s >>> 6;
  endfunction

  function automatic int chroma_ref(chroma_win_t w, int fx, int fy, int i, int j, int bd);
    int tmp [4];
    int s;
    if (fx == 0 && fy == 0) return w[i + 1][j + 1] <<< (14 - bd);
    if (fy == 0) begin
      s = 0;
      for (int k = 0; k < 4; k++) s += chroma_coef(fx, k) * w[i + 1][j + k];
      return s >>> (bd - 8);
    end
    if (fx == 0) begin
      s = 0;
      for (int k = 0; k < 4; k++) s += chroma_coef(fy, k) * w[i + k][j + 1];
      return s >>> (bd - 8);
    end
    for (int r = 0; r < 4; r++) begin
      s = 0;
      for (int k = 0; k < 4; k++) s += chroma_coef(fx, k) * w[i + r][j + k];
      tmp[r] = s >>> (bd - 8);
    end
    s = 0;
    for (int k = 0; k < 4; k++) s += chroma_coef(fy, k) * tmp[k];
    return s >>> 6;
  endfunction

endpackage
