// End-to-end testbench of hevc_interp_top at its default parameters.
//
// Two synthetic reference pictures (luma 48x48, Cb and Cr 24x24 each, random
// 8-bit samples) are generated. Twenty-four bi-predicted 16x16 prediction units are
// interpolated: for each unit and each reference picture, 16 luma 4x4 requests
// and 2 x 16 chroma 2x2 requests (4:2:0, the chroma vector is the luma vector
// read in eighth-pel units). Luma and chroma requests are issued by two
// concurrent drivers whenever the units are ready. Every predicted sample is
// compared with a direct evaluation of the HEVC filter on the picture.
//
// Cycle counts checked: a unit with one-pass (a/b/c) luma positions on both
// references takes 64 clocks for its 16x16 luma block (2 clocks per 4x4 per
// reference), a unit with two-pass positions takes 128 (8 clocks per bi-
// predicted 4x4); chroma of such units takes 64 and 128 clocks (1 or 2 clocks
// per 2x2 per component per reference).
// Mechanisms counted, each must occur: luma horizontal, vertical, two-pass
// (filter reuse) and full-pel blocks; the same for chroma; every chroma
// fraction 1..7 and every luma fraction 1..3; starts refused while busy;
// luma and chroma units busy in the same clock.
module tb_hevc_interp_top;
  import interp_pkg::*;
  import interp_ref_pkg::*;

  localparam int LP = 48, CP = 24, NPU = 24;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n;
  logic l_start, l_ready, l_valid, l_two_pass;
  logic [1:0] l_frac_x, l_frac_y;
  logic [7:0] l_ref [11][11];
  logic signed [PRED_W-1:0] l_pred [4][4];
  logic c_start, c_ready, c_valid, c_two_pass;
  logic [2:0] c_frac_x, c_frac_y;
  logic [7:0] c_ref [5][5];
  logic signed [PRED_W-1:0] c_pred [2][2];

  hevc_interp_top dut (
    .clk(clk), .rst_n(rst_n),
    .l_start(l_start), .l_ready(l_ready), .l_frac_x(l_frac_x), .l_frac_y(l_frac_y),
    .l_ref(l_ref), .l_valid(l_valid), .l_two_pass(l_two_pass), .l_pred(l_pred),
    .c_start(c_start), .c_ready(c_ready), .c_frac_x(c_frac_x), .c_frac_y(c_frac_y),
    .c_ref(c_ref), .c_valid(c_valid), .c_two_pass(c_two_pass), .c_pred(c_pred));

  // pictures: [ref][y][x]; chroma [ref][comp][y][x]
  int lpic [2][LP][LP];
  int cpic [2][2][CP][CP];
  // motion vectors per unit and reference, quarter-pel luma units
  int mvx [NPU][2], mvy [NPU][2];
  // predicted units: luma [ref][y][x], chroma [ref][comp][y][x]
  int lout [2][16][16];
  int cout [2][2][8][8];

  int checks = 0, failures = 0, cycle = 0;
  int n_lh = 0, n_lv = 0, n_l2 = 0, n_lf = 0, n_ch = 0, n_cv = 0, n_c2 = 0, n_cf = 0;
  int n_lbusy = 0, n_cbusy = 0, n_both = 0;
  int seen_lfrac [4], seen_cfrac [8];
  int l_first, l_last, c_first, c_last;

  function automatic void fail(string msg);
    failures++;
    if (failures < 12) $display("FAIL cycle %0d: %s", cycle, msg);
  endfunction

  // Loop limits held in variables, set at time zero, so that the simulator
  // keeps the reference loops as loops instead of unrolling them.
  int lim2, lim4, lim5, lim8, lim11, lim16;

  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  function automatic int lp(int r, int x, int y);
    return lpic[r][clampi(y, 0, LP - 1)][clampi(x, 0, LP - 1)];
  endfunction

  function automatic int cp(int r, int c, int x, int y);
    return cpic[r][c][clampi(y, 0, CP - 1)][clampi(x, 0, CP - 1)];
  endfunction

  // Direct HEVC luma sample at integer (xi, yi) plus fraction (fx, fy).
  function automatic int luma_pic(int r, int xi, int yi, int fx, int fy);
    int s, t;
    if (fx == 0 && fy == 0) return lp(r, xi, yi) * 64;
    if (fy == 0) begin
      s = 0; for (int k = 0; k < lim8; k++) s += luma_coef(fx, k) * lp(r, xi - 3 + k, yi);
      return s;
    end
    if (fx == 0) begin
      s = 0; for (int k = 0; k < lim8; k++) s += luma_coef(fy, k) * lp(r, xi, yi - 3 + k);
      return s;
    end
    s = 0;
    for (int m = 0; m < lim8; m++) begin
      t = 0; for (int k = 0; k < lim8; k++) t += luma_coef(fx, k) * lp(r, xi - 3 + k, yi - 3 + m);
      s += luma_coef(fy, m) * t;
    end
    return s >>> 6;
  endfunction

  function automatic int chroma_pic(int r, int c, int xi, int yi, int fx, int fy);
    int s, t;
    if (fx == 0 && fy == 0) return cp(r, c, xi, yi) * 64;
    if (fy == 0) begin
      s = 0; for (int k = 0; k < lim4; k++) s += chroma_coef(fx, k) * cp(r, c, xi - 1 + k, yi);
      return s;
    end
    if (fx == 0) begin
      s = 0; for (int k = 0; k < lim4; k++) s += chroma_coef(fy, k) * cp(r, c, xi, yi - 1 + k);
      return s;
    end
    s = 0;
    for (int m = 0; m < lim4; m++) begin
      t = 0; for (int k = 0; k < lim4; k++) t += chroma_coef(fx, k) * cp(r, c, xi - 1 + k, yi - 1 + m);
      s += chroma_coef(fy, m) * t;
    end
    return s >>> 6;
  endfunction

  typedef struct { int r; int comp; int bx; int by; } tag_t;

  // Plain (untimed) helpers keep the timed driver tasks small.
  function automatic void store_luma(tag_t t);
    for (int a = 0; a < lim4; a++)
      for (int b = 0; b < lim4; b++) lout[t.r][t.by * 4 + a][t.bx * 4 + b] = int'(l_pred[a][b]);
  endfunction

  function automatic void fill_luma(int r0, int ix, int iy);
    for (int r = 0; r < lim11; r++)
      for (int c = 0; c < lim11; c++) l_ref[r][c] = 8'(lp(r0, ix - 3 + c, iy - 3 + r));
  endfunction

  function automatic void store_chroma(tag_t t);
    for (int a = 0; a < lim2; a++)
      for (int b = 0; b < lim2; b++) cout[t.r][t.comp][t.by * 2 + a][t.bx * 2 + b] = int'(c_pred[a][b]);
  endfunction

  function automatic void fill_chroma(int r0, int comp, int ix, int iy);
    for (int r = 0; r < lim5; r++)
      for (int c = 0; c < lim5; c++) c_ref[r][c] = 8'(cp(r0, comp, ix - 1 + c, iy - 1 + r));
  endfunction

  // Compares a finished unit with the direct filter evaluation.
  function automatic void check_unit(int u);
    int e;
    for (int r = 0; r < lim2; r++) begin
      for (int y = 0; y < lim16; y++)
        for (int x = 0; x < lim16; x++) begin
          e = luma_pic(r, 16 + x + (mvx[u][r] >>> 2), 16 + y + (mvy[u][r] >>> 2), mvx[u][r] & 3, mvy[u][r] & 3);
          checks++;
          if (lout[r][y][x] != e) fail($sformatf("unit %0d ref %0d luma (%0d,%0d) = %0d expected %0d", u, r, x, y, lout[r][y][x], e));
        end
      for (int c = 0; c < lim2; c++)
        for (int y = 0; y < lim8; y++)
          for (int x = 0; x < lim8; x++) begin
            e = chroma_pic(r, c, 8 + x + (mvx[u][r] >>> 3), 8 + y + (mvy[u][r] >>> 3), mvx[u][r] & 7, mvy[u][r] & 7);
            checks++;
            if (cout[r][c][y][x] != e) fail($sformatf("unit %0d ref %0d chroma %0d (%0d,%0d) = %0d expected %0d", u, r, c, x, y, cout[r][c][y][x], e));
          end
    end
  endfunction

  // ------------------------------------------------------------ luma driver
  task automatic run_luma(int u);
    tag_t pend [$];
    tag_t t;
    int issued = 0, got = 0, fx, fy, ix, iy;
    l_first = -1;
    while (got < 32) begin
      if (l_valid) begin
        t = pend.pop_front();
        store_luma(t);
        got++;
        l_last = cycle;
      end
      l_start = 1'b0;
      if (issued < 32) begin
        t.r = issued / 16; t.by = (issued % 16) / 4; t.bx = issued % 4; t.comp = 0;
        fx = mvx[u][t.r] & 3; fy = mvy[u][t.r] & 3;
        ix = 16 + t.bx * 4 + (mvx[u][t.r] >>> 2);
        iy = 16 + t.by * 4 + (mvy[u][t.r] >>> 2);
        l_start = 1'b1; l_frac_x = 2'(fx); l_frac_y = 2'(fy);
        fill_luma(t.r, ix, iy);
        if (l_ready) begin
          pend.push_back(t);
          issued++;
          if (l_first < 0) l_first = cycle;
          seen_lfrac[fx]++; seen_lfrac[fy]++;
          if (fx == 0 && fy == 0) n_lf++; else if (fy == 0) n_lh++; else if (fx == 0) n_lv++; else n_l2++;
        end else n_lbusy++;
      end
      @(posedge clk);
      @(negedge clk);
    end
    l_start = 1'b0;
  endtask

  // ---------------------------------------------------------- chroma driver
  task automatic run_chroma(int u);
    tag_t pend [$];
    tag_t t;
    int issued = 0, got = 0, fx, fy, ix, iy;
    c_first = -1;
    while (got < 64) begin
      if (c_valid) begin
        t = pend.pop_front();
        store_chroma(t);
        got++;
        c_last = cycle;
      end
      c_start = 1'b0;
      if (issued < 64) begin
        t.r = issued / 32; t.comp = (issued % 32) / 16; t.by = (issued % 16) / 4; t.bx = issued % 4;
        fx = mvx[u][t.r] & 7; fy = mvy[u][t.r] & 7;
        ix = 8 + t.bx * 2 + (mvx[u][t.r] >>> 3);
        iy = 8 + t.by * 2 + (mvy[u][t.r] >>> 3);
        c_start = 1'b1; c_frac_x = 3'(fx); c_frac_y = 3'(fy);
        fill_chroma(t.r, t.comp, ix, iy);
        if (c_ready) begin
          pend.push_back(t);
          issued++;
          if (c_first < 0) c_first = cycle;
          seen_cfrac[fx]++; seen_cfrac[fy]++;
          if (fx == 0 && fy == 0) n_cf++; else if (fy == 0) n_ch++; else if (fx == 0) n_cv++; else n_c2++;
        end else n_cbusy++;
      end
      @(posedge clk);
      @(negedge clk);
    end
    c_start = 1'b0;
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if ((!l_ready || l_valid) && (!c_ready || c_valid)) n_both <= n_both + 1;
  end

  initial begin
    int lcyc, ccyc;
    lim2 = 2; lim4 = 4; lim5 = 5; lim8 = 8; lim11 = 11; lim16 = 16;
    for (int r = 0; r < 2; r++) begin
      for (int y = 0; y < LP; y++) for (int x = 0; x < LP; x++) lpic[r][y][x] = $urandom_range(0, 255);
      for (int c = 0; c < 2; c++)
        for (int y = 0; y < CP; y++) for (int x = 0; x < CP; x++) cpic[r][c][y][x] = $urandom_range(0, 255);
    end
    // unit 0: full-pel; 1: horizontal only; 2: vertical only; 3: two-pass; rest random
    mvx[0] = '{8, -4};  mvy[0] = '{0, 16};
    mvx[1] = '{5, -6};  mvy[1] = '{0, 0};
    mvx[2] = '{0, 0};   mvy[2] = '{7, -3};
    mvx[3] = '{3, -7};  mvy[3] = '{5, 9};
    for (int u = 4; u < NPU; u++)
      for (int r = 0; r < 2; r++) begin
        mvx[u][r] = int'($urandom_range(0, 64)) - 32;
        mvy[u][r] = int'($urandom_range(0, 64)) - 32;
      end
    rst_n = 1'b0; l_start = 1'b0; c_start = 1'b0; l_frac_x = '0; l_frac_y = '0; c_frac_x = '0; c_frac_y = '0;
    for (int r = 0; r < 11; r++) for (int c = 0; c < 11; c++) l_ref[r][c] = '0;
    for (int r = 0; r < 5; r++) for (int c = 0; c < 5; c++) c_ref[r][c] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int u = 0; u < NPU; u++) begin
      fork
        run_luma(u);
        run_chroma(u);
      join
      lcyc = l_last - l_first; ccyc = c_last - c_first;
      $display("unit %0d mv0=(%0d,%0d) mv1=(%0d,%0d): luma %0d clocks, chroma %0d clocks",
               u, mvx[u][0], mvy[u][0], mvx[u][1], mvy[u][1], lcyc, ccyc);
      if (u == 1 || u == 2) begin
        checks += 2;
        if (lcyc != 64) fail($sformatf("one-pass luma unit took %0d clocks, expected 64", lcyc));
        if (ccyc != 64) fail($sformatf("one-pass chroma unit took %0d clocks, expected 64", ccyc));
      end
      if (u == 3) begin
        checks += 2;
        if (lcyc != 128) fail($sformatf("two-pass luma unit took %0d clocks, expected 128", lcyc));
        if (ccyc != 128) fail($sformatf("two-pass chroma unit took %0d clocks, expected 128", ccyc));
      end
      check_unit(u);
    end
    $display("luma blocks: horizontal %0d vertical %0d two-pass %0d full-pel %0d, refused starts %0d",
             n_lh, n_lv, n_l2, n_lf, n_lbusy);
    $display("chroma blocks: horizontal %0d vertical %0d two-pass %0d full-pel %0d, refused starts %0d",
             n_ch, n_cv, n_c2, n_cf, n_cbusy);
    $display("clocks with both units busy: %0d", n_both);
    checks++; if (n_lh == 0 || n_lv == 0 || n_l2 == 0 || n_lf == 0) fail("a luma position class never ran");
    checks++; if (n_ch == 0 || n_cv == 0 || n_c2 == 0 || n_cf == 0) fail("a chroma position class never ran");
    checks++; if (n_lbusy == 0 || n_cbusy == 0) fail("no start was refused while busy");
    checks++; if (n_both == 0) fail("luma and chroma never busy together");
    for (int f = 1; f < 4; f++) begin checks++; if (seen_lfrac[f] == 0) fail($sformatf("luma fraction %0d never used", f)); end
    for (int f = 1; f < 8; f++) begin checks++; if (seen_cfrac[f] == 0) fail($sformatf("chroma fraction %0d never used", f)); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
