// tb_bbme: self-checking testbench of the bi-directional binary motion
// estimator (bbme = mbppu + bbme_search).
//
// Builds an 18x18 pixel block, sends it as 81 words and checks the binary
// pyramid against a model (neighbour-mean binarization, 2x2 mean
// down-sampling with edge padding). Random binary reference windows are
// written for both directions, with the current pyramid planted into them at
// a known vector, and the search is checked against a model of the
// three-level search (LV1 full search, LV2 predictors and reduced cross,
// LV3 +/-2 full search for 16x16 and the four 8x8 blocks, vector cost).
// Runs P and B macroblocks, with and without vector cost, and checks the
// cycle counts. Watchdog and TB_RESULT line.
module tb_bbme;
  import bbme_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;

  logic        mode_b = 1'b0;
  logic        pix_valid = 1'b0;
  logic [31:0] pix_data = '0;
  logic        ref_we = 1'b0, ref_dir = 1'b0;
  lvl_t        ref_lvl = LVL1;
  logic [5:0]  ref_row = '0;
  logic [47:0] ref_data = '0;
  bmv_t        pred_top = '0, pred_left = '0, pmv = '0;
  logic [3:0]  lambda = '0;
  logic        pre_busy, busy, done;
  bmv_t        mv_lv1 [2];
  bmv_t        mv_lv2 [2];
  bmv_t        mv16   [2];
  logic [11:0] cost16 [2];
  bmv_t        mv8    [2][4];
  logic [11:0] cost8  [2][4];

  bbme dut (.*);

  int checks = 0, failures = 0;
  int n2 = 2, n4 = 4, n5 = 5, n8 = 8, n16 = 16, n18 = 18, n12 = 12, n24 = 24, n48 = 48, n64 = 64, n25 = 25;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #5_000_000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // ---------------- pyramid model
  int blk [18][18];
  int g2 [8][8];
  int g1 [4][4];
  bit c3 [16][16];
  bit c2 [8][8];
  bit c1 [4][4];

  function automatic int cl(int v, int hi);
    return (v < 0) ? 0 : (v > hi ? hi : v);
  endfunction

  function automatic bit binz(int p, int u, int d, int l, int r);
    return p >= ((u + d + l + r + 1) >> 2);
  endfunction

  task automatic pyramid();
    for (int i = 0; i < n8; i++)
      for (int j = 0; j < n8; j++)
        g2[i][j] = (blk[2*i+1][2*j+1] + blk[2*i+1][2*j+2] + blk[2*i+2][2*j+1] + blk[2*i+2][2*j+2] + 2) >> 2;
    for (int i = 0; i < n4; i++)
      for (int j = 0; j < n4; j++)
        g1[i][j] = (g2[2*i][2*j] + g2[2*i][2*j+1] + g2[2*i+1][2*j] + g2[2*i+1][2*j+1] + 2) >> 2;
    for (int r = 0; r < n16; r++)
      for (int c = 0; c < n16; c++)
        c3[r][c] = binz(blk[r+1][c+1], blk[r][c+1], blk[r+2][c+1], blk[r+1][c], blk[r+1][c+2]);
    for (int r = 0; r < n8; r++)
      for (int c = 0; c < n8; c++)
        c2[r][c] = binz(g2[r][c], g2[cl(r-1,7)][c], g2[cl(r+1,7)][c], g2[r][cl(c-1,7)], g2[r][cl(c+1,7)]);
    for (int r = 0; r < n4; r++)
      for (int c = 0; c < n4; c++)
        c1[r][c] = binz(g1[r][c], g1[cl(r-1,3)][c], g1[cl(r+1,3)][c], g1[r][cl(c-1,3)], g1[r][cl(c+1,3)]);
  endtask

  // ---------------- search model
  bit s1 [2][12][12];
  bit s2 [2][24][24];
  bit s3 [2][48][48];

  int e1x [2], e1y [2], e2x [2], e2y [2];
  int e16x [2], e16y [2], e16c [2];
  int e8x [2][4], e8y [2][4], e8c [2][4];

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  function automatic int cost(int dx, int dy, int shift, int lam);
    return lam * (iabs(dx - (int'(pmv.x) >>> shift)) + iabs(dy - (int'(pmv.y) >>> shift)));
  endfunction

  function automatic int sod2(int d, int dx, int dy);
    int s = 0;
    for (int r = 0; r < n8; r++)
      for (int c = 0; c < n8; c++) s += int'(c2[r][c] != s2[d][8 + dy + r][8 + dx + c]);
    return s;
  endfunction

  task automatic search_model(int d, int lam);
    int best, bx, by, cx, cy, ox, oy;
    // LV1
    best = 4095;
    for (int n = 0; n < n64; n++) begin
      int dx, dy, s;
      dx = n % 8 - 4; dy = n / 8 - 4; s = 0;
      for (int r = 0; r < n4; r++)
        for (int c = 0; c < n4; c++) s += int'(c1[r][c] != s1[d][4 + dy + r][4 + dx + c]);
      s += cost(dx, dy, 2, lam);
      if (s < best) begin best = s; bx = dx; by = dy; end
    end
    e1x[d] = bx; e1y[d] = by;
    // LV2 step 1: 2*MV_LV1, zero, top/2, left/2
    best = 4095;
    for (int j = 0; j < n4; j++) begin
      int dx, dy, s;
      case (j)
        0: begin dx = 2 * e1x[d]; dy = 2 * e1y[d]; end
        1: begin dx = 0; dy = 0; end
        2: begin dx = int'(pred_top.x) >>> 1;  dy = int'(pred_top.y) >>> 1; end
        default: begin dx = int'(pred_left.x) >>> 1; dy = int'(pred_left.y) >>> 1; end
      endcase
      dx = dx < -8 ? -8 : (dx > 7 ? 7 : dx);
      dy = dy < -8 ? -8 : (dy > 7 ? 7 : dy);
      s = sod2(d, dx, dy) + cost(dx, dy, 1, lam);
      if (s < best) begin best = s; cx = dx; cy = dy; end
    end
    // LV2 step 2: cross without the point back towards the origin side
    if (cx == 0 && cy == 0) begin ox = 99; oy = 99; end
    else if (iabs(cx) >= iabs(cy)) begin ox = cx - (cx > 0 ? 1 : -1); oy = cy; end
    else begin ox = cx; oy = cy - (cy > 0 ? 1 : -1); end
    bx = cx; by = cy;
    for (int j = 0; j < n4; j++) begin
      int dx, dy, s;
      dx = cx + (j == 0 ? 1 : (j == 1 ? -1 : 0));
      dy = cy + (j == 2 ? 1 : (j == 3 ? -1 : 0));
      if (dx < -8 || dx > 7 || dy < -8 || dy > 7 || (dx == ox && dy == oy)) continue;
      s = sod2(d, dx, dy) + cost(dx, dy, 1, lam);
      if (s < best) begin best = s; bx = dx; by = dy; end
    end
    e2x[d] = bx; e2y[d] = by;
    // LV3
    e16c[d] = 4095;
    for (int q = 0; q < n4; q++) e8c[d][q] = 4095;
    for (int n = 0; n < n25; n++) begin
      int dx, dy, sq [4], mc;
      dx = 2 * e2x[d] + n % 5 - 2;
      dy = 2 * e2y[d] + n / 5 - 2;
      if (dx < -16 || dx > 15 || dy < -16 || dy > 15) continue;
      for (int q = 0; q < n4; q++) sq[q] = 0;
      for (int r = 0; r < n16; r++)
        for (int c = 0; c < n16; c++)
          if (c3[r][c] != s3[d][16 + dy + r][16 + dx + c]) sq[(r / 8) * 2 + c / 8]++;
      mc = cost(dx, dy, 0, lam);
      if (sq[0] + sq[1] + sq[2] + sq[3] + mc < e16c[d]) begin
        e16c[d] = sq[0] + sq[1] + sq[2] + sq[3] + mc; e16x[d] = dx; e16y[d] = dy;
      end
      for (int q = 0; q < n4; q++)
        if (sq[q] + mc < e8c[d][q]) begin e8c[d][q] = sq[q] + mc; e8x[d][q] = dx; e8y[d][q] = dy; end
    end
  endtask

  // ---------------- stimulus
  task automatic make_windows(int d, int dx, int dy);
    for (int r = 0; r < n12; r++) for (int c = 0; c < n12; c++) s1[d][r][c] = $urandom % 2;
    for (int r = 0; r < n24; r++) for (int c = 0; c < n24; c++) s2[d][r][c] = $urandom % 2;
    for (int r = 0; r < n48; r++) for (int c = 0; c < n48; c++) s3[d][r][c] = $urandom % 2;
    for (int r = 0; r < n4; r++) for (int c = 0; c < n4; c++) s1[d][4 + (dy >>> 2) + r][4 + (dx >>> 2) + c] = c1[r][c];
    for (int r = 0; r < n8; r++) for (int c = 0; c < n8; c++) s2[d][8 + (dy >>> 1) + r][8 + (dx >>> 1) + c] = c2[r][c];
    for (int r = 0; r < n16; r++) for (int c = 0; c < n16; c++) s3[d][16 + dy + r][16 + dx + c] = c3[r][c];
    // a few flipped bits in the LV3 copy
    for (int k = 0; k < 3; k++) begin
      int r, c;
      r = $urandom % 16; c = $urandom % 16;
      s3[d][16 + dy + r][16 + dx + c] = !c3[r][c];
    end
  endtask

  task automatic write_windows(int d);
    for (int r = 0; r < n12; r++) begin
      logic [47:0] w = '0;
      for (int c = 0; c < n12; c++) w[c] = s1[d][r][c];
      ref_we <= 1'b1; ref_dir <= d[0]; ref_lvl <= LVL1; ref_row <= 6'(r); ref_data <= w;
      @(posedge clk);
    end
    for (int r = 0; r < n24; r++) begin
      logic [47:0] w = '0;
      for (int c = 0; c < n24; c++) w[c] = s2[d][r][c];
      ref_we <= 1'b1; ref_dir <= d[0]; ref_lvl <= LVL2; ref_row <= 6'(r); ref_data <= w;
      @(posedge clk);
    end
    for (int r = 0; r < n48; r++) begin
      logic [47:0] w = '0;
      for (int c = 0; c < n48; c++) w[c] = s3[d][r][c];
      ref_we <= 1'b1; ref_dir <= d[0]; ref_lvl <= LVL3; ref_row <= 6'(r); ref_data <= w;
      @(posedge clk);
    end
    ref_we <= 1'b0;
    @(posedge clk);
  endtask

  task automatic make_block();
    int ox, oy;
    ox = $urandom % 64; oy = $urandom % 64;
    for (int r = 0; r < n18; r++)
      for (int c = 0; c < n18; c++)
        blk[r][c] = (((r + oy) * 7 + (c + ox) * 11) % 97) + int'($urandom % 120);
    pyramid();
  endtask

  task automatic send_block();
    for (int w = 0; w < 81; w++) begin
      logic [31:0] d;
      for (int i = 0; i < n4; i++) d[8*i +: 8] = 8'(blk[(4*w+i) / 18][(4*w+i) % 18]);
      pix_valid <= 1'b1; pix_data <= d;
      @(posedge clk);
    end
    pix_valid <= 1'b0;
  endtask

  int n_p = 0, n_b = 0, n_cost = 0, n_plant = 0, n_found = 0;

  task automatic run_mb(bit b, int lam, int dx0, int dy0, int dx1, int dy1, string name);
    int t_start, t, exp_cycles;
    make_block();
    make_windows(0, dx0, dy0);
    make_windows(1, dx1, dy1);
    mode_b <= b;
    lambda <= 4'(lam);
    @(posedge clk);
    write_windows(0);
    if (b) write_windows(1);
    send_block();
    t = 0;
    while (!dut.pp_done) begin @(posedge clk); t++; end
    check(t <= 40, $sformatf("%s: pre-processing took %0d cycles after the last word", name, t));
    t_start = 0;
    while (!done) begin @(posedge clk); t_start++; end
    // pyramid
    begin
      int bad = 0;
      for (int r = 0; r < n16; r++) for (int c = 0; c < n16; c++) bad += int'(dut.lv3[r][c] != c3[r][c]);
      for (int r = 0; r < n8; r++) for (int c = 0; c < n8; c++) bad += int'(dut.lv2[r][c] != c2[r][c]);
      for (int r = 0; r < n4; r++) for (int c = 0; c < n4; c++) bad += int'(dut.lv1[r][c] != c1[r][c]);
      check(bad == 0, $sformatf("%s: %0d pyramid bits differ", name, bad));
    end
    exp_cycles = b ? 33 : 19;
    check(t_start == exp_cycles, $sformatf("%s: search took %0d cycles, expected %0d", name, t_start, exp_cycles));
    for (int d = 0; d < (b ? n2 : 1); d++) begin
      search_model(d, lam);
      check(int'(mv_lv1[d].x) == e1x[d] && int'(mv_lv1[d].y) == e1y[d],
            $sformatf("%s dir %0d: LV1 (%0d,%0d) expected (%0d,%0d)", name, d, int'(mv_lv1[d].x), int'(mv_lv1[d].y), e1x[d], e1y[d]));
      check(int'(mv_lv2[d].x) == e2x[d] && int'(mv_lv2[d].y) == e2y[d],
            $sformatf("%s dir %0d: LV2 (%0d,%0d) expected (%0d,%0d)", name, d, int'(mv_lv2[d].x), int'(mv_lv2[d].y), e2x[d], e2y[d]));
      check(int'(mv16[d].x) == e16x[d] && int'(mv16[d].y) == e16y[d] && int'(cost16[d]) == e16c[d],
            $sformatf("%s dir %0d: 16x16 (%0d,%0d) cost %0d expected (%0d,%0d) %0d", name, d,
                      int'(mv16[d].x), int'(mv16[d].y), cost16[d], e16x[d], e16y[d], e16c[d]));
      for (int q = 0; q < n4; q++)
        check(int'(mv8[d][q].x) == e8x[d][q] && int'(mv8[d][q].y) == e8y[d][q] && int'(cost8[d][q]) == e8c[d][q],
              $sformatf("%s dir %0d: 8x8 %0d (%0d,%0d) cost %0d expected (%0d,%0d) %0d", name, d, q,
                        int'(mv8[d][q].x), int'(mv8[d][q].y), cost8[d][q], e8x[d][q], e8y[d][q], e8c[d][q]));
    end
    // a 4x4 binary LV1 block can match random data elsewhere, so the planted
    // vector is not always found: only counted here
    if (lam == 0) begin
      n_plant++;
      if (int'(mv16[0].x) == dx0 && int'(mv16[0].y) == dy0) n_found++;
      if (b) begin
        n_plant++;
        if (int'(mv16[1].x) == dx1 && int'(mv16[1].y) == dy1) n_found++;
      end
    end
    if (b) n_b++; else n_p++;
    if (lam != 0) n_cost++;
  endtask

  initial begin
    #1 rst_n = 1'b0;          // an edge on reset before the first clock
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    run_mb(1'b0, 0, 6, -5, 0, 0, "P near");
    run_mb(1'b0, 0, -15, 13, 0, 0, "P far");
    run_mb(1'b1, 0, 3, 2, -9, -14, "B");
    pred_top <= '{x: 6'sd8, y: -6'sd4};
    pred_left <= '{x: -6'sd12, y: 6'sd10};
    pmv <= '{x: 6'sd2, y: 6'sd1};
    run_mb(1'b0, 2, 9, 7, 0, 0, "P cost");
    run_mb(1'b1, 3, -4, 11, 14, -2, "B cost");
    for (int i = 0; i < 6; i++) begin
      bmv_t t, l;
      t.x = 6'($urandom % 32) - 6'sd16; t.y = 6'($urandom % 32) - 6'sd16;
      l.x = 6'($urandom % 32) - 6'sd16; l.y = 6'($urandom % 32) - 6'sd16;
      pred_top <= t; pred_left <= l; pmv <= t;
      run_mb(1'(i % 2), i % 3, int'($urandom % 32) - 16, int'($urandom % 32) - 16,
             int'($urandom % 32) - 16, int'($urandom % 32) - 16, $sformatf("random %0d", i));
    end
    $display("planted vectors found: %0d of %0d", n_found, n_plant);
    check(n_found > 0, "some planted vector found");
    check(n_p >= 2 && n_b >= 2 && n_cost >= 2, "P, B and vector-cost searches all ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
