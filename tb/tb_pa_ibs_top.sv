// tb_pa_ibs_top: full-size end-to-end testbench of the top level
// (pa_ibs_top with its default parameters: a 352x288 CIF frame for the
// pre-processor, the +/-16 PA-IBS search, K = 18 for the BBME).
//
// Three threads run at the same time, one per design:
//  * a whole CIF frame streams through bip; every output pixel's eight
//    bit-planes are compared with a filter model;
//  * ibs_me searches random bit-plane data with a fixed phi, with a
//    CAM-selected phi and with a planted block, each checked against a
//    full-search model of all 41 partitions, with the search time;
//  * bbme runs a P and a B macroblock, checked against models of the
//    binary pyramid and of the three-level search.
// Each mechanism is counted; one that never ran counts as a failure.
// Watchdog and TB_RESULT line.
module tb_pa_ibs_top;
  import ibs_pkg::*;
  import bbme_pkg::*;

  localparam int unsigned W = 352;
  localparam int unsigned H = 288;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;

  // bip
  logic            bip_in_valid = 1'b0;
  logic            bip_in_ready;
  logic [7:0]      bip_in_pix = '0;
  logic            bip_out_valid;
  logic [7:0]      bip_out_planes;
  logic [$clog2(W + 1)-1:0] bip_out_x;
  logic [$clog2(H + 1)-1:0] bip_out_y;
  // ibs
  logic            ibs_wr_valid = 1'b0, ibs_wr_is_ref = 1'b0, ibs_wr_pp = 1'b0;
  logic [2:0]      ibs_wr_bx = '0, ibs_wr_by = '0, ibs_wr_z = '0;
  region_t         ibs_wr_data = '0;
  logic            ibs_start = 1'b0, ibs_pp_sel = 1'b0, ibs_use_cam = 1'b0;
  logic [3:0]      ibs_phi_fixed = 4'd8;
  mv_t             ibs_mv_top = '0, ibs_mv_topright = '0, ibs_mv_left = '0;
  logic [7:0][6:0] ibs_cam_thr = {7'd16, 7'd16, 7'd16, 7'd16, 7'd16, 7'd8, 7'd4, 7'd0};
  logic            ibs_busy, ibs_done, ibs_ce;
  logic [3:0]      ibs_phi_used;
  logic [6:0]      ibs_activity;
  logic [11:0]     ibs_best_sod [NPART];
  mv_t             ibs_best_mv  [NPART];
  // bbme
  logic        bbme_mode_b = 1'b0;
  logic        bbme_pix_valid = 1'b0;
  logic [31:0] bbme_pix_data = '0;
  logic        bbme_ref_we = 1'b0, bbme_ref_dir = 1'b0;
  lvl_t        bbme_ref_lvl = LVL1;
  logic [5:0]  bbme_ref_row = '0;
  logic [47:0] bbme_ref_data = '0;
  bmv_t        bbme_pred_top = '0, bbme_pred_left = '0, bbme_pmv = '0;
  logic [3:0]  bbme_lambda = '0;
  logic        bbme_pre_busy, bbme_busy, bbme_done;
  bmv_t        bbme_mv_lv1 [2];
  bmv_t        bbme_mv_lv2 [2];
  bmv_t        bbme_mv16   [2];
  logic [11:0] bbme_cost16 [2];
  bmv_t        bbme_mv8    [2][4];
  logic [11:0] bbme_cost8  [2][4];

  pa_ibs_top dut (.*);

  int checks = 0, failures = 0;
  int n2 = 2, n4 = 4, n5 = 5, n6 = 6, n8 = 8, n16 = 16, n18 = 18, n12 = 12, n24 = 24, n48 = 48, n64 = 64, n25 = 25;
  int nnpart = NPART, nw = W, nh = H;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #50_000_000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // ======================= PA-IBS search engine
  // ---------------- model data
  bit C [2][8][16][16];
  bit R [2][8][48][48];

  function automatic bit [15:0] pmask(int p);
    bit [15:0] m;
    for (int b = 0; b < n16; b++) begin
      int r4, c4, q;
      r4 = b / 4; c4 = b % 4; q = (r4 / 2) * 2 + c4 / 2;
      if (p == 0) m[b] = 1;
      else if (p < 3)  m[b] = (r4 / 2 == p - 1);
      else if (p < 5)  m[b] = (c4 / 2 == p - 3);
      else if (p < 9)  m[b] = (q == p - 5);
      else if (p < 17) m[b] = (q == (p - 9) / 2) && (r4 % 2 == (p - 9) % 2);
      else if (p < 25) m[b] = (q == (p - 17) / 2) && (c4 % 2 == (p - 17) % 2);
      else m[b] = (b == p - 25);
    end
    return m;
  endfunction

  int exp_sod [NPART];
  int exp_x   [NPART];
  int exp_y   [NPART];

  task automatic ibs_model(int pp, int phi);
    int s4 [16];
    for (int p = 0; p < nnpart; p++) exp_sod[p] = 1 << 30;
    // search order: region (ry, rx), line, location
    for (int ry = 0; ry < n4; ry++)
      for (int rx = 0; rx < n4; rx++)
        for (int ln = 0; ln < n8; ln++)
          for (int l = 0; l < n8; l++) begin
            int dx, dy;
            dx = 8 * rx + l - 16;
            dy = 8 * ry + ln - 16;
            for (int b = 0; b < n16; b++) s4[b] = 0;
            for (int z = 0; z < phi; z++)
              for (int r = 0; r < n16; r++)
                for (int c = 0; c < n16; c++)
                  if (C[pp][z][r][c] != R[pp][z][16 + dy + r][16 + dx + c])
                    s4[(r / 4) * 4 + c / 4]++;
            for (int p = 0; p < nnpart; p++) begin
              bit [15:0] m;
              int s;
              m = pmask(p);
              s = 0;
              for (int b = 0; b < n16; b++) if (m[b]) s += s4[b];
              if (s < exp_sod[p]) begin
                exp_sod[p] = s; exp_x[p] = dx; exp_y[p] = dy;
              end
            end
          end
  endtask

  task automatic ibs_random(int pp, int density);
    for (int z = 0; z < n8; z++) begin
      for (int r = 0; r < n16; r++)
        for (int c = 0; c < n16; c++) C[pp][z][r][c] = ($urandom % 100) < density;
      for (int r = 0; r < n48; r++)
        for (int c = 0; c < n48; c++) R[pp][z][r][c] = ($urandom % 100) < density;
    end
  endtask

  task automatic ibs_plant(int pp, int dx, int dy, int flips);
    for (int z = 0; z < n8; z++)
      for (int r = 0; r < n16; r++)
        for (int c = 0; c < n16; c++) R[pp][z][16 + dy + r][16 + dx + c] = C[pp][z][r][c];
    for (int f = 0; f < flips; f++) begin
      int z, r, c;
      z = $urandom % 8; r = $urandom % 16; c = $urandom % 16;
      R[pp][z][16 + dy + r][16 + dx + c] = !C[pp][z][r][c];
    end
  endtask

  task automatic ibs_write_word(bit is_ref, int bx, int by, int z, int pp, region_t d);
    ibs_wr_valid <= 1'b1; ibs_wr_is_ref <= is_ref; ibs_wr_bx <= 3'(bx); ibs_wr_by <= 3'(by);
    ibs_wr_z <= 3'(z); ibs_wr_pp <= pp[0]; ibs_wr_data <= d;
    @(posedge clk);
  endtask

  task automatic ibs_load(int pp);
    for (int z = 0; z < n8; z++) begin
      for (int q = 0; q < n4; q++) begin
        region_t d;
        for (int r = 0; r < n8; r++)
          for (int c = 0; c < n8; c++) d[r * 8 + c] = C[pp][z][(q / 2) * 8 + r][(q % 2) * 8 + c];
        ibs_write_word(0, q, 0, z, pp, d);
      end
      for (int by = 0; by < n6; by++)
        for (int bx = 0; bx < n6; bx++) begin
          region_t d;
          for (int r = 0; r < n8; r++)
            for (int c = 0; c < n8; c++) d[r * 8 + c] = R[pp][z][by * 8 + r][bx * 8 + c];
          ibs_write_word(1, bx, by, z, pp, d);
        end
    end
    ibs_wr_valid <= 1'b0;
    @(posedge clk);
  endtask

  int cycles, ce_count;

  task automatic ibs_run(int pp, bit cam_mode, int phi, string name);
    int exp_phi;
    ibs_pp_sel <= pp[0]; ibs_use_cam <= cam_mode; ibs_phi_fixed <= 4'(phi);
    @(posedge clk);
    exp_phi = phi;
    ibs_start <= 1'b1;
    @(posedge clk);
    ibs_start <= 1'b0;
    #1;
    check(int'(ibs_phi_used) == exp_phi, $sformatf("%s: phi used %0d, expected %0d", name, ibs_phi_used, exp_phi));
    cycles = 1; ce_count = 0;
    while (!ibs_done) begin
      @(posedge clk);
      cycles++;
      if (ibs_ce) ce_count++;
    end
    ibs_model(pp, exp_phi);
    for (int p = 0; p < nnpart; p++) begin
      check(int'(ibs_best_sod[p]) == exp_sod[p] && int'(ibs_best_mv[p].x) == exp_x[p] && int'(ibs_best_mv[p].y) == exp_y[p],
            $sformatf("%s partition %0d: got sod %0d mv (%0d,%0d), expected %0d (%0d,%0d)", name, p,
                      ibs_best_sod[p], int'(ibs_best_mv[p].x), int'(ibs_best_mv[p].y), exp_sod[p], exp_x[p], exp_y[p]));
    end
    // the working clock runs at phi/8 of the input clock: ~1024 input cycles
    check(cycles >= 1024 && cycles <= 1024 + 8 * 14 / exp_phi + 16,
          $sformatf("%s: search took %0d input cycles (phi %0d)", name, cycles, exp_phi));
    check(ce_count >= 128 * exp_phi && ce_count <= 128 * exp_phi + 14,
          $sformatf("%s: %0d working cycles (phi %0d)", name, ce_count, exp_phi));
    $display("%s: phi %0d, %0d input cycles, %0d working cycles", name, exp_phi, cycles, ce_count);
  endtask


  // ======================= binary image pre-processor
  int img [2][H][W];
  int K [8][4][4];

  function automatic int px(int f, int y, int x);
    y = (y < 0) ? 0 : (y >= nh ? nh - 1 : y);
    x = (x < 0) ? 0 : (x >= nw ? nw - 1 : x);
    return img[f][y][x];
  endfunction

  function automatic logic [7:0] bip_model(int f, int y, int x);
    logic [7:0] b;
    for (int k = 0; k < n8; k++) begin
      int acc;
      acc = 0;
      for (int r = 0; r < n4; r++)
        for (int c = 0; c < n4; c++) acc += K[k][r][c] * px(f, y - 2 + r, x - 2 + c);
      b[k] = (acc >= 0);
    end
    return b;
  endfunction

  task automatic setk(int k, int r, int a, int b, int c, int d);
    K[k][r][0] = a; K[k][r][1] = b; K[k][r][2] = c; K[k][r][3] = d;
  endtask

  int nout = 0, stalls = 0;
  int ones [8];
  int bexp_x = 0, bexp_y = 0, bexp_f = 0;

  always @(posedge clk) begin
    if (rst_n && bip_out_valid) begin
      logic [7:0] e;
      e = bip_model(bexp_f, bexp_y, bexp_x);
      check(int'(bip_out_x) == bexp_x && int'(bip_out_y) == bexp_y,
            $sformatf("position (%0d,%0d), expected (%0d,%0d)", bip_out_x, bip_out_y, bexp_x, bexp_y));
      check(bip_out_planes == e, $sformatf("planes at (%0d,%0d): %b expected %b", bexp_x, bexp_y, bip_out_planes, e));
      for (int k = 0; k < n8; k++) if (bip_out_planes[k]) ones[k]++;
      nout++;
      bexp_x++;
      if (bexp_x == nw) begin
        bexp_x = 0; bexp_y++;
        if (bexp_y == nh) begin bexp_y = 0; bexp_f++; end
      end
    end
  end


  // ======================= BBME
  // ---------------- pyramid model
  int bb_blk [18][18];
  int bb_g2 [8][8];
  int bb_g1 [4][4];
  bit bb_c3 [16][16];
  bit bb_c2 [8][8];
  bit bb_c1 [4][4];

  function automatic int bb_cl(int v, int hi);
    return (v < 0) ? 0 : (v > hi ? hi : v);
  endfunction

  function automatic bit binz(int p, int u, int d, int l, int r);
    return p >= ((u + d + l + r + 1) >> 2);
  endfunction

  task automatic pyramid();
    for (int i = 0; i < n8; i++)
      for (int j = 0; j < n8; j++)
        bb_g2[i][j] = (bb_blk[2*i+1][2*j+1] + bb_blk[2*i+1][2*j+2] + bb_blk[2*i+2][2*j+1] + bb_blk[2*i+2][2*j+2] + 2) >> 2;
    for (int i = 0; i < n4; i++)
      for (int j = 0; j < n4; j++)
        bb_g1[i][j] = (bb_g2[2*i][2*j] + bb_g2[2*i][2*j+1] + bb_g2[2*i+1][2*j] + bb_g2[2*i+1][2*j+1] + 2) >> 2;
    for (int r = 0; r < n16; r++)
      for (int c = 0; c < n16; c++)
        bb_c3[r][c] = binz(bb_blk[r+1][c+1], bb_blk[r][c+1], bb_blk[r+2][c+1], bb_blk[r+1][c], bb_blk[r+1][c+2]);
    for (int r = 0; r < n8; r++)
      for (int c = 0; c < n8; c++)
        bb_c2[r][c] = binz(bb_g2[r][c], bb_g2[bb_cl(r-1,7)][c], bb_g2[bb_cl(r+1,7)][c], bb_g2[r][bb_cl(c-1,7)], bb_g2[r][bb_cl(c+1,7)]);
    for (int r = 0; r < n4; r++)
      for (int c = 0; c < n4; c++)
        bb_c1[r][c] = binz(bb_g1[r][c], bb_g1[bb_cl(r-1,3)][c], bb_g1[bb_cl(r+1,3)][c], bb_g1[r][bb_cl(c-1,3)], bb_g1[r][bb_cl(c+1,3)]);
  endtask

  // ---------------- search model
  bit bb_s1 [2][12][12];
  bit bb_s2 [2][24][24];
  bit bb_s3 [2][48][48];

  int e1x [2], e1y [2], e2x [2], e2y [2];
  int e16x [2], e16y [2], e16c [2];
  int e8x [2][4], e8y [2][4], e8c [2][4];

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  function automatic int cost(int dx, int dy, int shift, int lam);
    return lam * (iabs(dx - (int'(bbme_pmv.x) >>> shift)) + iabs(dy - (int'(bbme_pmv.y) >>> shift)));
  endfunction

  function automatic int sod2(int d, int dx, int dy);
    int s = 0;
    for (int r = 0; r < n8; r++)
      for (int c = 0; c < n8; c++) s += int'(bb_c2[r][c] != bb_s2[d][8 + dy + r][8 + dx + c]);
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
        for (int c = 0; c < n4; c++) s += int'(bb_c1[r][c] != bb_s1[d][4 + dy + r][4 + dx + c]);
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
        2: begin dx = int'(bbme_pred_top.x) >>> 1;  dy = int'(bbme_pred_top.y) >>> 1; end
        default: begin dx = int'(bbme_pred_left.x) >>> 1; dy = int'(bbme_pred_left.y) >>> 1; end
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
          if (bb_c3[r][c] != bb_s3[d][16 + dy + r][16 + dx + c]) sq[(r / 8) * 2 + c / 8]++;
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
    for (int r = 0; r < n12; r++) for (int c = 0; c < n12; c++) bb_s1[d][r][c] = $urandom % 2;
    for (int r = 0; r < n24; r++) for (int c = 0; c < n24; c++) bb_s2[d][r][c] = $urandom % 2;
    for (int r = 0; r < n48; r++) for (int c = 0; c < n48; c++) bb_s3[d][r][c] = $urandom % 2;
    for (int r = 0; r < n4; r++) for (int c = 0; c < n4; c++) bb_s1[d][4 + (dy >>> 2) + r][4 + (dx >>> 2) + c] = bb_c1[r][c];
    for (int r = 0; r < n8; r++) for (int c = 0; c < n8; c++) bb_s2[d][8 + (dy >>> 1) + r][8 + (dx >>> 1) + c] = bb_c2[r][c];
    for (int r = 0; r < n16; r++) for (int c = 0; c < n16; c++) bb_s3[d][16 + dy + r][16 + dx + c] = bb_c3[r][c];
    // a few flipped bits in the LV3 copy
    for (int k = 0; k < 3; k++) begin
      int r, c;
      r = $urandom % 16; c = $urandom % 16;
      bb_s3[d][16 + dy + r][16 + dx + c] = !bb_c3[r][c];
    end
  endtask

  task automatic write_windows(int d);
    for (int r = 0; r < n12; r++) begin
      logic [47:0] w = '0;
      for (int c = 0; c < n12; c++) w[c] = bb_s1[d][r][c];
      bbme_ref_we <= 1'b1; bbme_ref_dir <= d[0]; bbme_ref_lvl <= LVL1; bbme_ref_row <= 6'(r); bbme_ref_data <= w;
      @(posedge clk);
    end
    for (int r = 0; r < n24; r++) begin
      logic [47:0] w = '0;
      for (int c = 0; c < n24; c++) w[c] = bb_s2[d][r][c];
      bbme_ref_we <= 1'b1; bbme_ref_dir <= d[0]; bbme_ref_lvl <= LVL2; bbme_ref_row <= 6'(r); bbme_ref_data <= w;
      @(posedge clk);
    end
    for (int r = 0; r < n48; r++) begin
      logic [47:0] w = '0;
      for (int c = 0; c < n48; c++) w[c] = bb_s3[d][r][c];
      bbme_ref_we <= 1'b1; bbme_ref_dir <= d[0]; bbme_ref_lvl <= LVL3; bbme_ref_row <= 6'(r); bbme_ref_data <= w;
      @(posedge clk);
    end
    bbme_ref_we <= 1'b0;
    @(posedge clk);
  endtask

  task automatic make_block();
    int ox, oy;
    ox = $urandom % 64; oy = $urandom % 64;
    for (int r = 0; r < n18; r++)
      for (int c = 0; c < n18; c++)
        bb_blk[r][c] = (((r + oy) * 7 + (c + ox) * 11) % 97) + int'($urandom % 120);
    pyramid();
  endtask

  task automatic send_block();
    for (int w = 0; w < 81; w++) begin
      logic [31:0] d;
      for (int i = 0; i < n4; i++) d[8*i +: 8] = 8'(bb_blk[(4*w+i) / 18][(4*w+i) % 18]);
      bbme_pix_valid <= 1'b1; bbme_pix_data <= d;
      @(posedge clk);
    end
    bbme_pix_valid <= 1'b0;
  endtask

  int n_p = 0, n_b = 0, n_cost = 0, n_plant = 0, n_found = 0;

  task automatic run_mb(bit b, int lam, int dx0, int dy0, int dx1, int dy1, string name);
    int t_start, t, exp_cycles;
    make_block();
    make_windows(0, dx0, dy0);
    make_windows(1, dx1, dy1);
    bbme_mode_b <= b;
    bbme_lambda <= 4'(lam);
    @(posedge clk);
    write_windows(0);
    if (b) write_windows(1);
    send_block();
    t = 0;
    while (!dut.u_bbme.pp_done) begin @(posedge clk); t++; end
    check(t <= 40, $sformatf("%s: pre-processing took %0d cycles after the last word", name, t));
    t_start = 0;
    while (!bbme_done) begin @(posedge clk); t_start++; end
    // pyramid
    begin
      int bad = 0;
      for (int r = 0; r < n16; r++) for (int c = 0; c < n16; c++) bad += int'(dut.u_bbme.lv3[r][c] != bb_c3[r][c]);
      for (int r = 0; r < n8; r++) for (int c = 0; c < n8; c++) bad += int'(dut.u_bbme.lv2[r][c] != bb_c2[r][c]);
      for (int r = 0; r < n4; r++) for (int c = 0; c < n4; c++) bad += int'(dut.u_bbme.lv1[r][c] != bb_c1[r][c]);
      check(bad == 0, $sformatf("%s: %0d pyramid bits differ", name, bad));
    end
    exp_cycles = b ? 33 : 19;
    check(t_start == exp_cycles, $sformatf("%s: search took %0d cycles, expected %0d", name, t_start, exp_cycles));
    for (int d = 0; d < (b ? n2 : 1); d++) begin
      search_model(d, lam);
      check(int'(bbme_mv_lv1[d].x) == e1x[d] && int'(bbme_mv_lv1[d].y) == e1y[d],
            $sformatf("%s dir %0d: LV1 (%0d,%0d) expected (%0d,%0d)", name, d, int'(bbme_mv_lv1[d].x), int'(bbme_mv_lv1[d].y), e1x[d], e1y[d]));
      check(int'(bbme_mv_lv2[d].x) == e2x[d] && int'(bbme_mv_lv2[d].y) == e2y[d],
            $sformatf("%s dir %0d: LV2 (%0d,%0d) expected (%0d,%0d)", name, d, int'(bbme_mv_lv2[d].x), int'(bbme_mv_lv2[d].y), e2x[d], e2y[d]));
      check(int'(bbme_mv16[d].x) == e16x[d] && int'(bbme_mv16[d].y) == e16y[d] && int'(bbme_cost16[d]) == e16c[d],
            $sformatf("%s dir %0d: 16x16 (%0d,%0d) cost %0d expected (%0d,%0d) %0d", name, d,
                      int'(bbme_mv16[d].x), int'(bbme_mv16[d].y), bbme_cost16[d], e16x[d], e16y[d], e16c[d]));
      for (int q = 0; q < n4; q++)
        check(int'(bbme_mv8[d][q].x) == e8x[d][q] && int'(bbme_mv8[d][q].y) == e8y[d][q] && int'(bbme_cost8[d][q]) == e8c[d][q],
              $sformatf("%s dir %0d: 8x8 %0d (%0d,%0d) cost %0d expected (%0d,%0d) %0d", name, d, q,
                        int'(bbme_mv8[d][q].x), int'(bbme_mv8[d][q].y), bbme_cost8[d][q], e8x[d][q], e8y[d][q], e8c[d][q]));
    end
    // a 4x4 binary LV1 block can match random data elsewhere, so the planted
    // vector is not always found: only counted here
    if (lam == 0) begin
      n_plant++;
      if (int'(bbme_mv16[0].x) == dx0 && int'(bbme_mv16[0].y) == dy0) n_found++;
      if (b) begin
        n_plant++;
        if (int'(bbme_mv16[1].x) == dx1 && int'(bbme_mv16[1].y) == dy1) n_found++;
      end
    end
    if (b) n_b++; else n_p++;
    if (lam != 0) n_cost++;
  endtask


  // ======================= threads
  int n_frames = 0, n_ibs_fixed = 0, n_ibs_cam = 0, n_ibs_planted = 0, n_bbme_p = 0, n_bbme_b = 0;

  initial begin
    #1 rst_n = 1'b0;
    for (int k = 0; k < 8; k++) begin ones[k] = 0; for (int r = 0; r < 4; r++) setk(k, r, 0, 0, 0, 0); end
    setk(0, 1, 0, 1, 1, 1);  setk(0, 2, 0, 1, -8, 1);  setk(0, 3, 0, 1, 1, 1);
    setk(1, 1, 0, 1, 0, -1); setk(1, 2, 0, 2, 0, -2);  setk(1, 3, 0, 1, 0, -1);
    setk(2, 1, 0, 1, 2, 1);  setk(2, 3, 0, -1, -2, -1);
    setk(3, 1, 0, 1, 1, -2); setk(3, 2, 0, 1, -2, 1);  setk(3, 3, 0, -2, 1, 1);
    setk(4, 1, 0, -2, 1, 1); setk(4, 2, 0, 1, -2, 1);  setk(4, 3, 0, 1, 1, -2);
    setk(5, 2, 0, 1, -3, 1); setk(5, 3, 0, 0, 1, 0);
    setk(6, 2, -1, 3, -3, 1);
    K[7][0][2] = -1; K[7][1][2] = 3; K[7][2][2] = -3; K[7][3][2] = 1;
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < nh; y++)
        for (int x = 0; x < nw; x++)
          // smooth ramps plus noise, so every filter sees both signs
          img[f][y][x] = (f == 0) ? ((x * 9 + y * 5 + int'($urandom % 40)) % 256) : int'($urandom % 256);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    fork
      begin : bip_thread
        for (int i = 0; i < nw * nh; i++) begin
          while ($urandom % 4 == 0) begin
            bip_in_valid <= 1'b0;
            @(posedge clk);
          end
          bip_in_valid <= 1'b1;
          bip_in_pix   <= 8'(img[0][i / nw][i % nw]);
          // the pixel is taken at the first rising edge with bip_in_ready high
          @(negedge clk);
          while (!bip_in_ready) begin
            stalls++;
            @(negedge clk);
          end
          @(posedge clk);
        end
        bip_in_valid <= 1'b0;
        repeat (4 * W + 20) @(posedge clk);
        check(nout == W * H, $sformatf("bip: %0d pixels out, expected %0d", nout, W * H));
        check(stalls > 0, "bip: input was held off at least once");
        for (int k = 0; k < 8; k++)
          check(ones[k] > 0 && ones[k] < nout, $sformatf("bip: plane %0d has both values", k));
        if (nout == W * H) n_frames++;
      end
      begin : ibs_thread
        ibs_random(0, 50);
        ibs_load(0);
        ibs_run(0, 1'b0, 6, "ibs fixed phi 6");
        n_ibs_fixed++;
        ibs_random(1, 40);
        ibs_plant(1, -9, 12, 2);
        ibs_load(1);
        ibs_run(1, 1'b0, 8, "ibs planted");
        if (ibs_best_mv[0].x == -6'sd9 && ibs_best_mv[0].y == 6'sd12) n_ibs_planted++;
        ibs_mv_top = '{x: 6'sd2, y: 6'sd0};
        ibs_mv_topright = '{x: -6'sd2, y: 6'sd0};
        ibs_mv_left = '{x: 6'sd6, y: 6'sd4};
        ibs_random(0, 50);
        ibs_load(0);
        ibs_run(0, 1'b1, 2, "ibs cam phi 2");
        n_ibs_cam++;
      end
      begin : bbme_thread
        run_mb(1'b0, 0, 6, -5, 0, 0, "bbme P");
        bbme_pred_top <= '{x: 6'sd8, y: -6'sd4};
        bbme_pred_left <= '{x: -6'sd12, y: 6'sd10};
        bbme_pmv <= '{x: 6'sd2, y: 6'sd1};
        run_mb(1'b1, 2, -4, 11, 14, -2, "bbme B");
        n_bbme_p = n_p;
        n_bbme_b = n_b;
      end
    join
    check(n_frames == 1, "bip: a whole frame was pre-processed");
    check(n_ibs_fixed == 1, "ibs: fixed-phi search ran");
    check(n_ibs_cam == 1, "ibs: CAM-selected search ran");
    check(n_ibs_planted == 1, "ibs: planted block found");
    check(n_bbme_p == 1, "bbme: P macroblock searched");
    check(n_bbme_b == 1, "bbme: B macroblock searched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
