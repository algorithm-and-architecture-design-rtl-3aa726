// tb_ibs_me: self-checking testbench of the IBS motion estimator (ibs_me).
//
// A behavioural model holds the current block C[pp][z][16][16] and the
// reference window R[pp][z][48][48] as bit arrays, loads them into the DUT
// as 8x8 regions, and computes for every partition the smallest accumulated
// SOD over all 1024 vectors of the +/-16 range and the first vector (in the
// DUT's search order) that reaches it. Checked: all 41 best SODs and vectors
// for phi = 1..8 (fixed), a CAM-selected phi, a block planted into the
// window with a known vector, ping-pong loading of the next block during a
// search, and the search time of about 1024 input cycles whatever phi is.
// Ends with the TB_RESULT line; a watchdog stops a hung run.
module tb_ibs_me;
  import ibs_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            wr_valid = 1'b0, wr_is_ref = 1'b0, wr_pp = 1'b0;
  logic [2:0]      wr_bx = '0, wr_by = '0, wr_z = '0;
  region_t         wr_data = '0;
  logic            start = 1'b0, pp_sel = 1'b0, use_cam = 1'b0;
  logic [3:0]      phi_fixed = 4'd8;
  mv_t             mv_top = '0, mv_topright = '0, mv_left = '0;
  logic [7:0][6:0] cam_thr;
  logic            busy, done, ce;
  logic [3:0]      phi_used;
  logic [6:0]      activity;
  logic [11:0]     best_sod [NPART];
  mv_t             best_mv  [NPART];

  ibs_me dut (.*);

  int checks = 0, failures = 0;
  // loop bounds held in variables keep the model's loops rolled
  int n4 = 4, n6 = 6, n8 = 8, n16 = 16, n48 = 48, nnpart = NPART;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #20_000_000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

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

  task automatic model(int pp, int phi);
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

  task automatic randomize_data(int pp, int density);
    for (int z = 0; z < n8; z++) begin
      for (int r = 0; r < n16; r++)
        for (int c = 0; c < n16; c++) C[pp][z][r][c] = ($urandom % 100) < density;
      for (int r = 0; r < n48; r++)
        for (int c = 0; c < n48; c++) R[pp][z][r][c] = ($urandom % 100) < density;
    end
  endtask

  task automatic plant(int pp, int dx, int dy, int flips);
    for (int z = 0; z < n8; z++)
      for (int r = 0; r < n16; r++)
        for (int c = 0; c < n16; c++) R[pp][z][16 + dy + r][16 + dx + c] = C[pp][z][r][c];
    for (int f = 0; f < flips; f++) begin
      int z, r, c;
      z = $urandom % 8; r = $urandom % 16; c = $urandom % 16;
      R[pp][z][16 + dy + r][16 + dx + c] = !C[pp][z][r][c];
    end
  endtask

  task automatic write_word(bit is_ref, int bx, int by, int z, int pp, region_t d);
    wr_valid <= 1'b1; wr_is_ref <= is_ref; wr_bx <= 3'(bx); wr_by <= 3'(by);
    wr_z <= 3'(z); wr_pp <= pp[0]; wr_data <= d;
    @(posedge clk);
  endtask

  task automatic load(int pp);
    for (int z = 0; z < n8; z++) begin
      for (int q = 0; q < n4; q++) begin
        region_t d;
        for (int r = 0; r < n8; r++)
          for (int c = 0; c < n8; c++) d[r * 8 + c] = C[pp][z][(q / 2) * 8 + r][(q % 2) * 8 + c];
        write_word(0, q, 0, z, pp, d);
      end
      for (int by = 0; by < n6; by++)
        for (int bx = 0; bx < n6; bx++) begin
          region_t d;
          for (int r = 0; r < n8; r++)
            for (int c = 0; c < n8; c++) d[r * 8 + c] = R[pp][z][by * 8 + r][bx * 8 + c];
          write_word(1, bx, by, z, pp, d);
        end
    end
    wr_valid <= 1'b0;
    @(posedge clk);
  endtask

  int cycles, ce_count;

  task automatic run(int pp, bit cam_mode, int phi, string name);
    int exp_phi;
    pp_sel <= pp[0]; use_cam <= cam_mode; phi_fixed <= 4'(phi);
    @(posedge clk);
    exp_phi = phi;
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    #1;
    check(int'(phi_used) == exp_phi, $sformatf("%s: phi used %0d, expected %0d", name, phi_used, exp_phi));
    cycles = 1; ce_count = 0;
    while (!done) begin
      @(posedge clk);
      cycles++;
      if (ce) ce_count++;
    end
    model(pp, exp_phi);
    for (int p = 0; p < nnpart; p++) begin
      check(int'(best_sod[p]) == exp_sod[p] && int'(best_mv[p].x) == exp_x[p] && int'(best_mv[p].y) == exp_y[p],
            $sformatf("%s partition %0d: got sod %0d mv (%0d,%0d), expected %0d (%0d,%0d)", name, p,
                      best_sod[p], int'(best_mv[p].x), int'(best_mv[p].y), exp_sod[p], exp_x[p], exp_y[p]));
    end
    // the working clock runs at phi/8 of the input clock: ~1024 input cycles
    check(cycles >= 1024 && cycles <= 1024 + 8 * 14 / exp_phi + 16,
          $sformatf("%s: search took %0d input cycles (phi %0d)", name, cycles, exp_phi));
    check(ce_count >= 128 * exp_phi && ce_count <= 128 * exp_phi + 14,
          $sformatf("%s: %0d working cycles (phi %0d)", name, ce_count, exp_phi));
    $display("%s: phi %0d, %0d input cycles, %0d working cycles", name, exp_phi, cycles, ce_count);
  endtask

  initial begin
    // thresholds T1..T8 = 0, 4, 8, 16, 16, 16, 16, 16 (phi 1..4)
    cam_thr = {7'd16, 7'd16, 7'd16, 7'd16, 7'd16, 7'd8, 7'd4, 7'd0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    check(!busy && !done, "idle after reset");

    // every fixed phi on random data
    for (int phi = 1; phi <= n8; phi++) begin
      randomize_data(0, 50);
      load(0);
      run(0, 1'b0, phi, $sformatf("random phi=%0d", phi));
    end

    // a planted block with a few flipped bits must be found at its vector
    randomize_data(1, 40);
    plant(1, 7, -11, 3);
    load(1);
    run(1, 1'b0, 8, "planted");
    check(best_mv[0].x == 7 && best_mv[0].y == -11, "planted 16x16 vector found");
    check(best_sod[0] <= 3, "planted 16x16 SOD small");

    // CAM: neighbour deviation (|2-(-2)| + |2-6| + 0 + |0-4|) / 2 = 6 -> phi 2
    mv_top = '{x: 6'sd2, y: 6'sd0};
    mv_topright = '{x: -6'sd2, y: 6'sd0};
    mv_left = '{x: 6'sd6, y: 6'sd4};
    @(posedge clk);
    check(activity == 7'd6, $sformatf("CAM activity %0d, expected 6", activity));
    randomize_data(0, 50);
    load(0);
    run(0, 1'b1, 2, "cam phi 2");
    // large deviation -> phi capped at 4 by T4..T8 = 16
    mv_topright = '{x: -6'sd16, y: 6'sd15};
    mv_left = '{x: 6'sd15, y: -6'sd16};
    randomize_data(1, 50);
    load(1);
    run(1, 1'b1, 4, "cam phi 4");
    check(activity == 7'd31, $sformatf("CAM activity %0d, expected 31", activity));
    // deviation 4 -> T2 reached -> phi 2; deviation 3 -> phi 1
    mv_top = '0; mv_topright = '{x: 6'sd4, y: 6'sd0}; mv_left = '{x: 6'sd0, y: 6'sd4};
    run(1, 1'b1, 2, "cam boundary T2");
    mv_top = '0; mv_topright = '{x: 6'sd3, y: 6'sd0}; mv_left = '{x: 6'sd0, y: 6'sd4};
    run(1, 1'b1, 1, "cam below T2");
    mv_top = '0; mv_topright = '0; mv_left = '0;

    // ping-pong: load half 1 while half 0 is searched
    randomize_data(0, 50);
    load(0);
    randomize_data(1, 50);
    pp_sel <= 1'b0; use_cam <= 1'b0; phi_fixed <= 4'd3;
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    load(1);                 // 9*... = 320 writes during the search
    check(busy, "still busy after loading the other half");
    while (!done) @(posedge clk);
    model(0, 3);
    for (int p = 0; p < nnpart; p++)
      check(int'(best_sod[p]) == exp_sod[p] && int'(best_mv[p].x) == exp_x[p] && int'(best_mv[p].y) == exp_y[p],
            $sformatf("ping-pong half 0 partition %0d", p));
    run(1, 1'b0, 5, "ping-pong half 1");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
