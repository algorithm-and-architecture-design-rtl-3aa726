// mbppu: macroblock pre-processing unit of the BBME motion estimator.
//
// Builds the three-level binary pyramid of the current macroblock (MB) from
// an 18x18 block of 8-bit pixels: the 16x16 MB plus a one-pixel border
// (K = 18). The block arrives on a 32-bit bus, four pixels per word in raster
// order (pixel 4w+i in byte i), 81 words. Then:
//  * LV3 (16x16): each MB pixel is binarized with its four neighbours from
//    the 18x18 block (bbme_bin_pe).
//  * LV2 (8x8): the MB is down-sampled by 2 (rounded mean of 2x2 pixels),
//    padded to 10x10 by repeating its edge pixels, and binarized.
//  * LV1 (4x4): the 8x8 down-sampled image is down-sampled again, padded to
//    6x6 and binarized.
// Binarization runs with 9, 5 and 2 PEs for LV3, LV2 and LV1, so every level
// takes two cycles per row; the three levels run side by side in 32 cycles
// after the block is loaded. Down-sampling by the 2x2 mean and edge
// repetition as padding are this design's reading of the source; it also
// holds the whole 18x18 block instead of three rotating row buffers.
//
// Outputs lv3[r][c], lv2[r][c], lv1[r][c] are valid from `done` (one-cycle
// pulse) until the next block has been loaded and its processing starts.
module mbppu #(
  parameter int unsigned K = 18
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [31:0]       in_data,
  output logic              busy,
  output logic              done,
  output logic [15:0][15:0] lv3,
  output logic [7:0][7:0]   lv2,
  output logic [3:0][3:0]   lv1
);

  localparam int unsigned NWORDS = (K * K + 3) / 4;

  logic [7:0] blk [K][K];
  logic [6:0] wcnt;
  logic [4:0] row;       // output row of LV3 (LV2, LV1 use the low rows)
  logic       half;      // which half of the row
  logic       proc;

  // ---------------- load
  always_ff @(posedge clk) begin
    if (in_valid && !proc)
      for (int i = 0; i < 4; i++) begin
        int p;
        p = int'(wcnt) * 4 + i;
        if (p < K * K) blk[p / K][p % K] <= in_data[8*i +: 8];
      end
  end

  // ---------------- down-sampled images
  logic [7:0] g2 [8][8];
  logic [7:0] g1 [4][4];

  always_comb begin
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        logic [9:0] s;
        s = 10'(blk[2*i+1][2*j+1]) + 10'(blk[2*i+1][2*j+2])
          + 10'(blk[2*i+2][2*j+1]) + 10'(blk[2*i+2][2*j+2]) + 10'd2;
        g2[i][j] = 8'(s >> 2);
      end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        logic [9:0] s;
        s = 10'(g2[2*i][2*j]) + 10'(g2[2*i][2*j+1])
          + 10'(g2[2*i+1][2*j]) + 10'(g2[2*i+1][2*j+1]) + 10'd2;
        g1[i][j] = 8'(s >> 2);
      end
  end

  function automatic int clampi(int v, int hi);
    return (v < 0) ? 0 : ((v > hi) ? hi : v);
  endfunction

  // ---------------- binarization PEs
  logic [8:0] b3;
  logic [4:0] b2;
  logic [1:0] b1;

  for (genvar p = 0; p < 9; p++) begin : g_pe3
    int c, r;
    always_comb begin
      r = int'(row) + 1;
      c = clampi(int'(half) * 9 + p, 15) + 1;
    end
    bbme_bin_pe u_pe (
      .pix(blk[r][c]), .up(blk[r-1][c]), .down(blk[r+1][c]),
      .left(blk[r][c-1]), .right(blk[r][c+1]), .bin(b3[p])
    );
  end

  for (genvar p = 0; p < 5; p++) begin : g_pe2
    int c, r;
    always_comb begin
      r = clampi(int'(row), 7);
      c = clampi(int'(half) * 5 + p, 7);
    end
    bbme_bin_pe u_pe (
      .pix(g2[r][c]), .up(g2[clampi(r-1,7)][c]), .down(g2[clampi(r+1,7)][c]),
      .left(g2[r][clampi(c-1,7)]), .right(g2[r][clampi(c+1,7)]), .bin(b2[p])
    );
  end

  for (genvar p = 0; p < 2; p++) begin : g_pe1
    int c, r;
    always_comb begin
      r = clampi(int'(row), 3);
      c = int'(half) * 2 + p;
    end
    bbme_bin_pe u_pe (
      .pix(g1[r][c]), .up(g1[clampi(r-1,3)][c]), .down(g1[clampi(r+1,3)][c]),
      .left(g1[r][clampi(c-1,3)]), .right(g1[r][clampi(c+1,3)]), .bin(b1[p])
    );
  end

  // ---------------- sequencing and result registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt <= '0; row <= '0; half <= 1'b0; proc <= 1'b0; done <= 1'b0;
      lv3 <= '0; lv2 <= '0; lv1 <= '0;
    end else begin
      done <= 1'b0;
      if (!proc) begin
        if (in_valid) begin
          if (32'(wcnt) == NWORDS - 1) begin
            wcnt <= '0;
            proc <= 1'b1;
            row  <= '0;
            half <= 1'b0;
          end else begin
            wcnt <= wcnt + 1'b1;
          end
        end
      end else begin
        for (int p = 0; p < 9; p++)
          if (int'(half) * 9 + p < 16) lv3[row][int'(half) * 9 + p] <= b3[p];
        if (row < 8)
          for (int p = 0; p < 5; p++)
            if (int'(half) * 5 + p < 8) lv2[row[2:0]][int'(half) * 5 + p] <= b2[p];
        if (row < 4)
          for (int p = 0; p < 2; p++) lv1[row[1:0]][int'(half) * 2 + p] <= b1[p];
        half <= ~half;
        if (half) begin
          row <= row + 1'b1;
          if (row == 5'd15) begin
            proc <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  assign busy = proc;

endmodule
