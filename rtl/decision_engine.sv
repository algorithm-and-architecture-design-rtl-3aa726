// decision_engine: final motion-vector decision of the IBS motion estimator.
//
// For every final line from the pipelined buffers (eight search locations,
// each with sixteen accumulated 4x4 SODs) it forms the SODs of all 41 H.264
// partitions by summing 4x4 SODs and keeps, per partition, the smallest SOD
// seen since `clear` and the motion vector where it occurred. Ties keep the
// earlier location (search order: regions in raster order, lines top to
// bottom, locations left to right), which is this design's choice.
//
// Partition numbering: 0 = 16x16; 1,2 = 16x8 top/bottom; 3,4 = 8x16
// left/right; 5..8 = 8x8 quarters q (raster); 9+2q+h = 8x4 half h of quarter
// q (top/bottom); 17+2q+h = 4x8 half h of quarter q (left/right);
// 25+b = 4x4 block b (raster, b = 4*row4 + col4).
// Updates happen on enabled cycles (ce) with in_valid; one cycle latency.
module decision_engine
  import ibs_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   ce,
  input  logic                   clear,
  input  logic                   in_valid,
  input  mv_t [7:0]              in_mv,
  input  asod16_t [7:0]          in_sod,
  output logic [11:0]            best_sod [NPART],
  output mv_t                    best_mv  [NPART]
);

  function automatic logic [15:0] part_mask(int p);
    logic [15:0] m;
    m = '0;
    for (int b = 0; b < 16; b++) begin
      int r4, c4, q, h;
      r4 = b / 4;
      c4 = b % 4;
      q  = (r4 / 2) * 2 + (c4 / 2);
      if (p == 0) m[b] = 1'b1;
      else if (p < 3)  m[b] = ((r4 / 2) == p - 1);
      else if (p < 5)  m[b] = ((c4 / 2) == p - 3);
      else if (p < 9)  m[b] = (q == p - 5);
      else if (p < 17) begin
        h = (p - 9) % 2;
        m[b] = (q == (p - 9) / 2) && ((r4 % 2) == h);
      end else if (p < 25) begin
        h = (p - 17) % 2;
        m[b] = (q == (p - 17) / 2) && ((c4 % 2) == h);
      end else m[b] = (b == p - 25);
    end
    return m;
  endfunction

  logic [11:0] psum [8][NPART];

  for (genvar p = 0; p < NPART; p++) begin : g_part
    localparam logic [15:0] M = part_mask(p);
    for (genvar l = 0; l < 8; l++) begin : g_loc
      always_comb begin
        psum[l][p] = '0;
        for (int b = 0; b < 16; b++)
          if (M[b]) psum[l][p] = psum[l][p] + 12'(in_sod[l][b]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPART; p++) begin
        best_sod[p] <= '1;
        best_mv[p]  <= '0;
      end
    end else if (clear) begin
      for (int p = 0; p < NPART; p++) begin
        best_sod[p] <= '1;
        best_mv[p]  <= '0;
      end
    end else if (ce && in_valid) begin
      for (int p = 0; p < NPART; p++) begin
        logic [11:0] bs;
        mv_t         bm;
        bs = best_sod[p];
        bm = best_mv[p];
        for (int l = 0; l < 8; l++)
          if (psum[l][p] < bs) begin
            bs = psum[l][p];
            bm = in_mv[l];
          end
        best_sod[p] <= bs;
        best_mv[p]  <= bm;
      end
    end
  end

endmodule
