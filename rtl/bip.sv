// bip: binary image preprocessor (BIP) of the power adaptive motion
// estimator, working on whole frames.
//
// A W x H frame of 8-bit pixels streams in raster order (valid/ready, one
// pixel per cycle). For every pixel the eight filters of bip_filters produce
// eight bit-planes; these leave in raster order, one pixel per cycle, to be
// written to the frame buffer as the binary reference for the next frame and
// as the current binary frame for the search.
//
// Four row buffers (a ring, row r in slot r%4) hold the rows y-2..y+1 that
// the 4x4 neighbourhood of row y needs. Pixel (x,y) is produced once pixel
// (x+1,y+1) has arrived (or the frame has ended). Outside the frame the
// nearest edge pixel is used (replication); the source does not say how the
// border is treated, so this is this design's choice. Input is held off
// (in_ready low) while its next row would overwrite a row still needed, which
// costs about two cycles per row, and during the final two output rows.
// Output is registered; out_x/out_y give the pixel position.
module bip #(
  parameter int unsigned W = 352,
  parameter int unsigned H = 288,
  localparam int unsigned XW = $clog2(W + 1),
  localparam int unsigned YW = $clog2(H + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [7:0]    in_pix,
  output logic          out_valid,
  output logic [7:0]    out_planes,
  output logic [XW-1:0] out_x,
  output logic [YW-1:0] out_y
);

  logic [7:0] rowbuf [4][W];

  logic [XW-1:0] ix, ox;
  logic [YW-1:0] iy, oy;
  logic          in_done;

  // ---------------- input side
  always_comb begin
    in_ready = !in_done && (32'(iy) < 32'(oy) + 2);
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) rowbuf[iy[1:0]][ix] <= in_pix;
  end

  // ---------------- output side
  logic                 avail;
  logic [3:0][3:0][7:0] win;
  logic [7:0]           planes;

  always_comb begin
    int ny, nx;
    ny = (32'(oy) + 1 > H - 1) ? H - 1 : 32'(oy) + 1;
    nx = (32'(ox) + 1 > W - 1) ? W - 1 : 32'(ox) + 1;
    avail = in_done || (32'(iy) > ny) || (32'(iy) == ny && 32'(ix) > nx);
    for (int r = 0; r < 4; r++) begin
      int rr;
      rr = 32'(oy) - 2 + r;
      if (rr < 0) rr = 0;
      if (rr > H - 1) rr = H - 1;
      for (int c = 0; c < 4; c++) begin
        int cc;
        cc = 32'(ox) - 2 + c;
        if (cc < 0) cc = 0;
        if (cc > W - 1) cc = W - 1;
        win[r][c] = rowbuf[rr % 4][cc];
      end
    end
  end

  bip_filters u_filt (.win, .planes);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ix <= '0; iy <= '0; in_done <= 1'b0;
      ox <= '0; oy <= '0;
      out_valid <= 1'b0; out_planes <= '0; out_x <= '0; out_y <= '0;
    end else begin
      if (in_valid && in_ready) begin
        if (32'(ix) == W - 1) begin
          ix <= '0;
          iy <= iy + 1'b1;
          if (32'(iy) == H - 1) in_done <= 1'b1;
        end else begin
          ix <= ix + 1'b1;
        end
      end
      out_valid <= 1'b0;
      if (avail) begin
        out_valid  <= 1'b1;
        out_planes <= planes;
        out_x      <= ox;
        out_y      <= oy;
        if (32'(ox) == W - 1) begin
          ox <= '0;
          if (32'(oy) == H - 1) begin
            // frame complete: start over for the next frame
            oy <= '0; ix <= '0; iy <= '0; in_done <= 1'b0;
          end else begin
            oy <= oy + 1'b1;
          end
        end else begin
          ox <= ox + 1'b1;
        end
      end
    end
  end

endmodule
