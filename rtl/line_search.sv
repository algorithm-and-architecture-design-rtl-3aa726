// line_search: the 8x1 line search engine of the IBS motion estimator.
//
// One 8x8 search region is searched one line at a time. For line j (0..7) the
// engine compares the 16x16 current block with eight reference blocks taken
// from the 24x24 reference register array: location l (0..7) uses rows
// j..j+15 and columns l..l+15. Each comparison is a 256-bit XOR, counted as
// sixteen 4x4 sums of difference (SOD) so that every H.264 partition size can
// be built later. All eight locations are done in one cycle, as in the
// design this follows; the result is registered (one cycle latency) and the
// engine advances only when the working-clock enable `ce` is high.
//
// Interface: cur[r][c] and ref_win[r][c] are binary pixels, row r, column c.
// line is sampled with in_valid; out_sod[l][i] is 4x4 block i (raster order,
// i = 4*row4 + col4) of location l, valid with out_valid one enabled cycle
// later. in_tag is carried along unchanged (the controller's bookkeeping).
module line_search
  import ibs_pkg::*;
#(
  parameter int unsigned TAGW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ce,
  input  logic                 in_valid,
  input  logic [2:0]           line,
  input  logic [TAGW-1:0]      in_tag,
  input  logic [15:0][15:0]    cur,
  input  logic [23:0][23:0]    ref_win,
  output logic                 out_valid,
  output logic [TAGW-1:0]      out_tag,
  output sod16_t [7:0]         out_sod
);

  sod16_t [7:0] sod_c;

  always_comb begin
    for (int l = 0; l < 8; l++) begin
      for (int b = 0; b < 16; b++) begin
        logic [4:0] s;
        s = '0;
        for (int r = 0; r < 4; r++) begin
          for (int c = 0; c < 4; c++) begin
            int rr, cc;
            rr = (b / 4) * 4 + r;
            cc = (b % 4) * 4 + c;
            s = s + 5'(cur[rr][cc] ^ ref_win[int'(line) + rr][l + cc]);
          end
        end
        sod_c[l][b] = s;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= '0;
      out_sod   <= '0;
    end else if (ce) begin
      out_valid <= in_valid;
      out_tag   <= in_tag;
      if (in_valid) out_sod <= sod_c;
    end
  end

endmodule
