// lm_cur: LM_CUR, the current-block memory of the IBS motion estimator: four
// banks C0..C3 of 16 words x 64 bits (two-port register files), 4 kbit.
//
// Bank q holds quarter q (raster order: top-left, top-right, bottom-left,
// bottom-right) of the 16x16 current macroblock as an 8x8 binary region; word
// 8*pp + z is bit-plane z of ping-pong half pp. One read returns all four
// quarters, i.e. the whole 16x16 binary block of one bit-plane.
module lm_cur
  import ibs_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [NBANK_CUR-1:0]        we,
  input  logic [3:0]                  waddr,
  input  region_t                     wdata,
  input  logic                        re,
  input  logic [3:0]                  raddr,
  output region_t [NBANK_CUR-1:0]     rdata
);

  for (genvar b = 0; b < NBANK_CUR; b++) begin : g_bank
    tp_regfile #(.DEPTH(CUR_DEPTH), .WIDTH(64)) u_bank (
      .clk, .rst_n,
      .we(we[b]), .waddr(waddr), .wdata(wdata),
      .re(re), .raddr(raddr), .rdata(rdata[b])
    );
  end

endmodule
