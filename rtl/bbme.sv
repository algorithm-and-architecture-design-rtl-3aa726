// bbme: bi-directional binary motion estimator for one macroblock (MB).
//
// The MB pre-processing unit (mbppu) takes the 18x18 luma block around the
// current MB (81 words of four pixels), filters and binarizes it into the
// three-level binary pyramid, and pulses `done`. That pulse starts the
// search engine (bbme_search) on the new pyramid, so loading the next MB can
// overlap the search of this one. Reference windows are written through the
// ref_* port at any time the search is idle.
// Outputs per direction (0 forward, 1 backward): the 16x16 vector and cost,
// the four 8x8 vectors and costs, and the LV1/LV2 intermediate vectors;
// valid from `done` until the next search ends.
// In P mode only direction 0 is meaningful.
module bbme
  import bbme_pkg::*;
#(
  parameter int unsigned K = 18
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        mode_b,
  // current MB pixels
  input  logic        pix_valid,
  input  logic [31:0] pix_data,
  // reference windows
  input  logic        ref_we,
  input  logic        ref_dir,
  input  lvl_t        ref_lvl,
  input  logic [5:0]  ref_row,
  input  logic [47:0] ref_data,
  // predictors
  input  bmv_t        pred_top,
  input  bmv_t        pred_left,
  input  bmv_t        pmv,
  input  logic [3:0]  lambda,
  output logic        pre_busy,
  output logic        busy,
  output logic        done,
  output bmv_t        mv_lv1 [2],
  output bmv_t        mv_lv2 [2],
  output bmv_t        mv16   [2],
  output logic [11:0] cost16 [2],
  output bmv_t        mv8    [2][4],
  output logic [11:0] cost8  [2][4]
);

  logic              pp_done;
  logic [15:0][15:0] lv3;
  logic [7:0][7:0]   lv2;
  logic [3:0][3:0]   lv1;

  mbppu #(.K(K)) u_mbppu (
    .clk, .rst_n, .in_valid(pix_valid), .in_data(pix_data),
    .busy(pre_busy), .done(pp_done), .lv3, .lv2, .lv1
  );

  bbme_search u_search (
    .clk, .rst_n, .mode_b,
    .ref_we, .ref_dir, .ref_lvl, .ref_row, .ref_data,
    .cur_lv1(lv1), .cur_lv2(lv2), .cur_lv3(lv3),
    .start(pp_done), .pred_top, .pred_left, .pmv, .lambda,
    .busy, .done, .mv_lv1, .mv_lv2, .mv16, .cost16, .mv8, .cost8
  );

  // the pre-processor is slower than the search, so a new pyramid never
  // arrives while the previous one is still being searched
  // (armed one cycle after reset, so the check never samples reset itself)
  logic armed;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) armed <= 1'b0;
    else        armed <= 1'b1;

  a_no_overrun: assert property (@(posedge clk) (armed && pp_done) |-> !busy);

endmodule
