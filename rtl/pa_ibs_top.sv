// pa_ibs_top: top level holding the two motion estimators described here,
// side by side, each with its own ports:
//  * the power-aware integral bit-plane search engine (PA-IBS): binary image
//    pre-processor `bip` (pixels in, eight bit-planes out) and the search
//    engine `ibs_me` (8x8 binary regions in, best vectors of 41 partitions
//    out). The host moves the bit-planes from bip through frame memory into
//    ibs_me, as in an encoder with an external frame buffer, so the two are
//    not wired to each other here.
//  * the bi-directional binary motion estimator `bbme` (pixels and binary
//    reference windows in, 16x16 and 8x8 vectors out).
// Ports are prefixed bip_, ibs_ and bbme_. All three share clk and rst_n.
module pa_ibs_top
  import ibs_pkg::*;
  import bbme_pkg::*;
#(
  parameter int unsigned W = 352,
  parameter int unsigned H = 288,
  parameter int unsigned K = 18,
  localparam int unsigned XW = $clog2(W + 1),
  localparam int unsigned YW = $clog2(H + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // ---- binary image pre-processor
  input  logic          bip_in_valid,
  output logic          bip_in_ready,
  input  logic [7:0]    bip_in_pix,
  output logic          bip_out_valid,
  output logic [7:0]    bip_out_planes,
  output logic [XW-1:0] bip_out_x,
  output logic [YW-1:0] bip_out_y,
  // ---- integral bit-plane search engine
  input  logic          ibs_wr_valid,
  input  logic          ibs_wr_is_ref,
  input  logic [2:0]    ibs_wr_bx,
  input  logic [2:0]    ibs_wr_by,
  input  logic [2:0]    ibs_wr_z,
  input  logic          ibs_wr_pp,
  input  region_t       ibs_wr_data,
  input  logic          ibs_start,
  input  logic          ibs_pp_sel,
  input  logic          ibs_use_cam,
  input  logic [3:0]    ibs_phi_fixed,
  input  mv_t           ibs_mv_top,
  input  mv_t           ibs_mv_topright,
  input  mv_t           ibs_mv_left,
  input  logic [7:0][6:0] ibs_cam_thr,
  output logic          ibs_busy,
  output logic          ibs_done,
  output logic [3:0]    ibs_phi_used,
  output logic [6:0]    ibs_activity,
  output logic          ibs_ce,
  output logic [11:0]   ibs_best_sod [NPART],
  output mv_t           ibs_best_mv  [NPART],
  // ---- bi-directional binary motion estimator
  input  logic          bbme_mode_b,
  input  logic          bbme_pix_valid,
  input  logic [31:0]   bbme_pix_data,
  input  logic          bbme_ref_we,
  input  logic          bbme_ref_dir,
  input  lvl_t          bbme_ref_lvl,
  input  logic [5:0]    bbme_ref_row,
  input  logic [47:0]   bbme_ref_data,
  input  bmv_t          bbme_pred_top,
  input  bmv_t          bbme_pred_left,
  input  bmv_t          bbme_pmv,
  input  logic [3:0]    bbme_lambda,
  output logic          bbme_pre_busy,
  output logic          bbme_busy,
  output logic          bbme_done,
  output bmv_t          bbme_mv_lv1 [2],
  output bmv_t          bbme_mv_lv2 [2],
  output bmv_t          bbme_mv16   [2],
  output logic [11:0]   bbme_cost16 [2],
  output bmv_t          bbme_mv8    [2][4],
  output logic [11:0]   bbme_cost8  [2][4]
);

  bip #(.W(W), .H(H)) u_bip (
    .clk, .rst_n,
    .in_valid(bip_in_valid), .in_ready(bip_in_ready), .in_pix(bip_in_pix),
    .out_valid(bip_out_valid), .out_planes(bip_out_planes),
    .out_x(bip_out_x), .out_y(bip_out_y)
  );

  ibs_me u_ibs (
    .clk, .rst_n,
    .wr_valid(ibs_wr_valid), .wr_is_ref(ibs_wr_is_ref), .wr_bx(ibs_wr_bx),
    .wr_by(ibs_wr_by), .wr_z(ibs_wr_z), .wr_pp(ibs_wr_pp), .wr_data(ibs_wr_data),
    .start(ibs_start), .pp_sel(ibs_pp_sel), .use_cam(ibs_use_cam),
    .phi_fixed(ibs_phi_fixed), .mv_top(ibs_mv_top), .mv_topright(ibs_mv_topright),
    .mv_left(ibs_mv_left), .cam_thr(ibs_cam_thr),
    .busy(ibs_busy), .done(ibs_done), .phi_used(ibs_phi_used),
    .activity(ibs_activity), .ce(ibs_ce),
    .best_sod(ibs_best_sod), .best_mv(ibs_best_mv)
  );

  bbme #(.K(K)) u_bbme (
    .clk, .rst_n, .mode_b(bbme_mode_b),
    .pix_valid(bbme_pix_valid), .pix_data(bbme_pix_data),
    .ref_we(bbme_ref_we), .ref_dir(bbme_ref_dir), .ref_lvl(bbme_ref_lvl),
    .ref_row(bbme_ref_row), .ref_data(bbme_ref_data),
    .pred_top(bbme_pred_top), .pred_left(bbme_pred_left), .pmv(bbme_pmv),
    .lambda(bbme_lambda),
    .pre_busy(bbme_pre_busy), .busy(bbme_busy), .done(bbme_done),
    .mv_lv1(bbme_mv_lv1), .mv_lv2(bbme_mv_lv2), .mv16(bbme_mv16),
    .cost16(bbme_cost16), .mv8(bbme_mv8), .cost8(bbme_cost8)
  );

endmodule
