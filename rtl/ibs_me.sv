// ibs_me: the power adaptive iterative binary search (PA-IBS) motion
// estimation unit for one macroblock at a time, search range +/-16.
//
// The reference window and the current block arrive as binary bit-planes
// (eight per image, one per filter of the binary image preprocessor), as
// 64-bit 8x8 regions through MEM_IF into LM_REF (9 banks) and LM_CUR
// (4 banks). A search runs phi bit-planes (iterations): phi comes from the
// content adaptive mechanism (CAM) or from `phi_fixed` when use_cam is low.
// The clock generator (CG) scales the working clock to phi/8 of the input
// clock, so a search takes about the same input time whatever phi is, and
// the datapath is never idle. Each working cycle the 8x1 line search engine
// compares the current block with 8 reference positions (sixteen 4x4 SODs
// each); the pipelined buffers accumulate these over the phi planes; the
// decision engine keeps the best motion vector of each of the 41 H.264
// partitions. Ping-pong halves of the memories let the next macroblock be
// written while this one is searched.
//
// Timing: 128*phi working cycles of search plus 2 preload and 10 flush
// working cycles, i.e. about 1024 + 96/phi input cycles; `done` pulses when
// best_mv/best_sod are final. Start only when busy is low.
module ibs_me
  import ibs_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // bus writes of 8x8 binary regions
  input  logic              wr_valid,
  input  logic              wr_is_ref,
  input  logic [2:0]        wr_bx,
  input  logic [2:0]        wr_by,
  input  logic [2:0]        wr_z,
  input  logic              wr_pp,
  input  region_t           wr_data,
  // search control
  input  logic              start,
  input  logic              pp_sel,
  input  logic              use_cam,
  input  logic [3:0]        phi_fixed,
  input  mv_t               mv_top,
  input  mv_t               mv_topright,
  input  mv_t               mv_left,
  input  logic [7:0][6:0]   cam_thr,
  output logic              busy,
  output logic              done,
  output logic [3:0]        phi_used,
  output logic [6:0]        activity,
  output logic              ce,
  output logic [11:0]       best_sod [NPART],
  output mv_t               best_mv  [NPART]
);

  // ---------------- memories and their interface
  logic [NBANK_REF-1:0]       ref_we;
  logic [5:0]                 ref_waddr;
  logic [NBANK_CUR-1:0]       cur_we;
  logic [3:0]                 cur_waddr;
  region_t                    wdata;
  logic [NBANK_REF-1:0][5:0]  ref_raddr;
  logic [3:0]                 cur_raddr;
  region_t [NBANK_REF-1:0]    ref_rdata;
  region_t [NBANK_CUR-1:0]    cur_rdata;

  mem_if u_mem_if (
    .clk, .rst_n, .wr_valid, .wr_is_ref, .wr_bx, .wr_by, .wr_z, .wr_pp, .wr_data,
    .ref_we, .ref_waddr, .cur_we, .cur_waddr, .wdata
  );

  // ---------------- control
  logic [3:0] cam_phi, phi_sel;
  logic       dec_clear, rd_req, ld_req;
  logic [1:0] rd_rx, rd_ry, ld_rx, ld_ry;
  logic [2:0] rd_z;
  logic       rd_pp;
  logic       eng_valid, eng_first, eng_last;
  logic [2:0] eng_line, eng_plane;
  logic [3:0] eng_region;

  cam u_cam (
    .mv_top, .mv_topright, .mv_left, .thr(cam_thr), .activity, .phi(cam_phi)
  );

  assign phi_sel = use_cam ? cam_phi : phi_fixed;

  ibs_ctrl u_ctrl (
    .clk, .rst_n, .ce, .start, .phi_in(phi_sel), .pp_in(pp_sel),
    .busy, .done, .phi(phi_used), .dec_clear,
    .rd_req, .rd_rx, .rd_ry, .rd_z, .rd_pp,
    .ld_req, .ld_rx, .ld_ry,
    .eng_valid, .eng_line, .eng_first, .eng_last, .eng_plane, .eng_region
  );

  cg #(.PHI_MAX(PHI_MAX)) u_cg (.clk, .rst_n, .phi(phi_used), .ce);

  ag u_ag (
    .rx(rd_rx), .ry(rd_ry), .z(rd_z), .pp(rd_pp),
    .ref_addr(ref_raddr), .cur_addr(cur_raddr)
  );

  lm_ref u_lm_ref (
    .clk, .rst_n, .we(ref_we), .waddr(ref_waddr), .wdata,
    .re(rd_req & ce), .raddr(ref_raddr), .rdata(ref_rdata)
  );

  lm_cur u_lm_cur (
    .clk, .rst_n, .we(cur_we), .waddr(cur_waddr), .wdata,
    .re(rd_req & ce), .raddr(cur_raddr), .rdata(cur_rdata)
  );

  // ---------------- datapath
  logic [15:0][15:0] reg_cur;
  logic [23:0][23:0] reg_ref;

  region_regs u_regs (
    .clk, .rst_n, .ce, .load(ld_req), .rx(ld_rx), .ry(ld_ry),
    .cur_words(cur_rdata), .ref_words(ref_rdata), .cur(reg_cur), .ref_win(reg_ref)
  );

  localparam int unsigned TAGW = 12;
  logic [TAGW-1:0] eng_tag, ls_tag;
  logic            ls_valid;
  sod16_t [7:0]    ls_sod;

  assign eng_tag = {eng_first, eng_last, eng_plane, eng_region, eng_line};

  line_search #(.TAGW(TAGW)) u_line (
    .clk, .rst_n, .ce, .in_valid(eng_valid), .line(eng_line), .in_tag(eng_tag),
    .cur(reg_cur), .ref_win(reg_ref),
    .out_valid(ls_valid), .out_tag(ls_tag), .out_sod(ls_sod)
  );

  logic            pb_valid;
  logic [6:0]      pb_tag;
  asod16_t [7:0]   pb_sod;

  pipelined_buffers #(.TAGW(7)) u_pb (
    .clk, .rst_n, .ce, .in_valid(ls_valid),
    .in_first(ls_tag[11]), .in_last(ls_tag[10]), .in_plane(ls_tag[9:7]),
    .in_tag(ls_tag[6:0]), .in_sod(ls_sod),
    .out_valid(pb_valid), .out_tag(pb_tag), .out_sod(pb_sod)
  );

  mv_t [7:0] pb_mv;

  vg u_vg (.rx(pb_tag[4:3]), .ry(pb_tag[6:5]), .line(pb_tag[2:0]), .mv(pb_mv));

  decision_engine u_dec (
    .clk, .rst_n, .ce, .clear(dec_clear), .in_valid(pb_valid),
    .in_mv(pb_mv), .in_sod(pb_sod), .best_sod, .best_mv
  );

endmodule
