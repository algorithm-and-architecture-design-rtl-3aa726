// bbme_search: three-level binary pyramid search of the BBME motion
// estimator, with its address generation (AG), control (CTRL), vector cost
// (VG), the two shared SOD units (SOD1, SOD2) and the comparators.
//
// Data: the current MB's binary pyramid (LV1 4x4, LV2 8x8, LV3 16x16, from
// the pre-processor) is latched into C1..C3 at start. Reference windows are
// written row by row beforehand: LV1 12x12 (range -4..+3), LV2 24x24
// (-8..+7), LV3 48x48 (-16..+15), forward into S01..S03 and backward into
// S11..S13; bit c of a row is column c. The top-left of the reference block
// for vector (dx,dy) is window pixel (R+dx, R+dy), R = 4, 8, 16.
//
// Search (one candidate per SOD slot, all in parallel each cycle):
//  * LV1: full search of the 4x4 block, 64 points, sixteen per SOD unit and
//    cycle (the unit's sixteen 4x4 SODs).
//  * LV2, step 1: four candidates at once (four 8x8 SODs): twice MV_LV1, the
//    zero vector, and the top and left predictors halved. Step 2: the +/-1
//    cross around the winner, leaving out the point opposite to the winner's
//    direction; the winner's own SOD is kept rather than fetched again.
//  * LV3: +/-2 full search (25 points) around twice MV_LV2; each point gives
//    the 16x16 SOD and its four 8x8 SODs, so the 16x16 vector and the four
//    8x8 vectors are found together, from the same centre.
// Points outside a level's range are skipped. Each candidate's cost is its
// SOD plus lambda * (|dx - px| + |dy - py|), p being the predictor `pmv`
// scaled to the level; ties keep the earlier candidate.
// P mode (mode_b = 0): forward only; writes to the forward windows are
// mirrored into the backward ones and SOD2 takes every odd candidate, so LV1
// and LV3 take half the cycles. B mode: SOD1 searches forward and SOD2
// backward at the same time, on the same current data.
// Cycles from start to done: P 2+2+13+2 = 19, B 4+2+25+2 = 33.
// Which four LV2 candidates are used, the cost form and the cycle split are
// this design's choices; the source's own flow for LV2 is only outlined.
module bbme_search
  import bbme_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              mode_b,
  // reference window writes
  input  logic              ref_we,
  input  logic              ref_dir,     // 0 forward, 1 backward
  input  lvl_t              ref_lvl,
  input  logic [5:0]        ref_row,
  input  logic [47:0]       ref_data,
  // current pyramid
  input  logic [3:0][3:0]   cur_lv1,
  input  logic [7:0][7:0]   cur_lv2,
  input  logic [15:0][15:0] cur_lv3,
  // search control
  input  logic              start,
  input  bmv_t              pred_top,
  input  bmv_t              pred_left,
  input  bmv_t              pmv,
  input  logic [3:0]        lambda,
  output logic              busy,
  output logic              done,
  output bmv_t              mv_lv1 [2],
  output bmv_t              mv_lv2 [2],
  output bmv_t              mv16   [2],
  output logic [11:0]       cost16 [2],
  output bmv_t              mv8    [2][4],
  output logic [11:0]       cost8  [2][4]
);

  // ---------------- on-chip memories (register arrays)
  logic [3:0][3:0]   c1;
  logic [7:0][7:0]   c2;
  logic [15:0][15:0] c3;
  logic [11:0][11:0] s1 [2];
  logic [23:0][23:0] s2 [2];
  logic [47:0][47:0] s3 [2];

  always_ff @(posedge clk) begin
    if (ref_we) begin
      for (int d = 0; d < 2; d++)
        if (32'(ref_dir) == d || (!mode_b && !ref_dir)) begin
          case (ref_lvl)
            LVL1: if (ref_row < 12) s1[d][ref_row] <= ref_data[11:0];
            LVL2: if (ref_row < 24) s2[d][ref_row] <= ref_data[23:0];
            default: if (ref_row < 48) s3[d][ref_row] <= ref_data;
          endcase
        end
    end
  end

  // ---------------- control
  typedef enum logic [2:0] {S_IDLE, S_LV1, S_LV2A, S_LV2B, S_LV3, S_DONE} st_t;
  st_t        st;
  logic [4:0] step;
  logic       b_mode;
  bmv_t       ptop, pleft, ppred;
  logic [3:0] lam;

  // LV2 step-1 winner kept per direction
  bmv_t        c2_mv   [2];
  logic [11:0] c2_cost [2];

  function automatic logic [5:0] absv(int v);
    return 6'((v < 0) ? -v : v);
  endfunction

  function automatic bmvc_t clampc(int v, int lo, int hi);
    return bmvc_t'((v < lo) ? lo : ((v > hi) ? hi : v));
  endfunction

  // candidate description per unit and slot
  logic        cv   [2][16];
  bmv_t        cmv  [2][16];
  logic [255:0] vcur [2];
  logic [255:0] vref [2];
  logic [15:0][4:0] s4 [2];
  logic [3:0][6:0]  s8 [2];
  logic [8:0]       s16 [2];

  always_comb begin
    for (int u = 0; u < 2; u++) begin
      logic d;
      d = b_mode && (u == 1);
      vcur[u] = '0;
      vref[u] = '0;
      for (int i = 0; i < 16; i++) begin
        cv[u][i]    = 1'b0;
        cmv[u][i]   = '0;
      end
      case (st)
        S_LV1: begin
          int batch;
          batch = b_mode ? int'(step) : 2 * int'(step) + u;
          for (int i = 0; i < 16; i++) begin
            int n, dx, dy;
            n  = batch * 16 + i;
            dx = n % 8 - 4;
            dy = n / 8 - 4;
            cv[u][i]    = (n < 64) && (b_mode ? step < 4 : step < 2);
            cmv[u][i].x = bmvc_t'(dx);
            cmv[u][i].y = bmvc_t'(dy);
            for (int r = 0; r < 4; r++)
              for (int c = 0; c < 4; c++) begin
                vcur[u][i*16 + r*4 + c] = c1[r][c];
                vref[u][i*16 + r*4 + c] = cv[u][i] ? s1[d][4 + dy + r][4 + dx + c] : c1[r][c];
              end
          end
        end
        S_LV2A, S_LV2B: begin
          for (int j = 0; j < 4; j++) begin
            int dx, dy;
            logic ok;
            if (st == S_LV2A) begin
              case (j)
                0: begin dx = 2 * int'(mv_lv1[d].x); dy = 2 * int'(mv_lv1[d].y); end
                1: begin dx = 0; dy = 0; end
                2: begin dx = int'(clampc(int'(ptop.x) >>> 1, -8, 7));  dy = int'(clampc(int'(ptop.y) >>> 1, -8, 7)); end
                default: begin dx = int'(clampc(int'(pleft.x) >>> 1, -8, 7)); dy = int'(clampc(int'(pleft.y) >>> 1, -8, 7)); end
              endcase
              ok = 1'b1;
            end else begin
              int bx, by, ox, oy;
              bx = int'(c2_mv[d].x);
              by = int'(c2_mv[d].y);
              case (j)
                0: begin dx = bx + 1; dy = by; end
                1: begin dx = bx - 1; dy = by; end
                2: begin dx = bx; dy = by + 1; end
                default: begin dx = bx; dy = by - 1; end
              endcase
              // the point opposite to the winner's direction is left out
              if (bx == 0 && by == 0) begin
                ox = 0; oy = 0;
              end else if (absv(bx) >= absv(by)) begin
                ox = (bx > 0) ? bx - 1 : bx + 1; oy = by;
              end else begin
                ox = bx; oy = (by > 0) ? by - 1 : by + 1;
              end
              ok = !((bx != 0 || by != 0) && dx == ox && dy == oy);
            end
            ok = ok && dx >= -8 && dx <= 7 && dy >= -8 && dy <= 7 && (b_mode || u == 0);
            cv[u][j]    = ok;
            cmv[u][j].x = bmvc_t'(dx);
            cmv[u][j].y = bmvc_t'(dy);
            for (int r = 0; r < 8; r++)
              for (int c = 0; c < 8; c++) begin
                vcur[u][j*64 + r*8 + c] = c2[r][c];
                vref[u][j*64 + r*8 + c] = ok ? s2[d][8 + dy + r][8 + dx + c] : c2[r][c];
              end
          end
        end
        S_LV3: begin
          int n, dx, dy;
          logic ok;
          n  = b_mode ? int'(step) : 2 * int'(step) + u;
          dx = 2 * int'(mv_lv2[d].x) + n % 5 - 2;
          dy = 2 * int'(mv_lv2[d].y) + n / 5 - 2;
          ok = (n < 25) && dx >= -16 && dx <= 15 && dy >= -16 && dy <= 15;
          cv[u][0]    = ok;
          cmv[u][0].x = bmvc_t'(dx);
          cmv[u][0].y = bmvc_t'(dy);
          for (int r = 0; r < 16; r++)
            for (int c = 0; c < 16; c++) begin
              int g;
              g = 4 * ((r / 8) * 2 + c / 8) + ((r % 8) / 4) * 2 + (c % 8) / 4;
              vcur[u][g*16 + (r%4)*4 + c%4] = c3[r][c];
              vref[u][g*16 + (r%4)*4 + c%4] = ok ? s3[d][16 + dy + r][16 + dx + c] : c3[r][c];
            end
        end
        default: ;
      endcase
    end
  end

  for (genvar u = 0; u < 2; u++) begin : g_sod
    bbme_sod_unit u_sod (.cur(vcur[u]), .ref_data(vref[u]), .s4(s4[u]), .s8(s8[u]), .s16(s16[u]));
  end

  // motion vector cost from the vector generator
  function automatic logic [11:0] mvcost(bmv_t mv, bmv_t p, logic [3:0] l, int shift);
    int px, py;
    px = int'(p.x) >>> shift;
    py = int'(p.y) >>> shift;
    return 12'(int'(l) * (int'(absv(int'(mv.x) - px)) + int'(absv(int'(mv.y) - py))));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; step <= '0; done <= 1'b0; b_mode <= 1'b0;
      ptop <= '0; pleft <= '0; ppred <= '0; lam <= '0;
      c1 <= '0; c2 <= '0; c3 <= '0;
      for (int d = 0; d < 2; d++) begin
        mv_lv1[d] <= '0; mv_lv2[d] <= '0; mv16[d] <= '0; cost16[d] <= '1;
        c2_mv[d] <= '0; c2_cost[d] <= '1;
        for (int q = 0; q < 4; q++) begin mv8[d][q] <= '0; cost8[d][q] <= '1; end
      end
    end else begin
      done <= 1'b0;
      case (st)
        S_IDLE: if (start) begin
          c1 <= cur_lv1; c2 <= cur_lv2; c3 <= cur_lv3;
          b_mode <= mode_b; ptop <= pred_top; pleft <= pred_left; ppred <= pmv; lam <= lambda;
          for (int d = 0; d < 2; d++) begin
            cost16[d] <= '1; c2_cost[d] <= '1;
            for (int q = 0; q < 4; q++) cost8[d][q] <= '1;
          end
          step <= '0;
          st   <= S_LV1;
        end
        S_LV1: begin
          // running minimum per direction; first-cycle compares against "infinite"
          for (int d = 0; d < 2; d++) begin
            logic [11:0] bc;
            bmv_t        bm;
            bc = (step == 0) ? '1 : c2_cost[d];
            bm = mv_lv1[d];
            for (int u = 0; u < 2; u++)
              if ((b_mode ? u : 0) == d)
                for (int i = 0; i < 16; i++)
                  if (cv[u][i]) begin
                    logic [11:0] cst;
                    cst = 12'(s4[u][i]) + mvcost(cmv[u][i], ppred, lam, 2);
                    if (cst < bc) begin bc = cst; bm = cmv[u][i]; end
                  end
            c2_cost[d] <= bc;   // reused as the LV1 running minimum
            mv_lv1[d]  <= bm;
          end
          step <= step + 1'b1;
          if (b_mode ? step == 5'd3 : step == 5'd1) begin
            step <= '0;
            st   <= S_LV2A;
          end
        end
        S_LV2A, S_LV2B: begin
          for (int d = 0; d < 2; d++) begin
            logic [11:0] bc;
            bmv_t        bm;
            bc = (st == S_LV2A) ? 12'hfff : c2_cost[d];
            bm = c2_mv[d];
            for (int u = 0; u < 2; u++)
              if ((b_mode ? u : 0) == d)
                for (int j = 0; j < 4; j++)
                  if (cv[u][j]) begin
                    logic [11:0] cst;
                    cst = 12'(s8[u][j]) + mvcost(cmv[u][j], ppred, lam, 1);
                    if (cst < bc) begin bc = cst; bm = cmv[u][j]; end
                  end
            c2_cost[d] <= bc;
            c2_mv[d]   <= bm;
            if (st == S_LV2B) mv_lv2[d] <= bm;
          end
          st <= (st == S_LV2A) ? S_LV2B : S_LV3;
          step <= '0;
        end
        S_LV3: begin
          for (int d = 0; d < 2; d++) begin
            logic [11:0] bc;
            bmv_t        bm;
            logic [11:0] bc8 [4];
            bmv_t        bm8 [4];
            bc = cost16[d];
            bm = mv16[d];
            for (int q = 0; q < 4; q++) begin bc8[q] = cost8[d][q]; bm8[q] = mv8[d][q]; end
            for (int u = 0; u < 2; u++)
              if ((b_mode ? u : 0) == d && cv[u][0]) begin
                logic [11:0] mc, cst;
                mc  = mvcost(cmv[u][0], ppred, lam, 0);
                cst = 12'(s16[u]) + mc;
                if (cst < bc) begin bc = cst; bm = cmv[u][0]; end
                for (int q = 0; q < 4; q++) begin
                  cst = 12'(s8[u][q]) + mc;
                  if (cst < bc8[q]) begin bc8[q] = cst; bm8[q] = cmv[u][0]; end
                end
              end
            cost16[d] <= bc;
            mv16[d]   <= bm;
            for (int q = 0; q < 4; q++) begin cost8[d][q] <= bc8[q]; mv8[d][q] <= bm8[q]; end
          end
          step <= step + 1'b1;
          if (b_mode ? step == 5'd24 : step == 5'd12) st <= S_DONE;
        end
        S_DONE: begin
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);

endmodule
