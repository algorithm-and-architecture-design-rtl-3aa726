// pipelined_buffers: PB0..PB7, the SOD accumulation pipeline of the IBS
// motion estimator.
//
// Each enabled cycle the line search engine delivers the sixteen 4x4 SODs of
// eight search locations (one line of an 8x8 search region, one bit-plane).
// The eight buffers form an 8-stage ring: a line enters PB0 and leaves PB7
// eight enabled cycles later, exactly when the same line of the next
// bit-plane arrives. For the first bit-plane of a region the weighted SOD is
// stored as is; for later planes it is added to the sum leaving PB7. The sum
// of the last plane is released from PB7 to the decision engine, so with phi
// planes line j of a region is final 8*phi + j + 1 cycles after the region's
// first line (the timing described for this buffer). Each buffer holds
// 8 locations x 16 SODs x 8 bits = 1024 bits.
//
// The per-plane weight w_k of the accumulated SOD is a parameter array;
// its values are this design's choice (all 1), since the source gives none.
// The 8-bit sums saturate, which never happens with unit weights (8 x 16).
//
// Interface: in_first / in_last mark the first and last plane of the line;
// in_plane selects the weight; in_tag rides along to out_tag.
module pipelined_buffers
  import ibs_pkg::*;
#(
  parameter int unsigned TAGW = 16,
  parameter logic [7:0][3:0] WEIGHTS = {8{4'd1}}
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce,
  input  logic             in_valid,
  input  logic             in_first,
  input  logic             in_last,
  input  logic [2:0]       in_plane,
  input  logic [TAGW-1:0]  in_tag,
  input  sod16_t [7:0]     in_sod,
  output logic             out_valid,
  output logic [TAGW-1:0]  out_tag,
  output asod16_t [7:0]    out_sod
);

  typedef struct packed {
    logic              valid;
    logic              last;
    logic [TAGW-1:0]   tag;
    asod16_t [7:0]     sod;
  } pb_t;

  pb_t pb [8];
  pb_t nxt;

  function automatic asod_t sat_add(asod_t a, logic [9:0] b);
    logic [10:0] s;
    s = 11'(a) + 11'(b);
    return (s > 11'((1 << SODW) - 1)) ? asod_t'((1 << SODW) - 1) : asod_t'(s);
  endfunction

  always_comb begin
    nxt.valid = in_valid;
    nxt.last  = in_last;
    nxt.tag   = in_tag;
    for (int l = 0; l < 8; l++) begin
      for (int b = 0; b < 16; b++) begin
        logic [9:0] w;
        w = 10'(in_sod[l][b]) * 10'(WEIGHTS[in_plane]);
        nxt.sod[l][b] = sat_add(in_first ? '0 : pb[7].sod[l][b], w);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) pb[i] <= '0;
    end else if (ce) begin
      pb[0] <= in_valid ? nxt : '0;
      for (int i = 1; i < 8; i++) pb[i] <= pb[i-1];
    end
  end

  assign out_valid = pb[7].valid & pb[7].last;
  assign out_tag   = pb[7].tag;
  assign out_sod   = pb[7].sod;

  // An accumulating line must meet its own earlier plane at PB7.
  // (armed one cycle after reset, so the check never samples reset itself)
  logic armed;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) armed <= 1'b0;
    else        armed <= 1'b1;

  a_in_step: assert property (@(posedge clk)
    (armed && ce && in_valid && !in_first) |-> (pb[7].valid && !pb[7].last && pb[7].tag == in_tag));

endmodule
