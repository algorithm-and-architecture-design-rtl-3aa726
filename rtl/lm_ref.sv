// lm_ref: LM_REF, the reference search-window memory of the IBS motion
// estimator: nine banks S0..S8 of 64 words x 64 bits (two-port register
// files), 36 kbit in all.
//
// Each word is one 8x8 binary region of the 48x48 search window (+/-16).
// Window region (bx,by) of bit-plane z sits in bank (by%3)*3 + bx%3 at word
// 32*pp + 4*z + 2*(by/3) + bx/3, pp being the ping-pong half (see ibs_pkg).
// Any 3x3 group of neighbouring regions therefore hits every bank exactly
// once, so the 24x24 reference area of one search region is read in a single
// cycle. Writes come from the memory interface, one bank at a time; reads use
// one address per bank and have one cycle latency (see tp_regfile).
module lm_ref
  import ibs_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [NBANK_REF-1:0]        we,
  input  logic [5:0]                  waddr,
  input  region_t                     wdata,
  input  logic                        re,
  input  logic [NBANK_REF-1:0][5:0]   raddr,
  output region_t [NBANK_REF-1:0]     rdata
);

  for (genvar b = 0; b < NBANK_REF; b++) begin : g_bank
    tp_regfile #(.DEPTH(REF_DEPTH), .WIDTH(64)) u_bank (
      .clk, .rst_n,
      .we(we[b]), .waddr(waddr), .wdata(wdata),
      .re(re), .raddr(raddr[b]), .rdata(rdata[b])
    );
  end

endmodule
