// mem_if: MEM_IF, the bus side of the IBS motion estimator's local memories.
//
// The bus delivers one 64-bit 8x8 binary region per cycle together with its
// place: for the reference window the region coordinates (bx,by) in the 6x6
// grid of the +/-16 window, for the current block the quarter q (in bx[1:0]),
// plus the bit-plane z and the ping-pong half pp. MEM_IF registers the word
// and turns its place into a bank write enable and word address, following
// the region-to-bank table of the design (bank (by%3)*3 + bx%3, word
// 32*pp + 4*z + 2*(by/3) + bx/3 for LM_REF; bank q, word 8*pp + z for
// LM_CUR). One cycle latency; out-of-range coordinates are dropped.
module mem_if
  import ibs_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   wr_valid,
  input  logic                   wr_is_ref,   // 1: LM_REF, 0: LM_CUR
  input  logic [2:0]             wr_bx,
  input  logic [2:0]             wr_by,
  input  logic [2:0]             wr_z,
  input  logic                   wr_pp,
  input  region_t                wr_data,
  output logic [NBANK_REF-1:0]   ref_we,
  output logic [5:0]             ref_waddr,
  output logic [NBANK_CUR-1:0]   cur_we,
  output logic [3:0]             cur_waddr,
  output region_t                wdata
);

  logic [3:0] bank;
  logic [1:0] yidx;
  logic       ok;

  always_comb begin
    bank = 4'((32'(wr_by) % 3) * 3 + (32'(wr_bx) % 3));
    yidx = 2'((32'(wr_by) / 3) * 2 + (32'(wr_bx) / 3));
    ok   = wr_is_ref ? (32'(wr_bx) < NWIN && 32'(wr_by) < NWIN) : (32'(wr_bx) < NBANK_CUR);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_we    <= '0;
      cur_we    <= '0;
      ref_waddr <= '0;
      cur_waddr <= '0;
      wdata     <= '0;
    end else begin
      ref_we    <= '0;
      cur_we    <= '0;
      if (wr_valid && ok) begin
        if (wr_is_ref) ref_we[bank]      <= 1'b1;
        else           cur_we[wr_bx[1:0]] <= 1'b1;
      end
      ref_waddr <= {wr_pp, wr_z, yidx};
      cur_waddr <= {wr_pp, wr_z};
      wdata     <= wr_data;
    end
  end

endmodule
