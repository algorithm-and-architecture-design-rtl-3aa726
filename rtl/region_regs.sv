// region_regs: REG_CUR and REG_REF, the register arrays that feed the 8x1
// line search engine of the IBS motion estimator.
//
// On load (with ce) REG_CUR takes the four current-block quarters from the
// LM_CUR banks and forms the 16x16 binary block; REG_REF takes the nine words
// of the LM_REF banks and places them as the 3x3 regions of a 24x24 binary
// area. Which bank holds which of the nine regions depends on the search
// region (rx,ry): region (i,j) of the area (column i, row j) is window region
// (rx+i, ry+j) and comes from bank ((ry+j)%3)*3 + (rx+i)%3. The arrays hold
// their contents for the eight lines of the region search.
module region_regs
  import ibs_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         ce,
  input  logic                         load,
  input  logic [1:0]                   rx,
  input  logic [1:0]                   ry,
  input  region_t [NBANK_CUR-1:0]      cur_words,
  input  region_t [NBANK_REF-1:0]      ref_words,
  output logic [15:0][15:0]            cur,
  output logic [23:0][23:0]            ref_win
);

  logic [15:0][15:0] cur_n;
  logic [23:0][23:0] ref_n;

  always_comb begin
    for (int q = 0; q < 4; q++)
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++)
          cur_n[(q / 2) * 8 + r][(q % 2) * 8 + c] = cur_words[q][r * 8 + c];
    for (int j = 0; j < 3; j++)
      for (int i = 0; i < 3; i++) begin
        int b;
        b = ((int'(ry) + j) % 3) * 3 + (int'(rx) + i) % 3;
        for (int r = 0; r < 8; r++)
          for (int c = 0; c < 8; c++)
            ref_n[j * 8 + r][i * 8 + c] = ref_words[b][r * 8 + c];
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur     <= '0;
      ref_win <= '0;
    end else if (ce && load) begin
      cur     <= cur_n;
      ref_win <= ref_n;
    end
  end

endmodule
