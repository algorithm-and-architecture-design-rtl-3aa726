// vg: vector generator of the IBS motion estimator.
//
// Turns the indices of a search result into motion vectors: search region
// (rx,ry), line j of the region and location l of the 8x1 line give the
// displacement dx = -16 + 8*rx + l, dy = -16 + 8*ry + j (search range
// -16..+15). All eight locations of a line are produced at once.
// Combinational.
module vg
  import ibs_pkg::*;
(
  input  logic [1:0]   rx,
  input  logic [1:0]   ry,
  input  logic [2:0]   line,
  output mv_t [7:0]    mv
);

  always_comb begin
    for (int l = 0; l < 8; l++) begin
      mv[l].x = mvc_t'(-16 + 8 * int'(rx) + l);
      mv[l].y = mvc_t'(-16 + 8 * int'(ry) + int'(line));
    end
  end

endmodule
