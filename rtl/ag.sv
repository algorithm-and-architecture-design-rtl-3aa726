// ag: address generator of the IBS motion estimator.
//
// For search region (rx,ry) (0..3 each, +/-16 range), bit-plane z and
// ping-pong half pp it gives the word to read from each of the nine LM_REF
// banks and from LM_CUR. The search region needs window regions rx..rx+2 by
// ry..ry+2; bank b = 3*br + bc holds the one whose row by has by%3 = br and
// whose column bx has bx%3 = bc, at word 32*pp + 4*z + 2*(by/3) + bx/3.
// Purely combinational.
module ag
  import ibs_pkg::*;
(
  input  logic [1:0]                 rx,
  input  logic [1:0]                 ry,
  input  logic [2:0]                 z,
  input  logic                       pp,
  output logic [NBANK_REF-1:0][5:0]  ref_addr,
  output logic [3:0]                 cur_addr
);

  always_comb begin
    for (int b = 0; b < NBANK_REF; b++) begin
      int br, bc, bx, by;
      br = b / 3;
      bc = b % 3;
      by = int'(ry) + ((br - int'(ry) % 3 + 3) % 3);
      bx = int'(rx) + ((bc - int'(rx) % 3 + 3) % 3);
      ref_addr[b] = {pp, z, 2'((by / 3) * 2 + (bx / 3))};
    end
    cur_addr = {pp, z};
  end

endmodule
