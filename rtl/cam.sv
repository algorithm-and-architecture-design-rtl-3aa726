// cam: content adaptive mechanism of the IBS motion estimator.
//
// Chooses, per macroblock, how many bit-plane iterations (phi, 1..8) the
// search will run. The activity measure is the deviation of the neighbouring
// motion vectors: act = (|top.x - topright.x| + |top.x - left.x| +
// |top.y - topright.y| + |top.y - left.y|) / 2, rounded down. phi is the
// largest k (1..8) with T[k] <= act, where a threshold equal to the one below
// it is skipped, so thresholds can be set equal to cap phi (e.g. T1=0, T2=4,
// T3=8, T4..T8=16 gives phi 1..4). If act is below T[1], phi = 1.
// The thresholds are inputs so that software can program them.
// Combinational.
module cam
  import ibs_pkg::*;
(
  input  mv_t              mv_top,
  input  mv_t              mv_topright,
  input  mv_t              mv_left,
  input  logic [7:0][6:0]  thr,          // thr[k-1] = T_k, k = 1..8
  output logic [6:0]       activity,
  output logic [3:0]       phi
);

  function automatic logic [5:0] absdiff(mvc_t a, mvc_t b);
    logic signed [6:0] d;
    d = 7'(a) - 7'(b);
    return 6'(d < 0 ? -d : d);
  endfunction

  always_comb begin
    logic [7:0] s;
    s = 8'(absdiff(mv_top.x, mv_topright.x)) + 8'(absdiff(mv_top.x, mv_left.x))
      + 8'(absdiff(mv_top.y, mv_topright.y)) + 8'(absdiff(mv_top.y, mv_left.y));
    activity = 7'(s >> 1);
    phi = 4'd1;
    for (int k = 2; k <= 8; k++)
      if (thr[k-1] <= activity && thr[k-1] > thr[k-2]) phi = 4'(k);
  end

endmodule
