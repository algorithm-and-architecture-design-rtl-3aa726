// tb_cam: self-checking testbench of the content adaptive mechanism (cam).
// Random neighbour vectors and random non-decreasing thresholds (and the
// default table 0, 4, 8, 16...); activity and phi are compared with a model
// of the deviation measure and the threshold table, including equal
// thresholds that cap phi. Every phi 1..8 must occur. TB_RESULT line.
module tb_cam;
  import ibs_pkg::*;
  mv_t             mv_top, mv_topright, mv_left;
  logic [7:0][6:0] thr;
  logic [6:0]      activity;
  logic [3:0]      phi;
  cam dut (.*);
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100_000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction
  initial begin
    int seen [9];
    for (int k = 0; k < 9; k++) seen[k] = 0;
    for (int i = 0; i < 4000; i++) begin
      int a, e, t [8];
      mv_top.x = 6'($urandom); mv_top.y = 6'($urandom);
      mv_topright.x = 6'($urandom); mv_topright.y = 6'($urandom);
      mv_left.x = 6'($urandom); mv_left.y = 6'($urandom);
      if (i % 3 == 0) begin
        mv_topright = mv_top;
        mv_left.x = mv_top.x + 6'($urandom % 5);
        mv_left.y = mv_top.y;
      end
      t[0] = 0;
      for (int k = 1; k < 8; k++)
        t[k] = (i % 4 == 0) ? (k == 1 ? 4 : (k == 2 ? 8 : 16)) : t[k-1] + int'($urandom % 6);
      for (int k = 0; k < 8; k++) thr[k] = 7'(t[k]);
      #1;
      a = (iabs(int'(mv_top.x) - int'(mv_topright.x)) + iabs(int'(mv_top.x) - int'(mv_left.x))
         + iabs(int'(mv_top.y) - int'(mv_topright.y)) + iabs(int'(mv_top.y) - int'(mv_left.y))) / 2;
      e = 1;
      for (int k = 2; k <= 8; k++) if (t[k-1] <= a && t[k-1] > t[k-2]) e = k;
      check(int'(activity) == a, $sformatf("activity %0d expected %0d", activity, a));
      check(int'(phi) == e, $sformatf("phi %0d expected %0d (act %0d)", phi, e, a));
      seen[e]++;
    end
    for (int k = 1; k <= 8; k++) check(seen[k] > 0, $sformatf("phi %0d was produced", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
