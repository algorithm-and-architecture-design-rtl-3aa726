// tb_vg: self-checking testbench of the vector generator (vg).
// All region/line combinations: location l of line j in region (rx,ry) is
// the vector (-16 + 8rx + l, -16 + 8ry + j). TB_RESULT line.
module tb_vg;
  import ibs_pkg::*;
  logic [1:0] rx, ry;
  logic [2:0] line;
  mv_t [7:0]  mv;
  vg dut (.*);
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

  initial begin
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++)
        for (int j = 0; j < 8; j++) begin
          rx = 2'(a); ry = 2'(b); line = 3'(j);
          #1;
          for (int l = 0; l < 8; l++)
            check(int'(mv[l].x) == -16 + 8 * a + l && int'(mv[l].y) == -16 + 8 * b + j,
                  $sformatf("region (%0d,%0d) line %0d location %0d", a, b, j, l));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
