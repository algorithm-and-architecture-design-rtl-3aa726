// tb_ag: self-checking testbench of the address generator (ag).
// For every search region, plane and ping-pong half: each of the nine LM_REF
// banks must be addressed at the word holding the one region of the 3x3
// group (rx..rx+2, ry..ry+2) that maps to it, and LM_CUR at 8*pp + z.
// TB_RESULT line.
module tb_ag;
  import ibs_pkg::*;
  logic [1:0]                rx, ry;
  logic [2:0]                z;
  logic                      pp;
  logic [NBANK_REF-1:0][5:0] ref_addr;
  logic [3:0]                cur_addr;
  ag dut (.*);
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
        for (int zz = 0; zz < 8; zz++)
          for (int h = 0; h < 2; h++) begin
            rx = 2'(a); ry = 2'(b); z = 3'(zz); pp = h[0];
            #1;
            for (int j = 0; j < 3; j++)
              for (int i = 0; i < 3; i++) begin
                int bx, by, bank;
                bx = a + i; by = b + j;
                bank = (by % 3) * 3 + bx % 3;
                check(int'(ref_addr[bank]) == 32 * h + 4 * zz + 2 * (by / 3) + bx / 3,
                      $sformatf("region (%0d,%0d) z %0d pp %0d bank %0d", a, b, zz, h, bank));
              end
            check(int'(cur_addr) == 8 * h + zz, "current block address");
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
