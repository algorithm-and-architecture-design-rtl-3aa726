// tb_bbme_sod_unit: self-checking testbench of the BBME SOD unit.
// Random 256-bit current/reference vectors with random bit densities; the
// sixteen 4x4, four 8x8 and the 16x16 SODs are compared with popcounts of
// the XOR of the matching 16-bit groups. TB_RESULT line.
module tb_bbme_sod_unit;
  logic [255:0]     cur, ref_data;
  logic [15:0][4:0] s4;
  logic [3:0][6:0]  s8;
  logic [8:0]       s16;
  bbme_sod_unit dut (.*);
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

  int n16 = 16, n256 = 256;
  initial begin
    for (int i = 0; i < 3000; i++) begin
      int e4 [16], e8 [4], e16, dens;
      dens = $urandom % 101;
      for (int b = 0; b < n256; b++) begin
        cur[b] = 1'($urandom % 2);
        ref_data[b] = (($urandom % 100) < dens) ? !cur[b] : cur[b];
      end
      #1;
      e16 = 0;
      for (int q = 0; q < 4; q++) e8[q] = 0;
      for (int g = 0; g < n16; g++) begin
        e4[g] = 0;
        for (int k = 0; k < n16; k++) e4[g] += int'(cur[16*g+k] != ref_data[16*g+k]);
        e8[g / 4] += e4[g];
        e16 += e4[g];
        check(int'(s4[g]) == e4[g], $sformatf("4x4 %0d: %0d expected %0d", g, s4[g], e4[g]));
      end
      for (int q = 0; q < 4; q++) check(int'(s8[q]) == e8[q], $sformatf("8x8 %0d", q));
      check(int'(s16) == e16, $sformatf("16x16: %0d expected %0d", s16, e16));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
