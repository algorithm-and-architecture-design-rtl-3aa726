// tb_bbme_bin_pe: self-checking testbench of the BBME binarization PE.
// Random and boundary cases: bin = pix >= (up + down + left + right + 1) / 4,
// the rounded output of the neighbour-mean kernel. TB_RESULT line.
module tb_bbme_bin_pe;
  logic [7:0] pix, up, down, left, right;
  logic       bin;
  bbme_bin_pe dut (.*);
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
    int ones = 0;
    for (int i = 0; i < 5000; i++) begin
      int f;
      up = 8'($urandom); down = 8'($urandom); left = 8'($urandom); right = 8'($urandom);
      if (i < 256) begin up = 8'(i); down = 8'(i); left = 8'(i); right = 8'(255 - i); end
      f = (int'(up) + int'(down) + int'(left) + int'(right) + 1) / 4;
      pix = (i % 2) ? 8'(f) : ((i % 3 == 0) ? 8'(f - 1) : 8'($urandom));
      #1;
      check(bin == (int'(pix) >= f), $sformatf("pix %0d filt %0d bin %b", pix, f, bin));
      if (bin) ones++;
    end
    check(ones > 100 && ones < 4900, "both outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
