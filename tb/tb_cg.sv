// tb_cg: self-checking testbench of the clock generator (cg).
// For every phi (and the out-of-range values 0 and 9..15, taken as 8) it
// counts the enable pulses over 160 input cycles, expects exactly 20*phi,
// and checks that windows of 8 cycles never differ by more than one pulse
// (even spacing). TB_RESULT line.
module tb_cg;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;
  logic [3:0] phi = 4'd8;
  logic       ce;
  cg dut (.*);
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1_000_000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 16; p++) begin
      int cnt, e, win, wmin, wmax;
      phi <= 4'(p);
      repeat (17) @(posedge clk);
      e = (p == 0 || p > 8) ? 8 : p;
      cnt = 0; wmin = 99; wmax = 0;
      for (int w = 0; w < 20; w++) begin
        win = 0;
        for (int c = 0; c < 8; c++) begin
          @(negedge clk);
          if (ce) begin cnt++; win++; end
        end
        if (win < wmin) wmin = win;
        if (win > wmax) wmax = win;
      end
      check(cnt == 20 * e, $sformatf("phi %0d: %0d enables in 160 cycles, expected %0d", p, cnt, 20 * e));
      check(wmax - wmin <= 1, $sformatf("phi %0d: uneven enables", p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
