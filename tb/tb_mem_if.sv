// tb_mem_if: self-checking testbench of MEM_IF (mem_if).
//
// Drives random region writes (reference and current, valid and
// out-of-range places) and checks one cycle later the bank write enables,
// word addresses and data against the region-to-bank table: reference region
// (bx,by) -> bank (by%3)*3 + bx%3, word 32*pp + 4*z + 2*(by/3) + bx/3;
// current quarter q -> bank q, word 8*pp + z. Watchdog and TB_RESULT line.
module tb_mem_if;
  import ibs_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 wr_valid = 1'b0, wr_is_ref = 1'b0, wr_pp = 1'b0;
  logic [2:0]           wr_bx = '0, wr_by = '0, wr_z = '0;
  region_t              wr_data = '0;
  logic [NBANK_REF-1:0] ref_we;
  logic [5:0]           ref_waddr;
  logic [NBANK_CUR-1:0] cur_we;
  logic [3:0]           cur_waddr;
  region_t              wdata;

  mem_if dut (.*);

  int checks = 0, failures = 0;
  int n_ref = 0, n_cur = 0, n_drop = 0;

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
    int iters = 2000;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < iters; i++) begin
      bit v, isr, pp;
      int bx, by, z;
      logic [63:0] d;
      logic [NBANK_REF-1:0] e_rwe;
      logic [NBANK_CUR-1:0] e_cwe;
      v = ($urandom % 4) != 0; isr = $urandom % 2; pp = $urandom % 2;
      bx = $urandom % 8; by = $urandom % 8; z = $urandom % 8;
      d = {$urandom, $urandom};
      wr_valid <= v; wr_is_ref <= isr; wr_pp <= pp; wr_bx <= 3'(bx); wr_by <= 3'(by);
      wr_z <= 3'(z); wr_data <= d;
      @(posedge clk);
      #1;
      e_rwe = '0; e_cwe = '0;
      if (v && isr && bx < 6 && by < 6) e_rwe[(by % 3) * 3 + bx % 3] = 1'b1;
      if (v && !isr && bx < 4) e_cwe[bx] = 1'b1;
      if (v && isr && !(bx < 6 && by < 6)) n_drop++;
      if (v && !isr && bx >= 4) n_drop++;
      if (e_rwe != 0) n_ref++;
      if (e_cwe != 0) n_cur++;
      check(ref_we == e_rwe && cur_we == e_cwe,
            $sformatf("enables: got %b/%b expected %b/%b (ref %0d bx %0d by %0d)", ref_we, cur_we, e_rwe, e_cwe, isr, bx, by));
      if (e_rwe != 0)
        check(int'(ref_waddr) == 32 * pp + 4 * z + 2 * (by / 3) + bx / 3 && wdata == d, "reference address/data");
      if (e_cwe != 0)
        check(int'(cur_waddr) == 8 * pp + z && wdata == d, "current address/data");
    end
    check(n_ref > 100 && n_cur > 100 && n_drop > 50, "all kinds of write seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
