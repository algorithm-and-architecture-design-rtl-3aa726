// tb_tp_regfile: self-checking testbench of the two-port register file.
// Random writes and reads against a model memory: one-cycle registered
// read, rdata held while re is low, old data when the word read is written
// in the same cycle. TB_RESULT line.
module tb_tp_regfile;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;
  logic        we = 1'b0, re = 1'b0;
  logic [5:0]  waddr = '0, raddr = '0;
  logic [63:0] wdata = '0;
  logic [63:0] rdata;
  tp_regfile dut (.*);
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

  logic [63:0] m [64];
  initial begin
    logic [63:0] exp_r;
    int holds = 0;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    check(rdata == '0, "read data reset");
    for (int a = 0; a < 64; a++) begin
      m[a] = {$urandom, $urandom};
      we <= 1'b1; waddr <= 6'(a); wdata <= m[a];
      @(posedge clk);
    end
    we <= 1'b0;
    exp_r = '0;
    for (int i = 0; i < 3000; i++) begin
      bit w, r;
      int wa, ra;
      logic [63:0] d;
      w = 1'($urandom % 2); r = 1'($urandom % 2); wa = $urandom % 64; ra = (i % 5 == 0) ? wa : $urandom % 64;
      d = {$urandom, $urandom};
      we <= w; waddr <= 6'(wa); wdata <= d; re <= r; raddr <= 6'(ra);
      @(posedge clk);
      if (r) exp_r = m[ra];
      else holds++;
      if (w) m[wa] = d;
      #1;
      check(rdata == exp_r, $sformatf("read %0d", i));
    end
    check(holds > 100, "held reads seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
