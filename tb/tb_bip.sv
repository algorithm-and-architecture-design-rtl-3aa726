// tb_bip: self-checking testbench of the binary image preprocessor (bip).
//
// Streams random frames (W x H set small here to keep the run short) with
// random gaps on the input, and compares every output pixel's eight
// bit-planes and position against a model that applies the eight kernels
// with edge replication. Two frames are sent back to back to check that the
// block restarts cleanly. Watchdog and TB_RESULT line.
module tb_bip;

  localparam int unsigned W = 21;
  localparam int unsigned H = 13;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       in_valid = 1'b0;
  logic       in_ready;
  logic [7:0] in_pix = '0;
  logic       out_valid;
  logic [7:0] out_planes;
  logic [$clog2(W + 1)-1:0] out_x;
  logic [$clog2(H + 1)-1:0] out_y;

  bip #(.W(W), .H(H)) dut (.*);

  int checks = 0, failures = 0;
  int nw = W, nh = H, n4 = 4, n8 = 8;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #2_000_000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  int img [2][H][W];
  int K [8][4][4];

  function automatic int px(int f, int y, int x);
    y = (y < 0) ? 0 : (y >= nh ? nh - 1 : y);
    x = (x < 0) ? 0 : (x >= nw ? nw - 1 : x);
    return img[f][y][x];
  endfunction

  function automatic logic [7:0] model(int f, int y, int x);
    logic [7:0] b;
    for (int k = 0; k < n8; k++) begin
      int acc;
      acc = 0;
      for (int r = 0; r < n4; r++)
        for (int c = 0; c < n4; c++) acc += K[k][r][c] * px(f, y - 2 + r, x - 2 + c);
      b[k] = (acc >= 0);
    end
    return b;
  endfunction

  task automatic setk(int k, int r, int a, int b, int c, int d);
    K[k][r][0] = a; K[k][r][1] = b; K[k][r][2] = c; K[k][r][3] = d;
  endtask

  int nout = 0, stalls = 0;
  int ones [8];
  int exp_x = 0, exp_y = 0, exp_f = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [7:0] e;
      e = model(exp_f, exp_y, exp_x);
      check(int'(out_x) == exp_x && int'(out_y) == exp_y,
            $sformatf("position (%0d,%0d), expected (%0d,%0d)", out_x, out_y, exp_x, exp_y));
      check(out_planes == e, $sformatf("planes at (%0d,%0d): %b expected %b", exp_x, exp_y, out_planes, e));
      for (int k = 0; k < n8; k++) if (out_planes[k]) ones[k]++;
      nout++;
      exp_x++;
      if (exp_x == nw) begin
        exp_x = 0; exp_y++;
        if (exp_y == nh) begin exp_y = 0; exp_f++; end
      end
    end
  end

  initial begin
    for (int k = 0; k < 8; k++) begin ones[k] = 0; for (int r = 0; r < 4; r++) setk(k, r, 0, 0, 0, 0); end
    setk(0, 1, 0, 1, 1, 1);  setk(0, 2, 0, 1, -8, 1);  setk(0, 3, 0, 1, 1, 1);
    setk(1, 1, 0, 1, 0, -1); setk(1, 2, 0, 2, 0, -2);  setk(1, 3, 0, 1, 0, -1);
    setk(2, 1, 0, 1, 2, 1);  setk(2, 3, 0, -1, -2, -1);
    setk(3, 1, 0, 1, 1, -2); setk(3, 2, 0, 1, -2, 1);  setk(3, 3, 0, -2, 1, 1);
    setk(4, 1, 0, -2, 1, 1); setk(4, 2, 0, 1, -2, 1);  setk(4, 3, 0, 1, 1, -2);
    setk(5, 2, 0, 1, -3, 1); setk(5, 3, 0, 0, 1, 0);
    setk(6, 2, -1, 3, -3, 1);
    K[7][0][2] = -1; K[7][1][2] = 3; K[7][2][2] = -3; K[7][3][2] = 1;
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < nh; y++)
        for (int x = 0; x < nw; x++)
          // smooth ramps plus noise, so every filter sees both signs
          img[f][y][x] = (f == 0) ? ((x * 9 + y * 5 + int'($urandom % 40)) % 256) : int'($urandom % 256);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < nw * nh; i++) begin
        while ($urandom % 4 == 0) begin
          in_valid <= 1'b0;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        in_pix   <= 8'(img[f][i / nw][i % nw]);
        // the pixel is taken at the first rising edge with in_ready high
        @(negedge clk);
        while (!in_ready) begin
          stalls++;
          @(negedge clk);
        end
        @(posedge clk);
      end
    in_valid <= 1'b0;
    repeat (4 * W + 20) @(posedge clk);
    check(nout == 2 * W * H, $sformatf("%0d pixels out, expected %0d", nout, 2 * W * H));
    check(stalls > 0, "input was held off at least once");
    for (int k = 0; k < 8; k++)
      check(ones[k] > 0 && ones[k] < nout, $sformatf("plane %0d has both values", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
