// tp_regfile: two-port register file, one write port and one read port,
// both on the same clock, as used for every bank of the local search memories
// (16x64 for the current block, 64x64 for the reference window).
//
// Write: wdata is stored at waddr on a rising edge with we high. Read: with
// re high, the word at raddr appears on rdata after the rising edge and is
// held while re is low (registered output, one cycle latency). A read of the
// word being written in the same cycle returns the old contents. The array is
// not reset; the output register is.
module tp_regfile #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 64,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rdata <= '0;
    else if (re) rdata <= mem[raddr];
  end

endmodule
