// cg: clock generator for frequency scaling in the IBS motion estimator.
//
// The working frequency follows the iteration count: f_work = phi/8 *
// f_input. This implementation keeps one clock and produces the working clock
// as an enable: `ce` is high on exactly phi of every 8 input cycles, spread
// evenly by a phase accumulator (acc += phi; a pulse each time it passes 8).
// With phi = 8 the enable is always high. phi outside 1..8 is treated as 8.
// The enable is a function of the accumulator register and phi, so it is
// valid in the same cycle phi is applied.
module cg #(
  parameter int unsigned PHI_MAX = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  phi,
  output logic        ce
);

  localparam int unsigned AW = $clog2(2 * PHI_MAX) + 1;
  logic [AW-1:0] acc;
  logic [AW-1:0] sum;
  logic [3:0]    p;

  always_comb begin
    p   = (phi == 0 || 32'(phi) > PHI_MAX) ? 4'(PHI_MAX) : phi;
    sum = acc + AW'(p);
    ce  = (sum >= AW'(PHI_MAX));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc <= '0;
    else        acc <= ce ? sum - AW'(PHI_MAX) : sum;
  end

endmodule
