// ibs_ctrl: CTRL, the sequencer of the IBS motion estimator.
//
// A search is started (on the input clock) with `start`; phi (1..8, the
// target iterations) and the ping-pong half to read are latched then. The
// controller hands phi to the clock generator and from then on advances only
// on working-clock cycles (ce). It walks the 16 search regions in raster
// order; for each region it runs phi bit-planes z = 0..phi-1, and for each
// plane the 8 lines of the 8x8 region, one line per cycle, so the line engine
// is busy every working cycle: 128*phi working cycles per macroblock.
//
// Memory reads are issued one cycle ahead: two preload cycles fetch the first
// plane of region 0 into REG_CUR/REG_REF; after that the read of the next
// (region, plane) is issued at line 6 and the register arrays are loaded at
// line 7, while the engine still works on the current plane. After the last
// line a 10-cycle flush lets the line engine (1 cycle), the pipelined buffers
// (8) and the decision engine (1) finish; then `done` pulses for one input
// clock and the results are valid until the next start.
//
// The tag sent with each line tells the pipelined buffers whether it is the
// first or last plane and identifies the region and line for the vector
// generator.
module ibs_ctrl
  import ibs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  logic        start,
  input  logic [3:0]  phi_in,
  input  logic        pp_in,
  output logic        busy,
  output logic        done,
  output logic [3:0]  phi,
  output logic        dec_clear,
  // memory read request (acted on when ce is high)
  output logic        rd_req,
  output logic [1:0]  rd_rx,
  output logic [1:0]  rd_ry,
  output logic [2:0]  rd_z,
  output logic        rd_pp,
  // register array load (acted on when ce is high)
  output logic        ld_req,
  output logic [1:0]  ld_rx,
  output logic [1:0]  ld_ry,
  // line engine input
  output logic        eng_valid,
  output logic [2:0]  eng_line,
  output logic        eng_first,
  output logic        eng_last,
  output logic [2:0]  eng_plane,
  output logic [3:0]  eng_region
);

  typedef enum logic [2:0] {S_IDLE, S_PRE0, S_PRE1, S_RUN, S_FLUSH} state_t;
  state_t state;

  logic [3:0] region;
  logic [2:0] z;
  logic [2:0] line;
  logic [3:0] flush_cnt;
  logic [3:0] nx_region;
  logic [2:0] nx_z;
  logic       last_plane, last_group;

  always_comb begin
    last_plane = ({1'b0, z} == phi - 4'd1);
    last_group = last_plane && (region == 4'd15);
    nx_region  = last_plane ? region + 4'd1 : region;
    nx_z       = last_plane ? 3'd0 : z + 3'd1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      phi       <= 4'd8;
      rd_pp     <= 1'b0;
      region    <= '0;
      z         <= '0;
      line      <= '0;
      flush_cnt <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          phi    <= (phi_in == 0 || phi_in > 4'd8) ? 4'd8 : phi_in;
          rd_pp  <= pp_in;
          region <= '0;
          z      <= '0;
          line   <= '0;
          state  <= S_PRE0;
        end
        S_PRE0: if (ce) state <= S_PRE1;
        S_PRE1: if (ce) state <= S_RUN;
        S_RUN: if (ce) begin
          line <= line + 3'd1;
          if (line == 3'd7) begin
            if (last_group) begin
              state     <= S_FLUSH;
              flush_cnt <= '0;
            end else begin
              region <= nx_region;
              z      <= nx_z;
            end
          end
        end
        S_FLUSH: if (ce) begin
          flush_cnt <= flush_cnt + 4'd1;
          if (flush_cnt == 4'd9) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy      = (state != S_IDLE);
    dec_clear = (state == S_IDLE) && start;
    rd_req    = (state == S_PRE0) || (state == S_RUN && line == 3'd6 && !last_group);
    ld_req    = (state == S_PRE1) || (state == S_RUN && line == 3'd7 && !last_group);
    // the group fetched/loaded: the first one before the run, the next one during it
    if (state == S_RUN) begin
      rd_rx = nx_region[1:0];
      rd_ry = nx_region[3:2];
      rd_z  = nx_z;
    end else begin
      rd_rx = '0;
      rd_ry = '0;
      rd_z  = '0;
    end
    ld_rx      = rd_rx;
    ld_ry      = rd_ry;
    eng_valid  = (state == S_RUN);
    eng_line   = line;
    eng_first  = (z == 3'd0);
    eng_last   = last_plane;
    eng_plane  = z;
    eng_region = region;
  end

endmodule
