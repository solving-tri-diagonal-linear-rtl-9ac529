// sram_sol_writer - writes solution values into the output SRAM.
//
// The solver delivers the solution of each system in reverse order
// (x(N) first, x(1) last), tagged with its 0-based row index.  The writer puts
// solution j of system m at flat position p = m*N + j from the start of the
// output area, so the host finds the solutions in natural order.  LANES
// solution words share one output memory word: p selects word base_addr +
// p / LANES and lane p % LANES, written with a per-lane write enable.
//
// Interface: start (one-cycle pulse, latches base_addr, n_rows, n_sys and
// clears done); in_valid / in_idx / in_last / in_x from the solver (no
// back-pressure: the SRAM takes a write every cycle); sram_wr_en /
// sram_wr_addr / sram_wr_data / sram_wr_be; done rises in the cycle after the
// write of the last solution of the n_sys-th system and stays high until the
// next start.
//
// Timing: one solution per cycle, writes are registered (one cycle after
// in_valid).  Writing the output to a dedicated output SRAM follows the
// document; the address layout and the lane packing are this design's choices.
module sram_sol_writer #(
  parameter int unsigned ADDR_W = tdma_pkg::SRAM_ADDR_W,
  parameter int unsigned FP_W   = tdma_pkg::FP_W,
  parameter int unsigned LANES  = tdma_pkg::OUT_LANES,
  parameter int unsigned IDX_W  = 16,
  parameter int unsigned N_W    = 16,
  parameter int unsigned M_W    = 32,
  localparam int unsigned LANE_W = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [ADDR_W-1:0]     base_addr,
  input  logic [N_W-1:0]        n_rows,
  input  logic [M_W-1:0]        n_sys,
  output logic                  done,
  // solution stream
  input  logic                  in_valid,
  input  logic                  in_last,
  input  logic [IDX_W-1:0]      in_idx,
  input  logic [FP_W-1:0]       in_x,
  // output SRAM write port
  output logic                  sram_wr_en,
  output logic [ADDR_W-1:0]     sram_wr_addr,
  output logic [LANES*FP_W-1:0] sram_wr_data,
  output logic [LANES-1:0]      sram_wr_be
);

  localparam int unsigned P_W = ADDR_W + LANE_W;   // flat solution position

  logic [ADDR_W-1:0] base_reg;
  logic [N_W-1:0]    n_reg;
  logic [M_W-1:0]    sys_done, m_reg;
  logic [P_W-1:0]    sys_base;                       // m*N
  logic [P_W-1:0]    pos;
  logic              last_written;

  assign pos = sys_base + P_W'(in_idx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base_reg     <= '0;
      n_reg        <= '0;
      m_reg        <= '0;
      sys_done     <= '0;
      sys_base     <= '0;
      done         <= 1'b0;
      last_written <= 1'b0;
      sram_wr_en   <= 1'b0;
      sram_wr_addr <= '0;
      sram_wr_data <= '0;
      sram_wr_be   <= '0;
    end else begin
      sram_wr_en   <= in_valid;
      sram_wr_addr <= base_reg + ADDR_W'(pos >> LANE_W);
      sram_wr_data <= {LANES{in_x}};
      sram_wr_be   <= in_valid ? LANES'(1) << pos[LANE_W-1:0] : '0;

      if (start) begin
        base_reg     <= base_addr;
        n_reg        <= n_rows;
        m_reg        <= n_sys;
        sys_done     <= '0;
        sys_base     <= '0;
        done         <= 1'b0;
        last_written <= 1'b0;
      end else begin
        if (in_valid && in_last) begin
          sys_done <= sys_done + 1'b1;
          sys_base <= sys_base + P_W'(n_reg);
          if (sys_done + 1'b1 == m_reg) last_written <= 1'b1;
        end
        if (last_written) done <= 1'b1;
      end
    end
  end

endmodule
