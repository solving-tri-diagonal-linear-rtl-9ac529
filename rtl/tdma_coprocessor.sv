// tdma_coprocessor - FPGA co-processor that solves many independent
// tri-diagonal linear systems with the Thomas algorithm.
//
// The host puts M systems of N rows each into the input SRAM (one 128-bit
// word per row: {L, D, U, x}), sets the sizes and base addresses and pulses
// start.  The row reader streams the rows at one per clock into the solver
// pipeline (factorisation stage, two register banks, backward-substitution
// stage); the solution writer stores the solutions, in natural order, in the
// output SRAM.  done rises when the last solution is written and stays high
// until the next start.  Because the backward pass of system m overlaps the
// forward pass of system m+1, a run takes N*(M+1) cycles plus a fixed
// latency of RD_LAT + 4 cycles, which run_cycles reports.
//
// Interface:
//   control (from the host interface): start, n_rows, n_sys, in_base,
//     out_base; busy, done, err (start refused: N = 0, N > MAX_N or M = 0),
//     run_cycles (cycles from start to done of the last run).
//   input SRAM read port and output SRAM write port (see sram_row_reader,
//     sram_sol_writer).
//   stall_count: cycles in which a row waited for a free bank;
//   overlap_count: cycles in which a row entered the forward stage while the
//     backward stage worked on an earlier system ((M-1)*N for a gap-free run);
//     overflow: a system was longer than a bank (cannot happen when start
//     accepts only N <= MAX_N).
//
// The datapath and the double-banked pipeline follow the document; the
// control registers, sizes, address layout and status outputs are this
// design's choices (the document's host interface is the vendor's).
module tdma_coprocessor
  import tdma_pkg::*;
#(
  parameter int unsigned EXP_W   = tdma_pkg::FP_EXP_W,
  parameter int unsigned MAN_W   = tdma_pkg::FP_MAN_W,
  parameter int unsigned GS_ITER = tdma_pkg::FP_GS_ITER,
  parameter int unsigned MAX_N   = tdma_pkg::BANK_MAX_N,
  parameter int unsigned ADDR_W  = tdma_pkg::SRAM_ADDR_W,
  parameter int unsigned RD_LAT  = tdma_pkg::SRAM_RD_LAT,
  parameter int unsigned LANES   = tdma_pkg::OUT_LANES,
  localparam int unsigned W      = 1 + EXP_W + MAN_W,
  localparam int unsigned N_W    = 16,
  localparam int unsigned M_W    = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // run control
  input  logic                  start,
  input  logic [N_W-1:0]        n_rows,
  input  logic [M_W-1:0]        n_sys,
  input  logic [ADDR_W-1:0]     in_base,
  input  logic [ADDR_W-1:0]     out_base,
  output logic                  busy,
  output logic                  done,
  output logic                  err,
  output logic [31:0]           run_cycles,
  output logic [31:0]           stall_count,
  output logic [31:0]           overlap_count,
  output logic                  overflow,
  output logic                  demux_sel,
  output logic                  mux_sel,
  // input SRAM read port
  output logic                  in_sram_rd_en,
  output logic [ADDR_W-1:0]     in_sram_rd_addr,
  input  logic [4*W-1:0]        in_sram_rd_data,
  // output SRAM write port
  output logic                  out_sram_wr_en,
  output logic [ADDR_W-1:0]     out_sram_wr_addr,
  output logic [LANES*W-1:0]    out_sram_wr_data,
  output logic [LANES-1:0]      out_sram_wr_be
);

  localparam int unsigned IDX_W = (MAX_N > 1) ? $clog2(MAX_N) : 1;

  ctl_state_e state;
  logic       go, rd_busy, wr_done;

  logic         row_valid, row_ready, row_eos;
  logic [4*W-1:0] row;
  logic             sol_valid, sol_last, solver_stall;
  logic [IDX_W-1:0] sol_idx;
  logic [W-1:0]     sol_x;
  logic             bwd_active;

  assign go = start && (state != CTL_RUN) && (n_rows != '0) &&
              (32'(n_rows) <= MAX_N) && (n_sys != '0);

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= CTL_IDLE;
      err         <= 1'b0;
      run_cycles  <= '0;
      stall_count <= '0;
      overlap_count <= '0;
    end else begin
      unique case (state)
        CTL_IDLE, CTL_DONE: begin
          if (go) begin
            state       <= CTL_RUN;
            err         <= 1'b0;
            run_cycles  <= 32'd1;
            stall_count <= '0;
            overlap_count <= '0;
          end else if (start) begin
            err <= 1'b1;
          end
        end
        CTL_RUN: begin
          if (wr_done) state <= CTL_DONE;
          else         run_cycles <= run_cycles + 1'b1;
          if (solver_stall) stall_count <= stall_count + 1'b1;
          if (row_valid && row_ready && bwd_active) overlap_count <= overlap_count + 1'b1;
        end
        default: state <= CTL_IDLE;
      endcase
    end
  end

  assign busy = (state == CTL_RUN);
  assign done = (state == CTL_DONE);

  // ---------------------------------------------------------------- datapath
  sram_row_reader #(.ADDR_W(ADDR_W), .DATA_W(4*W), .RD_LAT(RD_LAT), .N_W(N_W), .M_W(M_W)) u_reader (
    .clk, .rst_n,
    .start(go), .base_addr(in_base), .n_rows, .n_sys, .busy(rd_busy),
    .sram_rd_en(in_sram_rd_en), .sram_rd_addr(in_sram_rd_addr), .sram_rd_data(in_sram_rd_data),
    .out_valid(row_valid), .out_ready(row_ready), .out_eos(row_eos), .out_data(row)
  );

  tdma_solver #(.EXP_W(EXP_W), .MAN_W(MAN_W), .GS_ITER(GS_ITER), .MAX_N(MAX_N)) u_solver (
    .clk, .rst_n,
    .in_valid(row_valid), .in_ready(row_ready), .in_eos(row_eos),
    .in_l(row[3*W +: W]), .in_d(row[2*W +: W]), .in_u(row[W +: W]), .in_x(row[0 +: W]),
    .out_valid(sol_valid), .out_last(sol_last), .out_idx(sol_idx), .out_x(sol_x),
    .stall(solver_stall), .bwd_active, .wr_sel(demux_sel), .rd_sel(mux_sel), .overflow
  );

  sram_sol_writer #(.ADDR_W(ADDR_W), .FP_W(W), .LANES(LANES), .IDX_W(IDX_W),
                    .N_W(N_W), .M_W(M_W)) u_writer (
    .clk, .rst_n,
    .start(go), .base_addr(out_base), .n_rows, .n_sys, .done(wr_done),
    .in_valid(sol_valid), .in_last(sol_last), .in_idx(sol_idx), .in_x(sol_x),
    .sram_wr_en(out_sram_wr_en), .sram_wr_addr(out_sram_wr_addr),
    .sram_wr_data(out_sram_wr_data), .sram_wr_be(out_sram_wr_be)
  );

  // the reader must have delivered every row before the run can finish
  assert property (@(posedge clk) disable iff (!rst_n) (busy && wr_done) |-> !rd_busy);

endmodule
