// tdma_solver - pipelined solver for a stream of tri-diagonal systems.
//
// Rows (L, D, U, x) of system after system enter one per clock cycle.  The
// factorisation / forward-substitution stage (tdma_factorise) turns each row
// into (D', U, x') and writes it into one of two register banks
// (tdma_bank_pair).  When the last row of a system has been written, the banks
// swap: the backward-substitution stage (tdma_bsub) reads the finished system
// from its bank in reverse order while the factorisation stage fills the other
// bank with the next system.  For M systems of N rows that arrive without
// gaps the solver therefore needs N*(M+1) cycles instead of 2*N*M.
//
// Interface:
//   in_valid / in_ready, in_eos (last row of a system), in_l/in_d/in_u/in_x.
//   out_valid with out_x = solution x(out_idx+1) of the current system;
//   solutions come out in reverse order, out_last marks x(1), the last one.
//   There is no back-pressure on the output.
//   stall is high in a cycle where a row waits because both banks are busy;
//   bwd_active is high in a cycle where the backward stage processes a row;
//   wr_sel / rd_sel show the DEMUX and MUX positions; overflow is sticky.
//
// Timing: row i of system m is accepted in cycle c; if system m has N rows
// and its last row is accepted in cycle c_end, x(N) appears on the registered
// output in cycle c_end + 2 and x(1) in cycle c_end + N + 1.
module tdma_solver #(
  parameter int unsigned EXP_W   = tdma_pkg::FP_EXP_W,
  parameter int unsigned MAN_W   = tdma_pkg::FP_MAN_W,
  parameter int unsigned GS_ITER = tdma_pkg::FP_GS_ITER,
  parameter int unsigned MAX_N   = tdma_pkg::BANK_MAX_N,
  localparam int unsigned W      = 1 + EXP_W + MAN_W,
  localparam int unsigned IDX_W  = (MAX_N > 1) ? $clog2(MAX_N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic             in_eos,
  input  logic [W-1:0]     in_l,
  input  logic [W-1:0]     in_d,
  input  logic [W-1:0]     in_u,
  input  logic [W-1:0]     in_x,
  output logic             out_valid,
  output logic             out_last,
  output logic [IDX_W-1:0] out_idx,
  output logic [W-1:0]     out_x,
  output logic             stall,
  output logic             bwd_active,
  output logic             wr_sel,
  output logic             rd_sel,
  output logic             overflow
);

  logic           f_valid, f_eos;
  logic [W-1:0]   f_l, f_d, f_u, f_x;   // f_l is not stored: the backward pass does not use L'
  logic           fire;

  logic             b_valid, b_last;
  logic [IDX_W-1:0] b_idx;
  logic [3*W-1:0]   b_row;
  logic             s_valid;
  logic [W-1:0]     s_x;

  assign fire  = in_valid && in_ready;
  assign stall      = in_valid && !in_ready;
  assign bwd_active = b_valid;

  tdma_factorise #(.EXP_W(EXP_W), .MAN_W(MAN_W), .GS_ITER(GS_ITER)) u_fact (
    .clk, .rst_n,
    .in_valid (fire), .in_eos,
    .in_l, .in_d, .in_u, .in_x,
    .out_valid(f_valid), .out_eos(f_eos),
    .out_l(f_l), .out_d(f_d), .out_u(f_u), .out_x(f_x)
  );

  tdma_bank_pair #(.ROW_W(3*W), .MAX_N(MAX_N)) u_banks (
    .clk, .rst_n,
    .wr_valid(f_valid), .wr_eos(f_eos), .wr_data({f_d, f_u, f_x}), .wr_ready(in_ready),
    .rd_valid(b_valid), .rd_last(b_last), .rd_idx(b_idx), .rd_data(b_row), .rd_ready(1'b1),
    .wr_sel, .rd_sel, .overflow
  );

  tdma_bsub #(.EXP_W(EXP_W), .MAN_W(MAN_W), .GS_ITER(GS_ITER)) u_bsub (
    .clk, .rst_n,
    .in_valid(b_valid), .in_last(b_last),
    .in_d(b_row[2*W +: W]), .in_u(b_row[W +: W]), .in_x(b_row[0 +: W]),
    .out_valid(s_valid), .out_x(s_x)
  );

  // registered solution output
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_idx   <= '0;
      out_x     <= '0;
    end else begin
      out_valid <= s_valid;
      out_last  <= s_valid && b_last;
      out_idx   <= b_idx;
      out_x     <= s_x;
    end
  end

endmodule
