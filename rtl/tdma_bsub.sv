// tdma_bsub - backward-substitution stage of the Thomas algorithm.
//
// Rows of a factorised system arrive in reverse order, i = n down to 1, one
// per clock cycle, each carrying D'(i), U(i) and x'(i) from the factorisation
// stage.  With U(i+1) and x(i+1) of the row before held in registers the stage
// computes the solution
//     x(i) = (x'(i) - U(i+1) * x(i+1)) / D'(i)
// For the first row of a system (i = n) the registers hold zero, so
// x(n) = x'(n) / D'(n).
//
// Interface: in_valid qualifies a row, in_last marks row 1, the last one of a
// system.  out_x is combinational, valid in the same cycle as the row
// (out_valid = in_valid).
//
// Timing: one row per cycle, zero cycles of latency.  The registers are
// cleared after the last row of a system so that the next system starts from
// zero; with the document's zero padding (U(1) = 0) they would be zero
// anyway.  One row per clock with the previous row's values in registers
// follows the document; the back-substitution formula is the standard
// Thomas algorithm for the document's storage convention, and computing it as
// one multiply, one subtract and one divide in series is this design's choice.
module tdma_bsub #(
  parameter int unsigned EXP_W   = tdma_pkg::FP_EXP_W,
  parameter int unsigned MAN_W   = tdma_pkg::FP_MAN_W,
  parameter int unsigned GS_ITER = tdma_pkg::FP_GS_ITER
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_last,
  input  logic [EXP_W+MAN_W:0] in_d,
  input  logic [EXP_W+MAN_W:0] in_u,
  input  logic [EXP_W+MAN_W:0] in_x,
  output logic                 out_valid,
  output logic [EXP_W+MAN_W:0] out_x
);

  localparam int unsigned W = 1 + EXP_W + MAN_W;

  logic [W-1:0] u_next, x_next;       // U(i+1), x(i+1)
  logic [W-1:0] ux, num;

  fp_mul #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_mul (.a(u_next), .b(x_next), .y(ux));
  fp_addsub #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_sub (.a(in_x), .b(ux), .sub(1'b1), .y(num));
  fp_div #(.EXP_W(EXP_W), .MAN_W(MAN_W), .GS_ITER(GS_ITER)) u_div (.a(num), .b(in_d), .y(out_x));

  assign out_valid = in_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u_next <= '0;
      x_next <= '0;
    end else if (in_valid) begin
      if (in_last) begin
        u_next <= '0;
        x_next <= '0;
      end else begin
        u_next <= in_u;
        x_next <= out_x;
      end
    end
  end

endmodule
