// tdma_factorise - factorisation and forward-substitution stage of the Thomas
// algorithm (tri-diagonal matrix algorithm, TDMA).
//
// A tri-diagonal system is held as four arrays: L (sub-diagonal, L(i) is the
// entry left of the diagonal in row i+1, last entry 0), D (diagonal),
// U (super-diagonal, U(i) is the entry above the diagonal in row i, first entry
// 0) and x (right-hand side, overwritten by the solution).  For one row i per
// clock cycle this stage computes, with L(i-1) and x(i-1) of the previous row
// held in registers:
//     D'(i) = D(i) - L'(i-1) * U(i)
//     L'(i) = L(i) / D'(i)
//     x'(i) = x(i) - L'(i-1) * x'(i-1)
// The multiply of x and the multiply/subtract/divide chain of D and L are
// independent, so they sit side by side in one clock cycle, as the document
// describes.
//
// Interface: in_valid qualifies a row; in_eos marks the last row of a system.
// The outputs are combinational functions of the current row and the two
// registers, valid in the same cycle as the row (out_valid = in_valid); the
// consumer registers them.  U passes through because backward substitution
// needs it.
//
// Timing: one row per cycle, zero cycles of latency.  The registers are
// cleared after an end-of-system row, so row 1 of the next system sees
// L'(0) = 0 and x'(0) = 0, which gives L'(1) = L(1)/D(1) and x'(1) = x(1) as
// the first step of the algorithm requires.  With the document's zero padding
// (L(n) = 0) the registers would hold zero anyway; the explicit clear is this
// design's choice.
module tdma_factorise #(
  parameter int unsigned EXP_W   = tdma_pkg::FP_EXP_W,
  parameter int unsigned MAN_W   = tdma_pkg::FP_MAN_W,
  parameter int unsigned GS_ITER = tdma_pkg::FP_GS_ITER
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_eos,
  input  logic [EXP_W+MAN_W:0] in_l,
  input  logic [EXP_W+MAN_W:0] in_d,
  input  logic [EXP_W+MAN_W:0] in_u,
  input  logic [EXP_W+MAN_W:0] in_x,
  output logic                 out_valid,
  output logic                 out_eos,
  output logic [EXP_W+MAN_W:0] out_l,
  output logic [EXP_W+MAN_W:0] out_d,
  output logic [EXP_W+MAN_W:0] out_u,
  output logic [EXP_W+MAN_W:0] out_x
);

  localparam int unsigned W = 1 + EXP_W + MAN_W;

  logic [W-1:0] l_prev, x_prev;       // L'(i-1), x'(i-1)
  logic [W-1:0] lu, lx;               // L'(i-1)*U(i), L'(i-1)*x'(i-1)

  fp_mul #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_mul_lu (.a(l_prev), .b(in_u), .y(lu));
  fp_addsub #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_sub_d (.a(in_d), .b(lu), .sub(1'b1), .y(out_d));
  fp_div #(.EXP_W(EXP_W), .MAN_W(MAN_W), .GS_ITER(GS_ITER)) u_div_l (.a(in_l), .b(out_d), .y(out_l));

  fp_mul #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_mul_lx (.a(l_prev), .b(x_prev), .y(lx));
  fp_addsub #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_sub_x (.a(in_x), .b(lx), .sub(1'b1), .y(out_x));

  assign out_u     = in_u;
  assign out_valid = in_valid;
  assign out_eos   = in_eos;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l_prev <= '0;
      x_prev <= '0;
    end else if (in_valid) begin
      if (in_eos) begin
        l_prev <= '0;
        x_prev <= '0;
      end else begin
        l_prev <= out_l;
        x_prev <= out_x;
      end
    end
  end

endmodule
