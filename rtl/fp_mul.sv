// fp_mul - combinational floating-point multiplier.
//
// y = a * b for words {sign, EXP_W-bit biased exponent, MAN_W-bit mantissa
// with hidden one}; an exponent field of zero is the value zero.
//
// How it works: the two (MAN_W+1)-bit significands are multiplied in full,
// the product (in [1,4)) is normalised by at most one place, and the mantissa
// is truncated (round toward zero).  Exponents are added and the bias removed.
// The generic widths, truncation and missing special cases follow the
// document; flushing underflow to zero and saturating overflow to the largest
// finite value are this design's choices.
//
// Timing: purely combinational, no clock.
module fp_mul #(
  parameter int unsigned EXP_W = tdma_pkg::FP_EXP_W,
  parameter int unsigned MAN_W = tdma_pkg::FP_MAN_W
) (
  input  logic [EXP_W+MAN_W:0] a,
  input  logic [EXP_W+MAN_W:0] b,
  output logic [EXP_W+MAN_W:0] y
);

  localparam int BIAS = (1 << (EXP_W - 1)) - 1;
  localparam int EMAX = (1 << EXP_W) - 1;

  logic [EXP_W-1:0]     ea, eb;
  logic [2*MAN_W+1:0]   prod;
  logic [MAN_W-1:0]     man;
  logic                 sy;
  int                   e_res;

  always_comb begin
    ea   = a[MAN_W +: EXP_W];
    eb   = b[MAN_W +: EXP_W];
    sy   = a[EXP_W+MAN_W] ^ b[EXP_W+MAN_W];
    prod = {1'b1, a[MAN_W-1:0]} * {1'b1, b[MAN_W-1:0]};
    if (prod[2*MAN_W+1]) begin
      man   = prod[2*MAN_W -: MAN_W];
      e_res = int'(ea) + int'(eb) - BIAS + 1;
    end else begin
      man   = prod[2*MAN_W-1 -: MAN_W];
      e_res = int'(ea) + int'(eb) - BIAS;
    end

    if (ea == '0 || eb == '0 || e_res <= 0) y = '0;
    else if (e_res > EMAX)                  y = {sy, EXP_W'(EMAX), {MAN_W{1'b1}}};
    else                                    y = {sy, EXP_W'(e_res), man};
  end

endmodule
