// fp_addsub - combinational floating-point adder / subtractor.
//
// y = a + b when sub = 0, y = a - b when sub = 1.  Words are
// {sign, EXP_W-bit biased exponent, MAN_W-bit mantissa with hidden one}.
// An exponent field of zero is the value zero; there is no NaN, infinity or
// subnormal handling, which keeps the unit small.
//
// How it works: the operand of larger magnitude is found, the smaller one's
// significand is shifted right by the exponent difference (bits falling off
// the end of GUARD_W guard bits are dropped), the two are added or subtracted,
// and the result is normalised by a leading-zero count.  The result is
// truncated to MAN_W bits (round toward zero).  The generic widths, truncation
// and the absence of special cases follow the document; the guard-bit count,
// flushing underflow to zero and saturating overflow to the largest finite
// value are this design's choices.
//
// Timing: purely combinational, no clock.
module fp_addsub #(
  parameter int unsigned EXP_W   = tdma_pkg::FP_EXP_W,
  parameter int unsigned MAN_W   = tdma_pkg::FP_MAN_W,
  parameter int unsigned GUARD_W = 3
) (
  input  logic [EXP_W+MAN_W:0] a,
  input  logic [EXP_W+MAN_W:0] b,
  input  logic                 sub,
  output logic [EXP_W+MAN_W:0] y
);

  localparam int unsigned SW   = MAN_W + 1 + GUARD_W;  // aligned significand width
  localparam int unsigned EMAX = (1 << EXP_W) - 1;

  logic             sa, sb;
  logic [EXP_W-1:0] ea, eb;
  logic [SW-1:0]    siga, sigb;

  logic             s_big, s_small;
  logic [EXP_W-1:0] e_big, e_small;
  logic [SW-1:0]    m_big, m_small, m_shift;
  logic [SW:0]      sum;             // one extra bit for the carry
  int               lz;
  int               e_res;
  logic [SW:0]      norm;

  always_comb begin
    sa   = a[EXP_W+MAN_W];
    sb   = b[EXP_W+MAN_W] ^ sub;
    ea   = a[MAN_W +: EXP_W];
    eb   = b[MAN_W +: EXP_W];
    siga = (ea == '0) ? '0 : {1'b1, a[MAN_W-1:0], {GUARD_W{1'b0}}};
    sigb = (eb == '0) ? '0 : {1'b1, b[MAN_W-1:0], {GUARD_W{1'b0}}};

    // order by magnitude: the exponent field and mantissa compare as one
    if (a[EXP_W+MAN_W-1:0] >= b[EXP_W+MAN_W-1:0]) begin
      s_big = sa; e_big = ea; m_big = siga;
      s_small = sb; e_small = eb; m_small = sigb;
    end else begin
      s_big = sb; e_big = eb; m_big = sigb;
      s_small = sa; e_small = ea; m_small = siga;
    end

    // align the smaller significand, truncating what is shifted out
    if (int'(e_big) - int'(e_small) >= int'(SW)) m_shift = '0;
    else                                         m_shift = m_small >> (e_big - e_small);

    if (s_big == s_small) sum = {1'b0, m_big} + {1'b0, m_shift};
    else                  sum = {1'b0, m_big} - {1'b0, m_shift};

    // leading zero count over the SW+1 bit sum
    lz = SW + 1;
    for (int i = 0; i <= int'(SW); i++) begin
      if (sum[i]) lz = SW - i;
    end

    // the hidden one belongs at bit SW-1; a carry puts it at bit SW (lz = 0).
    // Shifting left by lz brings the leading one to bit SW in every case.
    e_res = int'(e_big) + 1 - lz;
    norm  = sum << lz;

    if (sum == '0 || e_big == '0 || e_res <= 0) begin
      y = '0;
    end else if (e_res > int'(EMAX)) begin
      y = {s_big, EXP_W'(EMAX), {MAN_W{1'b1}}};
    end else begin
      y = {s_big, EXP_W'(e_res), norm[SW-1 -: MAN_W]};
    end
  end

endmodule
