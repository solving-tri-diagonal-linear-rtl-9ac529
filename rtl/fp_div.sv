// fp_div - combinational floating-point divider (Goldschmidt's algorithm).
//
// y = a / b for words {sign, EXP_W-bit biased exponent, MAN_W-bit mantissa
// with hidden one}; an exponent field of zero is the value zero.
//
// How it works: the significands are taken as fixed-point numbers with
// FRAC_W fractional bits and halved, so the divisor D0 lies in [0.5, 1).
// Each of the GS_ITER unrolled iterations multiplies numerator and divisor
// by F = 2 - D; the divisor converges quadratically to 1 and the numerator to
// the quotient.  Starting from |1 - D0| <= 1/2 with no seed table, the error
// after k iterations is at most 2**-(2**k), so five iterations cover a 23-bit
// mantissa.  Every product is truncated, so the quotient approaches its true
// value from below.  It is then normalised to [1,2) and truncated to MAN_W
// bits.  The use of Goldschmidt iterations, truncation and the missing special
// cases follow the document; the iteration count, the absence of a seed table,
// the guard bits and the saturated result for a zero divisor are this design's
// choices.
//
// Timing: purely combinational, no clock (2*GS_ITER multipliers deep).
module fp_div #(
  parameter int unsigned EXP_W   = tdma_pkg::FP_EXP_W,
  parameter int unsigned MAN_W   = tdma_pkg::FP_MAN_W,
  parameter int unsigned GS_ITER = tdma_pkg::FP_GS_ITER,
  parameter int unsigned GUARD_W = 6
) (
  input  logic [EXP_W+MAN_W:0] a,
  input  logic [EXP_W+MAN_W:0] b,
  output logic [EXP_W+MAN_W:0] y
);

  localparam int unsigned FRAC_W = MAN_W + 1 + GUARD_W;  // fractional bits
  localparam int unsigned VW     = FRAC_W + 1;           // values in [0, 2)
  localparam int BIAS = (1 << (EXP_W - 1)) - 1;
  localparam int EMAX = (1 << EXP_W) - 1;

  logic [EXP_W-1:0] ea, eb;
  logic             sy;
  logic [VW-1:0]    n_q [GS_ITER+1];
  logic [VW-1:0]    d_q [GS_ITER+1];
  logic [VW-1:0]    f;
  logic [2*VW-1:0]  pn, pd;
  logic [VW-1:0]    q;
  logic [MAN_W-1:0] man;
  int               e_res;

  always_comb begin
    ea = a[MAN_W +: EXP_W];
    eb = b[MAN_W +: EXP_W];
    sy = a[EXP_W+MAN_W] ^ b[EXP_W+MAN_W];

    // significand / 2: the hidden one sits just below the binary point
    n_q[0] = {2'b01, a[MAN_W-1:0], {GUARD_W{1'b0}}};
    d_q[0] = {2'b01, b[MAN_W-1:0], {GUARD_W{1'b0}}};
    for (int k = 0; k < int'(GS_ITER); k++) begin
      f  = VW'(0) - d_q[k];  // 2 - D, since 2.0 is 2**VW in this format
      pn = n_q[k] * f;
      pd = d_q[k] * f;
      n_q[k+1] = pn[FRAC_W +: VW];
      d_q[k+1] = pd[FRAC_W +: VW];
    end
    q = n_q[GS_ITER];

    // quotient of the significands lies in (0.5, 2)
    if (q[FRAC_W]) begin
      man   = q[FRAC_W-1 -: MAN_W];
      e_res = int'(ea) - int'(eb) + BIAS;
    end else begin
      man   = q[FRAC_W-2 -: MAN_W];
      e_res = int'(ea) - int'(eb) + BIAS - 1;
    end

    if (ea == '0 || e_res <= 0)            y = '0;
    else if (eb == '0 || e_res > EMAX)     y = {sy, EXP_W'(EMAX), {MAN_W{1'b1}}};
    else                                   y = {sy, EXP_W'(e_res), man};
  end

endmodule
