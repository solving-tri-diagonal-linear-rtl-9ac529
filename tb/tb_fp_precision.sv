// tb_fp_precision - checks that the arithmetic and the solver work at
// precisions other than the single-precision default.
//
// The three floating-point units are instantiated for a double-precision
// layout (11-bit exponent, 52-bit mantissa) and for a 16-bit layout (5-bit
// exponent, 10-bit mantissa).  Random operand pairs are applied one per clock,
// and every result must be within 2**-(MAN_W-3) relative of a double-precision
// reference (for the 52-bit mantissa the reference itself is rounded, which
// this bound leaves room for).  A tdma_solver built at double precision then
// solves gap-free streams of random diagonally dominant systems of 6 rows;
// the solutions must match a double-precision Thomas solve to 1e-12 of each
// system's largest component, and arrive N*(M+1) cycles after the first row.
module tb_fp_precision;
  import tb_fp_pkg::*;

  localparam int E1 = 11, M1 = 52, W1 = 1 + E1 + M1;
  localparam int E2 = 5,  M2 = 10, W2 = 1 + E2 + M2;
  localparam int NRAND = 1000;
  localparam int NS = 6, MS = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0, cycles = 0;

  logic [W1-1:0] a1 = '0, b1 = '0, s1, p1, q1;
  logic [W2-1:0] a2 = '0, b2 = '0, s2, p2, q2;
  logic sub = 1'b0;

  fp_addsub #(.EXP_W(E1), .MAN_W(M1)) u_add1 (.a(a1), .b(b1), .sub(sub), .y(s1));
  fp_mul    #(.EXP_W(E1), .MAN_W(M1)) u_mul1 (.a(a1), .b(b1), .y(p1));
  fp_div    #(.EXP_W(E1), .MAN_W(M1), .GS_ITER(6)) u_div1 (.a(a1), .b(b1), .y(q1));
  fp_addsub #(.EXP_W(E2), .MAN_W(M2)) u_add2 (.a(a2), .b(b2), .sub(sub), .y(s2));
  fp_mul    #(.EXP_W(E2), .MAN_W(M2)) u_mul2 (.a(a2), .b(b2), .y(p2));
  fp_div    #(.EXP_W(E2), .MAN_W(M2), .GS_ITER(4)) u_div2 (.a(a2), .b(b2), .y(q2));

  // double-precision solver
  logic in_valid = 1'b0, in_ready, in_eos = 1'b0;
  logic [W1-1:0] in_l = '0, in_d = '0, in_u = '0, in_x = '0;
  logic out_valid, out_last, stall, bwd_active, wr_sel, rd_sel, overflow;
  logic [2:0] out_idx;
  logic [W1-1:0] out_x;

  tdma_solver #(.EXP_W(E1), .MAN_W(M1), .GS_ITER(6), .MAX_N(8)) u_solver (.*);

  always #5 clk = ~clk;

  initial begin
    while (cycles < 20000) begin
      @(posedge clk);
      cycles++;
    end
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_rel(string what, real got, real ref_v, real tol);
    real rel;
    rel = (ref_v == 0.0) ? rabs(got) : rabs(got - ref_v) / rabs(ref_v);
    checks++;
    if (rel > tol) begin
      failures++;
      $display("FAIL %s: got %g expected %g (relative error %g)", what, got, ref_v, rel);
    end
  endtask

  function automatic logic [63:0] rand_op(int e, int m, int spread);
    logic [63:0] v;
    v = {$urandom, $urandom};
    v = v & ((64'd1 << m) - 1);
    v |= 64'((1 << (e - 1)) - 1 - spread + int'($urandom % (2 * spread + 1))) << m;
    if ($urandom % 2 == 1) v[e + m] = 1'b1;
    return v;
  endfunction

  typedef struct { real x; real scale; } sol_t;
  sol_t exp_q[$];
  int   first_cycle = -1, last_cycle = -1;

  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready && first_cycle < 0) first_cycle = cycles;
    if (rst_n && out_valid) begin
      sol_t e;
      e = exp_q.pop_front();
      checks++;
      if (rabs(fp_to_real(64'(out_x), E1, M1) - e.x) > 1e-12 * e.scale) begin
        failures++;
        $display("FAIL double-precision solver: %g expected %g", fp_to_real(64'(out_x), E1, M1), e.x);
      end
      if (out_last) last_cycle = cycles;
    end
  end

  function automatic real qd(real r);
    return fp_to_real(real_to_fp(r, E1, M1), E1, M1);
  endfunction

  initial begin
    real ra, rb, l[NS], d[NS], u[NS], x[NS], dd[NS], xx[NS], sol[NS], mult, scale;
    @(negedge clk);
    for (int i = 0; i < NRAND; i++) begin
      a1 = W1'(rand_op(E1, M1, 40));
      b1 = W1'(rand_op(E1, M1, 40));
      a2 = W2'(rand_op(E2, M2, 6));
      b2 = W2'(rand_op(E2, M2, 6));
      sub = (i % 2 == 1);
      @(negedge clk);
      ra = fp_to_real(64'(a1), E1, M1);
      rb = fp_to_real(64'(b1), E1, M1);
      expect_rel("double add/sub", fp_to_real(64'(s1), E1, M1), sub ? ra - rb : ra + rb, 2.0 ** -(M1 - 3));
      expect_rel("double mul", fp_to_real(64'(p1), E1, M1), ra * rb, 2.0 ** -(M1 - 3));
      expect_rel("double div", fp_to_real(64'(q1), E1, M1), ra / rb, 2.0 ** -(M1 - 3));
      ra = fp_to_real(64'(a2), E2, M2);
      rb = fp_to_real(64'(b2), E2, M2);
      expect_rel("16-bit add/sub", fp_to_real(64'(s2), E2, M2), sub ? ra - rb : ra + rb, 2.0 ** -(M2 - 3));
      expect_rel("16-bit mul", fp_to_real(64'(p2), E2, M2), ra * rb, 2.0 ** -(M2 - 3));
      expect_rel("16-bit div", fp_to_real(64'(q2), E2, M2), ra / rb, 2.0 ** -(M2 - 3));
    end

    rst_n = 1'b1;
    @(negedge clk);
    for (int s = 0; s < MS; s++) begin
      for (int i = 0; i < NS; i++) begin
        l[i] = (i == NS - 1) ? 0.0 : qd(urand(-1.0, 1.0));
        u[i] = (i == 0) ? 0.0 : qd(urand(-1.0, 1.0));
        d[i] = qd(urand(2.5, 6.0));
        x[i] = qd(urand(-4.0, 4.0));
      end
      dd[0] = d[0]; xx[0] = x[0];
      for (int i = 1; i < NS; i++) begin
        mult = l[i-1] / dd[i-1];
        dd[i] = d[i] - mult * u[i];
        xx[i] = x[i] - mult * xx[i-1];
      end
      sol[NS-1] = xx[NS-1] / dd[NS-1];
      for (int i = NS - 2; i >= 0; i--) sol[i] = (xx[i] - u[i+1] * sol[i+1]) / dd[i];
      scale = 0.0;
      for (int i = 0; i < NS; i++) if (rabs(sol[i]) > scale) scale = rabs(sol[i]);
      for (int i = NS - 1; i >= 0; i--) exp_q.push_back('{sol[i], scale});
      for (int i = 0; i < NS; i++) begin
        in_valid = 1'b1;
        in_eos = (i == NS - 1);
        in_l = W1'(real_to_fp(l[i], E1, M1));
        in_d = W1'(real_to_fp(d[i], E1, M1));
        in_u = W1'(real_to_fp(u[i], E1, M1));
        in_x = W1'(real_to_fp(x[i], E1, M1));
        @(negedge clk);
      end
    end
    in_valid = 1'b0;
    wait (exp_q.size() == 0);
    @(negedge clk);
    checks++;
    if (last_cycle - first_cycle != NS * (MS + 1)) begin
      failures++;
      $display("FAIL double-precision solver took %0d cycles, expected %0d", last_cycle - first_cycle, NS * (MS + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
