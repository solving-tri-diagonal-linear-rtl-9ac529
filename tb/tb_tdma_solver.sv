// tb_tdma_solver - self-checking testbench of the pipelined solver.
//
// Phase 1 streams M = 8 systems of N = 5 rows with no gaps and checks the
// pipelined timing: with the first row accepted in cycle t0, the solution
// x(1) of system m (0-based) must appear in cycle t0 + N*(m+2), so the whole
// batch takes N*(M+1) cycles, and no row may stall.  Phase 2 streams systems
// of random size (1..MAX_N) with random gaps; a short system after a long one
// must stall until a bank frees up.  Every solution value is compared with a
// double-precision Thomas-algorithm solve of the same input values; the error
// allowed is 1e-4 of the largest solution component of the system.  The
// testbench counts overlapped cycles (both stages busy), bank switches and
// stalls, and fails if one of them never happened.
module tb_tdma_solver;
  import tb_fp_pkg::*;

  localparam int EXP_W = tdma_pkg::FP_EXP_W;
  localparam int MAN_W = tdma_pkg::FP_MAN_W;
  localparam int W     = 1 + EXP_W + MAN_W;
  localparam int MAX_N = tdma_pkg::BANK_MAX_N;
  localparam int IDX_W = $clog2(MAX_N);
  localparam int N1    = 5;
  localparam int M1    = 8;
  localparam int M2    = 30;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, in_eos = 1'b0;
  logic [W-1:0] in_l = '0, in_d = '0, in_u = '0, in_x = '0;
  logic out_valid, out_last;
  logic [IDX_W-1:0] out_idx;
  logic [W-1:0] out_x;
  logic stall, bwd_active, wr_sel, rd_sel, overflow;
  int checks = 0, failures = 0, cycles = 0;
  int stalls = 0, overlap = 0, switches = 0;

  typedef struct { real x; int idx; bit last; real scale; } sol_t;
  sol_t exp_q[$];
  int   last_cycle[$];      // cycle of each out_last

  tdma_solver dut (.*);

  always #5 clk = ~clk;

  initial begin
    while (cycles < 50000) begin
      @(posedge clk);
      cycles++;
    end
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic wr_sel_q = 1'b0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (stall) stalls++;
      if (in_valid && in_ready && bwd_active) overlap++;
      if (wr_sel != wr_sel_q) switches++;
    end
    wr_sel_q <= wr_sel;
  end

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      sol_t e;
      real got;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        e = exp_q.pop_front();
        got = fp_to_real(64'(out_x), EXP_W, MAN_W);
        checks++;
        if (rabs(got - e.x) > 1e-4 * e.scale || 32'(out_idx) != e.idx || out_last != e.last) begin
          failures++;
          $display("FAIL x(%0d)=%g last %0b, expected x(%0d)=%g last %0b",
                   out_idx + 1, got, out_last, e.idx + 1, e.x, e.last);
        end
        if (out_last) last_cycle.push_back(cycles);
      end
    end
  end

  function automatic real q(real r);
    return fp_to_real(real_to_fp(r, EXP_W, MAN_W), EXP_W, MAN_W);
  endfunction

  // make a random diagonally dominant system, queue its reference solution
  // (reverse order, as the solver emits it), return its rows
  task automatic make_system(int n, output real l[], output real d[], output real u[], output real x[]);
    real dd[], xx[], sol[], m, scale;
    l = new[n]; d = new[n]; u = new[n]; x = new[n];
    dd = new[n]; xx = new[n]; sol = new[n];
    for (int i = 0; i < n; i++) begin
      l[i] = (i == n - 1) ? 0.0 : q(urand(-1.0, 1.0));
      u[i] = (i == 0) ? 0.0 : q(urand(-1.0, 1.0));
      d[i] = q(urand(2.5, 6.0) * (($urandom % 2) ? 1.0 : -1.0));
      x[i] = q(urand(-4.0, 4.0));
    end
    // Thomas algorithm in double precision (row i couples to l[i-1], u[i])
    dd[0] = d[0]; xx[0] = x[0];
    for (int i = 1; i < n; i++) begin
      m = l[i-1] / dd[i-1];
      dd[i] = d[i] - m * u[i];
      xx[i] = x[i] - m * xx[i-1];
    end
    sol[n-1] = xx[n-1] / dd[n-1];
    for (int i = n - 2; i >= 0; i--) sol[i] = (xx[i] - u[i+1] * sol[i+1]) / dd[i];
    scale = 0.0;
    for (int i = 0; i < n; i++) if (rabs(sol[i]) > scale) scale = rabs(sol[i]);
    for (int i = n - 1; i >= 0; i--) exp_q.push_back('{sol[i], i, i == 0, scale});
  endtask

  task automatic send_row(real l, real d, real u, real x, bit eos);
    in_valid = 1'b1;
    in_eos   = eos;
    in_l = W'(real_to_fp(l, EXP_W, MAN_W));
    in_d = W'(real_to_fp(d, EXP_W, MAN_W));
    in_u = W'(real_to_fp(u, EXP_W, MAN_W));
    in_x = W'(real_to_fp(x, EXP_W, MAN_W));
    #1;
    while (!in_ready) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    real l[], d[], u[], x[];
    int t0, n, st;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // phase 1: back-to-back systems of equal size
    t0 = cycles + 1;      // the next posedge accepts the first row
    for (int s = 0; s < M1; s++) begin
      make_system(N1, l, d, u, x);
      for (int i = 0; i < N1; i++) send_row(l[i], d[i], u[i], x[i], i == N1 - 1);
    end
    wait (exp_q.size() == 0);
    @(negedge clk);
    for (int s = 0; s < M1; s++) begin
      checks++;
      if (last_cycle[s] != t0 + N1 * (s + 2)) begin
        failures++;
        $display("FAIL system %0d finished in cycle %0d, expected %0d", s, last_cycle[s], t0 + N1 * (s + 2));
      end
    end
    $display("phase 1: %0d systems of %0d rows in %0d cycles (N*(M+1) = %0d)",
             M1, N1, last_cycle[M1-1] - t0, N1 * (M1 + 1));
    checks++;
    if (stalls != 0) begin
      failures++;
      $display("FAIL %0d stalls in a gap-free stream", stalls);
    end

    // phase 2: random sizes and gaps
    for (int s = 0; s < M2; s++) begin
      n = (s % 3 == 0) ? MAX_N - ($urandom % 4) : 1 + ($urandom % 4);
      make_system(n, l, d, u, x);
      for (int i = 0; i < n; i++) begin
        if ($urandom % 6 == 0) @(negedge clk);
        send_row(l[i], d[i], u[i], x[i], i == n - 1);
      end
    end
    wait (exp_q.size() == 0);
    repeat (3) @(negedge clk);
    $display("stalls %0d, overlapped cycles %0d, bank switches %0d", stalls, overlap, switches);
    checks++;
    if (stalls == 0 || overlap == 0 || switches != M1 + M2 || overflow) begin
      failures++;
      $display("FAIL mechanism counts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
