// tb_tdma_bsub - self-checking testbench of the backward-substitution stage.
//
// Random factorised systems (D' in [3,8], U in [-1,1], x' in [-4,4]) of sizes
// 1 to 9 are fed in reverse row order, one row per clock, with idle cycles
// mixed in.  U(1) is left random, which only the clear after the last row
// hides from the next system.  Each solution value is compared in its cycle
// with a double-precision back substitution of the same values, to a
// relative tolerance of 1e-5.
module tb_tdma_bsub;
  import tb_fp_pkg::*;

  localparam int EXP_W = 8;
  localparam int MAN_W = 23;
  localparam int W     = 1 + EXP_W + MAN_W;
  localparam int NMAX  = 9;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_last = 1'b0;
  logic [W-1:0] in_d = '0, in_u = '0, in_x = '0;
  logic out_valid;
  logic [W-1:0] out_x;
  int checks = 0, failures = 0, cycles = 0;

  tdma_bsub #(.EXP_W(EXP_W), .MAN_W(MAN_W)) dut (.*);

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

  function automatic real q(real r);
    return fp_to_real(real_to_fp(r, EXP_W, MAN_W), EXP_W, MAN_W);
  endfunction

  initial begin
    real d [NMAX+2], u [NMAX+2], x [NMAX+2], sol [NMAX+2];
    real got, tol;
    int  n;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 40; s++) begin
      n = 1 + (s % NMAX);
      for (int i = 1; i <= n; i++) begin
        d[i] = q(urand(3.0, 8.0));
        u[i] = q(urand(-1.0, 1.0));
        x[i] = q(urand(-4.0, 4.0));
      end
      sol[n+1] = 0.0;
      u[n+1]   = 0.0;
      for (int i = n; i >= 1; i--) begin
        in_valid = 1'b1;
        in_last  = (i == 1);
        in_d = W'(real_to_fp(d[i], EXP_W, MAN_W));
        in_u = W'(real_to_fp(u[i], EXP_W, MAN_W));
        in_x = W'(real_to_fp(x[i], EXP_W, MAN_W));
        #1;
        sol[i] = (x[i] - u[i+1] * sol[i+1]) / d[i];
        got = fp_to_real(64'(out_x), EXP_W, MAN_W);
        tol = 1e-5 * ((rabs(sol[i]) > 1.0) ? rabs(sol[i]) : 1.0);
        checks++;
        if (rabs(got - sol[i]) > tol || !out_valid) begin
          failures++;
          $display("FAIL system %0d row %0d: x=%g expected %g", s, i, got, sol[i]);
        end
        sol[i] = got;
        @(negedge clk);
        if ($urandom % 4 == 0) begin
          in_valid = 1'b0;
          in_last  = 1'b1;
          in_u     = W'($urandom);
          @(negedge clk);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
