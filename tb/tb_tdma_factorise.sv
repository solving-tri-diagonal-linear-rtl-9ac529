// tb_tdma_factorise - self-checking testbench of the factorisation /
// forward-substitution stage.
//
// Random diagonally dominant systems (D in [4,8], L and U in [-1,1], x in
// [-4,4]) of several sizes are fed one row per clock, with idle cycles mixed
// in.  U(1) is 0 as the storage convention asks, but L(n) of each system is
// left random, which only an end-of-system clear of the internal registers
// hides from the next system.  For every row the combinational outputs D',
// L' and x' are compared in the same cycle with a double-precision run of the
// same recurrence on the same input values, to a relative tolerance of 1e-5.
module tb_tdma_factorise;
  import tb_fp_pkg::*;

  localparam int EXP_W = 8;
  localparam int MAN_W = 23;
  localparam int W     = 1 + EXP_W + MAN_W;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_eos = 1'b0;
  logic [W-1:0] in_l = '0, in_d = '0, in_u = '0, in_x = '0;
  logic out_valid, out_eos;
  logic [W-1:0] out_l, out_d, out_u, out_x;
  int checks = 0, failures = 0, cycles = 0;

  tdma_factorise #(.EXP_W(EXP_W), .MAN_W(MAN_W)) dut (.*);

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

  task automatic check(string what, logic [W-1:0] got_w, real ref_v);
    real got, tol;
    got = fp_to_real(64'(got_w), EXP_W, MAN_W);
    tol = 1e-5 * ((rabs(ref_v) > 1.0) ? rabs(ref_v) : 1.0);
    checks++;
    if (rabs(got - ref_v) > tol) begin
      failures++;
      $display("FAIL %s got %g expected %g", what, got, ref_v);
    end
  endtask

  function automatic real q(real r);   // value as the design's format holds it
    return fp_to_real(real_to_fp(r, EXP_W, MAN_W), EXP_W, MAN_W);
  endfunction

  initial begin
    real l_prev, x_prev, l, d, u, x, dn, ln, xn;
    int  n;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 40; s++) begin
      n = 1 + (s % 9);
      l_prev = 0.0;
      x_prev = 0.0;
      for (int i = 1; i <= n; i++) begin
        l = q(urand(-1.0, 1.0));
        d = q(urand(4.0, 8.0));
        u = (i == 1) ? 0.0 : q(urand(-1.0, 1.0));
        x = q(urand(-4.0, 4.0));
        // reference recurrence
        dn = d - l_prev * u;
        ln = l / dn;
        xn = x - l_prev * x_prev;
        in_valid = 1'b1;
        in_eos   = (i == n);
        in_l = W'(real_to_fp(l, EXP_W, MAN_W));
        in_d = W'(real_to_fp(d, EXP_W, MAN_W));
        in_u = W'(real_to_fp(u, EXP_W, MAN_W));
        in_x = W'(real_to_fp(x, EXP_W, MAN_W));
        #1;
        check("D'", out_d, dn);
        check("L'", out_l, ln);
        check("x'", out_x, xn);
        checks++;
        if (out_u !== in_u || out_eos !== in_eos || !out_valid) begin
          failures++;
          $display("FAIL pass-through signals");
        end
        // carry the design-format values, as the hardware does
        l_prev = fp_to_real(64'(out_l), EXP_W, MAN_W);
        x_prev = fp_to_real(64'(out_x), EXP_W, MAN_W);
        @(negedge clk);
        if ($urandom % 4 == 0) begin
          // idle cycle with garbage on the row inputs
          in_valid = 1'b0;
          in_eos   = 1'b1;
          in_l     = W'($urandom);
          in_x     = W'($urandom);
          @(negedge clk);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
