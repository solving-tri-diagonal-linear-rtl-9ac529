// tb_fp_addsub - self-checking testbench of the floating-point adder / subtractor.
//
// Random operand pairs (sign, exponent within +-20 of the bias, mantissa all
// random) and a few exact cases are applied one per clock.  The reference is
// computed in double precision from the exact operand values; a result passes
// if its relative error is below 2.0 ** -(MAN_W - 2) (single precision:
// a few units in the last place, as truncation allows).  Mean and maximum
// relative error are printed in the end.  A watchdog ends the run.
module tb_fp_addsub;
  import tb_fp_pkg::*;

  localparam int EXP_W = 8;
  localparam int MAN_W = 23;
  localparam int W     = 1 + EXP_W + MAN_W;
  localparam int NRAND = 2000;

  logic clk = 1'b0;
  logic [W-1:0] a, b, y;
  logic sub;
  int checks = 0, failures = 0, cycles = 0;
  real err_sum = 0.0, err_max = 0.0;

  fp_addsub #(.EXP_W(EXP_W), .MAN_W(MAN_W)) dut (.a(a), .b(b), .sub(sub), .y(y));

  always #5 clk = ~clk;

  initial begin
    sub = 1'b0;
    while (cycles < 100000) begin
      @(posedge clk);
      cycles++;
    end
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rand_op(bit close_to, logic [W-1:0] other);
    logic [W-1:0] v;
    v = W'($urandom);
    v[MAN_W +: EXP_W] = EXP_W'(127 - 20 + ($urandom % 41));
    if (close_to) begin
      // same exponent as the other operand and nearby mantissa: cancellation
      v[W-2:0] = other[W-2:0] ^ W'($urandom % 64);
    end
    return v;
  endfunction

  task automatic apply_check(logic [W-1:0] va, logic [W-1:0] vb, logic vsub);
    real ra, rb, ref_v, got, rel;
    a = va; b = vb; sub = vsub;
    @(negedge clk);
    ra    = fp_to_real(64'(a), EXP_W, MAN_W);
    rb    = fp_to_real(64'(b), EXP_W, MAN_W);
    ref_v = sub ? (ra - rb) : (ra + rb);
    got   = fp_to_real(64'(y), EXP_W, MAN_W);
    if (ref_v == 0.0) rel = rabs(got);
    else              rel = rabs(got - ref_v) / rabs(ref_v);
    checks++;
    err_sum += rel;
    if (rel > err_max) err_max = rel;
    if (rel > 2.0 ** -(MAN_W - 2)) begin
      failures++;
      $display("FAIL a=%h b=%h sub=%0b y=%h got=%g ref=%g rel=%g", a, b, vsub, y, got, ref_v, rel);
    end
  endtask

  // check an exactly representable result bit for bit
  task automatic apply_exact(real ra, real rb, logic vsub, real expect_v);
    logic [W-1:0] e;
    a = W'(real_to_fp(ra, EXP_W, MAN_W));
    b = W'(real_to_fp(rb, EXP_W, MAN_W));
    sub = vsub;
    e = W'(real_to_fp(expect_v, EXP_W, MAN_W));
    @(negedge clk);
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL exact %g op %g: y=%h expected %h", ra, rb, y, e);
    end
  endtask

  initial begin
    logic [W-1:0] va;
    @(negedge clk);
    apply_exact(1.0, 1.0, 1'b0, 2.0);
    apply_exact(1.5, 0.25, 1'b0, 1.75);
    apply_exact(3.0, 3.0, 1'b1, 0.0);
    apply_exact(1.0, 3.0, 1'b1, -2.0);
    apply_exact(-2.5, -1.5, 1'b0, -4.0);
    apply_exact(0.0, 7.0, 1'b0, 7.0);
    apply_exact(7.0, 0.0, 1'b1, 7.0);
    apply_exact(1.0, 0.875, 1'b1, 0.125);
    for (int i = 0; i < NRAND; i++) begin
      va = rand_op(1'b0, '0);
      apply_check(va, rand_op(i % 4 == 0, va), i % 2 == 1);
    end
    $display("addsub relative error: mean %g max %g", err_sum / checks, err_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
