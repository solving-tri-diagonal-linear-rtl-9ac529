// tb_tdma_coprocessor - end-to-end testbench of the co-processor at its
// default parameters.
//
// Two SRAM models stand in for the board memories.  For each run the
// testbench writes M random diagonally dominant systems of N rows into the
// input SRAM ({L, D, U, x} per 128-bit word), pulses start with the sizes and
// base addresses, waits for done and reads the solutions back from the output
// SRAM.  Each solution is compared with a double-precision Thomas solve of the
// same input values (error allowed: 1e-4 of the system's largest component),
// and run_cycles must equal N*(M+1) + RD_LAT + 4, the pipelined cycle count
// plus the fixed latency of reader, solver and writer, with (M-1)*N cycles in
// which the forward and backward passes overlap.  The runs cover the
// document's 5-row systems, the largest system a bank holds (MAX_N rows),
// single-row systems and a single system; two refused starts (N = 0 and
// N > MAX_N) must raise err.  The testbench counts overlapped cycles (a row
// entering the forward stage while the backward stage works on the previous
// system), DEMUX/MUX switches, refused starts and partially filled output
// words, and fails if one never happened.  Mean and maximum relative error
// over all solutions are printed.
module tb_tdma_coprocessor;
  import tb_fp_pkg::*;

  localparam int EXP_W  = tdma_pkg::FP_EXP_W;
  localparam int MAN_W  = tdma_pkg::FP_MAN_W;
  localparam int W      = 1 + EXP_W + MAN_W;
  localparam int MAX_N  = tdma_pkg::BANK_MAX_N;
  localparam int ADDR_W = tdma_pkg::SRAM_ADDR_W;
  localparam int RD_LAT = tdma_pkg::SRAM_RD_LAT;
  localparam int LANES  = tdma_pkg::OUT_LANES;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [15:0] n_rows = '0;
  logic [31:0] n_sys = '0;
  logic [ADDR_W-1:0] in_base = '0, out_base = '0;
  logic busy, done, err, overflow, demux_sel, mux_sel;
  logic [31:0] run_cycles, stall_count, overlap_count;
  logic in_sram_rd_en;
  logic [ADDR_W-1:0] in_sram_rd_addr;
  logic [4*W-1:0] in_sram_rd_data;
  logic out_sram_wr_en;
  logic [ADDR_W-1:0] out_sram_wr_addr;
  logic [LANES*W-1:0] out_sram_wr_data;
  logic [LANES-1:0] out_sram_wr_be;
  logic [LANES*W-1:0] unused_rd;

  int checks = 0, failures = 0, cycles = 0;
  int overlap = 0, switches = 0, refused = 0, partial_words = 0;
  real err_sum = 0.0, err_max = 0.0;
  int  n_sol = 0;

  tdma_coprocessor dut (.*);

  qdr_sram_model #(.ADDR_W(ADDR_W), .DATA_W(4*W), .RD_LAT(RD_LAT)) u_in_mem (
    .clk, .rd_en(in_sram_rd_en), .rd_addr(in_sram_rd_addr), .rd_data(in_sram_rd_data),
    .wr_en(1'b0), .wr_addr('0), .wr_data('0), .wr_be('0)
  );
  qdr_sram_model #(.ADDR_W(ADDR_W), .DATA_W(LANES*W), .RD_LAT(1), .LANES(LANES)) u_out_mem (
    .clk, .rd_en(1'b0), .rd_addr('0), .rd_data(unused_rd),
    .wr_en(out_sram_wr_en), .wr_addr(out_sram_wr_addr), .wr_data(out_sram_wr_data), .wr_be(out_sram_wr_be)
  );

  always #5 clk = ~clk;

  initial begin
    while (cycles < 200000) begin
      @(posedge clk);
      cycles++;
    end
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, from the top-level ports only
  logic demux_q = 1'b0, mux_q = 1'b0;
  int   demux_switches = 0;
  always @(posedge clk) begin
    if (rst_n && demux_sel != demux_q) demux_switches++;
    if (rst_n && mux_sel != mux_q) switches++;
    demux_q <= demux_sel;
    mux_q <= mux_sel;
    if (busy && in_sram_rd_en && out_sram_wr_en) overlap++;
    if (rst_n && out_sram_wr_en && !$onehot(out_sram_wr_be)) begin
      failures++;
      $display("FAIL write enable %b is not one lane", out_sram_wr_be);
    end
  end

  function automatic real q(real r);
    return fp_to_real(real_to_fp(r, EXP_W, MAN_W), EXP_W, MAN_W);
  endfunction

  task automatic solve_run(int n, int m, int ibase, int obase);
    real l[], d[], u[], x[], dd[], xx[], sol[], mult, scale, got, rel;
    real all_sol[$];
    real all_scale[$];
    int  p, t0, expect_cycles;
    logic [LANES*W-1:0] word;
    l = new[n]; d = new[n]; u = new[n]; x = new[n];
    dd = new[n]; xx = new[n]; sol = new[n];
    for (int s = 0; s < m; s++) begin
      for (int i = 0; i < n; i++) begin
        l[i] = (i == n - 1) ? 0.0 : q(urand(-1.0, 1.0));
        u[i] = (i == 0) ? 0.0 : q(urand(-1.0, 1.0));
        d[i] = q(urand(2.5, 6.0) * (($urandom % 2 == 1) ? 1.0 : -1.0));
        x[i] = q(urand(-4.0, 4.0));
        u_in_mem.mem[ADDR_W'(ibase + s * n + i)] =
          {W'(real_to_fp(l[i], EXP_W, MAN_W)), W'(real_to_fp(d[i], EXP_W, MAN_W)),
           W'(real_to_fp(u[i], EXP_W, MAN_W)), W'(real_to_fp(x[i], EXP_W, MAN_W))};
      end
      dd[0] = d[0]; xx[0] = x[0];
      for (int i = 1; i < n; i++) begin
        mult = l[i-1] / dd[i-1];
        dd[i] = d[i] - mult * u[i];
        xx[i] = x[i] - mult * xx[i-1];
      end
      sol[n-1] = xx[n-1] / dd[n-1];
      for (int i = n - 2; i >= 0; i--) sol[i] = (xx[i] - u[i+1] * sol[i+1]) / dd[i];
      scale = 0.0;
      for (int i = 0; i < n; i++) if (rabs(sol[i]) > scale) scale = rabs(sol[i]);
      for (int i = 0; i < n; i++) begin
        all_sol.push_back(sol[i]);
        all_scale.push_back(scale);
      end
    end
    // run
    @(negedge clk);
    n_rows = 16'(n); n_sys = 32'(m);
    in_base = ADDR_W'(ibase); out_base = ADDR_W'(obase);
    start = 1'b1;
    t0 = cycles;
    @(negedge clk);
    start = 1'b0;
    checks++;
    if (!busy || err) begin
      failures++;
      $display("FAIL run N=%0d M=%0d not started", n, m);
    end
    while (!done) @(negedge clk);
    expect_cycles = n * (m + 1) + RD_LAT + 4;
    checks++;
    if (run_cycles != 32'(expect_cycles) || stall_count != 0 || overflow ||
        overlap_count != 32'(n * (m - 1))) begin
      failures++;
      $display("FAIL N=%0d M=%0d: run_cycles %0d expected %0d, stalls %0d, overlap %0d expected %0d",
               n, m, run_cycles, expect_cycles, stall_count, overlap_count, n * (m - 1));
    end
    $display("run N=%0d M=%0d: %0d cycles (N*(M+1) = %0d)", n, m, run_cycles, n * (m + 1));
    @(negedge clk);
    checks++;
    if (demux_switches != switches) begin
      failures++;
      $display("FAIL DEMUX switched %0d times, MUX %0d times", demux_switches, switches);
    end
    // results
    for (p = 0; p < n * m; p++) begin
      word = u_out_mem.peek(ADDR_W'(obase + p / LANES));
      got = fp_to_real(64'(word[(p % LANES) * W +: W]), EXP_W, MAN_W);
      rel = rabs(got - all_sol[p]) / all_scale[p];
      err_sum += rabs(got - all_sol[p]) / ((rabs(all_sol[p]) > 1e-3) ? rabs(all_sol[p]) : 1e-3);
      if (rel > err_max) err_max = rel;
      n_sol++;
      checks++;
      if (rel > 1e-4) begin
        failures++;
        $display("FAIL N=%0d M=%0d solution %0d: %g expected %g", n, m, p, got, all_sol[p]);
      end
    end
    if ((n * m) % LANES != 0) partial_words++;
  endtask

  task automatic refused_start(int n, int m);
    @(negedge clk);
    n_rows = 16'(n); n_sys = 32'(m);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    @(negedge clk);
    checks++;
    if (!err || busy) begin
      failures++;
      $display("FAIL start with N=%0d M=%0d was not refused", n, m);
    end else refused++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    solve_run(5, 40, 0, 1000);
    solve_run(MAX_N, 6, 300, 2000);
    refused_start(0, 3);
    solve_run(1, 9, 600, 3000);
    refused_start(MAX_N + 1, 2);
    solve_run(7, 1, 700, 4000);
    solve_run(5, 13, 800, 5000);
    $display("overlapped cycles %0d, bank switches %0d, refused starts %0d, runs ending in a partial word %0d",
             overlap, switches, refused, partial_words);
    $display("solution error: mean relative %g, max (relative to system norm) %g", err_sum / n_sol, err_max);
    checks++;
    if (overlap == 0 || switches != 40 + 6 + 9 + 1 + 13 || refused != 2 || partial_words == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
