// tb_sram_sol_writer - self-checking testbench of the output SRAM writer.
//
// Solutions are fed as the solver emits them: per system, row index N-1 down
// to 0, the last flagged, with random idle cycles.  Each value is a distinct
// word made from its system and row number.  After the run the SRAM model must
// hold solution j of system m in lane (m*N+j) % LANES of word
// base + (m*N+j) / LANES, with untouched lanes left as they were, and done
// must rise exactly two cycles after the last solution and not before.  Two
// runs with different N, M and base check that start resets the writer.
module tb_sram_sol_writer;

  localparam int ADDR_W = tdma_pkg::SRAM_ADDR_W;
  localparam int FP_W   = tdma_pkg::FP_W;
  localparam int LANES  = tdma_pkg::OUT_LANES;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [ADDR_W-1:0] base_addr = '0;
  logic [15:0] n_rows = '0;
  logic [31:0] n_sys = '0;
  logic done;
  logic in_valid = 1'b0, in_last = 1'b0;
  logic [15:0] in_idx = '0;
  logic [FP_W-1:0] in_x = '0;
  logic sram_wr_en;
  logic [ADDR_W-1:0] sram_wr_addr;
  logic [LANES*FP_W-1:0] sram_wr_data;
  logic [LANES-1:0] sram_wr_be;
  logic [LANES*FP_W-1:0] unused_rd;
  int checks = 0, failures = 0, cycles = 0;

  sram_sol_writer dut (.*);

  qdr_sram_model #(.ADDR_W(ADDR_W), .DATA_W(LANES*FP_W), .RD_LAT(1), .LANES(LANES)) u_mem (
    .clk, .rd_en(1'b0), .rd_addr('0), .rd_data(unused_rd),
    .wr_en(sram_wr_en), .wr_addr(sram_wr_addr), .wr_data(sram_wr_data), .wr_be(sram_wr_be)
  );

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

  function automatic logic [FP_W-1:0] val(int m, int j);
    return {16'(m + 1), 16'(j) ^ 16'h5A00};
  endfunction

  task automatic run(int base, int n, int m);
    int p;
    logic [FP_W-1:0] got;
    base_addr = ADDR_W'(base);
    n_rows = 16'(n);
    n_sys = 32'(m);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int s = 0; s < m; s++) begin
      for (int j = n - 1; j >= 0; j--) begin
        while ($urandom % 4 == 0) @(negedge clk);
        in_valid = 1'b1;
        in_last = (j == 0);
        in_idx = 16'(j);
        in_x = val(s, j);
        @(negedge clk);
        in_valid = 1'b0;
        in_last = 1'b0;
        checks++;
        if (done) begin
          failures++;
          $display("FAIL done before the last solution");
        end
      end
    end
    // the loop's last check saw cycle t+1 after the last solution (cycle t)
    @(negedge clk);
    checks++;
    if (!done) begin
      failures++;
      $display("FAIL done not set two cycles after the last solution");
    end
    for (int s = 0; s < m; s++) begin
      for (int j = 0; j < n; j++) begin
        p = s * n + j;
        got = u_mem.peek(ADDR_W'(base + p / LANES))[(p % LANES) * FP_W +: FP_W];
        checks++;
        if (got !== val(s, j)) begin
          failures++;
          $display("FAIL system %0d x(%0d): %h expected %h", s, j + 1, got, val(s, j));
        end
      end
    end
    // the lanes after the last solution stay untouched
    p = n * m;
    if (p % LANES != 0) begin
      got = u_mem.peek(ADDR_W'(base + p / LANES))[(p % LANES) * FP_W +: FP_W];
      checks++;
      if (got !== '0) begin
        failures++;
        $display("FAIL lane beyond the last solution written");
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run(50, 5, 6);
    run(300, 7, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
