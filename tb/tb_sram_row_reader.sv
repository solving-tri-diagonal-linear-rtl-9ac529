// tb_sram_row_reader - self-checking testbench of the input SRAM row reader.
//
// The SRAM model is filled with a distinct word per address.  Run 1
// (N = 5, M = 7) keeps out_ready high and checks that the first row appears
// RD_LAT + 2 cycles after start and that the N*M rows then follow one per
// cycle.  Run 2 (N = 3, M = 11, another base address) drops out_ready at
// random, so the FIFO has to hold returning reads.  In both runs every row
// must be the word at base + k, out_eos must be set on every N-th row and
// busy must fall after the last row.
module tb_sram_row_reader;

  localparam int ADDR_W = tdma_pkg::SRAM_ADDR_W;
  localparam int DATA_W = tdma_pkg::SRAM_DATA_W;
  localparam int RD_LAT = tdma_pkg::SRAM_RD_LAT;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [ADDR_W-1:0] base_addr = '0;
  logic [15:0] n_rows = '0;
  logic [31:0] n_sys = '0;
  logic busy;
  logic sram_rd_en;
  logic [ADDR_W-1:0] sram_rd_addr;
  logic [DATA_W-1:0] sram_rd_data;
  logic out_valid, out_ready = 1'b0, out_eos;
  logic [DATA_W-1:0] out_data;
  int checks = 0, failures = 0, cycles = 0;
  int waits = 0;

  sram_row_reader dut (.*);

  qdr_sram_model #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .RD_LAT(RD_LAT)) u_mem (
    .clk, .rd_en(sram_rd_en), .rd_addr(sram_rd_addr), .rd_data(sram_rd_data),
    .wr_en(1'b0), .wr_addr('0), .wr_data('0), .wr_be('0)
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

  function automatic logic [DATA_W-1:0] word(int a);
    return {32'(a) ^ 32'hA5A5_0000, 32'(a * 7), 32'(a + 3), 32'(~a)};
  endfunction

  task automatic run(int base, int n, int m, bit random_ready);
    int k, t_start, t_first, t_last;
    base_addr = ADDR_W'(base);
    n_rows = 16'(n);
    n_sys = 32'(m);
    start = 1'b1;
    t_start = cycles;
    @(negedge clk);
    start = 1'b0;
    k = 0;
    t_first = -1;
    t_last = -1;
    while (k < n * m) begin
      out_ready = random_ready ? ($urandom % 3 != 0) : 1'b1;
      #1;
      if (out_valid && !out_ready) waits++;
      if (out_valid && out_ready) begin
        if (t_first < 0) t_first = cycles;
        t_last = cycles;
        checks++;
        if (out_data !== word(base + k) || out_eos !== (k % n == n - 1)) begin
          failures++;
          $display("FAIL row %0d: data %h eos %0b", k, out_data, out_eos);
        end
        k++;
      end
      @(negedge clk);
    end
    out_ready = 1'b0;
    @(negedge clk);
    checks++;
    if (busy || out_valid) begin
      failures++;
      $display("FAIL still busy after the last row");
    end
    if (!random_ready) begin
      checks++;
      if (t_first - t_start != RD_LAT + 2 || t_last - t_first != n * m - 1) begin
        failures++;
        $display("FAIL timing: first row after %0d cycles, %0d rows in %0d cycles",
                 t_first - t_start, n * m, t_last - t_first + 1);
      end
    end
  endtask

  initial begin
    for (int a = 0; a < 200; a++) u_mem.mem[ADDR_W'(a)] = word(a);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run(10, 5, 7, 1'b0);
    run(140, 3, 11, 1'b1);
    checks++;
    if (waits == 0) begin
      failures++;
      $display("FAIL back-pressure never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
