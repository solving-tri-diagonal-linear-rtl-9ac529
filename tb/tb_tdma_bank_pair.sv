// tb_tdma_bank_pair - self-checking testbench of the double register bank.
//
// A writer process streams systems of random length (1..MAX_N rows) with
// random idle cycles; each row's data is {system number, row number}.  One
// system is longer than a bank, which must be cut at MAX_N rows and raise
// overflow.  A reader process accepts rows with a random rd_ready.  A
// scoreboard checks that every system comes out once, rows in reverse order,
// with the right rd_idx and rd_last, and that the DEMUX and MUX selects
// alternate at each end of system.  It also counts the stalls (both banks
// busy), the bank switches and the cycles in which both banks are in use,
// and fails if any of them never happened.
module tb_tdma_bank_pair;

  localparam int ROW_W = 32;
  localparam int MAX_N = 8;
  localparam int IDX_W = $clog2(MAX_N);
  localparam int NSYS  = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_valid = 1'b0, wr_eos = 1'b0, wr_ready;
  logic [ROW_W-1:0] wr_data = '0;
  logic rd_valid, rd_last, rd_ready = 1'b0;
  logic [IDX_W-1:0] rd_idx;
  logic [ROW_W-1:0] rd_data;
  logic wr_sel, rd_sel, overflow;
  int checks = 0, failures = 0, cycles = 0;
  int stalls = 0, wr_switches = 0, rd_switches = 0, overlap = 0;
  bit writer_done = 1'b0;

  // expected systems, each a queue of row words in write order
  typedef logic [ROW_W-1:0] row_q_t[$];
  row_q_t expect_q[$];
  row_q_t cur;

  tdma_bank_pair #(.ROW_W(ROW_W), .MAX_N(MAX_N)) dut (.*);

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

  // activity counters
  logic wr_sel_q = 1'b0, rd_sel_q = 1'b0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (wr_valid && !wr_ready) stalls++;
      if (wr_valid && wr_ready && rd_valid && rd_ready) overlap++;
      if (wr_sel != wr_sel_q) wr_switches++;
      if (rd_sel != rd_sel_q) rd_switches++;
    end
    wr_sel_q <= wr_sel;
    rd_sel_q <= rd_sel;
  end

  // writer
  initial begin
    int n;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NSYS; s++) begin
      n = (s == NSYS / 2) ? MAX_N + 3 : 1 + ($urandom % MAX_N);
      for (int i = 0; i < n; i++) begin
        while ($urandom % 5 == 0) begin
          wr_valid = 1'b0;
          @(negedge clk);
        end
        wr_valid = 1'b1;
        wr_eos   = (i == n - 1);
        wr_data  = {16'(s), 16'(i)};
        #1;
        while (!wr_ready) begin
          @(negedge clk);
          #1;
        end
        cur.push_back(wr_data);
        if (wr_eos || cur.size() == MAX_N) begin
          expect_q.push_back(cur);
          cur = {};
        end
        @(negedge clk);
      end
    end
    wr_valid = 1'b0;
    writer_done = 1'b1;
  end

  // reader and scoreboard
  initial begin
    row_q_t sys;
    int r;
    int nsys_read = 0;
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      rd_ready = ($urandom % 3 != 0);
      #1;
      if (rd_valid && rd_ready) begin
        if (sys.size() == 0) begin
          if (expect_q.size() == 0) begin
            failures++;
            $display("FAIL row read but no system was complete");
            continue;
          end
          sys = expect_q.pop_front();
          r = sys.size() - 1;
        end
        checks++;
        if (rd_data !== sys[r] || 32'(rd_idx) != r || rd_last !== (r == 0)) begin
          failures++;
          $display("FAIL read %h idx %0d last %0b, expected %h idx %0d", rd_data, rd_idx, rd_last, sys[r], r);
        end
        r--;
        if (r < 0) begin
          sys = {};
          nsys_read++;
        end
      end
      if (writer_done && expect_q.size() == 0 && sys.size() == 0 && !rd_valid) break;
    end
    repeat (2) @(posedge clk);   // let the counters see the last switch
    checks++;
    if (nsys_read != NSYS + 1 || !overflow) begin
      failures++;
      $display("FAIL systems read %0d (expected %0d), overflow %0b", nsys_read, NSYS + 1, overflow);
    end
    checks++;
    if (wr_switches != NSYS + 1 || rd_switches != NSYS + 1) begin
      failures++;
      $display("FAIL bank switches: write %0d read %0d", wr_switches, rd_switches);
    end
    $display("stalls %0d, overlap cycles %0d, switches %0d/%0d", stalls, overlap, wr_switches, rd_switches);
    checks++;
    if (stalls == 0 || overlap == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
