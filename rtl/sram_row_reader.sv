// sram_row_reader - streams matrix rows from the input SRAM to the solver.
//
// The host leaves M systems of N rows each in the input SRAM, one row per
// DATA_W-bit word at consecutive addresses from base_addr, packed as
// {L, D, U, x} from the most significant end.  After a start pulse the reader
// issues one read per clock cycle, tags the N-th row of every system as its
// end-of-system row, and presents the rows on a valid/ready stream.
//
// The SRAM returns data RD_LAT cycles after a read is issued.  A small FIFO
// takes the returning words; a read is only issued while the FIFO has room for
// every read in flight, so no word is lost when the solver stalls.  With a
// consumer that is always ready the stream runs at one row per cycle.
//
// Interface: start (one-cycle pulse, latches base_addr, n_rows, n_sys);
// sram_rd_en / sram_rd_addr / sram_rd_data; out_valid / out_ready / out_eos /
// out_data; busy until the last row has left the FIFO.
//
// Timing: the first row is offered RD_LAT + 2 cycles after the start pulse
// (start is registered, then RD_LAT cycles of SRAM, then the FIFO register).
// RD_LAT must be at least 1.  One row per
// clock and the 128-bit word follow the document; the packing order, the
// read latency, the FIFO and the counting of rows to find the end of a system
// are this design's choices.
module sram_row_reader #(
  parameter int unsigned ADDR_W = tdma_pkg::SRAM_ADDR_W,
  parameter int unsigned DATA_W = tdma_pkg::SRAM_DATA_W,
  parameter int unsigned RD_LAT = tdma_pkg::SRAM_RD_LAT,
  parameter int unsigned N_W    = 16,
  parameter int unsigned M_W    = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] base_addr,
  input  logic [N_W-1:0]    n_rows,
  input  logic [M_W-1:0]    n_sys,
  output logic              busy,
  // input SRAM read port
  output logic              sram_rd_en,
  output logic [ADDR_W-1:0] sram_rd_addr,
  input  logic [DATA_W-1:0] sram_rd_data,
  // row stream
  output logic              out_valid,
  input  logic              out_ready,
  output logic              out_eos,
  output logic [DATA_W-1:0] out_data
);

  localparam int unsigned DEPTH = RD_LAT + 2;
  localparam int unsigned PTR_W = $clog2(DEPTH);
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  logic              issuing;
  logic [ADDR_W-1:0] addr;
  logic [N_W-1:0]    n_reg, row_in_sys;
  logic [M_W-1:0]    sys_left;          // systems not yet completely issued

  logic [RD_LAT-1:0] pipe_v, pipe_eos;  // reads in flight; bit k issued k+1 cycles ago
  logic [CNT_W-1:0]  inflight;

  logic [DATA_W:0]   fifo [DEPTH];      // {eos, row}
  logic [PTR_W-1:0]  wp, rp;
  logic [CNT_W-1:0]  count;
  logic              push, pop, issue, issue_eos;

  assign issue_eos = (row_in_sys == n_reg - 1'b1);
  assign issue     = issuing && (32'(count) + 32'(inflight) < DEPTH);

  assign sram_rd_en   = issue;
  assign sram_rd_addr = addr;

  assign push      = pipe_v[RD_LAT-1];
  assign out_valid = (count != '0);
  assign out_data  = fifo[rp][DATA_W-1:0];
  assign out_eos   = fifo[rp][DATA_W];
  assign pop       = out_valid && out_ready;
  assign busy      = issuing || (inflight != '0) || (count != '0);

  // number of reads issued but not yet written into the FIFO
  always_comb begin
    inflight = '0;
    for (int k = 0; k < int'(RD_LAT); k++) inflight += CNT_W'(pipe_v[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing    <= 1'b0;
      addr       <= '0;
      n_reg      <= '0;
      row_in_sys <= '0;
      sys_left   <= '0;
      pipe_v   <= '0;
      pipe_eos <= '0;
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      pipe_v   <= RD_LAT'({pipe_v, issue});
      pipe_eos <= RD_LAT'({pipe_eos, issue && issue_eos});

      if (start && !busy) begin
        issuing    <= (n_rows != '0) && (n_sys != '0);
        addr       <= base_addr;
        n_reg      <= n_rows;
        row_in_sys <= '0;
        sys_left   <= n_sys;
      end else if (issue) begin
        addr <= addr + 1'b1;
        if (issue_eos) begin
          row_in_sys <= '0;
          sys_left   <= sys_left - 1'b1;
          if (sys_left == M_W'(1)) issuing <= 1'b0;
        end else begin
          row_in_sys <= row_in_sys + 1'b1;
        end
      end

      if (push) begin
        wp <= (wp == PTR_W'(DEPTH - 1)) ? '0 : wp + 1'b1;
      end
      if (pop) begin
        rp <= (rp == PTR_W'(DEPTH - 1)) ? '0 : rp + 1'b1;
      end
      count <= count + CNT_W'(push) - CNT_W'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) fifo[wp] <= {pipe_eos[RD_LAT-1], sram_rd_data};
  end

  // the credit check keeps the FIFO from overflowing
  assert property (@(posedge clk) disable iff (!rst_n) push |-> (32'(count) < DEPTH || pop));

endmodule
