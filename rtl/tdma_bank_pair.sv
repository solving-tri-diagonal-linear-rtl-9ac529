// tdma_bank_pair - the two system register banks between the factorisation
// and backward-substitution stages, with their DEMUX and MUX.
//
// Each bank holds one complete factorised system (up to MAX_N rows of
// ROW_W bits).  The write side (DEMUX) fills the bank selected by wr_sel in
// row order; the read side (MUX) empties the bank selected by rd_sel in
// reverse row order.  Each side switches to the other bank when it reaches
// the end of a system: the write side on the row flagged wr_eos, the read side
// after row 1 of the stored system.  While one bank is being filled by
// system m+1 the other is read out for system m, so the forward pass of one
// system overlaps the backward pass of the previous one.
//
// Interface:
//   write: wr_valid / wr_ready handshake, wr_eos marks the last row.
//          wr_ready is low only while the bank the DEMUX points at still holds
//          a system the read side has not finished (a stall).
//   read:  rd_valid while the bank the MUX points at is full; rd_data is that
//          bank's row rd_idx (0-based), starting at the last row; rd_last marks
//          row 0.  A row is consumed when rd_valid && rd_ready.
//   overflow: sticky flag; a system longer than MAX_N rows is cut at MAX_N
//          rows (the MAX_N-th row is taken as its end).
//
// Timing: a row written at a clock edge can be read in the next cycle; the
// read data is combinational from the registers.  Two banks and the switch at
// end-of-system follow the document; the handshake, the stall and the
// overflow rule are this design's choices.
module tdma_bank_pair #(
  parameter int unsigned ROW_W = 3 * tdma_pkg::FP_W,
  parameter int unsigned MAX_N = tdma_pkg::BANK_MAX_N,
  localparam int unsigned IDX_W = (MAX_N > 1) ? $clog2(MAX_N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // write side (from the factorisation stage)
  input  logic             wr_valid,
  input  logic             wr_eos,
  input  logic [ROW_W-1:0] wr_data,
  output logic             wr_ready,
  // read side (to the backward-substitution stage)
  output logic             rd_valid,
  output logic             rd_last,
  output logic [IDX_W-1:0] rd_idx,
  output logic [ROW_W-1:0] rd_data,
  input  logic             rd_ready,
  // status
  output logic             wr_sel,
  output logic             rd_sel,
  output logic             overflow
);

  logic [ROW_W-1:0] bank [2][MAX_N];
  logic [1:0]       full;
  logic [IDX_W:0]   len [2];           // rows stored in each bank
  logic [IDX_W:0]   wcnt;              // rows written to the current bank
  logic [IDX_W:0]   rcnt;              // rows read from the current bank

  logic wr_fire, wr_end, rd_fire;

  assign wr_ready = !full[wr_sel];
  assign wr_fire  = wr_valid && wr_ready;
  assign wr_end   = wr_eos || (wcnt == (IDX_W+1)'(MAX_N - 1));

  assign rd_valid = full[rd_sel];
  assign rd_idx   = IDX_W'(len[rd_sel] - 1'b1 - rcnt);
  assign rd_last  = (rcnt == len[rd_sel] - 1'b1);
  assign rd_data  = bank[rd_sel][rd_idx];
  assign rd_fire  = rd_valid && rd_ready;

  // storage: no reset, every row is written before it is read
  always_ff @(posedge clk) begin
    if (wr_fire) bank[wr_sel][IDX_W'(wcnt)] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full     <= '0;
      len[0]   <= '0;
      len[1]   <= '0;
      wcnt     <= '0;
      rcnt     <= '0;
      wr_sel   <= 1'b0;
      rd_sel   <= 1'b0;
      overflow <= 1'b0;
    end else begin
      // DEMUX side
      if (wr_fire) begin
        if (wr_end) begin
          full[wr_sel] <= 1'b1;
          len[wr_sel]  <= wcnt + 1'b1;
          wcnt         <= '0;
          wr_sel       <= !wr_sel;
          if (!wr_eos) overflow <= 1'b1;
        end else begin
          wcnt <= wcnt + 1'b1;
        end
      end
      // MUX side (never the same bank as a write in the same cycle: the
      // write side only writes an empty bank, the read side only reads a full one)
      if (rd_fire) begin
        if (rd_last) begin
          full[rd_sel] <= 1'b0;
          rcnt         <= '0;
          rd_sel       <= !rd_sel;
        end else begin
          rcnt <= rcnt + 1'b1;
        end
      end
    end
  end

  // the two sides never touch the same bank in one cycle
  assert property (@(posedge clk) disable iff (!rst_n)
                   (wr_fire && rd_fire) |-> (wr_sel != rd_sel));

endmodule
