// qdr_sram_model - behavioural model of a pair of QDR SRAMs used side by
// side as one wide memory with a separate read port and write port (QDR:
// both ports can be used in the same cycle).  Not synthesizable logic for the
// design; it stands in for the board memory in the testbenches.
//
// Read: rd_en with rd_addr in cycle t gives rd_data in cycle t + RD_LAT
// (RD_LAT >= 1); in other cycles rd_data is whatever the read pipeline
// holds.  Write: wr_en, wr_addr,
// wr_data and a per-lane enable wr_be (LANES lanes of DATA_W/LANES bits),
// taken at the clock edge.  Unwritten locations read as zero.  The storage is
// the associative array mem, which testbenches fill and inspect directly.
module qdr_sram_model #(
  parameter int unsigned ADDR_W = 20,
  parameter int unsigned DATA_W = 128,
  parameter int unsigned RD_LAT = 2,
  parameter int unsigned LANES  = 4
) (
  input  logic              clk,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [DATA_W-1:0] rd_data,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [DATA_W-1:0] wr_data,
  input  logic [LANES-1:0]  wr_be
);

  localparam int unsigned LW = DATA_W / LANES;

  logic [DATA_W-1:0] mem [logic [ADDR_W-1:0]];
  logic [DATA_W-1:0] pipe [RD_LAT];

  initial begin
    for (int k = 0; k < int'(RD_LAT); k++) pipe[k] = '0;
  end

  assign rd_data = pipe[RD_LAT-1];

  function automatic logic [DATA_W-1:0] peek(logic [ADDR_W-1:0] a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction

  always @(posedge clk) begin
    logic [DATA_W-1:0] w;
    // read pipeline: stage 0 samples the array, the last stage drives rd_data
    for (int k = int'(RD_LAT) - 1; k > 0; k--) pipe[k] <= pipe[k-1];
    pipe[0] <= rd_en ? peek(rd_addr) : '0;
    if (wr_en) begin
      w = peek(wr_addr);
      for (int k = 0; k < int'(LANES); k++)
        if (wr_be[k]) w[k*LW +: LW] = wr_data[k*LW +: LW];
      mem[wr_addr] = w;   // after the read above: a read in the same cycle sees the old word
    end
  end

endmodule
