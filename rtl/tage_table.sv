// tage_table: storage of one tagged TAGE component.
//
// ENTRIES entries of {Ctr, Tag, U}: a signed prediction counter, a partial tag
// and a useful bit, kept exactly as they are given (the caller encodes Ctr and
// Tag with the content key). One read port serves lookups, a second read port
// and a write port serve the read-modify-write of updates.
//
// Interface and timing: every read is synchronous (address in cycle t, data in
// t+1); a write lands at the clock edge. The document gives 1K entries per
// bank with 8- or 11-bit tags; the 3-bit counter and 1-bit useful field are
// this design's choice. The array is not reset.
module tage_table #(
  parameter int unsigned ENTRIES = 1024,
  parameter int unsigned TAG_W   = 8,
  parameter int unsigned CTR_W   = 3,
  parameter int unsigned U_W     = 1
) (
  input  logic                       clk,
  input  logic                       lk_en,
  input  logic [$clog2(ENTRIES)-1:0] lk_idx,
  output logic [CTR_W+TAG_W+U_W-1:0] lk_data,
  input  logic                       rd_en,
  input  logic [$clog2(ENTRIES)-1:0] rd_idx,
  output logic [CTR_W+TAG_W+U_W-1:0] rd_data,
  input  logic                       wr_en,
  input  logic [$clog2(ENTRIES)-1:0] wr_idx,
  input  logic [CTR_W+TAG_W+U_W-1:0] wr_data
);
  logic [CTR_W+TAG_W+U_W-1:0] mem [ENTRIES];

  always_ff @(posedge clk) begin
    if (lk_en) lk_data <= mem[lk_idx];
    if (rd_en) rd_data <= mem[rd_idx];
    if (wr_en) mem[wr_idx] <= wr_data;
  end
endmodule
