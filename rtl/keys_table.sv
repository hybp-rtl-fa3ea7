// keys_table: the randomized index keys tables ("code books") of all contexts.
//
// Each (thread, privilege) context owns its own table of 1K index keys of
// 10 bits, so the tables are physically isolated from one another. As in the
// document, a table is organised as SRAM rows of 40 bits that each hold four
// keys (256 rows per context); its physical shape has no bearing on the meaning
// of a key. The key of a branch is selected by the PC bits just above the
// instruction alignment: the upper bits pick the row, the low two pick the key
// in the row. The table is not a cache: every lookup reads a key in fixed time.
//
// Interface and timing:
//   lookup port  rd_en/rd_ctx/rd_pc in cycle t, rd_key valid in cycle t+1
//                (synchronous SRAM read; rd_key holds while rd_en is low).
//   fill port    wr_en/wr_ctx/wr_row/wr_data writes one 40-bit row per cycle.
// A read and a write of the same row in the same cycle return the old row.
// The contents are not reset; the renewal controller fills every table after
// reset. Dual-port access (one read, one write) is this design's choice.
module keys_table
  import hybp_pkg::*;
#(
  parameter int unsigned ROWS = KT_ROWS
) (
  input  logic                     clk,
  // lookup
  input  logic                     rd_en,
  input  ctx_t                     rd_ctx,
  input  pc_t                      rd_pc,
  output ikey_t                    rd_key,
  // fill
  input  logic                     wr_en,
  input  ctx_t                     wr_ctx,
  input  logic [$clog2(ROWS)-1:0]  wr_row,
  input  logic [KT_ROW_W-1:0]      wr_data
);

  localparam int unsigned RAW  = $clog2(ROWS);
  localparam int unsigned LW   = $clog2(KEYS_PER_ROW);

  logic [KT_ROW_W-1:0] mem [NCTX * ROWS];

  logic [KT_ROW_W-1:0] row_q;
  logic [LW-1:0]       lane_q;

  wire [RAW-1:0] rd_row  = rd_pc[PC_LSB + LW +: RAW];
  wire [LW-1:0]  rd_lane = rd_pc[PC_LSB +: LW];

  always_ff @(posedge clk) begin
    if (wr_en) mem[{wr_ctx, wr_row}] <= wr_data;
    if (rd_en) begin
      row_q  <= mem[{rd_ctx, rd_row}];
      lane_q <= rd_lane;
    end
  end

  assign rd_key = row_q[lane_q * KEY_W +: KEY_W];

endmodule
