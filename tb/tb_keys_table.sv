// tb_keys_table: fills the code books of all four contexts with rows computed
// from a known formula, then reads keys by PC and checks each 10-bit key, the
// one-cycle read latency, that the key holds while the PC moves on, and that contexts do not see each other's rows.
module tb_keys_table;
  import hybp_pkg::*;
  logic clk = 0, rd_en = 0, wr_en = 0;
  ctx_t rd_ctx = '0, wr_ctx = '0;
  pc_t  rd_pc = '0;
  ikey_t rd_key;
  logic [KT_ROW_AW-1:0] wr_row = '0;
  logic [KT_ROW_W-1:0]  wr_data = '0;
  int checks = 0, failures = 0;

  keys_table dut (.*);
  always #5 clk = ~clk;

  function automatic logic [KT_ROW_W-1:0] rowval(int c, int r);
    return {8'(c * 37 + r), 32'(r * 32'h9E3779B1 ^ c * 32'h85EBCA6B)};
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NCTX; c++)
      for (int r = 0; r < KT_ROWS; r++) begin
        @(negedge clk); wr_en = 1; wr_ctx = ctx_t'(c); wr_row = KT_ROW_AW'(r); wr_data = rowval(c, r);
      end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 600; n++) begin
      int c, e;
      logic [KT_ROW_W-1:0] row;
      c = $urandom_range(NCTX - 1);
      e = $urandom_range(KEY_ENTRIES - 1);
      rd_en = 1; rd_ctx = ctx_t'(c);
      rd_pc = {$urandom, $urandom} & ~pc_t'((1 << (PC_LSB + 10)) - 1);
      rd_pc = rd_pc | pc_t'(e << PC_LSB) | pc_t'($urandom_range(3));
      @(negedge clk);
      rd_en = 0;
      rd_pc = {$urandom, $urandom};   // the read is already registered
      row = rowval(c, e / 4);
      checks++;
      if (rd_key !== row[(e % 4) * KEY_W +: KEY_W]) begin
        failures++;
        if (failures < 5) $display("key mismatch ctx %0d entry %0d: %h", c, e, rd_key);
      end
      // the key must hold while rd_en is low
      @(negedge clk);
      checks++;
      if (rd_key !== row[(e % 4) * KEY_W +: KEY_W]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
