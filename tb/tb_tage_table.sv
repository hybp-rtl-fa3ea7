// tb_tage_table: writes random entries and reads them back through both read
// ports, checking the one-cycle read latency and that a write is seen by the
// next read of its address, against a reference copy kept in the testbench.
module tb_tage_table;
  localparam int E = 1024, TW = 11, EW = 3 + TW + 1;
  logic clk = 0, lk_en = 0, rd_en = 0, wr_en = 0;
  logic [9:0] lk_idx = '0, rd_idx = '0, wr_idx = '0;
  logic [EW-1:0] lk_data, rd_data, wr_data = '0;
  logic [EW-1:0] ref_mem [E];
  int checks = 0, failures = 0;

  tage_table #(.ENTRIES(E), .TAG_W(TW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < E; i++) begin
      @(negedge clk); wr_en = 1; wr_idx = 10'(i); wr_data = EW'($urandom); ref_mem[i] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 2000; n++) begin
      int a, b;
      a = $urandom_range(E - 1); b = $urandom_range(E - 1);
      lk_en = 1; lk_idx = 10'(a); rd_en = 1; rd_idx = 10'(b);
      wr_en = ($urandom_range(1) == 1); wr_idx = 10'($urandom_range(E - 1)); wr_data = EW'($urandom);
      @(negedge clk);
      checks += 2;
      if (lk_data !== ref_mem[a]) failures++;
      if (rd_data !== ref_mem[b]) failures++;
      if (wr_en) ref_mem[wr_idx] = wr_data;
      lk_en = 0; rd_en = 0; wr_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
