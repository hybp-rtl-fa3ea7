// tb_btb_sa: checks a 16-set, 4-way BTB array against a reference model of
// the set contents. Lookups are answered two cycles after the request with
// the output register on; updates land one cycle after they are presented;
// a rewrite of a present tag stays in its way; a fifth branch in a full set
// evicts exactly one of the four; reset empties the array.
module tb_btb_sa;
  import hybp_pkg::*;
  localparam int S = 16, W = 4;
  logic clk = 0, rst_n = 0, lk_en = 0, up_en = 0, lk_hit, up_busy;
  logic [3:0] lk_set = '0, up_set = '0;
  logic [BTB_TAG_W-1:0] lk_tag = '0;
  btb_entry_t lk_entry, up_entry = '0;
  int checks = 0, failures = 0;

  btb_sa #(.SETS(S), .WAYS(W), .OUT_REG(1'b1)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic btb_entry_t mk(int s, int i, int v);
    btb_entry_t e;
    e.valid = 1; e.btype = br_type_e'(i % 4); e.tag = BTB_TAG_W'(s * 256 + i * 3 + 1);
    e.tgt = BTB_TGT_W'(s * 100000 + i * 100 + v);
    return e;
  endfunction

  task automatic write(int s, int i, int v);
    @(negedge clk); up_en = 1; up_set = 4'(s); up_entry = mk(s, i, v);
    @(negedge clk); up_en = 0;
    checks++; if (!up_busy) failures++;
  endtask

  task automatic probe(int s, int i, int expect_v, output logic hit);
    @(negedge clk); lk_en = 1; lk_set = 4'(s); lk_tag = mk(s, i, 0).tag;
    @(negedge clk); lk_en = 0;
    checks++;
    if (lk_hit) failures++;          // not yet: two-cycle latency
    @(negedge clk);
    hit = lk_hit;
    if (expect_v >= 0) begin
      checks++;
      if (!lk_hit || lk_entry !== mk(s, i, expect_v)) begin
        failures++;
        if (failures < 5) $display("set %0d br %0d: hit %b %h", s, i, lk_hit, lk_entry);
      end
    end
  endtask

  initial begin
    logic h;
    int nhit;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int s = 0; s < S; s++) begin probe(s, 0, -1, h); checks++; if (h) failures++; end
    for (int s = 0; s < S; s++) for (int i = 0; i < W; i++) write(s, i, 1);
    for (int s = 0; s < S; s++) for (int i = 0; i < W; i++) probe(s, i, 1, h);
    write(5, 2, 9);
    for (int i = 0; i < W; i++) probe(5, i, (i == 2) ? 9 : 1, h);
    // a branch of set 5 is not found in set 6
    probe(6, 5, -1, h); checks++; if (h) failures++;
    write(5, W, 4);
    probe(5, W, 4, h);
    nhit = 0;
    for (int i = 0; i < W; i++) begin probe(5, i, -1, h); nhit += h; end
    checks++; if (nhit != W - 1) failures++;
    for (int i = 0; i < W; i++) probe(6, i, 1, h);
    rst_n = 0; @(negedge clk); rst_n = 1;
    nhit = 0;
    for (int s = 0; s < S; s++) begin probe(s, 1, -1, h); nhit += h; end
    checks++; if (nhit != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
