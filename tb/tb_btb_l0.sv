// tb_btb_l0: checks the fully associative L0 BTB partition against a
// reference list: hits return the stored entry in the same cycle, an entry is
// found only when both the encoded index and the encoded tag match, a rewrite
// of a present branch replaces it in place, and with all entries full a new
// branch evicts exactly one old one.
module tb_btb_l0;
  import hybp_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, up_en = 0, lk_hit;
  ikey_t lk_idx = '0, up_idx = '0;
  logic [BTB_TAG_W-1:0] lk_tag = '0;
  btb_entry_t lk_entry, up_entry = '0;
  int checks = 0, failures = 0;

  btb_l0 #(.ENTRIES(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic btb_entry_t mk(int i, int v);
    btb_entry_t e;
    e.valid = 1; e.btype = br_type_e'(i % 4); e.tag = BTB_TAG_W'(i * 77 + 5);
    e.tgt = BTB_TGT_W'(i * 1000 + v);
    return e;
  endfunction

  task automatic write(int i, int v);
    @(negedge clk); up_en = 1; up_idx = KEY_W'(i * 13); up_entry = mk(i, v);
    @(negedge clk); up_en = 0;
  endtask

  // returns 1 on hit; checks the entry when expect_v >= 0
  task automatic probe(int i, int expect_v, output logic hit);
    btb_entry_t e;
    @(negedge clk); lk_idx = KEY_W'(i * 13); lk_tag = mk(i, 0).tag;
    #1;
    hit = lk_hit;
    e = mk(i, expect_v);
    if (expect_v >= 0) begin
      checks++;
      if (!lk_hit || lk_entry !== e) begin
        failures++;
        if (failures < 5) $display("branch %0d: hit %b entry %h want %h", i, lk_hit, lk_entry, e);
      end
    end
  endtask

  initial begin
    logic h;
    int nhit;
    repeat (2) @(negedge clk); rst_n = 1;
    // empty after reset
    for (int i = 0; i < 20; i++) begin probe(i, -1, h); checks++; if (h) failures++; end
    for (int i = 0; i < N; i++) write(i, 1);
    for (int i = 0; i < N; i++) probe(i, 1, h);
    // same tag with another index is a different branch
    @(negedge clk); lk_idx = KEY_W'(3 * 13 + 1); lk_tag = mk(3, 0).tag; #1;
    checks++; if (lk_hit) failures++;
    // in-place rewrite keeps all others
    write(2, 7);
    for (int i = 0; i < N; i++) probe(i, (i == 2) ? 7 : 1, h);
    // one more branch evicts exactly one
    write(N, 3);
    probe(N, 3, h);
    nhit = 0;
    for (int i = 0; i < N; i++) begin probe(i, -1, h); nhit += h; end
    checks++;
    if (nhit != N - 1) begin failures++; $display("%0d old entries left", nhit); end
    // reset clears everything
    rst_n = 0; @(negedge clk); rst_n = 1;
    nhit = 0;
    for (int i = 0; i <= N; i++) begin probe(i, -1, h); nhit += h; end
    checks++; if (nhit != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
