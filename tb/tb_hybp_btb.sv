// tb_hybp_btb: exercises the three-level hybrid BTB at its default sizes.
// The code book is modelled by a fixed function of (PC, context) delivered
// one cycle after the lookup, like the keys table. The test checks, against
// targets and levels it works out itself:
//   * L0 answers in IF1, L1 in IF2, the L2 result in IF3;
//   * a branch trained in one context is not found by another context;
//   * entries evicted from L0 are found in L1, entries evicted from L0 and L1
//     are found in the shared L2 only if they went there (missed both
//     private levels when they were trained);
//   * a new content key hides every entry, the old key finds them again;
//   * back-to-back lookups are pipelined.
module tb_hybp_btb;
  import hybp_pkg::*;
  logic clk = 0, rst_n = 0;
  ckey_t ckey [NCTX];
  logic lk_valid = 0;
  ctx_t lk_ctx = '0;
  pc_t  lk_pc = '0;
  ikey_t lk_key;
  logic if1_hit, if2_hit, pred_valid, pred_hit;
  pc_t  if1_target, if2_target, pred_target, pred_pc;
  logic [1:0] pred_level;
  br_type_e pred_type;
  ikey_t pred_key;
  logic up_valid = 0;
  ctx_t up_ctx = '0;
  pc_t  up_pc = '0, up_target = '0;
  br_type_e up_type = BR_JUMP;
  ikey_t up_key = '0;
  logic [1:0] up_level = '0;
  logic l2_write;
  int checks = 0, failures = 0, n_l2w = 0;
  pc_t t2;

  hybp_btb dut (.*);
  always #5 clk = ~clk;

  function automatic ikey_t keyf(pc_t pc, ctx_t c);
    logic [31:0] x;
    x = 32'(pc >> PC_LSB) * 32'h2545F491 + 32'(c) * 32'h9E3779B9;
    return x[31 -: KEY_W];
  endfunction
  always_ff @(posedge clk) lk_key <= keyf(lk_pc, lk_ctx);
  always_ff @(posedge clk) if (l2_write) n_l2w++;

  function automatic pc_t tgt_of(pc_t pc, int v);
    return {pc[PC_W-1 -: 8], 38'(pc * 7 + v * 64), 2'b00};
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic train(ctx_t c, pc_t pc, int v, logic [1:0] level);
    @(negedge clk);
    up_valid = 1; up_ctx = c; up_pc = pc; up_target = tgt_of(pc, v);
    up_type = br_type_e'(pc[4:3]); up_key = keyf(pc, c); up_level = level;
    @(negedge clk); up_valid = 0;
    @(negedge clk);
  endtask

  // one lookup; returns hits per stage and the final level/target
  task automatic look(ctx_t c, pc_t pc, input pc_t want_t, output logic h1, output logic h2,
                      output logic [1:0] lvl, output pc_t t);
    @(negedge clk); lk_valid = 1; lk_ctx = c; lk_pc = pc;
    @(negedge clk); lk_valid = 0; h1 = if1_hit;
    if (h1) begin checks++; if (if1_target !== want_t) failures++; end
    @(negedge clk); h2 = if2_hit; t2 = if2_target;
    @(negedge clk);
    checks++;
    if (!pred_valid || pred_pc !== pc || pred_key !== keyf(pc, c)) failures++;
    lvl = pred_level; t = pred_target;
  endtask

  // expect a level (3 = miss) and, on a hit, the target of version v
  task automatic expect_lvl(ctx_t c, pc_t pc, int v, logic [1:0] want, string what);
    logic h1, h2;
    logic [1:0] lvl;
    pc_t t;
    t = tgt_of(pc, v);
    look(c, pc, tgt_of(pc, v), h1, h2, lvl, t);
    checks++;
    if (lvl !== want || (want != 3 && (t !== tgt_of(pc, v) || !pred_hit || pred_type !== br_type_e'(pc[4:3])))
        || (want == 3 && pred_hit) || (h1 !== (want == 0))) begin
      failures++;
      $display("%s: ctx %0d pc %h level %0d (want %0d) target %h", what, c, pc, lvl, want, t);
    end
    if (want == 1) begin checks++; if (!h2 || t2 !== tgt_of(pc, v)) failures++; end
  endtask

  function automatic logic [5:0] l1set(pc_t pc, ctx_t c);
    ikey_t k;
    k = pc_hash(pc) ^ keyf(pc, c);
    return k[5:0];
  endfunction

  initial begin
    pc_t a, p;
    logic h1, h2;
    logic [1:0] lvl;
    pc_t t;
    int n, base_w;
    for (int c = 0; c < NCTX; c++) ckey[c] = {$urandom, $urandom};
    repeat (2) @(negedge clk); rst_n = 1;
    a = 48'h0000_4000_1230;
    expect_lvl(0, a, 0, 3, "empty");
    train(0, a, 1, 3);
    checks++; if (n_l2w != 1) failures++;
    expect_lvl(0, a, 1, 0, "L0 hit");
    for (int c = 1; c < NCTX; c++) expect_lvl(ctx_t'(c), a, 1, 3, "other context");
    // push a out of L0 with branches of other L1 sets (not sent to L2)
    base_w = n_l2w;
    n = 0;
    h1 = 1;
    p = 48'h0000_4000_8000;
    do begin
      p += 4;
      if (l1set(p, 0) != l1set(a, 0)) begin
        train(0, p, 0, 0);
        n++;
        look(0, a, tgt_of(a, 1), h1, h2, lvl, t);
      end
    end while (h1 && n < 200);
    checks++; if (n_l2w != base_w) failures++;
    expect_lvl(0, a, 1, 1, "L1 hit");
    // now push a out of its L1 set too
    n = 0;
    h2 = 1;
    do begin
      p += 4;
      if (l1set(p, 0) == l1set(a, 0)) begin
        train(0, p, 0, 0);
        n++;
        look(0, a, tgt_of(a, 1), h1, h2, lvl, t);
      end
    end while ((h1 || h2) && n < 200);
    expect_lvl(0, a, 1, 2, "L2 hit");
    // a branch that hit in L1 when trained never reaches L2
    train(1, 48'h0000_7777_0040, 2, 3);
    train(1, 48'h0000_7777_0040, 3, 1);
    expect_lvl(1, 48'h0000_7777_0040, 3, 0, "retrained");
    checks++; if (n_l2w != base_w + 1) failures++;
    // back-to-back lookups of two branches of two contexts
    @(negedge clk); lk_valid = 1; lk_ctx = 0; lk_pc = a;
    @(negedge clk); lk_ctx = 1; lk_pc = 48'h0000_7777_0040;
    @(negedge clk); lk_valid = 0;
    @(negedge clk);
    checks++; if (pred_level !== 2 || pred_target !== tgt_of(a, 1)) failures++;
    @(negedge clk);
    checks++; if (pred_level !== 0 || pred_target !== tgt_of(48'h0000_7777_0040, 3)) failures++;
    // content-key change hides everything, the old key finds it again
    begin
      ckey_t old;
      old = ckey[0];
      ckey[0] = ~old;
      expect_lvl(0, a, 1, 3, "after key change");
      ckey[0] = old;
      expect_lvl(0, a, 1, 2, "old key back");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
