// tb_hybp_tage: trains the randomized TAGE predictor (default sizes) with
// conditional branches of two hardware threads. The code book is modelled by
// a fixed function of (PC, context) delivered one cycle after the lookup.
// Exact checks, worked out by the testbench: the prediction arrives two
// cycles after the lookup; it carries the index key and the thread's history
// (the testbench keeps its own copy of both threads' histories); the update
// reports a misprediction exactly when the prediction it saw was wrong.
// Behavioural checks: a period-5 pattern that a bimodal counter cannot follow
// is learned by the tagged components (few mispredictions at the end, a
// tagged provider for the not-taken instances), entries get allocated, and a
// new content key makes the trained provider entry unreadable.
module tb_hybp_tage;
  import hybp_pkg::*;
  localparam int HMAX = 640;
  logic clk = 0, rst_n = 0;
  ckey_t ckey [NCTX];
  logic lk_valid = 0;
  ctx_t lk_ctx = '0;
  pc_t  lk_pc = '0;
  ikey_t lk_key;
  logic pred_valid, pred_taken, pred_from_tag;
  logic [4:0] pred_prov;
  ikey_t pred_key;
  logic [HMAX-1:0] pred_hist;
  logic up_valid = 0, up_taken = 0;
  ctx_t up_ctx = '0;
  pc_t  up_pc = '0;
  ikey_t up_key = '0;
  logic [HMAX-1:0] up_hist = '0;
  logic up_alloc, up_mispred;
  logic [HMAX-1:0] hist_ref [NTHREADS];
  int checks = 0, failures = 0, n_alloc = 0;

  hybp_tage dut (.*);
  always #5 clk = ~clk;

  function automatic ikey_t keyf(pc_t pc, ctx_t c);
    logic [31:0] x;
    x = 32'(pc >> PC_LSB) * 32'h2545F491 + 32'(c) * 32'h9E3779B9;
    return x[31 -: KEY_W];
  endfunction
  always_ff @(posedge clk) lk_key <= keyf(lk_pc, lk_ctx);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic p_taken, p_tag;
  logic [4:0] p_prov;

  task automatic predict(ctx_t c, pc_t pc);
    @(negedge clk); lk_valid = 1; lk_ctx = c; lk_pc = pc;
    @(negedge clk); lk_valid = 0;
    checks++; if (pred_valid) failures++;           // not before IF2
    @(negedge clk);
    checks++;
    if (!pred_valid || pred_key !== keyf(pc, c) || pred_hist !== hist_ref[c[CTX_W-1]]) begin
      failures++;
      if (failures < 5) $display("metadata mismatch ctx %0d", c);
    end
    p_taken = pred_taken; p_tag = pred_from_tag; p_prov = pred_prov;
    checks++; if (pred_from_tag !== (pred_prov != 0)) failures++;
  endtask

  task automatic resolve(ctx_t c, pc_t pc, logic t);
    @(negedge clk);
    up_valid = 1; up_ctx = c; up_pc = pc; up_taken = t; up_key = keyf(pc, c);
    up_hist = hist_ref[c[CTX_W-1]];
    @(negedge clk); up_valid = 0;
    hist_ref[c[CTX_W-1]] = {hist_ref[c[CTX_W-1]][HMAX-2:0], t};
    checks++;
    if (up_mispred !== (p_taken != t)) failures++;
    if (up_alloc) n_alloc++;
  endtask

  initial begin
    int miss_late, tag_late, trained_prov;
    pc_t loop_pc, other_pc;
    for (int c = 0; c < NCTX; c++) ckey[c] = {$urandom, $urandom};
    hist_ref[0] = '0; hist_ref[1] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    loop_pc  = 48'h0000_1000_0104;
    other_pc = 48'h0000_1000_0208;
    miss_late = 0; tag_late = 0;
    for (int it = 0; it < 600; it++) begin
      logic t;
      t = (it % 5) != 4;
      predict(0, loop_pc);
      if (it >= 500) begin
        if (p_taken != t) miss_late++;
        if (p_tag && t == 0) tag_late++;
      end
      resolve(0, loop_pc, t);
      // thread 1 runs an always-taken branch in between
      predict(2, other_pc);
      resolve(2, other_pc, 1'b1);
    end
    checks++;
    if (miss_late > 5) begin failures++; $display("%0d late mispredictions", miss_late); end
    checks++;
    if (tag_late < 18) begin failures++; $display("tagged provider at %0d of 20 not-taken instances", tag_late); end
    checks++;
    if (n_alloc == 0) failures++;
    // the trained provider entry is unreadable under a new content key
    for (int it = 600; it < 604; it++) begin
      predict(0, loop_pc);
      resolve(0, loop_pc, 1'b1);
    end
    predict(0, loop_pc);     // the not-taken instance: a tagged provider
    trained_prov = p_prov;
    checks++; if (trained_prov == 0) failures++;
    ckey[0] = ~ckey[0];
    predict(0, loop_pc);
    checks++; if (p_prov == trained_prov) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
