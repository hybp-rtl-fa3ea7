// tb_hybp_top: end-to-end test of the HyBP prediction unit at its default
// sizes, with a 7-cycle pipelined cipher model filling the code books.
// Sequence: reset fills all four code books (each renewal must take 263
// cycles); thread 0 in user mode runs 320 taken branches twice, a loop of six
// branches that fits its L0, and a
// period-5 conditional branch; thread 1 looks up thread 0's branches; a
// context switch and an access-count threshold each trigger a renewal while
// lookups continue. Each branch is looked up, its BTB and TAGE answers are
// checked, and it is then resolved with the metadata the lookup returned.
// Counted and required at least once: L0, L1 and L2 BTB hits, L2 fills,
// TAGE allocations and tagged providers, renewals on reset, context switch
// and threshold, lookups served during a renewal, the flush of a context by
// its key change, and cross-thread misses.
module tb_hybp_top;
  import hybp_pkg::*;
  localparam int HMAX = 640;
  logic clk = 0, rst_n = 0;
  logic lk_valid = 0, lk_thread = 0, lk_priv = 0;
  pc_t lk_pc = '0;
  logic btb_if1_hit, btb_if2_hit, btb_valid, btb_hit;
  pc_t btb_if1_target, btb_if2_target, btb_target, btb_pc;
  logic [1:0] btb_level;
  br_type_e btb_type;
  ikey_t btb_key, tage_key;
  logic tage_valid, tage_taken, tage_from_tag;
  logic [4:0] tage_prov;
  logic [HMAX-1:0] tage_hist;
  logic bu_valid = 0, bu_thread = 0, bu_priv = 0;
  pc_t bu_pc = '0, bu_target = '0;
  br_type_e bu_type = BR_JUMP;
  ikey_t bu_key = '0;
  logic [1:0] bu_level = '0;
  logic tu_valid = 0, tu_thread = 0, tu_priv = 0, tu_taken = 0;
  pc_t tu_pc = '0;
  ikey_t tu_key = '0;
  logic [HMAX-1:0] tu_hist = '0;
  logic [31:0] threshold = 32'hFFFF_FFFF;
  logic cs_valid = 0, cs_thread = 0;
  logic [15:0] cs_asid = 16'h0001, cs_vmid = 16'h0000;
  logic [63:0] rand_in = 64'h5A5A_1234_C3C3_9876, timer = '0;
  logic ciph_req_valid, ciph_rsp_valid;
  logic [63:0] ciph_req_key, ciph_req_pt, ciph_rsp_ct;
  logic renew_busy, renew_done, l2_write, tage_alloc, tage_mispred;
  logic [NCTX-1:0] renew_pending;

  int checks = 0, failures = 0, cyc = 0;
  int n_l0 = 0, n_l1 = 0, n_l2 = 0, n_l2w = 0, n_alloc = 0, n_tagprov = 0, n_mis = 0;
  int n_renew = 0, n_renew_cs = 0, n_renew_thr = 0, n_busy_lookups = 0, n_flush = 0, n_xmiss = 0;
  int first_req = 0;
  logic in_renew = 0;

  hybp_top dut (.*);
  cipher_model #(.LAT(7)) u_ciph (
    .clk, .rst_n, .req_valid(ciph_req_valid), .req_key(ciph_req_key), .req_pt(ciph_req_pt),
    .rsp_valid(ciph_rsp_valid), .rsp_ct(ciph_rsp_ct));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    timer <= timer + 64'd1;
    if (l2_write) n_l2w++;
    if (tage_alloc) n_alloc++;
    if (tage_mispred) n_mis++;
    if (rst_n && ciph_req_valid && !in_renew) begin first_req = cyc; in_renew = 1; end
    if (rst_n && renew_done) begin
      in_renew = 0;
      n_renew++;
      checks++;
      if (cyc - first_req + 1 != 263) begin
        failures++;
        $display("renewal took %0d cycles", cyc - first_req + 1);
      end
    end
    if (lk_valid && renew_busy) n_busy_lookups++;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pc_t tgt_of(pc_t pc);
    return {pc[PC_W-1 -: 12], 34'(pc * 13 + 48'h40), 2'b00};
  endfunction

  // look up one branch; results of both predictors are left in these
  logic       r_hit, r_if1, r_tage;
  logic [1:0] r_lvl;
  pc_t        r_tgt;
  ikey_t      r_bkey, r_tkey;
  logic [HMAX-1:0] r_hist;
  logic [4:0] r_prov;

  task automatic lookup(logic th, logic pv, pc_t pc);
    @(negedge clk); lk_valid = 1; lk_thread = th; lk_priv = pv; lk_pc = pc;
    @(negedge clk); lk_valid = 0; r_if1 = btb_if1_hit;
    @(negedge clk);
    checks++;
    if (!tage_valid) failures++;
    r_tage = tage_taken; r_tkey = tage_key; r_hist = tage_hist; r_prov = tage_prov;
    @(negedge clk);
    checks++;
    if (!btb_valid || btb_pc !== pc || btb_key !== r_tkey) failures++;
    r_hit = btb_hit; r_lvl = btb_level; r_tgt = btb_target; r_bkey = btb_key;
    if (r_hit) begin
      checks++;
      if (r_tgt !== tgt_of(pc)) begin
        failures++;
        if (failures < 6) $display("pc %h: target %h want %h", pc, r_tgt, tgt_of(pc));
      end
      case (r_lvl) 2'd0: n_l0++; 2'd1: n_l1++; default: n_l2++; endcase
    end
  endtask

  task automatic train_btb(logic th, logic pv, pc_t pc);
    @(negedge clk);
    bu_valid = 1; bu_thread = th; bu_priv = pv; bu_pc = pc; bu_target = tgt_of(pc);
    bu_type = BR_JUMP; bu_key = r_bkey; bu_level = r_lvl;
    @(negedge clk); bu_valid = 0;
  endtask

  task automatic train_tage(logic th, logic pv, pc_t pc, logic t);
    @(negedge clk);
    tu_valid = 1; tu_thread = th; tu_priv = pv; tu_pc = pc; tu_taken = t;
    tu_key = r_tkey; tu_hist = r_hist;
    @(negedge clk); tu_valid = 0;
    if (r_prov != 0) n_tagprov++;
  endtask

  localparam int NBR = 320;
  function automatic pc_t br_pc(int i);
    return 48'h0000_0040_0000 + pc_t'(i * 36);
  endfunction

  initial begin
    int hits2, late_miss, n_before;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (n_renew == 4);
    // ---- thread 0, user: two passes over NBR taken branches ----
    for (int i = 0; i < NBR; i++) begin lookup(0, 0, br_pc(i)); train_btb(0, 0, br_pc(i)); end
    hits2 = 0;
    for (int i = 0; i < NBR; i++) begin
      lookup(0, 0, br_pc(i));
      if (r_hit) hits2++;
      train_btb(0, 0, br_pc(i));
    end
    checks++;
    if (hits2 < NBR * 9 / 10) begin failures++; $display("second pass hits %0d of %0d", hits2, NBR); end
    // ---- a loop of 6 branches fits the L0 partition ----
    for (int r = 0; r < 3; r++)
      for (int i = 0; i < 6; i++) begin
        lookup(0, 0, br_pc(i));
        if (r > 0) begin checks++; if (!r_hit) failures++; end
        train_btb(0, 0, br_pc(i));
      end
    // ---- thread 1 does not see thread 0's entries ----
    for (int i = 0; i < 32; i++) begin
      lookup(1, 0, br_pc(i));
      if (!r_hit) n_xmiss++;
      checks++; if (r_hit) failures++;
    end
    // ---- a period-5 conditional branch on thread 0 ----
    late_miss = 0;
    for (int it = 0; it < 400; it++) begin
      logic t;
      t = (it % 5) != 4;
      lookup(0, 0, 48'h0000_0050_0010);
      if (it >= 300 && r_tage != t) late_miss++;
      train_tage(0, 0, 48'h0000_0050_0010, t);
    end
    checks++;
    if (late_miss > 5) begin failures++; $display("late TAGE mispredictions %0d", late_miss); end
    // ---- context switch of thread 0: renewal, lookups continue ----
    lookup(0, 0, br_pc(3));
    checks++; if (!r_hit) failures++;
    n_before = n_renew;
    @(negedge clk); cs_valid = 1; cs_thread = 0; cs_asid = 16'h0077; rand_in = 64'h1111_2222_3333_4444;
    @(negedge clk); cs_valid = 0;
    for (int i = 0; i < 8; i++) lookup(0, 0, br_pc(i));   // during the renewal
    wait (n_renew == n_before + 2);
    n_renew_cs = n_renew - n_before;
    // old entries of the thread are gone
    for (int i = 0; i < 16; i++) begin
      lookup(0, 0, br_pc(i));
      if (!r_hit) n_flush++;
    end
    checks++; if (n_flush < 15) begin failures++; $display("only %0d of 16 flushed", n_flush); end
    // ---- access threshold on thread 1 kernel ----
    n_before = n_renew;
    threshold = 32'd20;
    for (int i = 0; i < 20; i++) lookup(1, 1, br_pc(i));
    threshold = 32'hFFFF_FFFF;
    // a renewal takes 263 cycles; allow 2000
    for (int i = 0; i < 2000 && n_renew != n_before + 1; i++) @(posedge clk);
    n_renew_thr = n_renew - n_before;
    // ---- every mechanism must have happened ----
    checks++; if (n_l0 == 0)  begin failures++; $display("no L0 hit"); end
    checks++; if (n_l1 == 0)  begin failures++; $display("no L1 hit"); end
    checks++; if (n_l2 == 0)  begin failures++; $display("no L2 hit"); end
    checks++; if (n_l2w == 0) begin failures++; $display("no L2 fill"); end
    checks++; if (n_alloc == 0) begin failures++; $display("no TAGE allocation"); end
    checks++; if (n_tagprov == 0) begin failures++; $display("no tagged provider"); end
    checks++; if (n_mis == 0) begin failures++; $display("no TAGE misprediction"); end
    checks++; if (n_renew_cs != 2) begin failures++; $display("context switch renewals %0d", n_renew_cs); end
    checks++; if (n_renew_thr != 1) begin failures++; $display("threshold renewals %0d", n_renew_thr); end
    checks++; if (n_busy_lookups == 0) begin failures++; $display("no lookup during renewal"); end
    checks++; if (n_xmiss == 0) failures++;
    $display("L0 %0d L1 %0d L2 %0d hits, %0d L2 fills, %0d allocations, %0d tagged providers, %0d mispredictions",
             n_l0, n_l1, n_l2, n_l2w, n_alloc, n_tagprov, n_mis);
    $display("renewals %0d (switch %0d, threshold %0d), %0d lookups during renewal, %0d flushed, %0d cross-thread misses",
             n_renew, n_renew_cs, n_renew_thr, n_busy_lookups, n_flush, n_xmiss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
