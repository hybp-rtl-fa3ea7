// hybp_btb: three-level hybrid BTB of HyBP.
//
// The two small upper levels are physically isolated: every (hardware thread,
// privilege) context has its own L0 and its own L1 partition, and a lookup
// only reaches the partition of its context (the multiplexers selected by the
// hardware thread in the document's figure, extended to the privilege level).
// The big L2 is shared by all contexts and protected by randomization:
//   encoded set index = Hash(PC) XOR index key from the context's code book
//   encoded tag       = PC tag XOR content key
//   stored target     = partial target XOR content key
// The private levels use the same encoding, so a new key pair hides all their
// old entries; this is the context-switch flush.
//
// Fill policy: a resolved taken branch is written into its context's L0 and
// L1; it is written into the shared L2 only when its prediction missed both
// private levels. The private levels thus filter what reaches the L2, which is
// the effect the document relies on to slow eviction-set searches.
//
// Pipeline (stage names from the document's figure):
//   IF0  lk_valid/ctx/pc presented; the code-book key is read (outside).
//   IF1  lk_key arrives; index and tag encoded; L0 answers (if1_*).
//   IF2  L1 answers (if2_*).
//   IF3  L2 answers; pred_* gives the final answer with priority L0, L1, L2,
//        together with the level that hit and the index key, which the core
//        returns with the update.
// Targets are 4-byte aligned, so the two low target bits are always zero.
// Update: up_* in cycle t (taken branches only), written at the end of t+1.
// A lookup may issue every cycle. Associativities, field widths, the fill
// policy and the update timing are this design's choices; sizes (16, 512,
// 7K entries, 60-bit entries, 7 ways x 1024 sets for L2) are the document's.
module hybp_btb
  import hybp_pkg::*;
#(
  parameter int unsigned L0_ENTRIES = 8,      // per context (16 per thread)
  parameter int unsigned L1_SETS    = 64,     // per context (512 per thread)
  parameter int unsigned L1_WAYS    = 4,
  parameter int unsigned L2_SETS    = 1024,
  parameter int unsigned L2_WAYS    = 7
) (
  input  logic        clk,
  input  logic        rst_n,
  input  ckey_t       ckey [NCTX],
  // lookup
  input  logic        lk_valid,
  input  ctx_t        lk_ctx,
  input  pc_t         lk_pc,
  input  ikey_t       lk_key,        // IF1: index key of the IF0 PC
  output logic        if1_hit,
  output pc_t         if1_target,
  output logic        if2_hit,
  output pc_t         if2_target,
  output logic        pred_valid,    // IF3
  output logic        pred_hit,
  output logic [1:0]  pred_level,    // 0 L0, 1 L1, 2 L2, 3 miss
  output pc_t         pred_target,
  output br_type_e    pred_type,
  output pc_t         pred_pc,
  output ikey_t       pred_key,
  // update
  input  logic        up_valid,
  input  ctx_t        up_ctx,
  input  pc_t         up_pc,
  input  pc_t         up_target,
  input  br_type_e    up_type,
  input  ikey_t       up_key,
  input  logic [1:0]  up_level,
  output logic        l2_write       // pulse: an entry went to the shared L2
);

  localparam int unsigned L1_SW = $clog2(L1_SETS);
  localparam int unsigned L2_SW = $clog2(L2_SETS);

  function automatic logic [BTB_TAG_W-1:0] tkey(input ckey_t k);
    return k[CKEY_W-1 -: BTB_TAG_W];
  endfunction
  function automatic logic [BTB_TGT_W-1:0] akey(input ckey_t k);
    return k[BTB_TGT_W-1:0];
  endfunction

  // ---------------- pipeline registers ----------------------------------------
  typedef struct packed {
    logic  v;
    ctx_t  ctx;
    pc_t   pc;
  } s1_t;

  typedef struct packed {
    logic       v;
    ctx_t       ctx;
    pc_t        pc;
    ikey_t      key;
    logic       l0_hit;
    btb_entry_t l0_ent;
  } sx_t;

  s1_t s1_q;
  sx_t s2_q, s3_q;

  // ---------------- IF1 ------------------------------------------------------
  wire ikey_t              enc_idx = pc_hash(s1_q.pc) ^ lk_key;
  wire [BTB_TAG_W-1:0]     enc_tag = btb_tag_of(s1_q.pc) ^ tkey(ckey[s1_q.ctx]);

  logic       l0_hit   [NCTX];
  btb_entry_t l0_ent   [NCTX];
  logic       l1_hit   [NCTX];
  btb_entry_t l1_ent   [NCTX];

  // update-side encoding
  wire ikey_t          up_idx = pc_hash(up_pc) ^ up_key;
  btb_entry_t          up_ent;
  always_comb begin
    up_ent.valid = 1'b1;
    up_ent.btype = up_type;
    up_ent.tag   = btb_tag_of(up_pc) ^ tkey(ckey[up_ctx]);
    up_ent.tgt   = up_target[PC_LSB +: BTB_TGT_W] ^ akey(ckey[up_ctx]);
  end

  for (genvar c = 0; c < NCTX; c++) begin : g_ctx
    btb_l0 #(.ENTRIES(L0_ENTRIES), .SEED(16'h1D0F + 16'(c))) u_l0 (
      .clk, .rst_n,
      .lk_idx  (enc_idx),
      .lk_tag  (enc_tag),
      .lk_hit  (l0_hit[c]),
      .lk_entry(l0_ent[c]),
      .up_en   (up_valid && up_ctx == ctx_t'(c)),
      .up_idx  (up_idx),
      .up_entry(up_ent)
    );
    btb_sa #(.SETS(L1_SETS), .WAYS(L1_WAYS), .OUT_REG(1'b0), .SEED(16'h3C5A + 16'(c))) u_l1 (
      .clk, .rst_n,
      .lk_en   (s1_q.v && s1_q.ctx == ctx_t'(c)),
      .lk_set  (enc_idx[L1_SW-1:0]),
      .lk_tag  (enc_tag),
      .lk_hit  (l1_hit[c]),
      .lk_entry(l1_ent[c]),
      .up_en   (up_valid && up_ctx == ctx_t'(c)),
      .up_set  (up_idx[L1_SW-1:0]),
      .up_entry(up_ent),
      .up_busy ()
    );
  end

  logic       l2_hit;
  btb_entry_t l2_ent;
  logic       l2_up;
  assign l2_up = up_valid && (up_level >= 2'd2);

  btb_sa #(.SETS(L2_SETS), .WAYS(L2_WAYS), .OUT_REG(1'b1), .SEED(16'h7E11)) u_l2 (
    .clk, .rst_n,
    .lk_en   (s1_q.v),
    .lk_set  (enc_idx[L2_SW-1:0]),
    .lk_tag  (enc_tag),
    .lk_hit  (l2_hit),
    .lk_entry(l2_ent),
    .up_en   (l2_up),
    .up_set  (up_idx[L2_SW-1:0]),
    .up_entry(up_ent),
    .up_busy ()
  );
  assign l2_write = l2_up;

  assign if1_hit    = s1_q.v && l0_hit[s1_q.ctx];
  assign if1_target = btb_full_target(s1_q.pc, l0_ent[s1_q.ctx].tgt ^ akey(ckey[s1_q.ctx]));

  // ---------------- IF2 / IF3 --------------------------------------------------
  assign if2_hit    = s2_q.v && l1_hit[s2_q.ctx];
  assign if2_target = btb_full_target(s2_q.pc, l1_ent[s2_q.ctx].tgt ^ akey(ckey[s2_q.ctx]));

  logic       s3_l1_hit;
  btb_entry_t s3_l1_ent;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_q <= '0;
      s2_q <= '0;
      s3_q <= '0;
      s3_l1_hit <= 1'b0;
      s3_l1_ent <= '0;
    end else begin
      s1_q <= '{v: lk_valid, ctx: lk_ctx, pc: lk_pc};
      s2_q <= '{v: s1_q.v, ctx: s1_q.ctx, pc: s1_q.pc, key: lk_key,
                l0_hit: if1_hit, l0_ent: l0_ent[s1_q.ctx]};
      s3_q <= s2_q;
      s3_l1_hit <= if2_hit;
      s3_l1_ent <= l1_ent[s2_q.ctx];
    end
  end

  btb_entry_t sel;
  always_comb begin
    pred_valid = s3_q.v;
    pred_hit   = 1'b1;
    pred_level = 2'd0;
    sel        = s3_q.l0_ent;
    if (!s3_q.l0_hit) begin
      if (s3_l1_hit) begin
        pred_level = 2'd1;
        sel        = s3_l1_ent;
      end else if (l2_hit) begin
        pred_level = 2'd2;
        sel        = l2_ent;
      end else begin
        pred_level = 2'd3;
        pred_hit   = 1'b0;
      end
    end
    pred_hit    = pred_hit && s3_q.v;
    pred_target = btb_full_target(s3_q.pc, sel.tgt ^ akey(ckey[s3_q.ctx]));
    pred_type   = sel.btype;
    pred_pc     = s3_q.pc;
    pred_key    = s3_q.key;
  end

endmodule
