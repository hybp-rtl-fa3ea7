// hybp_tage: TAGE direction predictor protected the HyBP way.
//
// Structure: a bimodal base predictor per (thread, privilege) context
// (physically isolated), plus NTAB shared tagged components of 1K entries,
// the first NSHORT with 8-bit tags and the rest with 11-bit tags. Component i
// is indexed and tagged with a hash of the PC and the newest HLEN(i) bits of
// the thread's global history; HLEN grows geometrically from HMIN to HMAX.
// Randomization: every component index is XORed with the 10-bit index key the
// context's code book returns for this PC (the same key the BTB uses), and the
// Ctr and Tag fields are stored XORed with the context's content key. A
// context with other keys therefore lands on other entries and cannot read
// the counters or match the tags it finds.
//
// Prediction: the longest-history component whose tag matches provides the
// direction (sign of Ctr); the next matching one, or the base predictor, is
// the alternate.
// Update (standard TAGE): the provider's Ctr moves toward the outcome; its U
// bit is set or cleared when provider and alternate disagree; on a wrong
// final prediction one entry is allocated in the first longer component
// whose U bit is clear (scanning from a random one of the first two), else
// the U bits of all longer components are cleared. The base predictor is
// trained when it was the provider. The thread's global history takes the
// outcome of every update (histories are kept per hardware thread and
// advanced in commit order).
//
// Pipeline:
//   IF0  lk_valid/ctx/pc; the index key is read outside.
//   IF1  lk_key arrives; indices and tags are computed; tables are read.
//   IF2  pred_* valid, with the metadata (index key and history snapshot)
//        that the core hands back with the update.
//   Update: up_* in cycle t, tables written at the end of t+1.
// The statistical corrector and loop predictor of TAGE-SC-L are not part of
// this module. Counter/useful widths, hash functions, history lengths and the
// allocation rule details are this design's choices (the document refers to
// the TAGE-SC-L publication for them).
module hybp_tage
  import hybp_pkg::*;
#(
  parameter int unsigned NTAB         = 30,
  parameter int unsigned NSHORT       = 10,
  parameter int unsigned TAG_S        = 8,
  parameter int unsigned TAG_L        = 11,
  parameter int unsigned T_ENTRIES    = 1024,
  parameter int unsigned HMIN         = 4,
  parameter int unsigned HMAX         = 640,
  parameter int unsigned BASE_ENTRIES = 4096
) (
  input  logic                clk,
  input  logic                rst_n,
  input  ckey_t               ckey [NCTX],
  // lookup
  input  logic                lk_valid,
  input  ctx_t                lk_ctx,
  input  pc_t                 lk_pc,
  input  ikey_t               lk_key,
  output logic                pred_valid,     // IF2
  output logic                pred_taken,
  output logic                pred_from_tag,  // a tagged component provided
  output logic [$clog2(NTAB+1)-1:0] pred_prov, // provider + 1, 0 = base
  output ikey_t               pred_key,
  output logic [HMAX-1:0]     pred_hist,
  // update
  input  logic                up_valid,
  input  ctx_t                up_ctx,
  input  pc_t                 up_pc,
  input  logic                up_taken,
  input  ikey_t               up_key,
  input  logic [HMAX-1:0]     up_hist,
  output logic                up_alloc,       // pulse (t+1): an entry was allocated
  output logic                up_mispred      // pulse (t+1): final prediction was wrong
);

  localparam int unsigned CTR_W = 3;
  localparam int unsigned IW    = $clog2(T_ENTRIES);
  localparam int unsigned PW    = $clog2(NTAB+1);

  function automatic int unsigned hlen(int unsigned i);
    return int'($floor(real'(HMIN) * $pow(real'(HMAX) / real'(HMIN),
                                          real'(i) / real'(NTAB - 1)) + 0.5));
  endfunction

  // XOR fold of the newest len history bits into w bits
  function automatic logic [15:0] fold(input logic [HMAX-1:0] h, input int unsigned len,
                                       input int unsigned w);
    logic [15:0] r;
    r = '0;
    for (int unsigned b = 0; b < HMAX; b++)
      if (b < len) r[b % w] ^= h[b];
    return r;
  endfunction

  function automatic logic [IW-1:0] t_index(input pc_t pc, input logic [HMAX-1:0] h,
                                            input int unsigned len, input int unsigned i,
                                            input ikey_t key);
    logic [15:0] f;
    f = fold(h, len, IW) ^ 16'(pc[PC_LSB +: IW]) ^ 16'(pc[PC_LSB + IW +: IW])
        ^ 16'(pc[PC_LSB +: IW] >> (i % IW));
    return f[IW-1:0] ^ IW'(key);
  endfunction

  function automatic logic [15:0] t_tag(input pc_t pc, input logic [HMAX-1:0] h,
                                        input int unsigned len, input int unsigned w);
    return (16'(pc[PC_LSB +: 16]) ^ fold(h, len, w) ^ (fold(h, len, w - 1) << 1));
  endfunction

  // ---------------- global histories (per hardware thread) ---------------------
  logic [HMAX-1:0] ghist_q [NTHREADS];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NTHREADS; t++) ghist_q[t] <= '0;
    end else if (up_valid) begin
      ghist_q[up_ctx[CTX_W-1]] <= {ghist_q[up_ctx[CTX_W-1]][HMAX-2:0], up_taken};
    end
  end

  // ---------------- lookup pipeline registers ---------------------------------
  logic  s1_v, s2_v;
  ctx_t  s1_ctx, s2_ctx;
  pc_t   s1_pc;
  ikey_t s2_key;
  logic [HMAX-1:0] s2_hist;
  wire [HMAX-1:0] s1_hist = ghist_q[s1_ctx[CTX_W-1]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s2_v <= 1'b0;
      s1_ctx <= '0; s2_ctx <= '0; s1_pc <= '0; s2_key <= '0; s2_hist <= '0;
    end else begin
      s1_v <= lk_valid; s1_ctx <= lk_ctx; s1_pc <= lk_pc;
      s2_v <= s1_v; s2_ctx <= s1_ctx; s2_key <= lk_key; s2_hist <= s1_hist;
    end
  end

  // ---------------- update pipeline registers ---------------------------------
  logic u1_v, u1_taken;
  ctx_t u1_ctx;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u1_v <= 1'b0; u1_taken <= 1'b0; u1_ctx <= '0;
    end else begin
      u1_v <= up_valid; u1_taken <= up_taken; u1_ctx <= up_ctx;
    end
  end

  // per-component decoded results
  logic [NTAB-1:0]  lk_hit, lk_pred;
  logic [NTAB-1:0]  u_hit, u_pred, u_useful;
  logic [CTR_W-1:0] u_ctr [NTAB];
  logic [NTAB-1:0]  wr_en;
  logic [NTAB-1:0]  wr_alloc;    // write a fresh entry
  logic [NTAB-1:0]  wr_clru;     // clear the U bit
  logic [NTAB-1:0]  wr_prov;     // update the provider
  logic [CTR_W-1:0] prov_ctr_new;
  logic             prov_u_new;
  logic [15:0]      rnd;

  lfsr16 #(.SEED(16'h5EED)) u_rnd (.clk, .rst_n, .q(rnd));

  for (genvar i = 0; i < NTAB; i++) begin : g_tab
    localparam int unsigned TW = (i < NSHORT) ? TAG_S : TAG_L;
    localparam int unsigned HL = hlen(i);
    localparam int unsigned EW = CTR_W + TW + 1;

    logic [EW-1:0] lk_data, rd_data, wdata;
    logic [IW-1:0] lk_idx, rd_idx, u_idx_q;
    logic [TW-1:0] lk_tag_q, u_tag_q;

    assign lk_idx = t_index(s1_pc, s1_hist, HL, i, lk_key);
    assign rd_idx = t_index(up_pc, up_hist, HL, i, up_key);

    always_ff @(posedge clk) begin
      lk_tag_q <= TW'(t_tag(s1_pc, s1_hist, HL, TW)) ^ ckey[s1_ctx][CKEY_W-1 -: TW];
      if (up_valid) begin
        u_idx_q <= rd_idx;
        u_tag_q <= TW'(t_tag(up_pc, up_hist, HL, TW)) ^ ckey[up_ctx][CKEY_W-1 -: TW];
      end
    end

    tage_table #(.ENTRIES(T_ENTRIES), .TAG_W(TW), .CTR_W(CTR_W), .U_W(1)) u_tab (
      .clk,
      .lk_en  (s1_v),
      .lk_idx (lk_idx),
      .lk_data(lk_data),
      .rd_en  (up_valid),
      .rd_idx (rd_idx),
      .rd_data(rd_data),
      .wr_en  (wr_en[i]),
      .wr_idx (u_idx_q),
      .wr_data(wdata)
    );

    // field layout {Ctr, Tag, U}; Ctr and Tag encoded with the content key
    wire [CTR_W-1:0] lk_ctr = lk_data[EW-1 -: CTR_W] ^ ckey[s2_ctx][CTR_W-1:0];
    assign lk_hit[i]  = (lk_data[TW:1] == lk_tag_q);
    assign lk_pred[i] = ~lk_ctr[CTR_W-1];

    assign u_ctr[i]    = rd_data[EW-1 -: CTR_W] ^ ckey[u1_ctx][CTR_W-1:0];
    assign u_hit[i]    = (rd_data[TW:1] == u_tag_q);
    assign u_pred[i]   = ~u_ctr[i][CTR_W-1];
    assign u_useful[i] = rd_data[0];

    always_comb begin
      wdata = rd_data;
      if (wr_alloc[i]) begin
        wdata = {(u1_taken ? CTR_W'(0) : {CTR_W{1'b1}}) ^ ckey[u1_ctx][CTR_W-1:0],
                 u_tag_q, 1'b0};
      end else if (wr_prov[i]) begin
        wdata = {prov_ctr_new ^ ckey[u1_ctx][CTR_W-1:0], rd_data[TW:1], prov_u_new};
      end else if (wr_clru[i]) begin
        wdata[0] = 1'b0;
      end
    end
  end

  // ---------------- base predictors --------------------------------------------
  logic [NCTX-1:0] base_lk, base_up;
  for (genvar c = 0; c < NCTX; c++) begin : g_base
    tage_base #(.ENTRIES(BASE_ENTRIES)) u_base (
      .clk, .rst_n,
      .kbit     (ckey[c][CTR_W]),
      .lk_en    (s1_v && s1_ctx == ctx_t'(c)),
      .lk_pc    (s1_pc),
      .lk_taken (base_lk[c]),
      .up_en    (up_valid && up_ctx == ctx_t'(c)),
      .up_pc    (up_pc),
      .up_taken (up_taken),
      .up_pred  (base_up[c]),
      .up_commit(u1_ctx == ctx_t'(c) && !(|u_hit))
    );
  end

  // ---------------- prediction (IF2) -------------------------------------------
  always_comb begin
    pred_taken    = base_lk[s2_ctx];
    pred_from_tag = 1'b0;
    pred_prov     = '0;
    for (int i = 0; i < NTAB; i++)
      if (lk_hit[i]) begin
        pred_taken    = lk_pred[i];
        pred_from_tag = 1'b1;
        pred_prov     = PW'(i + 1);
      end
  end
  assign pred_valid = s2_v;
  assign pred_key   = s2_key;
  assign pred_hist  = s2_hist;

  // ---------------- update decision (t+1) --------------------------------------
  int  prov, alt;
  logic has_prov, has_alt, prov_p, alt_p, final_p, mispred;
  logic [NTAB-1:0] longer, free;
  logic alloc_ok;
  int   alloc_i;

  always_comb begin
    prov = 0; alt = 0; has_prov = 1'b0; has_alt = 1'b0;
    for (int i = 0; i < NTAB; i++)
      if (u_hit[i]) begin
        if (has_prov) begin alt = prov; has_alt = 1'b1; end
        prov = i; has_prov = 1'b1;
      end
    prov_p  = u_pred[prov];
    alt_p   = has_alt ? u_pred[alt] : base_up[u1_ctx];
    final_p = has_prov ? prov_p : base_up[u1_ctx];
    mispred = u1_v && (final_p != u1_taken);

    // provider counter and useful bit
    prov_ctr_new = u_ctr[prov];
    if (u1_taken && u_ctr[prov] != {1'b0, {CTR_W-1{1'b1}}})      prov_ctr_new = u_ctr[prov] + 1'b1;
    else if (!u1_taken && u_ctr[prov] != {1'b1, {CTR_W-1{1'b0}}}) prov_ctr_new = u_ctr[prov] - 1'b1;
    prov_u_new = u_useful[prov];
    if (prov_p != alt_p) prov_u_new = (prov_p == u1_taken);

    // allocation in a longer component
    for (int i = 0; i < NTAB; i++) longer[i] = !has_prov || (i > prov);
    free     = longer & ~u_useful;
    alloc_ok = 1'b0;
    alloc_i  = 0;
    for (int i = 0; i < NTAB; i++)
      if (!alloc_ok && free[i]) begin
        // skip the first free component half of the time
        if (rnd[0] && i + 1 < NTAB && free[i + 1]) begin
          alloc_i = i + 1;
        end else begin
          alloc_i = i;
        end
        alloc_ok = 1'b1;
      end

    wr_alloc = '0; wr_clru = '0; wr_prov = '0;
    if (u1_v) begin
      if (has_prov) wr_prov[prov] = 1'b1;
      if (mispred && (longer != '0)) begin
        if (alloc_ok) wr_alloc[alloc_i] = 1'b1;
        else          wr_clru = longer;
      end
    end
    wr_en = wr_alloc | wr_clru | wr_prov;
  end

  assign up_alloc   = u1_v && (wr_alloc != '0);
  assign up_mispred = mispred;

endmodule
