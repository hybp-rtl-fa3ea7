// hybp_top: HyBP secure branch prediction unit for an SMT-2 core.
//
// Idea: protect each predictor table by the cheapest mechanism that is safe
// for its size. The small tables (L0/L1 BTB, bimodal base predictor) are kept
// apart per (hardware thread, privilege) context; the large tables (L2 BTB and
// the TAGE tagged components) are shared and randomized. Randomization uses a
// per-context code book of 1K 10-bit index keys, read with the branch PC in
// the first fetch stage and XORed into the table indices, and a per-context
// 64-bit content key XORed into stored tags, targets and counters. Because the
// code book is precomputed by a strong block cipher off the critical path, the
// cipher's latency never enters the fetch pipeline. Code books are renewed
// after reset, on every context switch and whenever a context's lookup count
// reaches an OS-set threshold; renewal takes ROWS + cipher latency cycles and
// never stalls prediction.
//
// Blocks: keys_table (code books), codebook_gen (renewal control, access
// counters, content keys), hybp_btb (three-level BTB), hybp_tage (TAGE).
// The block cipher (QARMA-64 in the document), the random number source and
// the timer are outside: their signals are ports. The BTB and TAGE share the
// code book read, which is done once per lookup.
//
// Timing of one lookup issued in cycle t (IF0):
//   t+1  index key read; L0 BTB answer (btb_if1_*)
//   t+2  L1 BTB answer (btb_if2_*); TAGE direction (tage_*)
//   t+3  final BTB answer incl. L2 (btb_*)
// The core returns the metadata (index key, BTB level, history snapshot) with
// the update of a resolved branch. Sizes default to the document's numbers.
module hybp_top
  import hybp_pkg::*;
#(
  parameter int unsigned L0_ENTRIES   = 8,
  parameter int unsigned L1_SETS      = 64,
  parameter int unsigned L1_WAYS      = 4,
  parameter int unsigned L2_SETS      = 1024,
  parameter int unsigned L2_WAYS      = 7,
  parameter int unsigned NTAB         = 30,
  parameter int unsigned NSHORT       = 10,
  parameter int unsigned T_ENTRIES    = 1024,
  parameter int unsigned HMIN         = 4,
  parameter int unsigned HMAX         = 640,
  parameter int unsigned BASE_ENTRIES = 4096,
  parameter int unsigned CNT_W        = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // lookup (IF0)
  input  logic                     lk_valid,
  input  logic                     lk_thread,
  input  logic                     lk_priv,
  input  pc_t                      lk_pc,
  // BTB answers
  output logic                     btb_if1_hit,
  output pc_t                      btb_if1_target,
  output logic                     btb_if2_hit,
  output pc_t                      btb_if2_target,
  output logic                     btb_valid,
  output logic                     btb_hit,
  output logic [1:0]               btb_level,
  output pc_t                      btb_target,
  output br_type_e                 btb_type,
  output pc_t                      btb_pc,
  output ikey_t                    btb_key,
  // TAGE answer
  output logic                     tage_valid,
  output logic                     tage_taken,
  output logic                     tage_from_tag,
  output logic [$clog2(NTAB+1)-1:0] tage_prov,
  output ikey_t                    tage_key,
  output logic [HMAX-1:0]          tage_hist,
  // BTB update (resolved taken branch)
  input  logic                     bu_valid,
  input  logic                     bu_thread,
  input  logic                     bu_priv,
  input  pc_t                      bu_pc,
  input  pc_t                      bu_target,
  input  br_type_e                 bu_type,
  input  ikey_t                    bu_key,
  input  logic [1:0]               bu_level,
  // TAGE update (resolved conditional branch)
  input  logic                     tu_valid,
  input  logic                     tu_thread,
  input  logic                     tu_priv,
  input  pc_t                      tu_pc,
  input  logic                     tu_taken,
  input  ikey_t                    tu_key,
  input  logic [HMAX-1:0]          tu_hist,
  // key management
  input  logic [CNT_W-1:0]         threshold,
  input  logic                     cs_valid,
  input  logic                     cs_thread,
  input  logic [15:0]              cs_asid,
  input  logic [15:0]              cs_vmid,
  input  logic [CIPH_W-1:0]        rand_in,
  input  logic [CIPH_W-1:0]        timer,
  // block cipher engine
  output logic                     ciph_req_valid,
  output logic [CIPH_W-1:0]        ciph_req_key,
  output logic [CIPH_W-1:0]        ciph_req_pt,
  input  logic                     ciph_rsp_valid,
  input  logic [CIPH_W-1:0]        ciph_rsp_ct,
  // status
  output logic                     renew_busy,
  output logic                     renew_done,
  output logic [NCTX-1:0]          renew_pending,
  output logic                     l2_write,
  output logic                     tage_alloc,
  output logic                     tage_mispred
);

  ckey_t ckey [NCTX];
  ikey_t lk_key;

  logic                 kt_wr_en;
  ctx_t                 kt_wr_ctx;
  logic [KT_ROW_AW-1:0] kt_wr_row;
  logic [KT_ROW_W-1:0]  kt_wr_data;

  wire ctx_t lk_ctx = ctx_of(lk_thread, lk_priv);

  keys_table u_keys (
    .clk,
    .rd_en  (lk_valid),
    .rd_ctx (lk_ctx),
    .rd_pc  (lk_pc),
    .rd_key (lk_key),
    .wr_en  (kt_wr_en),
    .wr_ctx (kt_wr_ctx),
    .wr_row (kt_wr_row),
    .wr_data(kt_wr_data)
  );

  codebook_gen #(.CNT_W(CNT_W)) u_gen (
    .clk, .rst_n,
    .acc_valid     (lk_valid),
    .acc_ctx       (lk_ctx),
    .threshold,
    .cs_valid, .cs_thread, .cs_asid, .cs_vmid,
    .rand_in, .timer,
    .ciph_req_valid, .ciph_req_key, .ciph_req_pt,
    .ciph_rsp_valid, .ciph_rsp_ct,
    .kt_wr_en, .kt_wr_ctx, .kt_wr_row, .kt_wr_data,
    .ckey,
    .busy          (renew_busy),
    .renew_done,
    .pending       (renew_pending)
  );

  hybp_btb #(
    .L0_ENTRIES(L0_ENTRIES), .L1_SETS(L1_SETS), .L1_WAYS(L1_WAYS),
    .L2_SETS(L2_SETS), .L2_WAYS(L2_WAYS)
  ) u_btb (
    .clk, .rst_n, .ckey,
    .lk_valid, .lk_ctx, .lk_pc, .lk_key,
    .if1_hit    (btb_if1_hit),
    .if1_target (btb_if1_target),
    .if2_hit    (btb_if2_hit),
    .if2_target (btb_if2_target),
    .pred_valid (btb_valid),
    .pred_hit   (btb_hit),
    .pred_level (btb_level),
    .pred_target(btb_target),
    .pred_type  (btb_type),
    .pred_pc    (btb_pc),
    .pred_key   (btb_key),
    .up_valid   (bu_valid),
    .up_ctx     (ctx_of(bu_thread, bu_priv)),
    .up_pc      (bu_pc),
    .up_target  (bu_target),
    .up_type    (bu_type),
    .up_key     (bu_key),
    .up_level   (bu_level),
    .l2_write
  );

  hybp_tage #(
    .NTAB(NTAB), .NSHORT(NSHORT), .T_ENTRIES(T_ENTRIES),
    .HMIN(HMIN), .HMAX(HMAX), .BASE_ENTRIES(BASE_ENTRIES)
  ) u_tage (
    .clk, .rst_n, .ckey,
    .lk_valid, .lk_ctx, .lk_pc, .lk_key,
    .pred_valid   (tage_valid),
    .pred_taken   (tage_taken),
    .pred_from_tag(tage_from_tag),
    .pred_prov    (tage_prov),
    .pred_key     (tage_key),
    .pred_hist    (tage_hist),
    .up_valid     (tu_valid),
    .up_ctx       (ctx_of(tu_thread, tu_priv)),
    .up_pc        (tu_pc),
    .up_taken     (tu_taken),
    .up_key       (tu_key),
    .up_hist      (tu_hist),
    .up_alloc     (tage_alloc),
    .up_mispred   (tage_mispred)
  );

endmodule
