// hybp_pkg: types and constants shared by the HyBP secure branch prediction unit.
//
// The unit serves an SMT-2 core. Every (hardware thread, privilege) pair is a
// "context": two threads times user/kernel gives four contexts. Small tables
// (L0/L1 BTB, bimodal base predictor) are physically separate per context; the
// large tables (L2 BTB, TAGE tagged tables) are shared and protected by index
// randomization (a per-context code book of 10-bit index keys) and XOR content
// encoding with a per-context 64-bit content key.
//
// The table sizes (16/512/7K BTB entries, 60-bit BTB entries, 1K-entry key table
// of 10-bit keys kept as 256 rows of 40 bits, 1K-entry tagged banks with 8- and
// 11-bit tags) follow the document. PC width, the BTB field split, the
// associativities and the history lengths are this design's own choices.
package hybp_pkg;

  // ---- contexts --------------------------------------------------------------
  localparam int unsigned NTHREADS = 2;               // SMT-2
  localparam int unsigned NPRIV    = 2;               // user, kernel
  localparam int unsigned NCTX     = NTHREADS * NPRIV;
  localparam int unsigned CTX_W    = $clog2(NCTX);

  typedef logic [CTX_W-1:0] ctx_t;

  // context number = {thread, privilege}
  function automatic ctx_t ctx_of(input logic thread, input logic priv);
    return ctx_t'({thread, priv});
  endfunction

  // ---- addresses ---------------------------------------------------------------
  localparam int unsigned PC_W   = 48;                // virtual address width
  localparam int unsigned PC_LSB = 2;                 // instructions are 4-byte aligned
  typedef logic [PC_W-1:0] pc_t;

  // ---- randomized index keys table ("code book") -------------------------------
  localparam int unsigned KEY_W       = 10;           // one index key
  localparam int unsigned KEY_ENTRIES = 1024;         // keys per context
  localparam int unsigned KT_ROW_W    = 40;           // physical SRAM word
  localparam int unsigned KEYS_PER_ROW = KT_ROW_W / KEY_W;
  localparam int unsigned KT_ROWS     = KEY_ENTRIES / KEYS_PER_ROW;   // 256
  localparam int unsigned KT_ROW_AW   = $clog2(KT_ROWS);
  typedef logic [KEY_W-1:0] ikey_t;

  // ---- content keys ------------------------------------------------------------
  localparam int unsigned CKEY_W = 64;
  typedef logic [CKEY_W-1:0] ckey_t;

  // ---- cipher interface ----------------------------------------------------------
  localparam int unsigned CIPH_W = 64;                // QARMA-64 block

  // ---- BTB entry: 60 bits = valid + type + tag + partial target ------------------
  localparam int unsigned BTB_TAG_W = 12;
  localparam int unsigned BTB_TGT_W = 45;             // target bits [46:2]

  typedef enum logic [1:0] {
    BR_COND = 2'd0,
    BR_JUMP = 2'd1,
    BR_CALL = 2'd2,
    BR_RET  = 2'd3
  } br_type_e;

  typedef struct packed {
    logic                  valid;
    br_type_e              btype;
    logic [BTB_TAG_W-1:0]  tag;     // encoded (XOR content key)
    logic [BTB_TGT_W-1:0]  tgt;     // encoded (XOR content key)
  } btb_entry_t;

  // plain tag of a branch PC
  function automatic logic [BTB_TAG_W-1:0] btb_tag_of(input pc_t pc);
    return pc[PC_LSB +: BTB_TAG_W];
  endfunction

  // "Hash" box of Fig. 3(a): XOR fold of the PC down to one key width
  function automatic ikey_t pc_hash(input pc_t pc);
    ikey_t h;
    h = '0;
    for (int unsigned i = PC_LSB; i < PC_W; i += KEY_W)
      for (int unsigned b = 0; b < KEY_W; b++)
        if (i + b < PC_W) h[b] ^= pc[i + b];
    return h;
  endfunction

  // full target from the stored partial target and the branch PC's upper bits
  function automatic pc_t btb_full_target(input pc_t pc, input logic [BTB_TGT_W-1:0] t);
    pc_t r;
    r = pc;
    r[PC_LSB +: BTB_TGT_W] = t;
    r[PC_LSB-1:0] = '0;
    return r;
  endfunction

endpackage
