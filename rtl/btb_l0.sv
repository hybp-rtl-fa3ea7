// btb_l0: the L0 BTB partition of one (hardware thread, privilege) context.
//
// A small fully associative table held in flip-flops. Each entry keeps the
// encoded set index (code-book key XOR PC hash) next to the encoded tag, so a
// branch hits only if both match, exactly as it would in a set-associative
// table; the branch type and the encoded partial target come with the hit.
// Because the index and tag arrive already encoded with the context's keys,
// changing those keys makes every old entry unreachable, which is how the
// table is "flushed" on a context switch.
//
// Interface and timing:
//   lookup  lk_idx/lk_tag -> lk_hit/lk_entry, combinational (the IF1 stage)
//   update  up_en with index, tag and entry; written at the next clock edge.
//           A matching entry is overwritten, otherwise the first invalid one,
//           otherwise a random one (random replacement, as in the document).
// Valid bits are cleared by reset. Full associativity is this design's choice;
// the document gives only the size (16 entries per thread, split here between
// the two privilege levels).
module btb_l0
  import hybp_pkg::*;
#(
  parameter int unsigned ENTRIES = 8,
  parameter logic [15:0] SEED    = 16'h1D0F
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  ikey_t                 lk_idx,
  input  logic [BTB_TAG_W-1:0]  lk_tag,
  output logic                  lk_hit,
  output btb_entry_t            lk_entry,
  input  logic                  up_en,
  input  ikey_t                 up_idx,
  input  btb_entry_t            up_entry
);

  localparam int unsigned EW = $clog2(ENTRIES);

  btb_entry_t  ent_q [ENTRIES];
  ikey_t       idx_q [ENTRIES];
  logic [15:0] rnd;

  lfsr16 #(.SEED(SEED)) u_rnd (.clk, .rst_n, .q(rnd));

  always_comb begin
    lk_hit   = 1'b0;
    lk_entry = '0;
    for (int i = 0; i < ENTRIES; i++)
      if (!lk_hit && ent_q[i].valid && idx_q[i] == lk_idx && ent_q[i].tag == lk_tag) begin
        lk_hit   = 1'b1;
        lk_entry = ent_q[i];
      end
  end

  // victim choice for an update
  logic [EW-1:0] vic;
  logic          found;
  always_comb begin
    found = 1'b0;
    vic   = rnd[EW-1:0];
    for (int i = 0; i < ENTRIES; i++)
      if (!found && ent_q[i].valid && idx_q[i] == up_idx && ent_q[i].tag == up_entry.tag) begin
        found = 1'b1;
        vic   = EW'(i);
      end
    for (int i = 0; i < ENTRIES; i++)
      if (!found && !ent_q[i].valid) begin
        found = 1'b1;
        vic   = EW'(i);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) begin
        ent_q[i] <= '0;
        idx_q[i] <= '0;
      end
    end else if (up_en) begin
      ent_q[vic] <= up_entry;
      idx_q[vic] <= up_idx;
    end
  end

endmodule
