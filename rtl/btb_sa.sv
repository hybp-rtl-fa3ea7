// btb_sa: set-associative BTB array with random replacement.
//
// Used for the private L1 BTB partitions (one per context) and for the shared,
// randomized L2 BTB. Set index and tag arrive already encoded with the
// context's index key and content key, so this array knows nothing about
// contexts. Tags and targets live in an SRAM-style array with synchronous
// reads; the valid bits are flip-flops so that reset clears them.
//
// Interface and timing:
//   lookup  lk_en/lk_set/lk_tag in cycle t; lk_hit/lk_entry in cycle t+LAT,
//           LAT = 1 + OUT_REG (the L1 answers in IF2, the L2, with an output
//           register, in IF3 as drawn in the document's pipeline figure).
//   update  up_en/up_set/up_entry in cycle t: the set is read in t and written
//           at the end of t+1 - into the way holding the same tag, else the
//           first invalid way, else a random way. up_busy marks cycle t+1.
//           A second update to the same set in t+1 is not seen by the first.
// The associativity and the two-cycle update are this design's choices.
module btb_sa
  import hybp_pkg::*;
#(
  parameter int unsigned SETS    = 1024,
  parameter int unsigned WAYS    = 7,
  parameter bit          OUT_REG = 1'b1,
  parameter logic [15:0] SEED    = 16'hB1B2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // lookup
  input  logic                     lk_en,
  input  logic [$clog2(SETS)-1:0]  lk_set,
  input  logic [BTB_TAG_W-1:0]     lk_tag,
  output logic                     lk_hit,
  output btb_entry_t               lk_entry,
  // update
  input  logic                     up_en,
  input  logic [$clog2(SETS)-1:0]  up_set,
  input  btb_entry_t               up_entry,
  output logic                     up_busy
);

  localparam int unsigned SW = $clog2(SETS);
  localparam int unsigned WW = (WAYS > 1) ? $clog2(WAYS) : 1;

  btb_entry_t mem [SETS][WAYS];
  logic [WAYS-1:0] vld_q [SETS];
  logic [15:0] rnd;

  lfsr16 #(.SEED(SEED)) u_rnd (.clk, .rst_n, .q(rnd));

  // ---------------- lookup -------------------------------------------------
  btb_entry_t        lk_row_q [WAYS];
  logic [WAYS-1:0]   lk_vld_q;
  logic [BTB_TAG_W-1:0] lk_tag_q;
  logic              lk_en_q;

  always_ff @(posedge clk) begin
    if (lk_en) begin
      for (int w = 0; w < WAYS; w++) lk_row_q[w] <= mem[lk_set][w];
      lk_tag_q <= lk_tag;
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lk_en_q  <= 1'b0;
      lk_vld_q <= '0;
    end else begin
      lk_en_q <= lk_en;
      if (lk_en) lk_vld_q <= vld_q[lk_set];
    end
  end

  logic       hit_c;
  btb_entry_t ent_c;
  always_comb begin
    hit_c = 1'b0;
    ent_c = '0;
    for (int w = 0; w < WAYS; w++)
      if (!hit_c && lk_en_q && lk_vld_q[w] && lk_row_q[w].tag == lk_tag_q) begin
        hit_c = 1'b1;
        ent_c = lk_row_q[w];
        ent_c.valid = 1'b1;
      end
  end

  if (OUT_REG) begin : g_oreg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        lk_hit   <= 1'b0;
        lk_entry <= '0;
      end else begin
        lk_hit   <= hit_c;
        lk_entry <= ent_c;
      end
    end
  end else begin : g_noreg
    assign lk_hit   = hit_c;
    assign lk_entry = ent_c;
  end

  // ---------------- update -------------------------------------------------
  logic            up_q;
  logic [SW-1:0]   up_set_q;
  btb_entry_t      up_ent_q;
  btb_entry_t      up_row_q [WAYS];
  logic [WAYS-1:0] up_vld;

  always_ff @(posedge clk) begin
    if (up_en) begin
      for (int w = 0; w < WAYS; w++) up_row_q[w] <= mem[up_set][w];
      up_set_q <= up_set;
      up_ent_q <= up_entry;
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) up_q <= 1'b0;
    else        up_q <= up_en;
  end
  assign up_busy = up_q;
  assign up_vld  = vld_q[up_set_q];

  logic [WW-1:0] vic;
  logic          found;
  always_comb begin
    found = 1'b0;
    vic   = WW'(rnd[7:0] % WAYS);
    for (int w = 0; w < WAYS; w++)
      if (!found && up_vld[w] && up_row_q[w].tag == up_ent_q.tag) begin
        found = 1'b1;
        vic   = WW'(w);
      end
    for (int w = 0; w < WAYS; w++)
      if (!found && !up_vld[w]) begin
        found = 1'b1;
        vic   = WW'(w);
      end
  end

  always_ff @(posedge clk) begin
    if (up_q) mem[up_set_q][vic] <= up_ent_q;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) vld_q[s] <= '0;
    end else if (up_q) begin
      vld_q[up_set_q][vic] <= up_ent_q.valid;
    end
  end

endmodule
