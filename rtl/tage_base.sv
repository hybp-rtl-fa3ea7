// tage_base: bimodal base predictor of one (hardware thread, privilege) context.
//
// A PC-indexed table of 2-bit counters split, as in the document, into a
// prediction-bit array and a hysteresis-bit array with half as many entries
// (two neighbouring prediction bits share one hysteresis bit). Each context
// has its own copy, so the base predictor is physically isolated. The
// prediction bit is stored XORed with one content-key bit and decoded on the
// way out, so a new content key scrambles the table in one cycle.
//
// Interface and timing:
//   lookup  lk_en/lk_pc in cycle t -> lk_taken in t+1 (synchronous read)
//   update  up_en/up_pc/up_taken in t: read in t; in t+1 up_pred shows the
//           decoded prediction bit and, if up_commit is high, the saturating
//           2-bit counter {prediction, hysteresis} is written back.
// kbit is the content-key bit of this context. Default sizes: 8K prediction
// bits and 4K hysteresis bits per thread, halved per privilege level. The
// arrays are not reset. The split between privilege levels and the
// two-cycle update are this design's choices.
module tage_base
  import hybp_pkg::*;
#(
  parameter int unsigned ENTRIES = 4096
) (
  input  logic clk,
  input  logic rst_n,
  input  logic kbit,
  input  logic lk_en,
  input  pc_t  lk_pc,
  output logic lk_taken,
  input  logic up_en,
  input  pc_t  up_pc,
  input  logic up_taken,
  output logic up_pred,      // t+1: decoded prediction bit of the update PC
  input  logic up_commit     // t+1: write the new counter value
);
  localparam int unsigned AW = $clog2(ENTRIES);

  logic pred_mem [ENTRIES];
  logic hyst_mem [ENTRIES/2];

  logic lk_q;
  always_ff @(posedge clk) begin
    if (lk_en) lk_q <= pred_mem[lk_pc[PC_LSB +: AW]];
  end
  assign lk_taken = lk_q ^ kbit;

  logic          u_v_q, u_t_q, u_p_q, u_h_q;
  logic [AW-1:0] u_a_q;
  always_ff @(posedge clk) begin
    if (up_en) begin
      u_a_q <= up_pc[PC_LSB +: AW];
      u_t_q <= up_taken;
      u_p_q <= pred_mem[up_pc[PC_LSB +: AW]];
      u_h_q <= hyst_mem[up_pc[PC_LSB + 1 +: AW - 1]];
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) u_v_q <= 1'b0;
    else        u_v_q <= up_en;
  end

  assign up_pred = u_p_q ^ kbit;

  // saturating counter on the decoded value
  logic [1:0] c_old, c_new;
  always_comb begin
    c_old = {u_p_q ^ kbit, u_h_q};
    c_new = c_old;
    if (u_t_q && c_old != 2'b11)       c_new = c_old + 2'd1;
    else if (!u_t_q && c_old != 2'b00) c_new = c_old - 2'd1;
  end

  always_ff @(posedge clk) begin
    if (u_v_q && up_commit) begin
      pred_mem[u_a_q]       <= c_new[1] ^ kbit;
      hyst_mem[u_a_q[AW-1:1]] <= c_new[0];
    end
  end
endmodule
