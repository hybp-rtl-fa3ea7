// codebook_gen: renews the per-context index keys tables and content keys.
//
// Renewal of a context's code book is requested
//   * for every context after reset,
//   * for both privilege contexts of a hardware thread on a context switch of
//     that thread, and
//   * when the context's access counter reaches the threshold set by the OS
//     (every BPU lookup of the context counts, speculative or not); the counter
//     restarts from zero when its renewal is requested.
// Pending requests are served one context at a time, lowest context first.
//
// A renewal latches an index seed, RAND ^ VMID ^ ASID of the thread, and then
// sends ROWS encryption requests to a pipelined block cipher (QARMA-64 in the
// document; outside this module), one per cycle, each with the current timer
// readout as plaintext and the seed as key. Ciphertexts return in order. The
// low 40 bits of the i-th ciphertext become row i of the code book; the whole
// first ciphertext also becomes the context's content key, so the content key
// changes in one cycle, right at the start of the refresh, while the SRAM rows
// follow one per cycle. With a cipher latency of 7 cycles and 256 rows the
// renewal takes 263 cycles from the first request to the last row written,
// the figure the document gives. The pipeline is never stalled meanwhile:
// lookups of a context being renewed simply see a mix of old and new keys.
//
// Interface and timing:
//   acc_valid/acc_ctx  one access per cycle at most
//   cs_valid           context switch on thread cs_thread with its ASID/VMID
//   ciph_req_*         request, accepted every cycle (no back-pressure)
//   ciph_rsp_*         response, any fixed latency, in order
//   kt_wr_*            code book row writes
//   ckey[c]            content key of context c, registered
// The plaintext is the timer input passed straight to the cipher, and each row
// written is the cipher response passed straight to the table, so those output
// bits carry no logic of this module; registering them would only add delay.
// Serving order, seed combining by XOR, and using the first ciphertext as the
// content key are this design's choices; the document leaves them open.
module codebook_gen
  import hybp_pkg::*;
#(
  parameter int unsigned ROWS  = KT_ROWS,
  parameter int unsigned CNT_W = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // access counting
  input  logic                     acc_valid,
  input  ctx_t                     acc_ctx,
  input  logic [CNT_W-1:0]         threshold,
  // context switch
  input  logic                     cs_valid,
  input  logic                     cs_thread,
  input  logic [15:0]              cs_asid,
  input  logic [15:0]              cs_vmid,
  // entropy and timer
  input  logic [CIPH_W-1:0]        rand_in,
  input  logic [CIPH_W-1:0]        timer,
  // cipher engine
  output logic                     ciph_req_valid,
  output logic [CIPH_W-1:0]        ciph_req_key,
  output logic [CIPH_W-1:0]        ciph_req_pt,
  input  logic                     ciph_rsp_valid,
  input  logic [CIPH_W-1:0]        ciph_rsp_ct,
  // code book fill
  output logic                     kt_wr_en,
  output ctx_t                     kt_wr_ctx,
  output logic [$clog2(ROWS)-1:0]  kt_wr_row,
  output logic [KT_ROW_W-1:0]      kt_wr_data,
  // content keys
  output ckey_t                    ckey [NCTX],
  // status
  output logic                     busy,
  output logic                     renew_done,     // pulse: last row written
  output logic [NCTX-1:0]          pending
);

  localparam int unsigned RAW = $clog2(ROWS);

  typedef enum logic {S_IDLE, S_RUN} state_e;
  state_e state_q;

  logic [CNT_W-1:0]  cnt_q [NCTX];
  logic [15:0]       asid_q [NTHREADS];
  logic [15:0]       vmid_q [NTHREADS];
  ctx_t              cur_q;
  logic [RAW:0]      issued_q, recvd_q;
  logic [CIPH_W-1:0] seed_q;

  // next context to serve: lowest pending
  ctx_t pick;
  always_comb begin
    pick = '0;
    for (int i = NCTX - 1; i >= 0; i--)
      if (pending[i]) pick = ctx_t'(i);
  end

  wire start = (state_q == S_IDLE) && (pending != '0);

  // threshold trigger of the access counter
  logic [NCTX-1:0] thr_hit;
  always_comb begin
    thr_hit = '0;
    if (acc_valid && (cnt_q[acc_ctx] + 1'b1 >= threshold)) thr_hit[acc_ctx] = 1'b1;
  end

  logic [NCTX-1:0] cs_hit;
  always_comb begin
    cs_hit = '0;
    if (cs_valid)
      for (int p = 0; p < NPRIV; p++) cs_hit[ctx_of(cs_thread, p[0])] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCTX; c++) cnt_q[c] <= '0;
      pending <= '1;                       // fill every code book after reset
    end else begin
      for (int c = 0; c < NCTX; c++) begin
        if (thr_hit[c] || cs_hit[c])               cnt_q[c] <= '0;
        else if (acc_valid && acc_ctx == ctx_t'(c)) cnt_q[c] <= cnt_q[c] + 1'b1;
      end
      // a request that arrives while its own renewal starts stays pending
      pending <= (pending & ~(start ? (NCTX'(1) << pick) : '0)) | thr_hit | cs_hit;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NTHREADS; t++) begin
        asid_q[t] <= '0;
        vmid_q[t] <= '0;
      end
    end else if (cs_valid) begin
      asid_q[cs_thread] <= cs_asid;
      vmid_q[cs_thread] <= cs_vmid;
    end
  end

  // thread of the context that starts (ASID/VMID of a switch in this cycle win)
  wire        pick_thr  = pick[CTX_W-1];
  wire [15:0] pick_asid = (cs_valid && cs_thread == pick_thr) ? cs_asid : asid_q[pick_thr];
  wire [15:0] pick_vmid = (cs_valid && cs_thread == pick_thr) ? cs_vmid : vmid_q[pick_thr];

  wire last_rx = ciph_rsp_valid && (recvd_q == (RAW+1)'(ROWS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      cur_q    <= '0;
      issued_q <= '0;
      recvd_q  <= '0;
      seed_q   <= '0;
      for (int c = 0; c < NCTX; c++) ckey[c] <= '0;
    end else begin
      case (state_q)
        S_IDLE: if (start) begin
          state_q  <= S_RUN;
          cur_q    <= pick;
          issued_q <= '0;
          recvd_q  <= '0;
          seed_q   <= rand_in ^ {32'h0, pick_vmid, pick_asid};
        end
        S_RUN: begin
          if (ciph_req_valid) issued_q <= issued_q + 1'b1;
          if (ciph_rsp_valid) begin
            recvd_q <= recvd_q + 1'b1;
            if (recvd_q == '0) ckey[cur_q] <= ciph_rsp_ct;
          end
          if (last_rx) state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign ciph_req_valid = (state_q == S_RUN) && (issued_q < (RAW+1)'(ROWS));
  assign ciph_req_key   = seed_q;
  assign ciph_req_pt    = timer;

  assign kt_wr_en   = (state_q == S_RUN) && ciph_rsp_valid;
  assign kt_wr_ctx  = cur_q;
  assign kt_wr_row  = recvd_q[RAW-1:0];
  assign kt_wr_data = ciph_rsp_ct[KT_ROW_W-1:0];

  assign busy       = (state_q == S_RUN);
  assign renew_done = last_rx && (state_q == S_RUN);

endmodule
