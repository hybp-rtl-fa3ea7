// tb_codebook_gen: runs the renewal controller against a 7-cycle pipelined
// cipher model. Checks: every context is renewed once after reset, in order;
// each renewal takes 263 cycles from first cipher request to last row; every
// row written is the low 40 bits of the cipher output for (seed, timer readout)
// with seed = RAND ^ {VMID, ASID}; the content key is the first cipher output;
// a context switch renews both privilege contexts of its thread with the new
// ASID/VMID; the access counter triggers a renewal at the threshold and
// restarts from zero.
module tb_codebook_gen;
  import hybp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic acc_valid = 0, cs_valid = 0, cs_thread = 0;
  ctx_t acc_ctx = '0;
  logic [31:0] threshold = 32'd1000;
  logic [15:0] cs_asid = '0, cs_vmid = '0;
  logic [63:0] rand_in = 64'h0123_4567_89AB_CDEF, timer = '0;
  logic ciph_req_valid, ciph_rsp_valid;
  logic [63:0] ciph_req_key, ciph_req_pt, ciph_rsp_ct;
  logic kt_wr_en;
  ctx_t kt_wr_ctx;
  logic [KT_ROW_AW-1:0] kt_wr_row;
  logic [KT_ROW_W-1:0] kt_wr_data;
  ckey_t ckey [NCTX];
  logic busy, renew_done;
  logic [NCTX-1:0] pending;
  int checks = 0, failures = 0;
  int cyc = 0;

  codebook_gen dut (.*);
  cipher_model #(.LAT(7)) u_ciph (
    .clk, .rst_n, .req_valid(ciph_req_valid), .req_key(ciph_req_key), .req_pt(ciph_req_pt),
    .rsp_valid(ciph_rsp_valid), .rsp_ct(ciph_rsp_ct));

  always #5 clk = ~clk;
  always @(posedge clk) begin cyc <= cyc + 1; timer <= timer + 64'd3; end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: plaintexts in request order, expected key of the renewal
  logic [63:0] pt_q [$];
  logic [63:0] exp_seed;
  logic [63:0] first_pt;
  int first_req, rows_seen, renewals, cur_ctx_seen;
  ctx_t order [$];
  logic [15:0] asid_ref [2], vmid_ref [2];

  always @(posedge clk) if (rst_n) begin
    if (ciph_req_valid) begin
      if (pt_q.size() == 0 && rows_seen == 0) first_req = cyc;
      pt_q.push_back(ciph_req_pt);
      checks++;
      if (ciph_req_key !== exp_seed) failures++;
    end
    if (kt_wr_en) begin
      logic [63:0] ct;
      if (rows_seen == 0) first_pt = pt_q[0];
      ct = u_ciph.mix(exp_seed, pt_q.pop_front());
      checks++;
      if (kt_wr_data !== ct[39:0] || kt_wr_row !== KT_ROW_AW'(rows_seen)) begin
        failures++;
        if (failures < 5) $display("row %0d: got %h/%0d want %h", rows_seen, kt_wr_data, kt_wr_row, ct[39:0]);
      end
      if (rows_seen == 1) begin
        checks++;
        if (ckey[kt_wr_ctx] !== u_ciph.mix(exp_seed, first_pt)) failures++;
      end
      rows_seen++;
    end
    if (renew_done) begin
      checks++;
      if (cyc - first_req + 1 != 263) begin
        failures++;
        $display("renewal took %0d cycles", cyc - first_req + 1);
      end
      checks++;
      if (rows_seen != KT_ROWS) failures++;
      order.push_back(kt_wr_ctx);
      renewals++;
    end
  end

  // expected seed whenever a renewal starts
  always @(posedge clk) if (rst_n && !busy && pending != 0) begin
    int c;
    c = 0;
    for (int i = NCTX - 1; i >= 0; i--) if (pending[i]) c = i;
    exp_seed <= rand_in ^ {32'h0, vmid_ref[c / 2], asid_ref[c / 2]};
    rows_seen <= 0;
  end

  initial begin
    asid_ref = '{16'h0, 16'h0}; vmid_ref = '{16'h0, 16'h0};
    renewals = 0; rows_seen = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    checks++;
    if (pending !== 4'b1111) failures++;
    wait (renewals == 4);
    checks++;
    if (order.size() != 4 || order[0] != 0 || order[1] != 1 || order[2] != 2 || order[3] != 3) failures++;
    // context switch on thread 1
    @(negedge clk);
    cs_valid = 1; cs_thread = 1; cs_asid = 16'hBEEF; cs_vmid = 16'h0042;
    asid_ref[1] = 16'hBEEF; vmid_ref[1] = 16'h0042; rand_in = 64'hFEDC_BA98_7654_3210;
    @(negedge clk);
    cs_valid = 0;
    checks++;
    if (pending !== 4'b1100) failures++;
    @(negedge clk);
    checks++;
    if (busy !== 1'b1 || pending !== 4'b1000) failures++;
    wait (renewals == 6);
    checks++;
    if (order[4] != 2 || order[5] != 3) failures++;
    checks++;
    if (ckey[2] === ckey[3]) failures++;
    // threshold: 10 accesses of context 1
    @(negedge clk);
    threshold = 10;
    for (int i = 0; i < 9; i++) begin
      acc_valid = 1; acc_ctx = 1; @(negedge clk);
    end
    checks++;
    if (pending !== 4'b0000) failures++;
    acc_valid = 1; acc_ctx = 1;
    @(negedge clk);
    acc_valid = 0;
    checks++;
    if (pending !== 4'b0010) failures++;
    @(negedge clk);
    checks++;
    if (!busy || kt_wr_ctx != 1) failures++;
    wait (renewals == 7);
    checks++;
    if (order[6] != 1) failures++;
    // the counter restarted at the trigger: 9 more accesses stay below it
    @(negedge clk);
    for (int i = 0; i < 9; i++) begin
      acc_valid = 1; acc_ctx = 1; @(negedge clk);
    end
    acc_valid = 0;
    checks++;
    if (pending !== 4'b0000) failures++;
    acc_valid = 1; @(negedge clk); acc_valid = 0;
    checks++;
    if (pending !== 4'b0010) failures++;
    wait (renewals == 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
