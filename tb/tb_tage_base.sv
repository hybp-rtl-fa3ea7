// tb_tage_base: trains 2-bit counters of the bimodal base predictor and checks
// the predicted direction against a reference counter model, including the
// shared hysteresis bit of neighbouring entries, the gating by up_commit, the
// lookup latency, and that flipping the content-key bit inverts every output.
module tb_tage_base;
  import hybp_pkg::*;
  localparam int E = 4096;
  logic clk = 0, rst_n = 0, kbit = 0, lk_en = 0, up_en = 0, up_taken = 0, up_commit = 0;
  pc_t lk_pc = '0, up_pc = '0;
  logic lk_taken, up_pred;
  logic [1:0] ctr [E];      // reference: {pred, hyst} per entry, hyst shared
  logic       p_ref [E];
  logic       h_ref [E/2];
  int checks = 0, failures = 0;

  tage_base #(.ENTRIES(E)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic update(int e, logic t, logic commit);
    logic [1:0] c;
    @(negedge clk);
    up_en = 1; up_pc = pc_t'(e << PC_LSB); up_taken = t;
    @(negedge clk);
    up_en = 0; up_commit = commit;
    checks++;
    if (up_pred !== p_ref[e]) failures++;
    c = {p_ref[e], h_ref[e/2]};
    if (t && c != 2'b11) c = c + 1;
    else if (!t && c != 2'b00) c = c - 1;
    if (commit) begin p_ref[e] = c[1]; h_ref[e/2] = c[0]; end
    @(negedge clk); up_commit = 0;
  endtask

  task automatic look(int e);
    @(negedge clk);
    lk_en = 1; lk_pc = pc_t'(e << PC_LSB);
    @(negedge clk);
    lk_en = 0;
    checks++;
    if (lk_taken !== p_ref[e]) begin
      failures++;
      if (failures < 5) $display("entry %0d predicted %b expected %b", e, lk_taken, p_ref[e]);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    // bring 64 entries into a known state: four not-taken updates each
    for (int e = 0; e < 64; e++) begin
      p_ref[e] = 0; h_ref[e/2] = 0;
      // from any start, four not-taken updates reach 00 for both neighbours
    end
    for (int e = 0; e < 64; e++) for (int k = 0; k < 4; k++) begin
      @(negedge clk); up_en = 1; up_pc = pc_t'(e << PC_LSB); up_taken = 0;
      @(negedge clk); up_en = 0; up_commit = 1;
      @(negedge clk); up_commit = 0;
    end
    for (int e = 0; e < 64; e++) look(e);
    for (int n = 0; n < 1500; n++) begin
      int e;
      e = $urandom_range(63);
      update(e, $urandom_range(3) != 0, $urandom_range(7) != 0);
      look($urandom_range(63));
    end
    // content-key bit flips the stored meaning of every prediction bit
    kbit = 1;
    for (int e = 0; e < 64; e++) begin
      @(negedge clk); lk_en = 1; lk_pc = pc_t'(e << PC_LSB);
      @(negedge clk); lk_en = 0;
      checks++;
      if (lk_taken !== ~p_ref[e]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
