// lfsr16: free-running 16-bit Fibonacci LFSR (taps 16,14,13,11), the source of
// the random way choice of the BTBs and the random start of TAGE allocation.
// It advances every cycle and never reaches the all-zero state: the seed
// parameter must be non-zero. Random replacement follows the document; the
// generator itself is this design's choice.
module lfsr16 #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [15:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= SEED;
    else        q <= {q[14:0], q[15] ^ q[13] ^ q[12] ^ q[10]};
  end
endmodule
