// cipher_model: behavioural stand-in for the pipelined block cipher that fills
// the code books (QARMA-64 in the published design, not modelled here). It
// accepts one request per cycle and returns, LAT cycles later and in order, a
// keyed nonlinear mix of the plaintext. Only its timing and determinism matter
// to the testbenches; it has no cryptographic strength. The same mix is
// available to testbenches as the function mix().
module cipher_model #(
  parameter int unsigned LAT = 7
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  input  logic [63:0] req_key,
  input  logic [63:0] req_pt,
  output logic        rsp_valid,
  output logic [63:0] rsp_ct
);
  function automatic logic [63:0] mix(input logic [63:0] k, input logic [63:0] p);
    logic [63:0] x;
    x = p ^ k;
    for (int r = 0; r < 4; r++) begin
      x = x * 64'h9E3779B97F4A7C15 + {x[31:0], x[63:32]};
      x = x ^ (x >> 29) ^ k;
    end
    return x;
  endfunction

  logic        v_q [LAT];
  logic [63:0] d_q [LAT];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) begin v_q[i] <= 1'b0; d_q[i] <= '0; end
    end else begin
      v_q[0] <= req_valid;
      d_q[0] <= mix(req_key, req_pt);
      for (int i = 1; i < LAT; i++) begin v_q[i] <= v_q[i-1]; d_q[i] <= d_q[i-1]; end
    end
  end
  assign rsp_valid = v_q[LAT-1];
  assign rsp_ct    = d_q[LAT-1];
endmodule
