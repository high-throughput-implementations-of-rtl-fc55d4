// rc6_input_round: the RC6 pre-whitening step. The four words are
// registered (one pipeline stage), then B and D receive the first two round
// keys: B' = B + S[0], D' = D + S[1] (mod 2^W); A and C pass unchanged.
// Latency one clock; the keys are read in the cycle the outputs appear.
module rc6_input_round #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  input  logic [W-1:0] c_i,
  input  logic [W-1:0] d_i,
  input  logic [W-1:0] s0,
  input  logic [W-1:0] s1,
  output logic [W-1:0] a_o,
  output logic [W-1:0] b_o,
  output logic [W-1:0] c_o,
  output logic [W-1:0] d_o
);

  logic [W-1:0] a_r, b_r, c_r, d_r;

  always_ff @(posedge clk) begin
    a_r <= a_i;
    b_r <= b_i;
    c_r <= c_i;
    d_r <= d_i;
  end

  assign a_o = a_r;
  assign b_o = b_r + s0;
  assign c_o = c_r;
  assign d_o = d_r + s1;

endmodule
