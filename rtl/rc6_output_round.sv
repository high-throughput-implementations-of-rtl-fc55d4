// rc6_output_round: the RC6 post-whitening step. The four words are
// registered (one pipeline stage), then A and C receive the last two round
// keys: A' = A + S[2r+2], C' = C + S[2r+3] (mod 2^W); B and D pass unchanged.
// Latency one clock; the keys are read in the cycle the outputs appear.
module rc6_output_round #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  input  logic [W-1:0] c_i,
  input  logic [W-1:0] d_i,
  input  logic [W-1:0] s_a,   // S[2r+2]
  input  logic [W-1:0] s_c,   // S[2r+3]
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

  assign a_o = a_r + s_a;
  assign b_o = b_r;
  assign c_o = c_r + s_c;
  assign d_o = d_r;

endmodule
