// rc6_f_alg1: the straightforward f(X) = (X(2X+1)) mod 2^W operator
// ("algorithm 1"). It forms the product of X and (2X+1) and keeps its low W
// bits; the multiplier structure is left to synthesis (on an FPGA with
// 18x18 multipliers a 32-bit operand costs three of them).
//
// Interface: x in, q out. LATENCY = 0 gives a combinational operator;
// LATENCY = 1 registers the result, so q follows x by one clock. Where the
// pipeline register sits inside the operator is not specified by the
// source; this design puts it on the output.
module rc6_f_alg1 #(
  parameter int unsigned W       = 32,
  parameter int unsigned LATENCY = 1
) (
  input  logic         clk,
  input  logic [W-1:0] x,
  output logic [W-1:0] q
);

  logic [W-1:0] d1;
  logic [W-1:0] prod;

  assign d1   = {x[W-2:0], 1'b1};  // 2X + 1 (mod 2^W)
  assign prod = W'(x * d1);        // low W bits of the product

  if (LATENCY == 0) begin : g_comb
    assign q = prod;
  end else begin : g_reg
    always_ff @(posedge clk) q <= prod;
  end

endmodule
