// rc6_f_alg2: f(X) = (X(2X+1)) mod 2^W from simplified partial products
// ("algorithm 2"), for even W >= 4, using AND gates and adders only.
//
// Since X(2X+1) = X + 2X^2, the squared terms collapse (x_i x_i = x_i,
// x_i x_j + x_j x_i = 2 x_i x_j) and only W/2 partial products remain:
//   PP_i       = sum_{j=2i+3}^{W-1} x_{j-i-2} x_i 2^j  +  x_i 2^{2i+1}
//                                                 for i < W/2-2
//   PP_{W/2-2} = (x_{W/2-1} AND NOT x_{W/2-2}) 2^{W-1} + x_{W/2-2} 2^{W-3}
//   PP_{W/2-1} = X
// The top-bit term of PP_{W/2-2} merges x_{W/2-1} x_{W/2-2} 2^{W-1} with the
// lone x_{W/2-1} 2^{W-1} (x y + x = 2xy + x NOT y, and 2^W vanishes).
// The partial products follow the source; summing them with a balanced
// tree of W-bit adders is this design's choice.
//
// Interface: x in, q out. LATENCY = 0: combinational. LATENCY = 1: the two
// halves of the adder tree are registered and added in the next cycle, so
// q follows x by one clock (register placement chosen by this design).
module rc6_f_alg2 #(
  parameter int unsigned W       = 32,
  parameter int unsigned LATENCY = 1
) (
  input  logic         clk,
  input  logic [W-1:0] x,
  output logic [W-1:0] q
);

  localparam int unsigned NPP  = W / 2;

  if (W % 2 != 0 || W < 4) begin : g_bad_w
    $error("rc6_f_alg2: W must be even and at least 4");
  end
  localparam int unsigned HALF = NPP / 2;

  logic [W-1:0] pp [NPP];

  always_comb begin
    for (int i = 0; i < NPP; i++) begin
      pp[i] = '0;
      if (i == NPP - 1) begin
        pp[i] = x;
      end else if (i == NPP - 2) begin
        pp[i][W-1] = x[i+1] & ~x[i];
        pp[i][W-3] = x[i];
      end else begin
        pp[i][2*i+1] = x[i];
        for (int j = 2 * i + 3; j < W; j++) pp[i][j] = x[j-i-2] & x[i];
      end
    end
  end

  logic [W-1:0] sum_lo, sum_hi;

  always_comb begin
    sum_lo = '0;
    sum_hi = '0;
    for (int i = 0; i < NPP; i++) begin
      if (i < HALF) sum_lo = sum_lo + pp[i];
      else          sum_hi = sum_hi + pp[i];
    end
  end

  if (LATENCY == 0) begin : g_comb
    assign q = sum_lo + sum_hi;
  end else begin : g_reg
    logic [W-1:0] lo_q, hi_q;
    always_ff @(posedge clk) begin
      lo_q <= sum_lo;
      hi_q <= sum_hi;
    end
    assign q = lo_q + hi_q;
  end

endmodule
