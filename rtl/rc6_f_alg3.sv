// rc6_f_alg3: f(X) = (X(2X+1)) mod 2^W with two small multiplications
// ("algorithm 3"), for even W >= 6. Split X into its low half L = X[W/2-1:0]
// and high half H = X[W-1:W/2] (kept at its weight). Then
//   X(2X+1) = L(2L+1) + H + 4LH + 2H^2, and 2H^2 = 0 mod 2^W,
// and of 4LH only bits of L below W/2-2 and bits of H below W-2 reach a
// weight under 2^W. So
//   f(X) = [L(2L+1)] + [X[W/2-3:0] * X[W-3:W/2]] * 2^{W/2+2} + H  (mod 2^W),
// a (W/2)x(W/2+1) product (16x17 for W = 32), a (W/2-2)x(W/2-2) product
// (14x14) and two additions, all as given by the source.
//
// Interface: x in, q out. LATENCY = 0: combinational. LATENCY = 1: both
// products and H are registered, the way an embedded multiplier with an
// internal pipeline register would hold them, and the final additions follow
// the register; q follows x by one clock.
module rc6_f_alg3 #(
  parameter int unsigned W       = 32,
  parameter int unsigned LATENCY = 1
) (
  input  logic         clk,
  input  logic [W-1:0] x,
  output logic [W-1:0] q
);

  localparam int unsigned HW = W / 2;   // width of the low half

  if (W % 2 != 0 || W < 6) begin : g_bad_w
    $error("rc6_f_alg3: W must be even and at least 6");
  end
  localparam int unsigned RW = HW - 2;  // width of the rectangular product operands

  logic [HW-1:0] lo;
  logic [HW:0]   lo2p1;
  logic [RW-1:0] ra, rb;
  logic [W-1:0]  p1;      // L(2L+1) mod 2^W
  logic [RW-1:0] p2;      // only the low RW bits survive the shift by W/2+2
  logic [HW-1:0] hi;

  assign lo    = x[HW-1:0];
  assign lo2p1 = {lo, 1'b1};
  assign ra    = x[RW-1:0];
  assign rb    = x[W-3:HW];
  assign p1    = W'(lo * lo2p1);
  assign p2    = RW'(ra * rb);
  assign hi    = x[W-1:HW];

  logic [W-1:0]  p1_s;
  logic [RW-1:0] p2_s;
  logic [HW-1:0] hi_s;

  if (LATENCY == 0) begin : g_comb
    assign p1_s = p1;
    assign p2_s = p2;
    assign hi_s = hi;
  end else begin : g_reg
    always_ff @(posedge clk) begin
      p1_s <= p1;
      p2_s <= p2;
      hi_s <= hi;
    end
  end

  assign q = p1_s + {p2_s, {(HW + 2){1'b0}}} + {hi_s, {HW{1'b0}}};

endmodule
