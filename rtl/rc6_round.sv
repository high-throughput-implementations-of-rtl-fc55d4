// rc6_round: one pipelined RC6 encryption round of latency ALPHA+2 clocks.
//
//   t = f(B) <<< log2(W)        u = f(D) <<< log2(W)
//   A' = ((A ^ t) <<< u) + S[2i]   C' = ((C ^ u) <<< t) + S[2i+1]
//   (A, B, C, D) <- (B, C', D, A')
//
// Register placement follows the source's round diagram: B and D pass one
// register before the f(X) operators, whose latency is ALPHA; A and C are
// delayed ALPHA+1 clocks to meet t and u at the XOR gates; the XOR results
// and the rotation amounts pass one more register ahead of the
// variable rotations; B and D are delayed ALPHA+1 more clocks to leave the
// round together with A' and C'. The key additions sit after the last
// register, so s_even/s_odd are read in the same cycle the round's outputs
// appear (the keys belonging to the data in the round's last stage).
//
// ALGO picks the f(X) operator (1: plain product, 2: simplified partial
// products, 3: two small multiplications); ALPHA must be 0 or 1.
module rc6_round #(
  parameter int unsigned W     = 32,
  parameter int unsigned ALPHA = 1,
  parameter int unsigned ALGO  = 3
) (
  input  logic         clk,
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  input  logic [W-1:0] c_i,
  input  logic [W-1:0] d_i,
  input  logic [W-1:0] s_even,  // S[2i]
  input  logic [W-1:0] s_odd,   // S[2i+1]
  output logic [W-1:0] a_o,
  output logic [W-1:0] b_o,
  output logic [W-1:0] c_o,
  output logic [W-1:0] d_o
);

  localparam int unsigned LGW = $clog2(W);

  // First register of B and D, ALPHA+1 registers on A and C.
  logic [W-1:0] b_r, d_r;
  logic [W-1:0] a_dl [ALPHA+1];
  logic [W-1:0] c_dl [ALPHA+1];

  always_ff @(posedge clk) begin
    b_r     <= b_i;
    d_r     <= d_i;
    a_dl[0] <= a_i;
    c_dl[0] <= c_i;
    for (int k = 1; k <= ALPHA; k++) begin
      a_dl[k] <= a_dl[k-1];
      c_dl[k] <= c_dl[k-1];
    end
  end

  // f(X) operators of latency ALPHA.
  logic [W-1:0] fb, fd;

  if (ALGO == 1) begin : g_alg1
    rc6_f_alg1 #(.W(W), .LATENCY(ALPHA)) u_fb (.clk(clk), .x(b_r), .q(fb));
    rc6_f_alg1 #(.W(W), .LATENCY(ALPHA)) u_fd (.clk(clk), .x(d_r), .q(fd));
  end else if (ALGO == 2) begin : g_alg2
    rc6_f_alg2 #(.W(W), .LATENCY(ALPHA)) u_fb (.clk(clk), .x(b_r), .q(fb));
    rc6_f_alg2 #(.W(W), .LATENCY(ALPHA)) u_fd (.clk(clk), .x(d_r), .q(fd));
  end else begin : g_alg3
    rc6_f_alg3 #(.W(W), .LATENCY(ALPHA)) u_fb (.clk(clk), .x(b_r), .q(fb));
    rc6_f_alg3 #(.W(W), .LATENCY(ALPHA)) u_fd (.clk(clk), .x(d_r), .q(fd));
  end

  // Fixed rotation by log2(W): t and u.
  logic [W-1:0] t, u;
  assign t = {fb[W-1-LGW:0], fb[W-1:W-LGW]};
  assign u = {fd[W-1-LGW:0], fd[W-1:W-LGW]};

  // Register after the XOR gates; t and u are registered as rotation amounts.
  logic [W-1:0]     ax_r, cx_r;
  logic [LGW-1:0]   t_r, u_r;

  always_ff @(posedge clk) begin
    ax_r <= a_dl[ALPHA] ^ t;
    cx_r <= c_dl[ALPHA] ^ u;
    t_r  <= t[LGW-1:0];
    u_r  <= u[LGW-1:0];
  end

  // B and D: ALPHA+1 further registers.
  logic [W-1:0] b_dl [ALPHA+1];
  logic [W-1:0] d_dl [ALPHA+1];

  always_ff @(posedge clk) begin
    b_dl[0] <= b_r;
    d_dl[0] <= d_r;
    for (int k = 1; k <= ALPHA; k++) begin
      b_dl[k] <= b_dl[k-1];
      d_dl[k] <= d_dl[k-1];
    end
  end

  // Data-dependent rotations and key additions.
  logic [W-1:0] a_rot, c_rot;

  rc6_rotl #(.W(W)) u_rot_a (.x(ax_r), .amt(u_r), .y(a_rot));
  rc6_rotl #(.W(W)) u_rot_c (.x(cx_r), .amt(t_r), .y(c_rot));

  assign a_o = b_dl[ALPHA];
  assign b_o = c_rot + s_odd;
  assign c_o = d_dl[ALPHA];
  assign d_o = a_rot + s_even;

endmodule
