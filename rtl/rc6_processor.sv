// rc6_processor: pipelined RC6-W/R encryption processor.
//
// A block is four W-bit words {D, C, B, A} (A in the low bits, each word
// little-endian as in the cipher's byte order). The datapath is
//   input register -> input round -> [ring entry mux] -> K rounds
//     -> output round -> output register,
// with every round a pipeline of ALPHA+2 stages (ALPHA = latency of the
// f(X) operator). K is the number of rounds built in hardware and must
// divide R:
//   * K = R (the default, full loop unrolling): every block passes each
//     round once; a new block can enter every clock and in_ready stays
//     high. Latency 4 + R*(ALPHA+2) clocks (64 for the defaults).
//   * K < R (partial unrolling): the output of round K-1 loops back to round
//     0 and a block makes R/K passes; the token's pass number selects the
//     round keys. A block is accepted when in_ready is high; with blocks
//     always offered the rate settles at one block per R/K clocks.
//     Latency 4 + R*(ALPHA+2) clocks.
// IO_W selects full-width (4W) ports or half-width (2W) ports on which a
// block takes two clocks; the two-beat ports add one clock of latency on
// the output side (first beat).
//
// Round keys S[0..2R+3] are shifted in on key_in while key_shift is high,
// in the order given by rc6_pkg::key_chain_index (reversed: the key for the
// last chain position first); with K = R that is S[2R+3] first and S[0]
// last. Keys must not change while blocks are in flight. The token control
// unit is reset by rst_n (synchronous, active low); data registers are not
// reset. out_valid marks the result (or each result beat).
//
// The round structure, the register placement in a round, the round key
// registers, the token shift register and the loop-back multiplexer follow
// the source's architecture; the handshake (in_ready), the reset, the key
// load order and the narrow-port beat order are this design's choices.
module rc6_processor #(
  parameter int unsigned W     = rc6_pkg::RC6_W,
  parameter int unsigned R     = rc6_pkg::RC6_R,
  parameter int unsigned K     = rc6_pkg::RC6_R,
  parameter int unsigned ALPHA = rc6_pkg::RC6_ALPHA,
  parameter int unsigned ALGO  = rc6_pkg::RC6_ALGO,
  parameter int unsigned IO_W  = 4 * W,
  localparam int unsigned NP = R / K,
  localparam int unsigned IW = (NP > 1) ? $clog2(NP) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // round key loading
  input  logic            key_shift,
  input  logic [W-1:0]    key_in,
  // plaintext
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [IO_W-1:0] in_data,
  // ciphertext
  output logic            out_valid,
  output logic [IO_W-1:0] out_data
);

  if (R % K != 0) begin : g_bad_k
    $error("rc6_processor: K must divide R");
  end
  if (IO_W != 4 * W && IO_W != 2 * W) begin : g_bad_io
    $error("rc6_processor: IO_W must be 4*W or 2*W");
  end

  // ---------------------------------------------------------------- ports
  logic           blk_valid, blk_ready;
  logic [4*W-1:0] blk_data;
  logic           res_valid;
  logic [4*W-1:0] res_data;

  if (IO_W == 2 * W) begin : g_narrow
    rc6_port_in64 #(.W(W)) u_port_in (
      .clk, .rst_n, .in_valid, .in_ready, .in_data,
      .blk_valid, .blk_ready, .blk_data
    );
    rc6_port_out64 #(.W(W)) u_port_out (
      .clk, .rst_n, .blk_valid(res_valid), .blk_data(res_data),
      .out_valid, .out_data
    );
  end else begin : g_wide
    assign blk_valid = in_valid;
    assign in_ready  = blk_ready;
    assign blk_data  = in_data;
    assign out_valid = res_valid;
    assign out_data  = res_data;
  end

  // ---------------------------------------------------------- control unit
  logic                 sel_new;
  logic [K-1:0][IW-1:0] iter_sel;

  rc6_control #(.R(R), .K(K), .ALPHA(ALPHA)) u_ctrl (
    .clk, .rst_n,
    .in_valid (blk_valid),
    .in_ready (blk_ready),
    .sel_new,
    .iter_sel,
    .out_valid(res_valid)
  );

  // ------------------------------------------------------------ round keys
  logic [W-1:0]        s_in0, s_in1, s_out_a, s_out_c;
  logic [K-1:0][W-1:0] s_even, s_odd;

  rc6_key_store #(.W(W), .R(R), .K(K)) u_keys (
    .clk, .key_shift, .key_in, .iter_sel,
    .s_in0, .s_in1, .s_even, .s_odd, .s_out_a, .s_out_c
  );

  // -------------------------------------------------------------- datapath
  logic [4*W-1:0] x_r;

  always_ff @(posedge clk) x_r <= blk_data;

  logic [W-1:0] ia, ib, ic, id;

  rc6_input_round #(.W(W)) u_in_round (
    .clk,
    .a_i(x_r[W-1:0]), .b_i(x_r[2*W-1:W]), .c_i(x_r[3*W-1:2*W]), .d_i(x_r[4*W-1:3*W]),
    .s0(s_in0), .s1(s_in1),
    .a_o(ia), .b_o(ib), .c_o(ic), .d_o(id)
  );

  // Words between rounds: index j is the input of physical round j,
  // index K the output of the last one.
  logic [W-1:0] ra [K+1];
  logic [W-1:0] rb [K+1];
  logic [W-1:0] rc [K+1];
  logic [W-1:0] rd [K+1];

  // Ring entry: a new block from the input round or a looping block.
  assign ra[0] = sel_new ? ia : ra[K];
  assign rb[0] = sel_new ? ib : rb[K];
  assign rc[0] = sel_new ? ic : rc[K];
  assign rd[0] = sel_new ? id : rd[K];

  for (genvar j = 0; j < K; j++) begin : g_round
    rc6_round #(.W(W), .ALPHA(ALPHA), .ALGO(ALGO)) u_round (
      .clk,
      .a_i(ra[j]), .b_i(rb[j]), .c_i(rc[j]), .d_i(rd[j]),
      .s_even(s_even[j]), .s_odd(s_odd[j]),
      .a_o(ra[j+1]), .b_o(rb[j+1]), .c_o(rc[j+1]), .d_o(rd[j+1])
    );
  end

  logic [W-1:0] oa, ob, oc, od;

  rc6_output_round #(.W(W)) u_out_round (
    .clk,
    .a_i(ra[K]), .b_i(rb[K]), .c_i(rc[K]), .d_i(rd[K]),
    .s_a(s_out_a), .s_c(s_out_c),
    .a_o(oa), .b_o(ob), .c_o(oc), .d_o(od)
  );

  always_ff @(posedge clk) res_data <= {od, oc, ob, oa};

endmodule
