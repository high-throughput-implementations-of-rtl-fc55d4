// rc6_control: the token control unit of the RC6 processor.
//
// A token travels alongside every block and marks the pipeline stage that
// holds valid data; the unit is a shift register with one token register
// per pipeline stage: the input register, the input round, the
// L = K*(ALPHA+2) stages of the K physical rounds (the "ring"), the output
// round and the output register. out_valid is the token of the output
// register.
//
// With partial unrolling (K < R) a block makes NP = R/K passes through the
// rounds and its token carries the pass number. At the end of the ring a
// token that has not finished its last pass re-enters the ring with its
// pass number plus one; a finished token goes to the output round. A new
// token from the input round enters the ring with pass number 0 and
// sel_new tells the datapath's multiplexer to take the input round's data
// instead of the loop-back data. iter_sel[j] is the pass number in the last
// stage of physical round j and selects its round keys.
//
// in_ready guards the ring entry: a block accepted now reaches the entry two
// clocks later, and in_ready is low when a looping block will occupy the
// entry then (the token three stages before the end of the ring). With full
// unrolling in_ready is always high. Tokens use a synchronous active-low
// reset. The token chain follows the source; carrying the pass number in
// the token and the in_ready rule are this design's choices.
module rc6_control #(
  parameter int unsigned R     = 20,
  parameter int unsigned K     = 20,
  parameter int unsigned ALPHA = 1,
  localparam int unsigned NP = R / K,
  localparam int unsigned IW = (NP > 1) ? $clog2(NP) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,   // a block is offered
  output logic                 in_ready,   // and accepted when in_ready is high
  output logic                 sel_new,    // ring entry takes the input round
  output logic [K-1:0][IW-1:0] iter_sel,   // pass number at each round's last stage
  output logic                 out_valid   // output register holds a result
);

  localparam int unsigned RL = ALPHA + 2;  // latency of one round
  localparam int unsigned L  = K * RL;     // stages in the ring

  typedef struct packed {
    logic          valid;
    logic [IW-1:0] iter;
  } token_t;

  logic   tok_x, tok_ir, tok_or, tok_y;
  token_t ring [L];
  token_t ring_in;
  logic   last_pass;

  assign last_pass = (int'(ring[L-1].iter) == NP - 1);

  if (NP == 1) begin : g_full
    assign in_ready = 1'b1;
  end else begin : g_part
    if (L < 3) begin : g_bad
      $error("rc6_control: partial unrolling needs K*(ALPHA+2) >= 3");
    end
    assign in_ready = !(ring[L-3].valid && (int'(ring[L-3].iter) != NP - 1));
  end

  assign sel_new = tok_ir;

  always_comb begin
    ring_in = '0;
    if (tok_ir) begin
      ring_in.valid = 1'b1;
    end else if (ring[L-1].valid && !last_pass) begin
      ring_in.valid = 1'b1;
      ring_in.iter  = ring[L-1].iter + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tok_x  <= 1'b0;
      tok_ir <= 1'b0;
      tok_or <= 1'b0;
      tok_y  <= 1'b0;
      for (int s = 0; s < L; s++) ring[s] <= '0;
    end else begin
      tok_x   <= in_valid && in_ready;
      tok_ir  <= tok_x;
      ring[0] <= ring_in;
      for (int s = 1; s < L; s++) ring[s] <= ring[s-1];
      tok_or  <= ring[L-1].valid && last_pass;
      tok_y   <= tok_or;
    end
  end

  always_comb begin
    for (int j = 0; j < K; j++) iter_sel[j] = ring[(j + 1) * RL - 1].iter;
  end

  assign out_valid = tok_y;

  // A new block must never meet a looping block at the ring entry.
  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n)
    !(tok_ir && ring[L-1].valid && !last_pass));

endmodule
