// rc6_key_store: the round key registers of the RC6 processor.
//
// All 2R+4 keys sit in W-bit registers that form one shift chain: while
// key_shift is high, key_in enters chain position 0 and every key moves one
// position on, so loading takes 2R+4 clocks, the key for the last position
// first. rc6_pkg::key_chain_index() gives the key that belongs at each
// position. The chain holds, in order: S[0], S[1] for the input round; for
// each physical round j, one pair S[2i], S[2i+1] per pass (R/K passes);
// S[2R+2], S[2R+3] for the output round.
//
// With full unrolling (K = R) each round has a single pair. With partial
// unrolling (K < R) the pass number of the data in round j's last stage,
// iter_sel[j], selects that round's pair through a multiplexer, so the
// token's pass number acts as the address of a small round key memory.
// The key outputs are combinational from the registers and the selects.
// A shift chain for loading follows the source's processor diagrams; the
// load strobe and the order of pairs within a round are this design's.
module rc6_key_store #(
  parameter int unsigned W = 32,
  parameter int unsigned R = 20,
  parameter int unsigned K = 20,
  localparam int unsigned NP = R / K,                     // passes per block
  localparam int unsigned IW = (NP > 1) ? $clog2(NP) : 1  // pass number width
) (
  input  logic               clk,
  input  logic               key_shift,
  input  logic [W-1:0]       key_in,
  input  logic [K-1:0][IW-1:0] iter_sel,
  output logic [W-1:0]       s_in0,               // S[0]
  output logic [W-1:0]       s_in1,               // S[1]
  output logic [K-1:0][W-1:0] s_even,             // S[2i] of each physical round
  output logic [K-1:0][W-1:0] s_odd,              // S[2i+1] of each physical round
  output logic [W-1:0]       s_out_a,             // S[2R+2]
  output logic [W-1:0]       s_out_c              // S[2R+3]
);

  localparam int unsigned NK = 2 * R + 4;

  logic [W-1:0] chain [NK];

  always_ff @(posedge clk) begin
    if (key_shift) begin
      chain[0] <= key_in;
      for (int p = 1; p < NK; p++) chain[p] <= chain[p-1];
    end
  end

  assign s_in0   = chain[0];
  assign s_in1   = chain[1];
  assign s_out_a = chain[NK-2];
  assign s_out_c = chain[NK-1];

  always_comb begin
    for (int j = 0; j < K; j++) begin
      s_even[j] = chain[2 + 2 * NP * j];
      s_odd[j]  = chain[3 + 2 * NP * j];
      for (int n = 1; n < NP; n++) begin
        if (int'(iter_sel[j]) == n) begin
          s_even[j] = chain[2 + 2 * NP * j + 2 * n];
          s_odd[j]  = chain[3 + 2 * NP * j + 2 * n];
        end
      end
    end
  end

endmodule
