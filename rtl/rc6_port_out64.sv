// rc6_port_out64: narrow output port for devices with too few pins for a
// 4W-bit block. A result block is sent as two 2W-bit beats on consecutive
// clocks, first {B, A} (the low half), then {D, C}; out_valid marks each
// beat. The beats are registered, so the first appears one clock after
// blk_valid. Results may arrive at most every second clock, which holds
// whenever the input also uses two-beat transfers (every block keeps its
// spacing through the pipeline); an assertion checks it. The beat order and
// timing are this design's choices.
module rc6_port_out64 #(
  parameter int unsigned W = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           blk_valid,
  input  logic [4*W-1:0] blk_data,
  output logic           out_valid,
  output logic [2*W-1:0] out_data
);

  logic           pend_hi;
  logic [2*W-1:0] hi_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      pend_hi   <= 1'b0;
    end else begin
      out_valid <= blk_valid || pend_hi;
      pend_hi   <= blk_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (blk_valid) begin
      out_data <= blk_data[2*W-1:0];
      hi_q     <= blk_data[4*W-1:2*W];
    end else begin
      out_data <= hi_q;
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    !(blk_valid && pend_hi));

endmodule
