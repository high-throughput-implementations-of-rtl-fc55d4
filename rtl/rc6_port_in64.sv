// rc6_port_in64: narrow input port for devices with too few pins for a
// 4W-bit block. A block arrives as two 2W-bit beats, first {B, A} (the low
// half), then {D, C}. The first beat is held in a register; when the
// second beat is offered, the whole block is presented to the processor in
// the same cycle and both are accepted together. The source only says that
// two clock cycles carry one block over 64-bit ports; the beat order and
// the valid/ready handshake are this design's.
module rc6_port_in64 #(
  parameter int unsigned W = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [2*W-1:0] in_data,
  output logic           blk_valid,
  input  logic           blk_ready,
  output logic [4*W-1:0] blk_data
);

  logic           have_lo;
  logic [2*W-1:0] lo_q;

  assign in_ready  = !have_lo || blk_ready;
  assign blk_valid = in_valid && have_lo;
  assign blk_data  = {in_data, lo_q};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      have_lo <= 1'b0;
    end else if (in_valid && in_ready) begin
      have_lo <= !have_lo;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && !have_lo) lo_q <= in_data;
  end

endmodule
