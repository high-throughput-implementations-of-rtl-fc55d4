// rc6_rotl: barrel rotator for RC6. The output is the W-bit word x rotated
// left by the log2(W) least significant bits of amt, the RC6 operation
// "x <<< amt". It is built as log2(W) stages of 2:1 multiplexers, stage s
// rotating by 2^s when bit s of the amount is set. The document states only
// that a barrel shifter performs the rotations; the stage structure is this
// design's choice. Purely combinational.
module rc6_rotl #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0]         x,
  input  logic [$clog2(W)-1:0] amt,
  output logic [W-1:0]         y
);

  localparam int unsigned LGW = $clog2(W);

  logic [W-1:0] stage [LGW+1];

  assign stage[0] = x;

  for (genvar s = 0; s < LGW; s++) begin : g_stage
    localparam int unsigned SH = 2 ** s;
    assign stage[s+1] = amt[s] ? {stage[s][W-1-SH:0], stage[s][W-1:W-SH]}
                               : stage[s];
  end

  assign y = stage[LGW];

endmodule
