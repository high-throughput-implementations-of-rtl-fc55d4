// tb_rc6_f_alg1: self-checking testbench for rc6_f_alg1, the f(X) operator
// f(X) = (X(2X+1)) mod 2^W. Three instances are checked against a full-width
// product computed in the testbench:
//   * W = 32 with one pipeline register: 2000 random operands plus corner
//     values, streamed one per clock; each result must appear exactly one
//     clock after its operand (latency 1);
//   * W = 8 combinational: all 256 operands;
//   * W = 16 combinational: all 65536 operands.
module tb_rc6_f_alg1;

  logic        clk = 1'b0;
  int unsigned checks = 0;
  int unsigned failures = 0;

  always #5 clk = ~clk;

  logic [31:0] x32, q32;
  logic [7:0]  x8, q8;
  logic [15:0] x16, q16;

  rc6_f_alg1 #(.W(32), .LATENCY(1)) dut32 (.clk(clk), .x(x32), .q(q32));
  rc6_f_alg1 #(.W(8),  .LATENCY(0)) dut8  (.clk(clk), .x(x8),  .q(q8));
  rc6_f_alg1 #(.W(16), .LATENCY(0)) dut16 (.clk(clk), .x(x16), .q(q16));

  function automatic logic [31:0] ref_f(logic [31:0] x, int unsigned w);
    logic [63:0] p;
    p = 64'(x) * (64'(x) * 2 + 1);
    return p[31:0] & ((w == 32) ? 32'hFFFF_FFFF : ((32'd1 << w) - 1));
  endfunction

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] prev;
    x32 = '0; x8 = '0; x16 = '0;
    // Exhaustive small widths (combinational).
    for (int v = 0; v < 256; v++) begin
      x8 = 8'(v);
      #1;
      check(32'(q8), ref_f(32'(v), 8), "w8");
    end
    for (int v = 0; v < 65536; v++) begin
      x16 = 16'(v);
      #1;
      check(32'(q16), ref_f(32'(v), 16), "w16");
    end
    // W = 32, one operand per clock, latency one clock.
    @(negedge clk);
    for (int i = 0; i < 2010; i++) begin
      case (i)
        0: x32 = 32'h0;
        1: x32 = 32'hFFFF_FFFF;
        2: x32 = 32'h8000_0000;
        3: x32 = 32'h0000_FFFF;
        4: x32 = 32'hFFFF_0000;
        5: x32 = 32'h7FFF_FFFF;
        6: x32 = 32'h0000_0001;
        7: x32 = 32'hC000_C000;
        default: x32 = $urandom;
      endcase
      prev = x32;
      @(posedge clk);
      #1;
      check(q32, ref_f(prev, 32), "w32 latency 1");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
