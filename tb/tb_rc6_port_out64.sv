// tb_rc6_port_out64: self-checking testbench for the two-beat output port.
// Random result blocks are offered with two to five clocks between them
// (back to back every second clock included). Each must come out as {B, A}
// one clock after blk_valid and {D, C} on the next clock, with out_valid on
// exactly those two clocks.
module tb_rc6_port_out64;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  int unsigned checks = 0;
  int unsigned failures = 0;

  always #5 clk = ~clk;

  logic          blk_valid, out_valid;
  logic [127:0]  blk_data;
  logic [63:0]   out_data;

  rc6_port_out64 #(.W(32)) dut (
    .clk(clk), .rst_n(rst_n), .blk_valid(blk_valid), .blk_data(blk_data),
    .out_valid(out_valid), .out_data(out_data)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] blk;
    int gap;
    blk_valid = 0; blk_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 400; n++) begin
      blk = {$urandom, $urandom, $urandom, $urandom};
      blk_valid = 1; blk_data = blk;
      @(negedge clk);
      blk_valid = 0; blk_data = '1;
      check(out_valid && out_data == blk[63:0], "first beat");
      gap = (n % 4 == 0) ? 0 : int'($urandom % 4);
      @(negedge clk);
      check(out_valid && out_data == blk[127:64], "second beat");
      repeat (gap) begin
        @(negedge clk);
        check(!out_valid, "idle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
