// tb_rc6_port_in64: self-checking testbench for the two-beat input port.
// Random blocks are sent as {B, A} then {D, C} with random idle clocks
// between beats, while the processor side (blk_ready) is randomly busy.
// Checked: blk_valid is raised only with a second beat, the assembled block
// equals the block sent, a second beat waits while blk_ready is low and is
// accepted together with the block, and the number of blocks delivered
// equals the number sent.
module tb_rc6_port_in64;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  int unsigned checks = 0;
  int unsigned failures = 0;
  int unsigned waits = 0;

  always #5 clk = ~clk;

  logic          in_valid, in_ready, blk_valid, blk_ready;
  logic [63:0]   in_data;
  logic [127:0]  blk_data;

  rc6_port_in64 #(.W(32)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .in_data(in_data), .blk_valid(blk_valid), .blk_ready(blk_ready),
    .blk_data(blk_data)
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
    int unsigned  delivered = 0;
    in_valid = 0; in_data = '0; blk_ready = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      blk = {$urandom, $urandom, $urandom, $urandom};
      // first beat
      @(negedge clk);
      blk_ready = ($urandom % 3 != 0);
      in_valid = 1; in_data = blk[63:0];
      #1;
      check(in_ready && !blk_valid, "first beat accepted, no block yet");
      @(negedge clk);
      in_valid = 0;
      repeat ($urandom % 3) begin
        blk_ready = ($urandom % 3 != 0);
        #1;
        check(!blk_valid, "no block while idle");
        @(negedge clk);
      end
      // second beat: wait while the processor is busy
      in_valid = 1; in_data = blk[127:64];
      blk_ready = ($urandom % 3 != 0);
      #1;
      while (!blk_ready) begin
        waits++;
        check(!in_ready && blk_valid, "second beat held while busy");
        @(negedge clk);
        blk_ready = ($urandom % 2 != 0);
        #1;
      end
      check(in_ready && blk_valid && blk_data == blk, "block assembled");
      delivered++;
      @(negedge clk);
      in_valid = 0;
    end
    check(delivered == 400 && waits > 0, "all blocks delivered, busy case seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
