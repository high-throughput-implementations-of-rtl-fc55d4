// tb_rc6_rotl: self-checking testbench for the barrel rotator rc6_rotl.
// For W = 32, every rotation amount 0..31 is applied to 200 random words
// and compared with a rotation written as a shift-and-or in the testbench.
// A W = 8 instance is checked exhaustively (all words, all amounts).
module tb_rc6_rotl;

  int unsigned checks = 0;
  int unsigned failures = 0;

  logic [31:0] x32, y32;
  logic [4:0]  a32;
  logic [7:0]  x8, y8;
  logic [2:0]  a8;

  rc6_rotl #(.W(32)) dut32 (.x(x32), .amt(a32), .y(y32));
  rc6_rotl #(.W(8))  dut8  (.x(x8),  .amt(a8),  .y(y8));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] dbl;
    logic [31:0] exp32;
    logic [15:0] dbl8;
    for (int i = 0; i < 200; i++) begin
      for (int s = 0; s < 32; s++) begin
        x32 = (i == 0) ? 32'h8000_0001 : $urandom;
        a32 = 5'(s);
        #1;
        dbl   = {x32, x32} << s;
        exp32 = dbl[63:32];
        checks++;
        if (y32 !== exp32) begin
          failures++;
          if (failures < 10) $display("FAIL rotl32 x=%h s=%0d got %h exp %h", x32, s, y32, exp32);
        end
      end
    end
    for (int v = 0; v < 256; v++) begin
      for (int s = 0; s < 8; s++) begin
        x8 = 8'(v);
        a8 = 3'(s);
        #1;
        dbl8 = {x8, x8} << s;
        checks++;
        if (y8 !== dbl8[15:8]) begin
          failures++;
          if (failures < 10) $display("FAIL rotl8 x=%h s=%0d got %h", x8, s, y8);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
