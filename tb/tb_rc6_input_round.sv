// tb_rc6_input_round: self-checking testbench for rc6_input_round. Random
// words are streamed in one set per clock; one clock later the outputs must
// equal the inputs with B+S[0], D+S[1] (mod 2^32) computed in the testbench, using
// the keys present in the output cycle.
module tb_rc6_input_round;

  logic        clk = 1'b0;
  int unsigned checks = 0;
  int unsigned failures = 0;

  always #5 clk = ~clk;

  logic [31:0] a_i, b_i, c_i, d_i, k0, k1, a_o, b_o, c_o, d_o;

  rc6_input_round #(.W(32)) dut (
    .clk(clk), .a_i(a_i), .b_i(b_i), .c_i(c_i), .d_i(d_i),
    .s0(k0), .s1(k1),
    .a_o(a_o), .b_o(b_o), .c_o(c_o), .d_o(d_o)
  );

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] a, b, c, d;
    logic [127:0] exp;
    @(negedge clk);
    for (int i = 0; i < 500; i++) begin
      a_i = $urandom; b_i = $urandom; c_i = $urandom; d_i = $urandom;
      a = a_i; b = b_i; c = c_i; d = d_i;
      @(negedge clk);
      k0 = $urandom; k1 = $urandom;
      a_i = $urandom; b_i = $urandom; c_i = $urandom; d_i = $urandom;
      #1;
      exp = {d + k1, c, b + k0, a};
      checks++;
      if ({d_o, c_o, b_o, a_o} !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL got %h exp %h", {d_o, c_o, b_o, a_o}, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
