// tb_rc6_round: self-checking testbench for one pipelined RC6 round.
// Three instances share one random input stream (a new set of words every
// clock, random keys every clock): f(X) algorithm 3 and algorithm 1 with an
// f latency of 1 (round latency 3) and algorithm 2 with f latency 0 (round
// latency 2). The result leaving each instance must equal one RC6 round
// computed by the reference model on the words that entered ALPHA+2 clocks
// earlier, with the keys present at the output.
module tb_rc6_round;
  import rc6_ref_pkg::*;

  logic        clk = 1'b0;
  int unsigned checks = 0;
  int unsigned failures = 0;

  always #5 clk = ~clk;

  localparam int NI = 3;
  localparam int unsigned ALPHAS [NI] = '{1, 1, 0};
  localparam int unsigned ALGOS  [NI] = '{3, 1, 2};
  localparam int NCYC = 1000;

  logic [31:0] a_i, b_i, c_i, d_i, se, so;
  logic [127:0] outs [NI];

  for (genvar g = 0; g < NI; g++) begin : g_dut
    logic [31:0] a_o, b_o, c_o, d_o;
    rc6_round #(.W(32), .ALPHA(ALPHAS[g]), .ALGO(ALGOS[g])) dut (
      .clk(clk), .a_i(a_i), .b_i(b_i), .c_i(c_i), .d_i(d_i),
      .s_even(se), .s_odd(so),
      .a_o(a_o), .b_o(b_o), .c_o(c_o), .d_o(d_o)
    );
    assign outs[g] = {d_o, c_o, b_o, a_o};
  end

  function automatic logic [127:0] one_round(logic [127:0] x, word_t k0, word_t k1);
    word_t a, b, c, d, t, u;
    a = x[31:0]; b = x[63:32]; c = x[95:64]; d = x[127:96];
    t = rotl(f(b), 5);
    u = rotl(f(d), 5);
    a = rotl(a ^ t, u % 32) + k0;
    c = rotl(c ^ u, t % 32) + k1;
    return {a, d, c, b};
  endfunction

  initial begin : watchdog
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [127:0] hist [NCYC];

  initial begin
    logic [127:0] exp;
    for (int cyc = 0; cyc < NCYC; cyc++) begin
      @(negedge clk);
      a_i = $urandom; b_i = $urandom; c_i = $urandom; d_i = $urandom;
      se = $urandom; so = $urandom;
      if (cyc == 5) begin b_i = 0; d_i = 0; end
      if (cyc == 6) begin b_i = '1; d_i = '1; end
      hist[cyc] = {d_i, c_i, b_i, a_i};
      #1;
      for (int g = 0; g < NI; g++) begin
        int lat;
        lat = int'(ALPHAS[g]) + 2;
        if (cyc >= lat) begin
          exp = one_round(hist[cyc-lat], se, so);
          checks++;
          if (outs[g] !== exp) begin
            failures++;
            if (failures < 10)
              $display("FAIL inst %0d cycle %0d got %h exp %h", g, cyc, outs[g], exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
