// tb_rc6_key_store: self-checking testbench for the round key registers.
// Two instances: R = 20 rounds fully unrolled (K = 20) and R = 6 rounds with
// K = 2 physical rounds (3 passes). Distinct keys S[i] = i*0x01010101 ^
// 0xA5000000 are shifted in, in the reverse order of the chain positions
// given by rc6_pkg::key_chain_index. Then every output is compared with the
// key the RC6 round it serves needs: S[0], S[1], S[2R+2], S[2R+3], and for
// physical round j on pass n, S[2i] and S[2i+1] with i = n*K + j + 1. Keys
// must hold when key_shift is low.
module tb_rc6_key_store;

  logic        clk = 1'b0;
  int unsigned checks = 0;
  int unsigned failures = 0;

  always #5 clk = ~clk;

  function automatic logic [31:0] key_val(int unsigned i);
    return (i * 32'h0101_0101) ^ 32'hA500_0000;
  endfunction

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  // Full unrolling.
  localparam int unsigned RA = 20, KA = 20;
  logic                  sh_a;
  logic [31:0]           kin_a;
  logic [KA-1:0][0:0]    it_a;
  logic [31:0]           a_in0, a_in1, a_oa, a_oc;
  logic [KA-1:0][31:0]   a_e, a_o;
  rc6_key_store #(.W(32), .R(RA), .K(KA)) dut_a (
    .clk(clk), .key_shift(sh_a), .key_in(kin_a), .iter_sel(it_a),
    .s_in0(a_in0), .s_in1(a_in1), .s_even(a_e), .s_odd(a_o),
    .s_out_a(a_oa), .s_out_c(a_oc)
  );

  // Partial unrolling, 3 passes.
  localparam int unsigned RB = 6, KB = 2, NPB = 3;
  logic                  sh_b;
  logic [31:0]           kin_b;
  logic [KB-1:0][1:0]    it_b;
  logic [31:0]           b_in0, b_in1, b_oa, b_oc;
  logic [KB-1:0][31:0]   b_e, b_o;
  rc6_key_store #(.W(32), .R(RB), .K(KB)) dut_b (
    .clk(clk), .key_shift(sh_b), .key_in(kin_b), .iter_sel(it_b),
    .s_in0(b_in0), .s_in1(b_in1), .s_even(b_e), .s_odd(b_o),
    .s_out_a(b_oa), .s_out_c(b_oc)
  );

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sh_a = 0; sh_b = 0; it_a = '0; it_b = '0;
    @(negedge clk);
    for (int p = 2 * RA + 3; p >= 0; p--) begin
      sh_a = 1; kin_a = key_val(rc6_pkg::key_chain_index(p, RA, KA));
      @(negedge clk);
    end
    sh_a = 0; kin_a = '1;
    for (int p = 2 * RB + 3; p >= 0; p--) begin
      sh_b = 1; kin_b = key_val(rc6_pkg::key_chain_index(p, RB, KB));
      @(negedge clk);
    end
    sh_b = 0; kin_b = '1;
    repeat (3) @(negedge clk);   // keys must hold
    check(a_in0, key_val(0), "A S[0]");
    check(a_in1, key_val(1), "A S[1]");
    check(a_oa, key_val(2 * RA + 2), "A S[2r+2]");
    check(a_oc, key_val(2 * RA + 3), "A S[2r+3]");
    for (int j = 0; j < KA; j++) begin
      check(a_e[j], key_val(2 * (j + 1)), "A S[2i]");
      check(a_o[j], key_val(2 * (j + 1) + 1), "A S[2i+1]");
    end
    check(b_in0, key_val(0), "B S[0]");
    check(b_in1, key_val(1), "B S[1]");
    check(b_oa, key_val(2 * RB + 2), "B S[2r+2]");
    check(b_oc, key_val(2 * RB + 3), "B S[2r+3]");
    for (int n0 = 0; n0 < NPB; n0++) begin
      for (int n1 = 0; n1 < NPB; n1++) begin
        it_b[0] = 2'(n0);
        it_b[1] = 2'(n1);
        #1;
        check(b_e[0], key_val(2 * (n0 * KB + 1)), "B round 0 S[2i]");
        check(b_o[0], key_val(2 * (n0 * KB + 1) + 1), "B round 0 S[2i+1]");
        check(b_e[1], key_val(2 * (n1 * KB + 2)), "B round 1 S[2i]");
        check(b_o[1], key_val(2 * (n1 * KB + 2) + 1), "B round 1 S[2i+1]");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
