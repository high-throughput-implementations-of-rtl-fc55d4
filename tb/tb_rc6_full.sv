// tb_rc6_full: the RC6 processor with every parameter at its default
// (RC6-32/20, all 20 rounds unrolled, f algorithm 3 with one pipeline
// register, 128-bit ports). Round keys are expanded by the reference model
// and shifted in; the processor then encrypts a known-answer block followed
// by 500 random blocks offered on every clock. Each result is compared with
// the reference model; the latency must be 64 clocks and the results must
// leave one per clock. The key is then changed and a second known-answer
// block is checked.
module tb_rc6_full;
  import rc6_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  int unsigned checks = 0;
  int unsigned failures = 0;
  int unsigned cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  localparam int unsigned LAT = 64;
  localparam int NBLK = 500;

  logic          key_shift, in_valid, in_ready, out_valid;
  logic [31:0]   key_in;
  logic [127:0]  in_data, out_data;

  rc6_processor dut (
    .clk(clk), .rst_n(rst_n), .key_shift(key_shift), .key_in(key_in),
    .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data),
    .out_valid(out_valid), .out_data(out_data)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  logic [127:0] exp_q [$];
  int unsigned  acc_q [$];
  int unsigned  results = 0;
  int unsigned  first_out = 0;
  int unsigned  last_out = 0;

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      logic [127:0] e;
      int unsigned  a;
      e = exp_q.pop_front();
      a = acc_q.pop_front();
      check(out_data == e, "ciphertext");
      check(cyc - a == LAT, "latency 64");
      if (results == 0) first_out = cyc;
      last_out = cyc;
      results++;
    end
  end

  task automatic load_keys(keys_t s);
    for (int p = 2 * 20 + 3; p >= 0; p--) begin
      @(negedge clk);
      key_shift = 1'b1;
      key_in = s[rc6_pkg::key_chain_index(p, 20, 20)];
    end
    @(negedge clk);
    key_shift = 1'b0;
  endtask

  task automatic send(logic [127:0] blk, keys_t s);
    @(negedge clk);
    in_valid = 1'b1;
    in_data  = blk;
    #1;
    check(in_ready, "in_ready");
    exp_q.push_back(encrypt(blk, s, 20));
    acc_q.push_back(cyc);
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] k [];
    keys_t keys1, keys2;
    k = new[16];
    foreach (k[i]) k[i] = 8'h00;
    keys1 = key_schedule(k, 20);
    k = '{8'h01, 8'h23, 8'h45, 8'h67, 8'h89, 8'hab, 8'hcd, 8'hef,
          8'h01, 8'h12, 8'h23, 8'h34, 8'h45, 8'h56, 8'h67, 8'h78};
    keys2 = key_schedule(k, 20);
    key_shift = 1'b0; key_in = '0; in_valid = 1'b0; in_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_keys(keys1);
    send('0, keys1);
    for (int n = 0; n < NBLK; n++) send({$urandom, $urandom, $urandom, $urandom}, keys1);
    @(negedge clk);
    in_valid = 1'b0;
    while (exp_q.size() != 0) @(negedge clk);
    check(results == NBLK + 1, "result count");
    check(last_out - first_out == NBLK, "one result per clock");
    // Published known answer for the all-zero key and block.
    check(encrypt('0, keys1, 20) == 128'h1ea448984edf29c178f7b15636a5c38f, "known answer 1");
    load_keys(keys2);
    send(bytes_to_block('{8'h02, 8'h13, 8'h24, 8'h35, 8'h46, 8'h57, 8'h68, 8'h79,
                          8'h8a, 8'h9b, 8'hac, 8'hbd, 8'hce, 8'hdf, 8'he0, 8'hf1}), keys2);
    check(exp_q[0] == 128'h183fa47e36f6511f23c615472f194e52, "known answer 2");
    @(negedge clk);
    in_valid = 1'b0;
    while (exp_q.size() != 0) @(negedge clk);
    check(results == NBLK + 2, "result count after key change");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
