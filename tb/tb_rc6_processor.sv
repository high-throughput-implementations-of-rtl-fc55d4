// tb_rc6_processor: end-to-end testbench of the RC6 encryption processor in
// the seven configurations of the evaluated designs plus one more:
//   0: K = 20 (full unrolling), f algorithm 3, 128-bit ports (XC2V3000 row)
//   1: K = 20,                  f algorithm 2, 128-bit ports (XCV1600E row)
//   2: K = 10 (two passes),     f algorithm 2, 128-bit ports (XCV1000E and
//                                                            XC2V3000 alg. 2)
//   3: K = 10,                  f algorithm 3, 128-bit ports (XC2V1000 row)
//   4: K = 5  (four passes),    f algorithm 3, 64-bit ports  (XC2V500 row)
//   5: K = 4  (five passes),    f algorithm 3, 64-bit ports  (XC2V250 row)
//   all of these with an f latency of 1, and
//   6: K = 20,                  f algorithm 1, f latency 0, 128-bit ports
// Each instance gets round keys expanded by the reference model from the
// all-zero 16-byte key, encrypts the all-zero block (known answer
// 8fc3a536 56b1f778 c129df4e 9848a41e in cipher byte order) and 60 random
// blocks, then is reloaded with the key 0123456789abcdef0112233445566778,
// encrypts the block 02132435...e0f1 (known answer 524e192f...a43f18) and
// 200 random blocks. Blocks are first offered on 70% of the clocks, then
// on every clock. Every result is compared with the reference model, in
// order, and its latency with 4 + R*(ALPHA+2) clocks (one more for the
// first beat of a 64-bit port). It also checks one result per clock when
// fully unrolled with blocks offered every clock, and a steady rate of one
// block per R/K clocks otherwise (blocks accepted over the last 100).
// Mechanisms counted (each must occur): key reload, stall (in_ready low), loop-back into the rounds (R/K-1 per
// correct result, since K rounds alone cannot produce it), two-beat
// input and output transfers, back-to-back results.
module tb_rc6_processor;
  import rc6_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  int unsigned checks = 0;
  int unsigned failures = 0;
  int unsigned cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  localparam int NC = 7;
  localparam int unsigned R = 20;
  localparam int unsigned KS  [NC] = '{20, 20, 10, 10, 5, 4, 20};
  localparam int unsigned ALG [NC] = '{3, 2, 2, 3, 3, 3, 1};
  localparam int unsigned ALP [NC] = '{1, 1, 1, 1, 1, 1, 0};
  localparam int unsigned IOS [NC] = '{128, 128, 128, 128, 64, 64, 128};
  localparam int NRAND1 = 60;
  localparam int NRAND2 = 200;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  keys_t keys1, keys2;
  logic [127:0] pt1, pt2;
  bit           go = 0;
  bit           done [NC];

  int unsigned n_reload [NC];
  int unsigned n_stall [NC];
  int unsigned n_loop [NC];
  int unsigned n_beats_in [NC];
  int unsigned n_beats_out [NC];
  int unsigned n_b2b [NC];

  initial begin
    logic [7:0] k [];
    k = new[16];
    foreach (k[i]) k[i] = 8'h00;
    keys1 = key_schedule(k, R);
    k = '{8'h01, 8'h23, 8'h45, 8'h67, 8'h89, 8'hab, 8'hcd, 8'hef,
          8'h01, 8'h12, 8'h23, 8'h34, 8'h45, 8'h56, 8'h67, 8'h78};
    keys2 = key_schedule(k, R);
    pt1 = '0;
    pt2 = bytes_to_block('{8'h02, 8'h13, 8'h24, 8'h35, 8'h46, 8'h57, 8'h68, 8'h79,
                           8'h8a, 8'h9b, 8'hac, 8'hbd, 8'hce, 8'hdf, 8'he0, 8'hf1});
    // The reference model itself must reproduce the published answers.
    check(encrypt(pt1, keys1, R) == 128'h1ea448984edf29c178f7b15636a5c38f, "reference KAT 1");
    check(encrypt(pt2, keys2, R) == 128'h183fa47e36f6511f23c615472f194e52, "reference KAT 2");
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    go = 1'b1;
  end

  for (genvar g = 0; g < NC; g++) begin : g_cfg
    localparam int unsigned K    = KS[g];
    localparam int unsigned IO   = IOS[g];
    localparam int unsigned NP   = R / K;
    localparam int unsigned LAT  = 4 + R * (ALP[g] + 2);
    localparam bit          NARROW = (IO == 64);

    logic           key_shift, in_valid, in_ready, out_valid;
    logic [31:0]    key_in;
    logic [IO-1:0]  in_data, out_data;

    rc6_processor #(.W(32), .R(R), .K(K), .ALPHA(ALP[g]), .ALGO(ALG[g]), .IO_W(IO)) dut (
      .clk(clk), .rst_n(rst_n), .key_shift(key_shift), .key_in(key_in),
      .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data),
      .out_valid(out_valid), .out_data(out_data)
    );


    logic [127:0] exp_q [$];
    int unsigned  acc_q [$];
    logic [127:0] cur_exp;
    int unsigned  cur_acc;
    int unsigned  out_beat = 0;
    int unsigned  last_out = 0;
    int unsigned  results = 0;
    int unsigned  accepted = 0;

    // Output monitor: sampled on the falling edge.
    always @(negedge clk) begin
      if (rst_n && out_valid) begin
        if (!NARROW) begin
          cur_exp = exp_q.pop_front();
          cur_acc = acc_q.pop_front();
          check(out_data == IO'(cur_exp), $sformatf("cfg %0d result", g));
          // K rounds yield the R-round ciphertext only after R/K-1 loop-backs.
          if (out_data == IO'(cur_exp)) n_loop[g] += NP - 1;
          check(cyc - cur_acc == LAT, $sformatf("cfg %0d latency", g));
          if (results > 0 && last_out == cyc - 1) n_b2b[g]++;
          last_out = cyc;
          results++;
        end else if (out_beat == 0) begin
          cur_exp = exp_q.pop_front();
          cur_acc = acc_q.pop_front();
          check(out_data == IO'(cur_exp[63:0]), $sformatf("cfg %0d result beat 0", g));
          check(cyc - cur_acc == LAT + 1, $sformatf("cfg %0d latency", g));
          out_beat = 1;
          n_beats_out[g]++;
        end else begin
          check(out_data == IO'(cur_exp[127:64]), $sformatf("cfg %0d result beat 1", g));
          if (out_data == IO'(cur_exp[127:64])) n_loop[g] += NP - 1;
          out_beat = 0;
          n_beats_out[g]++;
          results++;
        end
      end
    end

    task automatic load_keys(keys_t s);
      for (int p = 2 * R + 3; p >= 0; p--) begin
        @(negedge clk);
        key_shift = 1'b1;
        key_in = s[rc6_pkg::key_chain_index(p, R, K)];
      end
      @(negedge clk);
      key_shift = 1'b0;
      n_reload[g]++;
    endtask

    // Offer one block; returns once it has been accepted.
    task automatic send(logic [127:0] blk, keys_t s, bit dense);
      int unsigned beat = 0;
      forever begin
        @(negedge clk);
        #2;
        if (!dense && ($urandom % 10 >= 7)) begin
          in_valid = 1'b0;
          continue;
        end
        in_valid = 1'b1;
        in_data  = NARROW ? IO'(beat == 0 ? blk[63:0] : blk[127:64]) : IO'(blk);
        #1;
        if (!in_ready) begin
          n_stall[g]++;
          continue;
        end
        if (NARROW && beat == 0) begin
          beat = 1;
          n_beats_in[g]++;
          continue;
        end
        if (NARROW) n_beats_in[g]++;
        exp_q.push_back(encrypt(blk, s, R));
        acc_q.push_back(cyc);
        accepted++;
        break;
      end
    endtask

    task automatic drain();
      @(negedge clk);
      #2;
      in_valid = 1'b0;
      while (exp_q.size() != 0 || out_beat != 0) @(negedge clk);
    endtask

    initial begin
      int unsigned r0, t0;
      key_shift = 1'b0; key_in = '0; in_valid = 1'b0; in_data = '0;
      wait (go);
      load_keys(keys1);
      send(pt1, keys1, 1'b1);
      for (int n = 0; n < NRAND1; n++)
        send({$urandom, $urandom, $urandom, $urandom}, keys1, 1'b0);
      drain();
      check(results == NRAND1 + 1, $sformatf("cfg %0d results, first key", g));
      load_keys(keys2);
      send(pt2, keys2, 1'b1);
      for (int n = 0; n < NRAND2; n++) begin
        if (n == NRAND2 / 2) begin
          r0 = accepted;
          t0 = cyc;
        end
        send({$urandom, $urandom, $urandom, $urandom}, keys2, n >= NRAND2 / 2 - 40);
      end
      // Steady rate while blocks are offered on every clock.
      begin
        int unsigned blocks, cycles, per;
        blocks = accepted - r0;
        cycles = cyc - t0;
        per    = (NP > 1) ? NP : (NARROW ? 2 : 1);
        check(blocks * per <= cycles + 2 * per && cycles <= blocks * per + 2 * per,
              $sformatf("cfg %0d rate: %0d blocks in %0d clocks", g, blocks, cycles));
      end
      drain();
      check(results == NRAND1 + NRAND2 + 2, $sformatf("cfg %0d results", g));
      done[g] = 1'b1;
    end
  end

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (go);
    for (int g = 0; g < NC; g++) wait (done[g]);
    for (int g = 0; g < NC; g++) begin
      $display("cfg %0d: key loads %0d, stalls %0d, loop-backs %0d, in beats %0d, out beats %0d, back-to-back %0d",
               g, n_reload[g], n_stall[g], n_loop[g], n_beats_in[g], n_beats_out[g], n_b2b[g]);
      check(n_reload[g] == 2, "key reload happened");
      if (KS[g] < R) begin
        check(n_stall[g] > 0, "stall happened");
        check(n_loop[g] > 0, "loop-back happened");
      end else begin
        check(n_b2b[g] > 0, "back-to-back results happened");
      end
      if (IOS[g] == 64) begin
        check(n_beats_in[g] > 0, "two-beat input happened");
        check(n_beats_out[g] > 0, "two-beat output happened");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
