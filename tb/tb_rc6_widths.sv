// tb_rc6_widths: the RC6 processor at word sizes and round counts other than
// RC6-32/20, since the RTL is generic in W and R like the cipher itself
// (RC6-w/r/b). Four instances:
//   0: W = 16, R = 12, K = 3 (four passes), f algorithm 2, 32-bit two-beat ports
//   1: W = 8,  R = 8,  K = 8,                f algorithm 3, 32-bit ports
//   2: W = 64, R = 20, K = 10 (two passes),  f algorithm 3, 256-bit ports
//   3: W = 16, R = 12, K = 12,               f algorithm 1, 32-bit two-beat ports
// Round keys are random (the key schedule is outside the hardware). A
// reference model written for any word size up to 64 bits (masked 64-bit
// arithmetic, rotations by the log2(w) low bits, fixed rotation by log2(w))
// computes each expected ciphertext. 150 random blocks per instance are
// offered on random clocks; every result and its latency 4 + R*(ALPHA+2)
// (+1 for two-beat ports) are checked, in order.
module tb_rc6_widths;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  int unsigned checks = 0;
  int unsigned failures = 0;
  int unsigned cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  localparam int NC = 4;
  localparam int unsigned WS  [NC] = '{16, 8, 64, 16};
  localparam int unsigned RS  [NC] = '{12, 8, 20, 12};
  localparam int unsigned KS  [NC] = '{3, 8, 10, 12};
  localparam int unsigned ALG [NC] = '{2, 3, 3, 1};
  localparam bit          NAR [NC] = '{1, 0, 0, 1};
  localparam int NBLK = 150;

  typedef logic [63:0] w64_t;
  typedef w64_t        wkeys_t [];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  function automatic w64_t wmask(int unsigned w);
    return (w == 64) ? '1 : ((64'd1 << w) - 1);
  endfunction

  function automatic w64_t rotl_w(w64_t x, int unsigned n, int unsigned w);
    x = x & wmask(w);
    n = n % w;
    if (n == 0) return x;
    return ((x << n) | (x >> (w - n))) & wmask(w);
  endfunction

  function automatic w64_t f_w(w64_t x, int unsigned w);
    logic [127:0] p;
    p = 128'(x) * (128'(x) * 2 + 1);
    return p[63:0] & wmask(w);
  endfunction

  // Encrypt words a, b, c, d (index 0..3) with w-bit words and r rounds.
  function automatic void encrypt_w(ref w64_t v [4], input wkeys_t s,
                                    input int unsigned r, input int unsigned w);
    w64_t a, b, c, d, t, u, tmp, m;
    int unsigned lgw;
    m = wmask(w);
    lgw = $clog2(w);
    a = v[0]; b = v[1]; c = v[2]; d = v[3];
    b = (b + s[0]) & m;
    d = (d + s[1]) & m;
    for (int i = 1; i <= r; i++) begin
      t = rotl_w(f_w(b, w), lgw, w);
      u = rotl_w(f_w(d, w), lgw, w);
      a = (rotl_w(a ^ t, int'(u % w), w) + s[2*i]) & m;
      c = (rotl_w(c ^ u, int'(t % w), w) + s[2*i+1]) & m;
      tmp = a; a = b; b = c; c = d; d = tmp;
    end
    a = (a + s[2*r+2]) & m;
    c = (c + s[2*r+3]) & m;
    v[0] = a; v[1] = b; v[2] = c; v[3] = d;
  endfunction

  bit done [NC];

  for (genvar g = 0; g < NC; g++) begin : g_cfg
    localparam int unsigned W   = WS[g];
    localparam int unsigned R   = RS[g];
    localparam int unsigned K   = KS[g];
    localparam int unsigned IO  = NAR[g] ? 2 * W : 4 * W;
    localparam int unsigned LAT = 4 + R * 3 + (NAR[g] ? 1 : 0);

    logic           key_shift, in_valid, in_ready, out_valid;
    logic [W-1:0]   key_in;
    logic [IO-1:0]  in_data, out_data;

    rc6_processor #(.W(W), .R(R), .K(K), .ALPHA(1), .ALGO(ALG[g]), .IO_W(IO)) dut (
      .clk(clk), .rst_n(rst_n), .key_shift(key_shift), .key_in(key_in),
      .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data),
      .out_valid(out_valid), .out_data(out_data)
    );

    logic [4*W-1:0] exp_q [$];
    int unsigned    acc_q [$];
    logic [4*W-1:0] cur;
    int unsigned    beat = 0;

    always @(negedge clk) begin
      if (rst_n && out_valid) begin
        if (!NAR[g]) begin
          cur = exp_q.pop_front();
          check(out_data == IO'(cur), $sformatf("cfg %0d result", g));
          check(cyc - acc_q.pop_front() == LAT, $sformatf("cfg %0d latency", g));
        end else if (beat == 0) begin
          cur = exp_q.pop_front();
          check(out_data == IO'(cur[2*W-1:0]), $sformatf("cfg %0d beat 0", g));
          check(cyc - acc_q.pop_front() == LAT, $sformatf("cfg %0d latency", g));
          beat = 1;
        end else begin
          check(out_data == IO'(cur[4*W-1:2*W]), $sformatf("cfg %0d beat 1", g));
          beat = 0;
        end
      end
    end

    initial begin
      wkeys_t s;
      w64_t   v [4];
      logic [4*W-1:0] blk;
      int unsigned nb;
      key_shift = 0; key_in = '0; in_valid = 0; in_data = '0;
      s = new[2 * R + 4];
      foreach (s[i]) s[i] = {$urandom, $urandom} & wmask(W);
      wait (rst_n);
      for (int p = 2 * R + 3; p >= 0; p--) begin
        @(negedge clk);
        key_shift = 1;
        key_in = W'(s[rc6_pkg::key_chain_index(p, R, K)]);
      end
      @(negedge clk);
      key_shift = 0;
      for (int n = 0; n < NBLK; n++) begin
        for (int q = 0; q < 4; q++) v[q] = {$urandom, $urandom} & wmask(W);
        blk = {W'(v[3]), W'(v[2]), W'(v[1]), W'(v[0])};
        nb = 0;
        forever begin
          @(negedge clk);
          #2;
          in_valid = ($urandom % 4 != 0);
          in_data  = NAR[g] ? IO'(nb == 0 ? blk[2*W-1:0] : blk[4*W-1:2*W]) : IO'(blk);
          #1;
          if (!(in_valid && in_ready)) continue;
          if (NAR[g] && nb == 0) begin
            nb = 1;
            continue;
          end
          break;
        end
        encrypt_w(v, s, R, W);
        exp_q.push_back({W'(v[3]), W'(v[2]), W'(v[1]), W'(v[0])});
        acc_q.push_back(cyc);
      end
      @(negedge clk);
      #2;
      in_valid = 0;
      while (exp_q.size() != 0 || beat != 0) @(negedge clk);
      done[g] = 1;
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int g = 0; g < NC; g++) wait (done[g]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
