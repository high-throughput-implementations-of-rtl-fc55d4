// tb_rc6_control: self-checking testbench for the token control unit.
// Three configurations: R = 4 fully unrolled (K = 4, ALPHA = 1), R = 6 with
// K = 2 (three passes, ALPHA = 1) and R = 20 with K = 5 (four passes,
// ALPHA = 0). Each is offered blocks at random (70% of clocks) and then on
// every clock. Checked against a model kept in the testbench:
//   * every accepted block raises out_valid exactly 4 + R*(ALPHA+2) clocks
//     later, and out_valid is never raised otherwise;
//   * sel_new is high exactly two clocks after each acceptance;
//   * fully unrolled: in_ready never drops; partially unrolled: in_ready
//     drops (the stall happens) and, with blocks offered every clock, the
//     accepted rate over the last 600 clocks is 1/(R/K) within one ring's
//     worth of blocks.
// A collision at the ring entry would also trip the unit's own assertion.
module tb_rc6_control;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  int unsigned checks = 0;
  int unsigned failures = 0;

  always #5 clk = ~clk;

  localparam int NC = 3;
  localparam int unsigned RS [NC] = '{4, 6, 20};
  localparam int unsigned KS [NC] = '{4, 2, 5};
  localparam int unsigned AS [NC] = '{1, 1, 0};
  localparam int NCYC = 2000;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int unsigned stalls [NC];

  for (genvar g = 0; g < NC; g++) begin : g_cfg
    localparam int unsigned NP  = RS[g] / KS[g];
    localparam int unsigned IW  = (NP > 1) ? $clog2(NP) : 1;
    localparam int unsigned LAT = 4 + RS[g] * (AS[g] + 2);
    localparam int unsigned L   = KS[g] * (AS[g] + 2);

    logic                      in_valid, in_ready, sel_new, out_valid;
    logic [KS[g]-1:0][IW-1:0]  iter_sel;
    bit                        acc [NCYC + LAT + 10];
    int                        cyc = 0;
    int                        acc_late = 0;

    rc6_control #(.R(RS[g]), .K(KS[g]), .ALPHA(AS[g])) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
      .sel_new(sel_new), .iter_sel(iter_sel), .out_valid(out_valid)
    );

    initial begin
      in_valid = 1'b0;
      foreach (acc[i]) acc[i] = 1'b0;
      wait (rst_n);
      for (cyc = 0; cyc < NCYC; cyc++) begin
        @(negedge clk);
        in_valid = (cyc < NCYC / 2) ? ($urandom % 10 < 7) : 1'b1;
        #1;
        acc[cyc] = in_valid && in_ready;
        if (cyc >= NCYC - 600 && acc[cyc]) acc_late++;
        if (in_valid && !in_ready) stalls[g]++;
        if (NP == 1) check(in_ready, "in_ready high when fully unrolled");
        check(out_valid == ((cyc >= LAT) ? acc[cyc-LAT] : 1'b0), "out_valid latency");
        check(sel_new == ((cyc >= 2) ? acc[cyc-2] : 1'b0), "sel_new timing");
      end
      check(acc_late >= 600 / NP - L && acc_late <= 600 / NP + L, "steady-state rate");
      if (NP > 1) check(stalls[g] > 0, "in_ready stall happened");
    end
  end

  initial begin : watchdog
    repeat (NCYC + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    repeat (NCYC + 20) @(posedge clk);
    for (int g = 0; g < NC; g++) $display("config %0d: %0d stall cycles", g, stalls[g]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
