// tb_test_clock_gen: checks the launch-to-capture distance of every LCP level, that no pulses
// are produced outside aging test, and the clock bypass in each mode.
module tb_test_clock_gen;
  import aging_pkg::*;

  localparam int unsigned MIN_T = 3, STEP_T = 2;

  logic clk = 1'b0, rst_n = 1'b0, func_clk = 1'b0, soc_test_clk = 1'b0, lc_req = 1'b0;
  clk_mode_e mode = MODE_AGING_TEST;
  lcp_t level = '0;
  logic busy, launch, capture, lc_done, core_clk;
  int checks = 0, failures = 0;

  test_clock_gen #(.LCP_MIN_TICKS(MIN_T), .LCP_STEP_TICKS(STEP_T)) dut (.*);

  always #5 clk = ~clk;
  always #7 func_clk = ~func_clk;
  always #11 soc_test_clk = ~soc_test_clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int l = 0; l < int'(LCP_LEVELS); l++) begin
      int t_launch, t_cap, cyc;
      level  <= lcp_t'(l);
      lc_req <= 1'b1;
      @(posedge clk);
      lc_req <= 1'b0;
      cyc = 0;
      t_launch = -1;
      t_cap = -1;
      while (t_cap < 0 && cyc < 100) begin
        #1;
        if (launch) t_launch = cyc;
        if (capture) t_cap = cyc;
        // core clock carries the pulses in the low phase of clk
        if (launch || capture) begin
          #5;  // now in the low phase of clk
          check(core_clk == 1'b1, "core_clk pulse during launch/capture");
        end else begin
          #5;
          check(core_clk == 1'b0, "core_clk quiet between launch and capture");
        end
        @(posedge clk);
        cyc++;
      end
      check(t_launch == 0, $sformatf("launch in the cycle after the request (level %0d)", l));
      check(t_cap - t_launch == int'(MIN_T + l * STEP_T),
            $sformatf("level %0d: distance %0d expected %0d", l, t_cap - t_launch, MIN_T + l * STEP_T));
      @(posedge clk);
    end
    // no pulses outside aging test; bypass of the other clocks
    mode <= MODE_FUNC;
    @(posedge clk);
    lc_req <= 1'b1;
    @(posedge clk);
    lc_req <= 1'b0;
    for (int i = 0; i < 40; i++) begin
      #1;
      check(!launch && !capture, "no launch/capture in functional mode");
      @(posedge clk);
    end
    for (int i = 0; i < 40; i++) begin
      @(func_clk);
      #1;
      check(core_clk == func_clk, "functional clock bypassed");
    end
    mode <= MODE_PROD_TEST;
    @(posedge clk);
    for (int i = 0; i < 40; i++) begin
      @(soc_test_clk);
      #1;
      check(core_clk == soc_test_clk, "SoC test clock bypassed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
