// tb_core_test_ctrl: runs test sessions of the core test controller against a part-under-test
// model with a known path delay, and checks the outcome (status, minimum level), the number of
// TPS applications and launch/capture pairs, and the sensor codes against a reference model of
// the test flow. Covers TS = 0, sudden fails, searches without a logged delay, searches that
// go down (Pflag) and up (Fflag), and the translated starting point.
module tb_core_test_ctrl;
  import aging_pkg::*;

  localparam int unsigned NT = 8, MIN_T = 4, STEP_T = 1, WIN = 64, NPAT = 2;

  logic clk = 1'b0, rst_n = 1'b0, func_clk = 1'b0, soc_test_clk = 1'b0;
  clk_mode_e sys_mode = MODE_FUNC;
  logic core_clk, test_en;
  logic cmd_valid = 1'b0, cmd_ready, cmd_ts = 1'b0, cmd_prev_valid = 1'b0;
  logic [$clog2(NT)-1:0] cmd_tps = '0, cut_tps;
  lcp_t cmd_lcp_max = '0;
  delay_t cmd_prev_typ = '0;
  logic rsp_valid;
  core_report_t rsp;
  logic cfg_we = 1'b0;
  logic [2*BIN_W-1:0] cfg_addr = '0;
  logic [7:0] cfg_factor = '0;
  logic cut_start, cut_lc_req, cut_done, cut_pass, launch, capture;
  logic ro_v = 1'b0, ro_t = 1'b0;
  int unsigned put_delay = 0, launches;
  int checks = 0, failures = 0;
  int n_fail = 0, n_maxpass = 0, n_down = 0, n_up = 0, n_three = 0;

  core_test_ctrl #(.NUM_TPS(NT), .LCP_MIN_TICKS(MIN_T), .LCP_STEP_TICKS(STEP_T),
                   .SENSOR_WINDOW(WIN)) dut (.*);

  put_model #(.NPAT(NPAT), .SHIFT(3)) u_put (
    .clk, .rst_n, .cut_start, .delay(put_delay), .launch, .capture, .cut_lc_req, .cut_done, .cut_pass,
    .launches
  );

  always #5 clk = ~clk;
  always #23 ro_v = ~ro_v;      // 640 / 46 edges per window
  always #37 ro_t = ~ro_t;      // 640 / 74 edges per window
  always #13 func_clk = ~func_clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model of the flow; returns status, minimum level and applications
  task automatic model(input bit ts, input int lmax, input int delay, input bit pv, input int pred,
                       output result_e st, output int mn, output int ap, output bit went_up);
    int m, lv;
    bit pf, ff;
    m = (delay > int'(MIN_T)) ? (delay - int'(MIN_T) + int'(STEP_T) - 1) / int'(STEP_T) : 0;
    ap = 1;
    went_up = 0;
    if (m > lmax) begin st = RES_FAIL; mn = lmax; return; end
    if (!ts) begin st = RES_MAX_PASS; mn = lmax; return; end
    ff = 0;
    lv = (pred > int'(MIN_T)) ? (pred - int'(MIN_T) + int'(STEP_T) - 1) / int'(STEP_T) : 0;
    if (!pv || lv >= lmax) begin
      pf = 1;
      if (lmax == 0) begin st = RES_MIN_FOUND; mn = 0; return; end
      lv = lmax - 1;
    end else pf = 0;
    forever begin
      ap++;
      if (lv >= m) begin
        if (ff || lv == 0) begin st = RES_MIN_FOUND; mn = lv; return; end
        pf = 1; lv--;
      end else begin
        if (pf) begin st = RES_MIN_FOUND; mn = lv + 1; return; end
        if (lv >= lmax) begin st = RES_FAIL; mn = lmax; return; end
        ff = 1; went_up = 1; lv++;
      end
    end
  endtask

  task automatic session(bit ts, int lmax, int delay, bit pv, int prev, int factor);
    result_e est;
    int emn, eap, pred, l0, cyc;
    bit up;
    pred = (prev * factor + 32) / 64;
    if (pred > 255) pred = 255;
    model(ts, lmax, delay, pv, pred, est, emn, eap, up);
    l0 = launches;
    put_delay = delay;
    @(posedge clk);
    cmd_valid <= 1'b1;
    cmd_tps <= $bits(cmd_tps)'($urandom_range(NT - 1));
    cmd_ts <= ts;
    cmd_lcp_max <= lcp_t'(lmax);
    cmd_prev_valid <= pv;
    cmd_prev_typ <= delay_t'(prev);
    @(posedge clk);
    cmd_valid <= 1'b0;
    #1;
    check(!cmd_ready && test_en, "busy and in aging test mode after the command");
    cyc = 0;
    while (!rsp_valid && cyc < 100000) begin
      @(posedge clk);
      #1;
      cyc++;
    end
    check(rsp.status == est, $sformatf("ts %0d lmax %0d delay %0d pv %0d pred %0d: status %s expected %s",
          ts, lmax, delay, pv, pred, rsp.status.name(), est.name()));
    if (est == RES_MIN_FOUND)
      check(int'(rsp.lcp_min) == emn, $sformatf("delay %0d pred %0d: min %0d expected %0d", delay, pred, rsp.lcp_min, emn));
    check(int'(rsp.applies) == eap, $sformatf("delay %0d pred %0d: %0d applications expected %0d", delay, pred, rsp.applies, eap));
    check(launches - l0 == eap * int'(NPAT), "one launch/capture pair per pattern and application");
    check(int'(rsp.v_code) >= 640 / 46 - 1 && int'(rsp.v_code) <= 640 / 46 + 1, "voltage code");
    check(int'(rsp.t_code) >= 640 / 74 - 1 && int'(rsp.t_code) <= 640 / 74 + 1, "temperature code");
    @(posedge clk);
    #1;
    check(cmd_ready && !test_en, "idle and back to the system clock after the report");
    if (est == RES_FAIL) n_fail++;
    if (est == RES_MAX_PASS) n_maxpass++;
    if (est == RES_MIN_FOUND && up) n_up++;
    if (est == RES_MIN_FOUND && !up && eap > 2) n_down++;
    if (est == RES_MIN_FOUND && eap == 3) n_three++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    // fixed cases
    session(0, 10, 9, 0, 0, 64);           // TS = 0 pass
    session(1, 5, 12, 1, 8, 64);           // sudden fail
    session(1, 10, 9, 0, 0, 64);           // no log: down from LCP_max
    session(1, 12, 10, 1, 10, 64);        // exact prediction: three applications
    check(int'(rsp.applies) == 3, "exact prediction uses three applications");
    session(1, 12, 12, 1, 9, 64);         // prediction too low: search goes up
    session(1, 15, 4, 1, 6, 64);          // minimum is LCP_min
    for (int i = 0; i < 120; i++) begin
      automatic int lmax = $urandom_range(15);
      session(1'($urandom_range(5) != 0), lmax, $urandom_range(2, 22), 1'($urandom_range(4) != 0),
              $urandom_range(2, 24), 64);
    end
    // "typical -> measured" factor 2.0 for every bin: the predicted delay doubles
    for (int a = 0; a < 16; a++) begin
      cfg_we <= 1'b1;
      cfg_addr <= 4'(a);
      cfg_factor <= 8'd128;
      @(posedge clk);
    end
    cfg_we <= 1'b0;
    for (int i = 0; i < 40; i++) begin
      session(1, 15, $urandom_range(4, 19), 1, $urandom_range(2, 10), 128);
    end
    check(n_fail > 0 && n_maxpass > 0 && n_up > 0 && n_down > 0 && n_three > 0,
          $sformatf("all flow paths seen: fail %0d maxpass %0d up %0d down %0d three %0d",
                    n_fail, n_maxpass, n_up, n_down, n_three));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
