// tb_aging_test_top: end-to-end test of the whole aging test architecture at its default size
// (32 cores, 100 test pattern sets, 16 LCP levels, 10 sessions per power-on/-off window).
//
// Every core gets a part-under-test model and two ring-oscillator models (one sensitive to the
// supply, one to temperature) enabled while the core is under test. Each TPS has a "true" path
// delay at typical conditions; some TPSs age at different speeds over the windows. The
// environment changes from window to window between typical, hot, and hot with a low supply;
// the part's actual delay scales with the condition, and the translation tables are loaded with
// the matching correction factors. Checks per session: the status (fail exactly when the actual
// delay exceeds LCP_max, TS = 0 otherwise passes), the translated delay within one tick of the
// true typical delay whatever the condition, and the error report (sudden fail or warning).
// Every mechanism must happen at least once: the three selection priorities, moves into the
// danger lists and back (after a one-off slow reading), searches going down and up, starts from a logged delay, sessions in
// each environment, sudden fails, warnings and TS = 0 sessions.
module tb_aging_test_top;
  import aging_pkg::*;

  localparam int unsigned NC = 32, NT = 100, NROWS = 110, WINDOWS = 40;
  localparam int unsigned MIN_T = 8, LMAX = 15;
  localparam int unsigned CW = $clog2(NC), TW = $clog2(NT);

  logic clk = 1'b0, rst_n = 1'b0, pwr_window = 1'b0, busy, window_done;
  logic info_we = 1'b0, info_ts = 1'b0, sched_we = 1'b0, lut_we = 1'b0, inv_lut_we = 1'b0;
  logic [TW-1:0] info_tps = '0, sched_tps = '0;
  logic [CW-1:0] info_core = '0, inv_lut_core = '0;
  lcp_t info_lcp_max = '0;
  logic [6:0] sched_row = '0;
  logic [7:0] sched_len = '0;
  logic [CW+3:0] lut_addr = '0;
  logic [3:0] inv_lut_addr = '0;
  logic [7:0] lut_factor = '0, inv_lut_factor = '0;
  delay_t danger_step = 8'd2, warn_point = 8'd16;
  logic err_valid;
  err_e err_kind;
  logic [TW-1:0] err_tps;
  logic [CW-1:0] err_core;
  delay_t err_delay;
  logic sess_done, sess_from_dlt;
  logic [TW-1:0] sess_tps;
  logic [2:0] sess_from_level, sess_to_level;
  result_e sess_status;
  delay_t sess_typ;
  code_t sess_v_code, sess_t_code;
  clk_mode_e sys_mode = MODE_FUNC;
  logic [NC-1:0] func_clk = '0, core_clk, test_en, cut_start, cut_lc_req, cut_done, cut_pass;
  logic [NC-1:0] launch, capture, ro_v, ro_t;
  logic soc_test_clk = 1'b0;
  logic [TW-1:0] cut_tps [NC];

  aging_test_top dut (.*);

  always #5 clk = ~clk;
  always #13 func_clk = ~func_clk;

  // environment: 0 typical, 1 hot, 2 hot with low supply
  int env = 0;
  int unsigned vdd_v, vdd_nom = 1800;
  int temp_t, temp_nom = 25;
  always_comb begin
    vdd_v  = (env == 2) ? 1500 : 1800;
    temp_t = (env == 0) ? 25 : 125;
  end

  int unsigned true_typ [NT];
  int unsigned put_delay [NC];
  int unsigned launches [NC];

  function automatic int unsigned scale100();
    return (env == 0) ? 100 : (env == 1) ? 120 : 144;
  endfunction

  for (genvar c = 0; c < int'(NC); c++) begin : g_env
    always_comb put_delay[c] = (true_typ[cut_tps[c]] * scale100() + 99) / 100;
    put_model #(.NPAT(2), .SHIFT(20)) u_put (
      .clk, .rst_n, .cut_start(cut_start[c]), .delay(put_delay[c]), .launch(launch[c]),
      .capture(capture[c]), .cut_lc_req(cut_lc_req[c]), .cut_done(cut_done[c]),
      .cut_pass(cut_pass[c]), .launches(launches[c])
    );
    // supply sensor: voltage dependence only; temperature sensor: temperature only
    ring_osc #(.T0(0.677), .K_T(0.0)) u_ro_v (.en(test_en[c]), .vdd_mv(vdd_v), .temp_c(temp_nom), .ro_out(ro_v[c]));
    ring_osc #(.T0(0.677), .K_T(0.002)) u_ro_t (.en(test_en[c]), .vdd_mv(vdd_nom), .temp_c(temp_t), .ro_out(ro_t[c]));
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // search direction seen in each core test controller
  int c_up = 0, c_down = 0, c_from_log = 0;
  for (genvar c = 0; c < int'(NC); c++) begin : g_probe
    always @(posedge clk) if (rst_n && dut.g_core[c].u_core_ctrl.rsp_valid
                              && dut.g_core[c].u_core_ctrl.rsp.status == RES_MIN_FOUND) begin
      if (dut.g_core[c].u_core_ctrl.fflag) c_up++;
      else c_down++;
      if (dut.g_core[c].u_core_ctrl.prev_valid) c_from_log++;
    end
  end

  int n_err = 0;
  err_e last_err;
  int last_err_tps;
  always @(posedge clk) if (rst_n && err_valid) begin
    n_err++;
    last_err = err_kind;
    last_err_tps = int'(err_tps);
  end

  bit ts_of [NT];
  int c_from_sched = 0, c_from_dlt = 0, c_to_dlt = 0, c_back = 0, c_sudden = 0, c_warn = 0;
  int c_maxpass = 0, c_env [3], c_sessions = 0, c_prio1 = 0;
  int last_dlt_level = 0;
  int tested [NT];

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < int'(NT); t++) begin
      true_typ[t] = $urandom_range(8, 11);
      ts_of[t] = (t % 10 != 9);
      info_we <= 1'b1; info_tps <= TW'(t); info_core <= CW'(t % NC);
      info_lcp_max <= lcp_t'(LMAX); info_ts <= ts_of[t];
      @(posedge clk);
    end
    info_we <= 1'b0;
    for (int r = 0; r < int'(NROWS); r++) begin
      sched_we <= 1'b1; sched_row <= 7'(r); sched_tps <= TW'((r < int'(NT)) ? r : (r - NT) * 3);
      @(posedge clk);
    end
    sched_we <= 1'b0;
    sched_len <= 8'(NROWS);
    // translation tables: bin 1 of a sensor code is the nominal condition, bin 0 the stressed one
    for (int c = 0; c < int'(NC); c++) begin
      for (int a = 0; a < 16; a++) begin
        automatic int vb = a / 4, tb = a % 4;
        automatic int nstress = (vb == 0) + (tb == 0);
        lut_we <= 1'b1; lut_addr <= (CW+4)'((c << 4) + a);
        lut_factor <= (nstress == 2) ? 8'd44 : (nstress == 1) ? 8'd53 : 8'd64;
        inv_lut_we <= 1'b1; inv_lut_core <= CW'(c); inv_lut_addr <= 4'(a);
        inv_lut_factor <= (nstress == 2) ? 8'd92 : (nstress == 1) ? 8'd77 : 8'd64;
        @(posedge clk);
      end
    end
    lut_we <= 1'b0;
    inv_lut_we <= 1'b0;
    @(posedge clk);

    for (int w = 0; w < int'(WINDOWS); w++) begin
      int n_sess;
      env = w % 3;
      // aging: the first 30 TPSs age, five of them fast
      for (int t = 0; t < 30; t++) begin
        if (t < 5) true_typ[t] = true_typ[t] + 1;
        else if (w % (2 + t % 4) == 0) true_typ[t] = true_typ[t] + 1;
        if (true_typ[t] > 18) true_typ[t] = 18;
      end
      pwr_window <= 1'b1;
      @(posedge clk);
      pwr_window <= 1'b0;
      n_sess = 0;
      while (1) begin
        @(posedge clk);
        #1;
        if (window_done) break;
        if (sess_done) begin
          automatic int t = int'(sess_tps);
          automatic int actual = (true_typ[t] * scale100() + 99) / 100;
          automatic bit fail = actual > int'(MIN_T + LMAX);
          n_sess++;
          c_sessions++;
          c_env[env]++;
          check(sess_status == (fail ? RES_FAIL : ts_of[t] ? RES_MIN_FOUND : RES_MAX_PASS),
                $sformatf("window %0d TPS %0d typ %0d actual %0d: status %s", w, t, true_typ[t], actual, sess_status.name()));
          // the reported sensor codes fall in the bins of the current environment
          check(int'(sess_v_code[7:6]) == ((env == 2) ? 0 : 1) && int'(sess_t_code[7:6]) == ((env == 0) ? 1 : 0),
                $sformatf("window %0d env %0d: sensor codes %0d/%0d in the wrong bins", w, env, sess_v_code, sess_t_code));
          if (sess_status == RES_MIN_FOUND) begin
            check(int'(sess_typ) >= int'(true_typ[t]) - 1 && int'(sess_typ) <= int'(true_typ[t]) + 1,
                  $sformatf("window %0d env %0d TPS %0d: translated delay %0d, true typical %0d", w, env, t, sess_typ, true_typ[t]));
            if (int'(sess_typ) >= int'(warn_point)) begin
              check(last_err == ERR_WARNING && last_err_tps == t, "warning reported");
              c_warn++;
            end
          end
          if (sess_status == RES_FAIL) begin
            check(last_err == ERR_SUDDEN && last_err_tps == t, "sudden fail reported");
            c_sudden++;
          end
          if (sess_status == RES_MAX_PASS) c_maxpass++;
          if (sess_from_dlt) c_from_dlt++; else c_from_sched++;
          if (sess_to_level != 0) c_to_dlt++;
          if (sess_from_dlt && sess_to_level == 0) c_back++;
          if (sess_from_dlt && n_sess == 1 && last_dlt_level != 0) c_prio1++;
          // TPSs 40..49 read 3 ticks slow once (a measurement outlier) at their second test
          tested[t]++;
          if (t >= 40 && t < 50 && tested[t] == 1) true_typ[t] += 3;
          if (t >= 40 && t < 50 && tested[t] == 2) true_typ[t] -= 3;
        end
      end
      check(n_sess == 10, $sformatf("window %0d ran %0d sessions", w, n_sess));
      last_dlt_level = dut.u_soc_ctrl.serve_left != 0;
    end
    $display("sessions %0d (typical %0d, hot %0d, hot+low supply %0d): from scheduling table %0d, from danger lists %0d (continued %0d), into danger lists %0d, back %0d, search up %0d, down %0d, from log %0d, sudden %0d, warning %0d, TS=0 %0d",
             c_sessions, c_env[0], c_env[1], c_env[2], c_from_sched, c_from_dlt, c_prio1, c_to_dlt,
             c_back, c_up, c_down, c_from_log, c_sudden, c_warn, c_maxpass);
    check(c_from_sched > 0, "selection from the scheduling table");
    check(c_from_dlt > 0, "selection from a danger list");
    check(c_prio1 > 0, "danger list service continued into the next window");
    check(c_to_dlt > 0, "move into a danger list");
    check(c_back > 0, "move back to the scheduling table");
    check(c_up > 0 && c_down > 0, "searches in both directions");
    check(c_from_log > 0, "start from a logged delay");
    check(c_env[0] > 0 && c_env[1] > 0 && c_env[2] > 0, "all environments");
    check(c_sudden > 0, "sudden fail");
    check(c_warn > 0, "warning");
    check(c_maxpass > 0, "TS = 0 session");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
