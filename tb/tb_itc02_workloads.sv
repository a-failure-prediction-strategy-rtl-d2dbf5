// tb_itc02_workloads: runs the default-size aging test architecture (32 core controllers, room
// for 100 test pattern sets) with the core and TPS counts of three ITC'02 benchmark SoCs, one
// after the other with a reset in between:
//   t512505: 31 cores, 79 TPSs (the largest benchmark that fits the default size),
//   p93791:  32 cores, 29 TPSs (every core controller in use),
//   d695:    10 cores, 10 TPSs (no more TPSs than sessions in a window).
// TPS t is mapped to core t mod (number of cores); every TPS has one scheduling-table row, and
// one TPS in ten uses TS = 0. A quarter of the TPSs age over the windows, and the environment
// cycles between typical, hot, and hot with a low supply, as in tb_aging_test_top.
// Checks per session: only TPSs of the workload are served, the command goes to the core of the
// TPS and only that core leaves functional mode, the status and the translated delay match the
// part model, and every window runs its ten sessions. Per workload: every TPS is tested at
// least once, aged TPSs reach the danger lists and are served from them, and fresh TPSs stay in
// the scheduling table. For d695, with no more TPSs than sessions, every TPS of the scheduling
// table (DF = 0) is tested in every window in which no danger list is served.
module tb_itc02_workloads;
  import aging_pkg::*;

  localparam int unsigned NC = 32, NT = 100, WINDOWS = 30;
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
    repeat (6000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cores seen in test mode, and the core each session command is sent to
  int n_cores = NC;
  logic [NC-1:0] en_seen;
  always @(posedge clk) en_seen <= rst_n ? (en_seen | test_en) : '0;
  int cmd_checks = 0, cmd_bad = 0;
  always @(posedge clk) if (rst_n && dut.core_cmd_valid != '0) begin
    cmd_checks++;
    if (dut.core_cmd_valid != NC'(1) << (int'(dut.cmd_tps) % n_cores)) begin
      cmd_bad++;
      $display("FAIL: command for TPS %0d went to cores %b", dut.cmd_tps, dut.core_cmd_valid);
    end
  end

  task automatic run_workload(string name, int unsigned ncores, int unsigned ntps);
    bit ts_of [NT], in_dlt [NT], df_at_start [NT];
    int tested [NT], in_window [NT];
    int c_from_dlt = 0, c_to_dlt = 0, c_sessions = 0, c_aged_dlt = 0, fresh_moved = 0;
    int full_windows = 0;
    logic [NC-1:0] cores_used = '0;
    n_cores = ncores;
    rst_n <= 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < int'(NT); t++) begin
      tested[t] = 0;
      in_dlt[t] = 1'b0;
      true_typ[t] = $urandom_range(8, 11);
    end
    for (int t = 0; t < int'(ntps); t++) begin
      ts_of[t] = (t % 10 != 9);
      cores_used[t % ncores] = 1'b1;
      info_we <= 1'b1; info_tps <= TW'(t); info_core <= CW'(t % ncores);
      info_lcp_max <= lcp_t'(LMAX); info_ts <= ts_of[t];
      @(posedge clk);
    end
    info_we <= 1'b0;
    for (int r = 0; r < int'(ntps); r++) begin
      sched_we <= 1'b1; sched_row <= 7'(r); sched_tps <= TW'(r);
      @(posedge clk);
    end
    sched_we <= 1'b0;
    sched_len <= 8'(ntps);
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
      int n_sess, n_dlt;
      env = w % 3;
      // a quarter of the TPSs age, each at its own speed; the others keep their delay
      for (int t = 0; t < int'(ntps) / 4; t++)
        if (w % (1 + t % 3) == 0 && true_typ[t] < 18) true_typ[t]++;
      for (int t = 0; t < int'(NT); t++) begin in_window[t] = 0; df_at_start[t] = in_dlt[t]; end
      pwr_window <= 1'b1;
      @(posedge clk);
      pwr_window <= 1'b0;
      n_sess = 0;
      n_dlt = 0;
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
          check(t < int'(ntps), $sformatf("%s: TPS %0d is not in the workload", name, t));
          if (t >= int'(ntps)) continue;
          tested[t]++;
          in_window[t]++;
          check(sess_status == (fail ? RES_FAIL : ts_of[t] ? RES_MIN_FOUND : RES_MAX_PASS),
                $sformatf("%s window %0d TPS %0d: status %s", name, w, t, sess_status.name()));
          if (sess_status == RES_MIN_FOUND)
            check(int'(sess_typ) >= int'(true_typ[t]) - 1 && int'(sess_typ) <= int'(true_typ[t]) + 1,
                  $sformatf("%s window %0d TPS %0d: translated delay %0d, true typical %0d", name, w, t, sess_typ, true_typ[t]));
          if (sess_from_dlt) begin c_from_dlt++; n_dlt++; end
          in_dlt[t] = (sess_to_level != 0);
          if (sess_to_level != 0) begin
            c_to_dlt++;
            if (t < int'(ntps) / 4) c_aged_dlt++; else fresh_moved++;
          end
        end
      end
      check(n_sess == 10, $sformatf("%s window %0d ran %0d sessions", name, w, n_sess));
      // with no more TPSs than sessions, a window without danger-list service tests every TPS
      // that was in the scheduling table (DF = 0) when it began
      if (ntps <= 10 && n_dlt == 0) begin
        automatic bit all = 1'b1;
        for (int t = 0; t < int'(ntps); t++) if (!df_at_start[t] && in_window[t] == 0) all = 1'b0;
        check(all, $sformatf("%s window %0d: not every TPS tested", name, w));
        full_windows++;
      end
    end
    begin
      automatic int untested = 0;
      for (int t = 0; t < int'(ntps); t++) if (tested[t] == 0) untested++;
      check(untested == 0, $sformatf("%s: %0d TPSs never tested", name, untested));
    end
    check((en_seen & ~cores_used) == '0, $sformatf("%s: a core outside the workload left functional mode", name));
    check(en_seen == cores_used, $sformatf("%s: not every core of the workload was tested", name));
    check(c_aged_dlt > 0 && c_from_dlt > 0, $sformatf("%s: aged TPSs reach and are served from the danger lists", name));
    check(fresh_moved == 0, $sformatf("%s: %0d moves of non-aging TPSs into a danger list", name, fresh_moved));
    if (ntps <= 10) check(full_windows > 0, $sformatf("%s: no window without danger-list service", name));
    $display("%s: %0d cores, %0d TPSs, %0d sessions, from danger lists %0d, into danger lists %0d, full-coverage windows %0d",
             name, ncores, ntps, c_sessions, c_from_dlt, c_to_dlt, full_windows);
  endtask

  initial begin
    run_workload("t512505", 31, 79);
    run_workload("p93791", 32, 29);
    run_workload("d695", 10, 10);
    check(cmd_checks > 0, "commands observed");
    checks += cmd_checks;
    failures += cmd_bad;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
