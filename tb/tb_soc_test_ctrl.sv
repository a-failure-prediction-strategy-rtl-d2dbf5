// tb_soc_test_ctrl: the SoC test controller with testbench-driven core responses.
//
// The testbench plays all core test controllers: it answers each command after a random delay
// with a report derived from a per-TPS "true" minimum level that rises over the windows at a
// per-TPS speed. A reference model of the adaptive scheduling (period indicators, danger list
// tables, serving order, scheduling table with danger flags), of the translation, the log, the
// analysis and the table moves predicts every command and every session result, which are
// checked. Each mechanism must occur at least once: selection by each of the three priorities,
// moves into the danger lists and back, a full danger list, sudden fails, warnings, TS = 0.
module tb_soc_test_ctrl;
  import aging_pkg::*;

  localparam int unsigned NC = 3, NT = 10, SD = 16, LD = 10, NL = 3, DD = 3, BP = 4, SESS = 4;
  localparam int unsigned MIN_T = 8, STEP_T = 1;
  localparam int unsigned CW = $clog2(NC), TW = $clog2(NT), RW = $clog2(SD), LW = $clog2(SD + 1);
  localparam int unsigned AW = CW + 2 * BIN_W, DLW = $clog2(NL + 1);
  localparam int unsigned NROWS = 12;

  logic clk = 1'b0, rst_n = 1'b0, pwr_window = 1'b0, busy, window_done;
  logic info_we = 1'b0, info_ts = 1'b0, sched_we = 1'b0, lut_we = 1'b0;
  logic [TW-1:0] info_tps = '0, sched_tps = '0;
  logic [CW-1:0] info_core = '0;
  lcp_t info_lcp_max = '0;
  logic [RW-1:0] sched_row = '0;
  logic [LW-1:0] sched_len = '0;
  logic [AW-1:0] lut_addr = '0;
  logic [7:0] lut_factor = '0;
  delay_t danger_step = 8'd2, warn_point = 8'd26;
  logic [NC-1:0] core_cmd_valid, core_cmd_ready = '1, core_rsp_valid = '0;
  logic [TW-1:0] cmd_tps;
  lcp_t cmd_lcp_max;
  logic cmd_ts, cmd_prev_valid;
  delay_t cmd_prev_typ;
  core_report_t core_rsp [NC];
  logic err_valid;
  err_e err_kind;
  logic [TW-1:0] err_tps;
  logic [CW-1:0] err_core;
  delay_t err_delay;
  logic sess_done, sess_from_dlt;
  logic [TW-1:0] sess_tps;
  logic [DLW-1:0] sess_from_level, sess_to_level;
  result_e sess_status;
  delay_t sess_typ;
  code_t sess_v_code, sess_t_code;

  soc_test_ctrl #(.NUM_CORES(NC), .NUM_TPS(NT), .SCHED_DEPTH(SD), .LOG_DEPTH(LD),
                  .NUM_LEVELS(NL), .DLT_DEPTH(DD), .BASE_PERIOD(BP), .SESSIONS_PER_WINDOW(SESS),
                  .LCP_MIN_TICKS(MIN_T), .LCP_STEP_TICKS(STEP_T)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // error monitor
  int n_err_events = 0;
  err_e last_err_kind;
  int last_err_tps;
  always @(posedge clk) if (rst_n && err_valid) begin
    n_err_events++;
    last_err_kind = err_kind;
    last_err_tps = int'(err_tps);
  end

  // ------------------------------------------------------------ reference model state
  int m_core [NT], m_lmax [NT];
  bit m_ts [NT], m_df [NT];
  int m_rows [NROWS];
  int m_ptr = 0;
  int m_lut [NC << (2 * BIN_W)];
  int m_dlt [NL][$];
  int m_pi [NL];
  int m_serve_lvl = 0, m_serve_left = 0;
  int m_log [NT][$];
  int true_base [NT], true_speed [NT];

  // coverage
  int c_prio1 = 0, c_prio2 = 0, c_prio3 = 0, c_push = 0, c_back = 0, c_full = 0;
  int c_sudden = 0, c_warning = 0, c_maxpass = 0, c_empty_full_pi = 0;

  // select the next TPS as the controller should; returns -1 when the window ends
  function automatic int model_select(output int from_level);
    from_level = 0;
    forever begin
      int hl;
      if (m_serve_left > 0 && m_dlt[m_serve_lvl].size() > 0) begin
        m_serve_left--;
        from_level = m_serve_lvl + 1;
        c_prio1++;
        return m_dlt[m_serve_lvl].pop_front();
      end
      hl = -1;
      for (int l = 0; l < int'(NL); l++) if (m_pi[l] >= int'(BP >> l)) hl = l;
      if (hl >= 0) begin
        m_pi[hl] = 0;
        m_serve_lvl = hl;
        if (m_dlt[hl].size() > 0) begin
          m_serve_left = m_dlt[hl].size() - 1;
          from_level = hl + 1;
          c_prio2++;
          return m_dlt[hl].pop_front();
        end
        m_serve_left = 0;
        c_empty_full_pi++;
        continue;
      end
      m_serve_left = 0;
      for (int k = 0; k < int'(NROWS); k++) begin
        int r = (m_ptr + k) % NROWS;
        if (!m_df[m_rows[r]]) begin
          m_ptr = (r + 1) % NROWS;
          c_prio3++;
          return m_rows[r];
        end
      end
      return -1;
    end
  endfunction

  task automatic wait_cycle();
    @(posedge clk);
    #1;
  endtask

  initial begin
    int window;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // configuration
    for (int t = 0; t < int'(NT); t++) begin
      m_core[t] = t % NC;
      m_lmax[t] = $urandom_range(8, 15);
      m_ts[t] = (t != 9);
      true_base[t] = $urandom_range(1, 5);
      true_speed[t] = (t < 5) ? $urandom_range(1, 3) : 0;
      info_we <= 1'b1; info_tps <= TW'(t); info_core <= CW'(m_core[t]);
      info_lcp_max <= lcp_t'(m_lmax[t]); info_ts <= m_ts[t];
      @(posedge clk);
    end
    info_we <= 1'b0;
    for (int r = 0; r < int'(NROWS); r++) begin
      m_rows[r] = (r < int'(NT)) ? r : ((r == 10) ? 2 : 5);
      sched_we <= 1'b1; sched_row <= RW'(r); sched_tps <= TW'(m_rows[r]);
      @(posedge clk);
    end
    sched_we <= 1'b0;
    sched_len <= LW'(NROWS);
    foreach (m_lut[a]) begin
      m_lut[a] = $urandom_range(56, 80);
      lut_we <= 1'b1; lut_addr <= AW'(a); lut_factor <= 8'(m_lut[a]);
      @(posedge clk);
    end
    lut_we <= 1'b0;
    @(posedge clk);

    for (window = 0; window < 60; window++) begin
      for (int l = 0; l < int'(NL); l++) if (m_pi[l] < int'(BP >> l)) m_pi[l]++;
      pwr_window <= 1'b1;
      @(posedge clk);
      pwr_window <= 1'b0;
      #1;
      for (int s = 0; s < int'(SESS) + 1; s++) begin
        int exp_tps, from_level, c, cyc, true_lvl, typ, ticks, f, lvl, shift, new_level, errs0;
        result_e st;
        core_report_t r;
        bit wnd_done_seen;
        if (s == int'(SESS)) begin
          cyc = 0;
          while (!window_done && cyc < 50) begin wait_cycle(); cyc++; end
          check(window_done && core_cmd_valid == '0, "window ends after its sessions");
          break;
        end
        exp_tps = model_select(from_level);
        cyc = 0;
        wnd_done_seen = 0;
        while (core_cmd_valid == '0 && cyc < 500) begin
          if (window_done) wnd_done_seen = 1;
          wait_cycle();
          cyc++;
        end
        if (exp_tps < 0) begin
          check(core_cmd_valid == '0, "no command when no TPS is eligible");
          break;
        end
        c = m_core[exp_tps];
        check(core_cmd_valid == NC'(1 << c) && int'(cmd_tps) == exp_tps,
              $sformatf("window %0d session %0d: command to %b TPS %0d, expected core %0d TPS %0d",
                        window, s, core_cmd_valid, cmd_tps, c, exp_tps));
        check(int'(cmd_lcp_max) == m_lmax[exp_tps] && cmd_ts == m_ts[exp_tps], "command fields");
        check(cmd_prev_valid == (m_log[exp_tps].size() > 0), "prev_valid");
        if (m_log[exp_tps].size() > 0) check(int'(cmd_prev_typ) == m_log[exp_tps][$], "prev_typ is the newest log");
        // core response
        true_lvl = true_base[exp_tps] + (true_speed[exp_tps] * window) / 6;
        r.v_code = code_t'($urandom);
        r.t_code = code_t'($urandom);
        r.applies = 5'd3;
        if (true_lvl > m_lmax[exp_tps]) begin st = RES_FAIL; r.lcp_min = lcp_t'(m_lmax[exp_tps]); end
        else if (!m_ts[exp_tps]) begin st = RES_MAX_PASS; r.lcp_min = lcp_t'(m_lmax[exp_tps]); end
        else begin st = RES_MIN_FOUND; r.lcp_min = lcp_t'(true_lvl); end
        r.status = st;
        repeat ($urandom_range(1, 12)) wait_cycle();
        errs0 = n_err_events;
        core_rsp[c] = r;
        core_rsp_valid[c] = 1'b1;
        wait_cycle();
        core_rsp_valid = '0;
        // model of translation, log, analysis and move
        new_level = 0;
        typ = 0;
        if (st == RES_MIN_FOUND) begin
          ticks = MIN_T + int'(r.lcp_min) * STEP_T;
          f = m_lut[(c << (2 * BIN_W)) + int'(r.v_code[7:6]) * 4 + int'(r.t_code[7:6])];
          typ = (ticks * f + 32) / 64;
          if (typ > 255) typ = 255;
          m_log[exp_tps].push_back(typ);
          if (m_log[exp_tps].size() > int'(LD)) void'(m_log[exp_tps].pop_front());
          shift = (m_log[exp_tps].size() >= 2 && m_log[exp_tps][$] > m_log[exp_tps][0])
                  ? m_log[exp_tps][$] - m_log[exp_tps][0] : 0;
          lvl = shift / int'(danger_step);
          new_level = (lvl > int'(NL)) ? NL : lvl;
        end else if (st == RES_FAIL) begin
          new_level = m_ts[exp_tps] ? NL : 0;
        end
        if (m_ts[exp_tps]) begin
          if (new_level > 0 && m_dlt[new_level - 1].size() < int'(DD)) begin
            m_dlt[new_level - 1].push_back(exp_tps);
            m_df[exp_tps] = 1;
            c_push++;
          end else begin
            if (new_level > 0) c_full++;
            if (from_level > 0) c_back++;
            m_df[exp_tps] = 0;
            new_level = 0;
          end
        end else new_level = 0;
        cyc = 0;
        while (!sess_done && cyc < 100) begin wait_cycle(); cyc++; end
        check(sess_done && int'(sess_tps) == exp_tps, "session done for the commanded TPS");
        check(int'(sess_from_level) == from_level && sess_from_dlt == (from_level > 0),
              $sformatf("TPS %0d served from level %0d, expected %0d", exp_tps, sess_from_level, from_level));
        check(sess_status == st, "session status");
        check(sess_v_code == r.v_code && sess_t_code == r.t_code, "session sensor codes");
        check(int'(sess_to_level) == new_level,
              $sformatf("TPS %0d moved to level %0d, expected %0d", exp_tps, sess_to_level, new_level));
        if (st == RES_MIN_FOUND) check(int'(sess_typ) == typ, $sformatf("translated delay %0d expected %0d", sess_typ, typ));
        if (st == RES_FAIL) begin
          check(n_err_events == errs0 + 1 && last_err_kind == ERR_SUDDEN && last_err_tps == exp_tps, "sudden fail reported");
          c_sudden++;
        end else if (st == RES_MIN_FOUND && typ >= int'(warn_point)) begin
          check(n_err_events == errs0 + 1 && last_err_kind == ERR_WARNING && last_err_tps == exp_tps, "warning reported");
          c_warning++;
        end else begin
          check(n_err_events == errs0, "no error reported");
        end
        if (st == RES_MAX_PASS) c_maxpass++;
      end
      repeat (5) wait_cycle();
    end
    $display("coverage: prio1 %0d prio2 %0d prio3 %0d push %0d back %0d full %0d sudden %0d warning %0d maxpass %0d empty-full-pi %0d",
             c_prio1, c_prio2, c_prio3, c_push, c_back, c_full, c_sudden, c_warning, c_maxpass, c_empty_full_pi);
    check(c_prio1 > 0, "priority 1 (continue a danger list) happened");
    check(c_prio2 > 0, "priority 2 (full period indicator) happened");
    check(c_prio3 > 0, "priority 3 (scheduling table) happened");
    check(c_push > 0, "move into a danger list happened");
    check(c_back > 0, "move back to the scheduling table happened");
    check(c_full > 0, "full danger list happened");
    check(c_sudden > 0, "sudden fail happened");
    check(c_warning > 0, "warning happened");
    check(c_maxpass > 0, "TS = 0 session happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
