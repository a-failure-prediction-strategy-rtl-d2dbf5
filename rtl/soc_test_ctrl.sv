// soc_test_ctrl: SoC test controller with adaptive aging test scheduling.
//
// A pulse on pwr_window marks a power-on or power-off period. The controller then raises every
// period indicator by one and runs up to SESSIONS_PER_WINDOW test sessions, one test pattern set
// (TPS) each. The next TPS is picked in this order of priority:
//   1. a TPS left in the danger list table that was being served in the previous session,
//   2. the head of the highest-level danger list table whose period indicator is full (the
//      indicator is cleared, and every TPS in the table at that moment is to be served in FIFO
//      order, continuing in later sessions and windows if need be),
//   3. the next TPS of the scheduling table whose danger flag DF is 0 (round robin).
// The TPS information table gives the core, LCP_max and test strategy TS. The command, with the
// last logged delay of the TPS, goes to that core's test controller. Its report is handled so:
//   - minimum LCP found: the level is turned into launch-to-capture ticks, translated to typical
//     voltage and temperature with the core's "measured -> typical" table, and logged. The
//     aging analyser compares it with the oldest logged delay, which yields a danger level, and
//     an ERR_WARNING error is reported if it reached warn_point;
//   - fail at LCP_max: an ERR_SUDDEN error is reported; with TS = 1 the TPS goes to the
//     highest danger level;
//   - pass at LCP_max (TS = 0): nothing is logged and the TPS does not move.
// A TPS with TS = 1 then moves to the danger list table of its level (DF = 1), or, at level 0,
// back to the scheduling table (DF = 0). If the target table is full it goes back to the
// scheduling table. sess_done pulses at the end of each session with what was decided and
// the measured voltage and temperature codes, which a system may store next to the log;
// window_done pulses when the window's sessions are over or no TPS is eligible.
// Tables are written through the cfg ports while no window runs.
//
// The priorities, the tables, the flags, the translation of reported delays, the log and the
// warning point follow the method. The number of sessions per window is its assumed minimum of
// ten. The danger level rule, the handling of a full table and of a sudden fail, and all
// interfaces are this design's own choices.
module soc_test_ctrl
  import aging_pkg::*;
#(
  parameter int unsigned NUM_CORES           = 32,
  parameter int unsigned NUM_TPS             = 100,
  parameter int unsigned SCHED_DEPTH         = 128,
  parameter int unsigned LOG_DEPTH           = 10,
  parameter int unsigned NUM_LEVELS          = 4,
  parameter int unsigned DLT_DEPTH           = 16,
  parameter int unsigned BASE_PERIOD         = 8,
  parameter int unsigned SESSIONS_PER_WINDOW = 10,
  parameter int unsigned LCP_MIN_TICKS       = 8,
  parameter int unsigned LCP_STEP_TICKS      = 1,
  localparam int unsigned CORE_W  = (NUM_CORES > 1) ? $clog2(NUM_CORES) : 1,
  localparam int unsigned TPS_W   = (NUM_TPS > 1) ? $clog2(NUM_TPS) : 1,
  localparam int unsigned ROW_W   = (SCHED_DEPTH > 1) ? $clog2(SCHED_DEPTH) : 1,
  localparam int unsigned LEN_W   = $clog2(SCHED_DEPTH + 1),
  localparam int unsigned LUT_W   = CORE_W + 2 * BIN_W,
  localparam int unsigned DLVL_W  = $clog2(NUM_LEVELS + 1)   // danger level 0..NUM_LEVELS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // power-on/-off window
  input  logic                 pwr_window,
  output logic                 busy,
  output logic                 window_done,
  // configuration
  input  logic                 info_we,
  input  logic [TPS_W-1:0]     info_tps,
  input  logic [CORE_W-1:0]    info_core,
  input  lcp_t                 info_lcp_max,
  input  logic                 info_ts,
  input  logic                 sched_we,
  input  logic [ROW_W-1:0]     sched_row,
  input  logic [TPS_W-1:0]     sched_tps,
  input  logic [LEN_W-1:0]     sched_len,
  input  logic                 lut_we,
  input  logic [LUT_W-1:0]     lut_addr,
  input  logic [7:0]           lut_factor,
  input  delay_t               danger_step,
  input  delay_t               warn_point,
  // core test controllers
  output logic [NUM_CORES-1:0] core_cmd_valid,
  input  logic [NUM_CORES-1:0] core_cmd_ready,
  output logic [TPS_W-1:0]     cmd_tps,
  output lcp_t                 cmd_lcp_max,
  output logic                 cmd_ts,
  output delay_t               cmd_prev_typ,
  output logic                 cmd_prev_valid,
  input  logic [NUM_CORES-1:0] core_rsp_valid,
  input  core_report_t         core_rsp [NUM_CORES],
  // reports to the system
  output logic                 err_valid,
  output err_e                 err_kind,
  output logic [TPS_W-1:0]     err_tps,
  output logic [CORE_W-1:0]    err_core,
  output delay_t               err_delay,
  output logic                 sess_done,
  output logic [TPS_W-1:0]     sess_tps,
  output logic                 sess_from_dlt,   // TPS came from a danger list table
  output logic [DLVL_W-1:0]    sess_from_level, // its level (1..NUM_LEVELS), 0 if from the scheduling table
  output logic [DLVL_W-1:0]    sess_to_level,   // danger level after the session, 0 = scheduling table
  output result_e              sess_status,
  output delay_t               sess_typ,        // translated delay (RES_MIN_FOUND only)
  output code_t                sess_v_code,     // voltage and temperature sensor codes of the
  output code_t                sess_t_code      // session's deciding measurement
);

  localparam int unsigned LVL_W  = (NUM_LEVELS > 1) ? $clog2(NUM_LEVELS) : 1;
  localparam int unsigned DCNT_W = $clog2(DLT_DEPTH + 1);
  localparam int unsigned LCNT_W = $clog2(LOG_DEPTH + 1);
  localparam int unsigned SESS_W = $clog2(SESSIONS_PER_WINDOW + 1);

  typedef enum logic [3:0] {
    S_IDLE, S_SELECT, S_SCHED, S_INFO, S_CMD, S_WAIT, S_XLATE, S_LOG, S_ANALYZE, S_MOVE
  } state_e;

  state_e              state;
  logic [SESS_W-1:0]   sessions_left;
  logic [LVL_W-1:0]    serve_lvl;
  logic [DCNT_W-1:0]   serve_left;
  logic [TPS_W-1:0]    cur_tps;
  logic [CORE_W-1:0]   cur_core;
  logic                cur_ts;
  logic                from_dlt;
  logic [LVL_W-1:0]    from_lvl;
  core_report_t        rpt;
  logic [DLVL_W-1:0]   new_level;
  logic                push_ok;
  delay_t              typ_q;

  // ---------------------------------------------------------------- tables
  logic               df_we, df_val;
  logic [CORE_W-1:0]  rd_core;
  lcp_t               rd_lcp_max;
  logic               rd_ts, rd_df;
  logic [NUM_TPS-1:0] df_vec;

  tps_info_table #(.NUM_TPS(NUM_TPS), .NUM_CORES(NUM_CORES)) u_info (
    .clk, .rst_n, .cfg_we(info_we), .cfg_tps(info_tps), .cfg_core(info_core),
    .cfg_lcp_max(info_lcp_max), .cfg_ts(info_ts), .df_we, .df_tps(cur_tps), .df_val,
    .rd_tps(cur_tps), .rd_core, .rd_lcp_max, .rd_ts, .rd_df, .df_vec
  );

  logic             sched_req, sched_busy, sched_found, sched_none;
  logic [TPS_W-1:0] sched_next;

  sched_table #(.NUM_TPS(NUM_TPS), .SCHED_DEPTH(SCHED_DEPTH)) u_sched (
    .clk, .rst_n, .cfg_we(sched_we), .cfg_row(sched_row), .cfg_tps(sched_tps),
    .cfg_len(sched_len), .df_vec, .next_req(sched_req), .busy(sched_busy),
    .found(sched_found), .none(sched_none), .next_tps(sched_next)
  );

  logic                  dlt_push, dlt_pop;
  logic [LVL_W-1:0]      dlt_push_lvl, dlt_pop_lvl;
  logic [TPS_W-1:0]      dlt_head  [NUM_LEVELS];
  logic [DCNT_W-1:0]     dlt_count [NUM_LEVELS];
  logic [NUM_LEVELS-1:0] dlt_full, pi_full, pi_clear;
  logic                  pi_tick;

  danger_list_tables #(.NUM_TPS(NUM_TPS), .NUM_LEVELS(NUM_LEVELS), .DEPTH(DLT_DEPTH),
                       .BASE_PERIOD(BASE_PERIOD)) u_dlt (
    .clk, .rst_n, .push(dlt_push), .push_level(dlt_push_lvl), .push_tps(cur_tps),
    .pop(dlt_pop), .pop_level(dlt_pop_lvl), .head(dlt_head), .count(dlt_count),
    .fifo_full(dlt_full), .pi_tick, .pi_clear, .pi_full
  );

  logic               log_we;
  delay_t             log_newest, log_oldest;
  logic [LCNT_W-1:0]  log_count;

  log_memory #(.NUM_TPS(NUM_TPS), .LOG_DEPTH(LOG_DEPTH)) u_log (
    .clk, .rst_n, .wr_en(log_we), .wr_tps(cur_tps), .wr_delay(typ_q), .rd_tps(cur_tps),
    .rd_newest(log_newest), .rd_oldest(log_oldest), .rd_count(log_count)
  );

  delay_t meas_ticks, typ;

  always_comb meas_ticks = DELAY_W'(LCP_MIN_TICKS + int'(rpt.lcp_min) * LCP_STEP_TICKS);

  vt_translator #(.NUM_CORES(NUM_CORES)) u_fwd_lut (
    .clk, .rst_n, .cfg_we(lut_we), .cfg_addr(lut_addr), .cfg_factor(lut_factor),
    .core(cur_core), .v_code(rpt.v_code), .t_code(rpt.t_code), .delay_in(meas_ticks),
    .delay_out(typ)
  );

  delay_t            shift;
  logic [DLVL_W-1:0] ana_level;
  logic              ana_warning;

  aging_analyzer #(.NUM_LEVELS(NUM_LEVELS), .LOG_DEPTH(LOG_DEPTH)) u_analyzer (
    .newest(log_newest), .oldest(log_oldest), .count(log_count), .danger_step, .warn_point,
    .shift, .level(ana_level), .warning(ana_warning)
  );

  // ------------------------------------------------- highest full period indicator with a TPS
  logic             pi_any;
  logic [LVL_W-1:0] pi_lvl;

  always_comb begin
    pi_any = 1'b0;
    pi_lvl = '0;
    for (int l = 0; l < int'(NUM_LEVELS); l++) begin
      if (pi_full[l]) begin
        pi_any = 1'b1;
        pi_lvl = LVL_W'(l);
      end
    end
  end

  // ------------------------------------------------------------------- control
  always_comb begin
    pi_tick      = (state == S_IDLE) && pwr_window;
    pi_clear     = '0;
    dlt_pop      = 1'b0;
    dlt_pop_lvl  = serve_lvl;
    sched_req    = 1'b0;
    // end of a session: a TS = 1 TPS goes to the danger list of its level, or back to the
    // scheduling table at level 0 or when that list is full
    push_ok      = (new_level != '0) && !dlt_full[LVL_W'(new_level - 1'b1)];
    df_we        = (state == S_MOVE) && cur_ts;
    df_val       = push_ok;
    dlt_push     = df_we && push_ok;
    dlt_push_lvl = LVL_W'(new_level - 1'b1);
    if (state == S_SELECT && sessions_left != '0) begin
      if (serve_left != '0 && dlt_count[serve_lvl] != '0) begin
        dlt_pop = 1'b1;
      end else if (pi_any) begin
        pi_clear[pi_lvl] = 1'b1;
        dlt_pop_lvl      = pi_lvl;
        dlt_pop          = (dlt_count[pi_lvl] != '0);
      end else begin
        sched_req = !sched_busy;
      end
    end
  end

  assign busy     = (state != S_IDLE);
  assign cmd_tps  = cur_tps;
  assign cmd_ts   = cur_ts;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      sessions_left  <= '0;
      serve_lvl      <= '0;
      serve_left     <= '0;
      cur_tps        <= '0;
      cur_core       <= '0;
      cur_ts         <= 1'b0;
      from_dlt       <= 1'b0;
      from_lvl       <= '0;
      rpt            <= '0;
      new_level      <= '0;
      typ_q          <= '0;
      cmd_lcp_max    <= '0;
      cmd_prev_typ   <= '0;
      cmd_prev_valid <= 1'b0;
      core_cmd_valid <= '0;
      log_we         <= 1'b0;
      window_done    <= 1'b0;
      err_valid      <= 1'b0;
      err_kind       <= ERR_NONE;
      err_tps        <= '0;
      err_core       <= '0;
      err_delay      <= '0;
      sess_done      <= 1'b0;
      sess_tps       <= '0;
      sess_from_dlt  <= 1'b0;
      sess_from_level <= '0;
      sess_to_level  <= '0;
      sess_status    <= RES_MAX_PASS;
      sess_typ       <= '0;
      sess_v_code    <= '0;
      sess_t_code    <= '0;
    end else begin
      window_done    <= 1'b0;
      err_valid      <= 1'b0;
      sess_done      <= 1'b0;
      log_we         <= 1'b0;
      core_cmd_valid <= '0;
      unique case (state)
        S_IDLE: begin
          if (pwr_window) begin
            sessions_left <= SESS_W'(SESSIONS_PER_WINDOW);
            state         <= S_SELECT;
          end
        end
        S_SELECT: begin
          if (sessions_left == '0) begin
            window_done <= 1'b1;
            state       <= S_IDLE;
          end else if (serve_left != '0 && dlt_count[serve_lvl] != '0) begin   // priority 1
            cur_tps    <= dlt_head[serve_lvl];
            from_dlt   <= 1'b1;
            from_lvl   <= serve_lvl;
            serve_left <= serve_left - 1'b1;
            state      <= S_INFO;
          end else if (pi_any) begin                                            // priority 2
            serve_lvl <= pi_lvl;
            if (dlt_count[pi_lvl] != '0) begin
              cur_tps    <= dlt_head[pi_lvl];
              from_dlt   <= 1'b1;
              from_lvl   <= pi_lvl;
              serve_left <= dlt_count[pi_lvl] - 1'b1;
              state      <= S_INFO;
            end else begin
              serve_left <= '0;                 // nothing to serve: indicator just restarts
            end
          end else begin                                                        // priority 3
            serve_left <= '0;
            from_dlt   <= 1'b0;
            from_lvl   <= '0;
            if (!sched_busy) state <= S_SCHED;
          end
        end
        S_SCHED: begin
          if (sched_found) begin
            cur_tps <= sched_next;
            state   <= S_INFO;
          end else if (sched_none) begin
            window_done <= 1'b1;
            state       <= S_IDLE;
          end
        end
        S_INFO: begin
          cur_core       <= rd_core;
          cur_ts         <= rd_ts;
          cmd_lcp_max    <= rd_lcp_max;
          cmd_prev_typ   <= log_newest;
          cmd_prev_valid <= (log_count != '0);
          state          <= S_CMD;
        end
        S_CMD: begin
          if (core_cmd_ready[cur_core]) begin
            core_cmd_valid[cur_core] <= 1'b1;
            state                    <= S_WAIT;
          end
        end
        S_WAIT: begin
          if (core_rsp_valid[cur_core]) begin
            rpt   <= core_rsp[cur_core];
            state <= S_XLATE;
          end
        end
        S_XLATE: begin
          typ_q <= typ;
          unique case (rpt.status)
            RES_MIN_FOUND: begin
              log_we <= 1'b1;
              state  <= S_LOG;
            end
            RES_FAIL: begin
              err_valid <= 1'b1;
              err_kind  <= ERR_SUDDEN;
              err_tps   <= cur_tps;
              err_core  <= cur_core;
              err_delay <= '1;
              new_level <= cur_ts ? DLVL_W'(NUM_LEVELS) : '0;
              state     <= S_MOVE;
            end
            default: begin
              new_level <= '0;
              state     <= S_MOVE;
            end
          endcase
        end
        S_LOG: state <= S_ANALYZE;               // the log write takes effect at this edge
        S_ANALYZE: begin                         // analyse the history including the new value
          new_level <= ana_level;
          if (ana_warning) begin
            err_valid <= 1'b1;
            err_kind  <= ERR_WARNING;
            err_tps   <= cur_tps;
            err_core  <= cur_core;
            err_delay <= log_newest;
          end
          state <= S_MOVE;
        end
        S_MOVE: begin                            // table update: see the combinational block
          sess_done       <= 1'b1;
          sess_tps        <= cur_tps;
          sess_from_dlt   <= from_dlt;
          sess_from_level <= from_dlt ? DLVL_W'(from_lvl) + 1'b1 : '0;
          sess_to_level   <= dlt_push ? new_level : '0;
          sess_status     <= rpt.status;
          sess_typ        <= typ_q;
          sess_v_code     <= rpt.v_code;
          sess_t_code     <= rpt.t_code;
          sessions_left   <= sessions_left - 1'b1;
          state           <= S_SELECT;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
