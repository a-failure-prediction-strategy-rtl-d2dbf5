// core_test_ctrl: core test controller running the aging test flow of one core.
//
// A command from the SoC test controller names a test pattern set (TPS), its LCP_max level, its
// test strategy TS and the last logged delay of the TPS at typical conditions (prev_typ). The
// controller then holds the core in aging test mode (test_en high, core_clk from the launch/
// capture generator) and runs one test session:
//   1. Apply the TPS at LCP_max while measuring voltage and temperature. A fail is a sudden
//      delay increase and is reported at once (status RES_FAIL). With TS = 0 a pass ends the
//      session (RES_MAX_PASS).
//   3. Predict the starting LCP_test from prev_typ and the measured V_init/T_init through the
//      per-core "typical -> measured" translation table, and clear Pflag and Fflag. With no
//      logged delay, or a prediction at or above LCP_max, the search starts from the LCP_max
//      pass just seen.
//   4. Apply the TPS at LCP_test. On a pass after a fail (Fflag), this level is the minimum; on a
//      pass otherwise set Pflag and step one level down (the minimum is level 0 if already
//      there). On a fail after a pass (Pflag), the level above is the minimum; on a fail
//      otherwise set Fflag and step one level up. A fail at LCP_max during the search counts as
//      a sudden fail.
//   9. Report the minimum level with the voltage and temperature codes of the last
//      application (RES_MIN_FOUND) and the number of applications.
// One application: pulse cut_start (with cut_tps) and the two sensors' start; the core's scan
// logic shifts each pattern and pulses cut_lc_req, receives one launch/capture pair at the
// current LCP, and at the end returns cut_done with cut_pass. The application is complete when
// cut_done and both sensor readouts have arrived. cmd_ready is high while idle; rsp_valid
// pulses for one cycle with the report.
//
// The flow, the flags and the translation of the starting point follow the method. The command
// and report format, the interface to the core's scan logic and the handling of the edge cases
// above are this design's own choices.
module core_test_ctrl
  import aging_pkg::*;
#(
  parameter int unsigned NUM_TPS        = 100,
  parameter int unsigned LCP_MIN_TICKS  = 8,
  parameter int unsigned LCP_STEP_TICKS = 1,
  parameter int unsigned SENSOR_WINDOW  = 256,
  localparam int unsigned TPS_W         = (NUM_TPS > 1) ? $clog2(NUM_TPS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // clocking of the core
  input  clk_mode_e          sys_mode,      // FUNC or PROD_TEST when no aging test runs
  input  logic               func_clk,
  input  logic               soc_test_clk,
  output logic               core_clk,
  output logic               test_en,
  // command from the SoC test controller
  input  logic               cmd_valid,
  output logic               cmd_ready,
  input  logic [TPS_W-1:0]   cmd_tps,
  input  lcp_t               cmd_lcp_max,
  input  logic               cmd_ts,
  input  delay_t             cmd_prev_typ,
  input  logic               cmd_prev_valid,
  output logic               rsp_valid,
  output core_report_t       rsp,
  // "typical -> measured" translation table of this core
  input  logic               cfg_we,
  input  logic [2*BIN_W-1:0] cfg_addr,
  input  logic [7:0]         cfg_factor,
  // core scan logic
  output logic               cut_start,
  output logic [TPS_W-1:0]   cut_tps,
  input  logic               cut_lc_req,
  input  logic               cut_done,
  input  logic               cut_pass,
  output logic               launch,
  output logic               capture,
  // ring oscillator sensor outputs
  input  logic               ro_v,
  input  logic               ro_t
);

  typedef enum logic [2:0] {
    S_IDLE, S_APPLY, S_WAIT, S_EVAL, S_INIT, S_REPORT
  } state_e;

  state_e     state;
  logic       phase_max;      // current application is the LCP_max test (process 1)
  lcp_t       lcp_max, level, min_level;
  logic       ts, prev_valid;
  delay_t     prev_typ;
  logic       pflag, fflag;
  logic       got_cut, got_v, got_t, pass_q;
  code_t      v_code, t_code;
  result_e    status;
  logic [4:0] applies;

  // sensors
  logic  sens_start;
  logic  v_busy, v_done, t_busy, t_done;
  code_t v_meas, t_meas;

  ro_sensor #(.WINDOW(SENSOR_WINDOW)) u_v_sensor (
    .clk, .rst_n, .start(sens_start), .ro_in(ro_v), .busy(v_busy), .done(v_done), .code(v_meas)
  );
  ro_sensor #(.WINDOW(SENSOR_WINDOW)) u_t_sensor (
    .clk, .rst_n, .start(sens_start), .ro_in(ro_t), .busy(t_busy), .done(t_done), .code(t_meas)
  );

  // launch/capture generation and clock bypass
  clk_mode_e mode;
  logic      lc_busy, lc_done;

  assign mode = test_en ? MODE_AGING_TEST : sys_mode;

  test_clock_gen #(.LCP_MIN_TICKS(LCP_MIN_TICKS), .LCP_STEP_TICKS(LCP_STEP_TICKS)) u_clk_gen (
    .clk, .rst_n, .mode, .func_clk, .soc_test_clk, .level, .lc_req(cut_lc_req),
    .busy(lc_busy), .launch, .capture, .lc_done, .core_clk
  );

  // starting point prediction (process 3)
  delay_t pred_ticks;
  lcp_t   init_level;

  vt_translator #(.NUM_CORES(1)) u_inv_lut (
    .clk, .rst_n, .cfg_we, .cfg_addr({1'b0, cfg_addr}), .cfg_factor,
    .core(1'b0), .v_code, .t_code, .delay_in(prev_typ), .delay_out(pred_ticks)
  );

  always_comb begin
    int unsigned steps;
    if (int'(pred_ticks) <= int'(LCP_MIN_TICKS)) steps = 0;
    else steps = (int'(pred_ticks) - LCP_MIN_TICKS + LCP_STEP_TICKS - 1) / LCP_STEP_TICKS;
    init_level = (steps >= int'(lcp_max)) ? lcp_max : LCP_W'(steps);
  end

  assign cmd_ready = (state == S_IDLE);
  logic [TPS_W-1:0] rsp_tps_q;
  assign cut_tps   = rsp_tps_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      phase_max  <= 1'b0;
      lcp_max    <= '0;
      level      <= '0;
      min_level  <= '0;
      ts         <= 1'b0;
      prev_valid <= 1'b0;
      prev_typ   <= '0;
      pflag      <= 1'b0;
      fflag      <= 1'b0;
      got_cut    <= 1'b0;
      got_v      <= 1'b0;
      got_t      <= 1'b0;
      pass_q     <= 1'b0;
      v_code     <= '0;
      t_code     <= '0;
      status     <= RES_MAX_PASS;
      applies    <= '0;
      rsp_tps_q  <= '0;
      test_en    <= 1'b0;
      cut_start  <= 1'b0;
      sens_start <= 1'b0;
      rsp_valid  <= 1'b0;
      rsp        <= '0;
    end else begin
      cut_start  <= 1'b0;
      sens_start <= 1'b0;
      rsp_valid  <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (cmd_valid) begin
            rsp_tps_q  <= cmd_tps;
            lcp_max    <= cmd_lcp_max;
            level      <= cmd_lcp_max;
            ts         <= cmd_ts;
            prev_typ   <= cmd_prev_typ;
            prev_valid <= cmd_prev_valid;
            phase_max  <= 1'b1;
            applies    <= '0;
            test_en    <= 1'b1;
            state      <= S_APPLY;
          end
        end
        S_APPLY: begin                       // processes 1 and 4: start one application
          cut_start  <= 1'b1;
          sens_start <= 1'b1;
          got_cut    <= 1'b0;
          got_v      <= 1'b0;
          got_t      <= 1'b0;
          applies    <= applies + 1'b1;
          state      <= S_WAIT;
        end
        S_WAIT: begin
          if (cut_done) begin
            got_cut <= 1'b1;
            pass_q  <= cut_pass;
          end
          if (v_done) begin
            got_v  <= 1'b1;
            v_code <= v_meas;
          end
          if (t_done) begin
            got_t  <= 1'b1;
            t_code <= t_meas;
          end
          if (got_cut && got_v && got_t) state <= S_EVAL;
        end
        S_EVAL: begin
          if (phase_max) begin               // process 1 / 2
            phase_max <= 1'b0;
            if (!pass_q) begin
              status    <= RES_FAIL;
              min_level <= lcp_max;
              state     <= S_REPORT;
            end else if (!ts) begin
              status    <= RES_MAX_PASS;
              min_level <= lcp_max;
              state     <= S_REPORT;
            end else begin
              state <= S_INIT;
            end
          end else if (pass_q) begin         // processes 5 and 6
            if (fflag || level == '0) begin
              status    <= RES_MIN_FOUND;
              min_level <= level;
              state     <= S_REPORT;
            end else begin
              pflag <= 1'b1;
              level <= level - 1'b1;
              state <= S_APPLY;
            end
          end else begin                     // processes 7 and 8
            if (pflag) begin
              status    <= RES_MIN_FOUND;
              min_level <= level + 1'b1;
              state     <= S_REPORT;
            end else if (level >= lcp_max) begin
              status    <= RES_FAIL;
              min_level <= lcp_max;
              state     <= S_REPORT;
            end else begin
              fflag <= 1'b1;
              level <= level + 1'b1;
              state <= S_APPLY;
            end
          end
        end
        S_INIT: begin                        // process 3
          fflag <= 1'b0;
          if (!prev_valid || init_level >= lcp_max) begin
            // LCP_max has just passed: continue downwards from there
            pflag <= 1'b1;
            if (lcp_max == '0) begin
              status    <= RES_MIN_FOUND;
              min_level <= '0;
              state     <= S_REPORT;
            end else begin
              level <= lcp_max - 1'b1;
              state <= S_APPLY;
            end
          end else begin
            pflag <= 1'b0;
            level <= init_level;
            state <= S_APPLY;
          end
        end
        S_REPORT: begin                      // processes 9 and 10
          rsp_valid   <= 1'b1;
          rsp.status  <= status;
          rsp.lcp_min <= min_level;
          rsp.v_code  <= v_code;
          rsp.t_code  <= t_code;
          rsp.applies <= applies;
          test_en     <= 1'b0;
          state       <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
