// aging_test_top: SoC aging test architecture (failure prediction for transistor aging).
//
// One SoC test controller and one core test controller per core. During a power-on or
// power-off period (pwr_window) the SoC test controller picks test pattern sets (TPSs) by
// degree of aging, hands each to the controller of the core it covers, and turns the reported
// minimum launch-to-capture period into a delay at typical voltage and temperature, which it
// logs and analyses. Each core test controller runs the LCP_max test and the search for the
// minimum passing launch-to-capture period, measuring voltage and temperature with two ring-
// oscillator sensors, and drives the core's clock with launch/capture pulses while it tests.
//
// What is outside this module and appears as ports: each core's scan logic with its pattern
// source, decompressor and compactor (cut_* and launch/capture), the ring oscillators (ro_v,
// ro_t), the clocks the cores receive outside aging test, and the system that configures the
// tables and receives the error reports. All logic runs on clk, whose period is the step of the
// launch timing window.
module aging_test_top
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
  parameter int unsigned SENSOR_WINDOW       = 256,
  localparam int unsigned CORE_W  = (NUM_CORES > 1) ? $clog2(NUM_CORES) : 1,
  localparam int unsigned TPS_W   = (NUM_TPS > 1) ? $clog2(NUM_TPS) : 1,
  localparam int unsigned ROW_W   = (SCHED_DEPTH > 1) ? $clog2(SCHED_DEPTH) : 1,
  localparam int unsigned LEN_W   = $clog2(SCHED_DEPTH + 1),
  localparam int unsigned LUT_W   = CORE_W + 2 * BIN_W,
  localparam int unsigned DLVL_W  = $clog2(NUM_LEVELS + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
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
  input  logic                 lut_we,          // "measured -> typical" factors
  input  logic [LUT_W-1:0]     lut_addr,
  input  logic [7:0]           lut_factor,
  input  logic                 inv_lut_we,      // "typical -> measured" factors of core inv_lut_core
  input  logic [CORE_W-1:0]    inv_lut_core,
  input  logic [2*BIN_W-1:0]   inv_lut_addr,
  input  logic [7:0]           inv_lut_factor,
  input  delay_t               danger_step,
  input  delay_t               warn_point,
  // reports
  output logic                 err_valid,
  output err_e                 err_kind,
  output logic [TPS_W-1:0]     err_tps,
  output logic [CORE_W-1:0]    err_core,
  output delay_t               err_delay,
  output logic                 sess_done,
  output logic [TPS_W-1:0]     sess_tps,
  output logic                 sess_from_dlt,
  output logic [DLVL_W-1:0]    sess_from_level,
  output logic [DLVL_W-1:0]    sess_to_level,
  output result_e              sess_status,
  output delay_t               sess_typ,
  output code_t                sess_v_code,
  output code_t                sess_t_code,
  // cores
  input  clk_mode_e            sys_mode,
  input  logic [NUM_CORES-1:0] func_clk,
  input  logic                 soc_test_clk,
  output logic [NUM_CORES-1:0] core_clk,
  output logic [NUM_CORES-1:0] test_en,
  output logic [NUM_CORES-1:0] cut_start,
  output logic [TPS_W-1:0]     cut_tps [NUM_CORES],
  input  logic [NUM_CORES-1:0] cut_lc_req,
  input  logic [NUM_CORES-1:0] cut_done,
  input  logic [NUM_CORES-1:0] cut_pass,
  output logic [NUM_CORES-1:0] launch,
  output logic [NUM_CORES-1:0] capture,
  input  logic [NUM_CORES-1:0] ro_v,
  input  logic [NUM_CORES-1:0] ro_t
);

  logic [NUM_CORES-1:0] core_cmd_valid, core_cmd_ready, core_rsp_valid;
  core_report_t         core_rsp [NUM_CORES];
  logic [TPS_W-1:0]     cmd_tps;
  lcp_t                 cmd_lcp_max;
  logic                 cmd_ts, cmd_prev_valid;
  delay_t               cmd_prev_typ;

  soc_test_ctrl #(
    .NUM_CORES(NUM_CORES), .NUM_TPS(NUM_TPS), .SCHED_DEPTH(SCHED_DEPTH), .LOG_DEPTH(LOG_DEPTH),
    .NUM_LEVELS(NUM_LEVELS), .DLT_DEPTH(DLT_DEPTH), .BASE_PERIOD(BASE_PERIOD),
    .SESSIONS_PER_WINDOW(SESSIONS_PER_WINDOW), .LCP_MIN_TICKS(LCP_MIN_TICKS),
    .LCP_STEP_TICKS(LCP_STEP_TICKS)
  ) u_soc_ctrl (
    .clk, .rst_n, .pwr_window, .busy, .window_done,
    .info_we, .info_tps, .info_core, .info_lcp_max, .info_ts,
    .sched_we, .sched_row, .sched_tps, .sched_len, .lut_we, .lut_addr, .lut_factor,
    .danger_step, .warn_point,
    .core_cmd_valid, .core_cmd_ready, .cmd_tps, .cmd_lcp_max, .cmd_ts, .cmd_prev_typ,
    .cmd_prev_valid, .core_rsp_valid, .core_rsp,
    .err_valid, .err_kind, .err_tps, .err_core, .err_delay,
    .sess_done, .sess_tps, .sess_from_dlt, .sess_from_level, .sess_to_level, .sess_status,
    .sess_typ, .sess_v_code, .sess_t_code
  );

  for (genvar c = 0; c < int'(NUM_CORES); c++) begin : g_core
    core_test_ctrl #(
      .NUM_TPS(NUM_TPS), .LCP_MIN_TICKS(LCP_MIN_TICKS), .LCP_STEP_TICKS(LCP_STEP_TICKS),
      .SENSOR_WINDOW(SENSOR_WINDOW)
    ) u_core_ctrl (
      .clk, .rst_n, .sys_mode, .func_clk(func_clk[c]), .soc_test_clk,
      .core_clk(core_clk[c]), .test_en(test_en[c]),
      .cmd_valid(core_cmd_valid[c]), .cmd_ready(core_cmd_ready[c]), .cmd_tps,
      .cmd_lcp_max, .cmd_ts, .cmd_prev_typ, .cmd_prev_valid,
      .rsp_valid(core_rsp_valid[c]), .rsp(core_rsp[c]),
      .cfg_we(inv_lut_we && int'(inv_lut_core) == c), .cfg_addr(inv_lut_addr),
      .cfg_factor(inv_lut_factor),
      .cut_start(cut_start[c]), .cut_tps(cut_tps[c]), .cut_lc_req(cut_lc_req[c]),
      .cut_done(cut_done[c]), .cut_pass(cut_pass[c]), .launch(launch[c]),
      .capture(capture[c]), .ro_v(ro_v[c]), .ro_t(ro_t[c])
    );
  end

endmodule
