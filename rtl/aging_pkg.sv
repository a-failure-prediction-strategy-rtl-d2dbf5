// aging_pkg: constants and types shared by the aging test blocks.
//
// The launch-to-capture period (LCP) is handled as a level 0..LCP_LEVELS-1; level 0 is the
// shortest period LCP_min. Sixteen levels and ten logged delays per test pattern set (TPS) are
// the numbers of the reference configuration. Delays at typical voltage and temperature are
// kept in one byte, as the memory estimate of the method assumes. The report record that a core
// test controller returns, and its status encoding, are this design's own choice.
package aging_pkg;

  localparam int unsigned LCP_LEVELS = 16;              // number of LCP_test levels
  localparam int unsigned LCP_W      = $clog2(LCP_LEVELS);
  localparam int unsigned DELAY_W    = 8;               // logged delay: one byte
  localparam int unsigned CODE_W     = 8;               // sensor readout code
  localparam int unsigned BIN_W      = 2;               // V or T bin index into the translation table

  typedef logic [LCP_W-1:0]   lcp_t;
  typedef logic [DELAY_W-1:0] delay_t;
  typedef logic [CODE_W-1:0]  code_t;

  // Outcome of one test session on a core.
  typedef enum logic [1:0] {
    RES_MAX_PASS = 2'd0,   // TS=0: passed at LCP_max, nothing measured
    RES_MIN_FOUND = 2'd1,  // TS=1: minimum passing LCP_test found
    RES_FAIL = 2'd2        // failed at LCP_max: sudden delay increase (or failure)
  } result_e;

  typedef struct packed {
    result_e     status;
    lcp_t        lcp_min;   // minimum passing level (valid for RES_MIN_FOUND)
    code_t       v_code;    // voltage sensor code at the deciding measurement
    code_t       t_code;    // temperature sensor code at the deciding measurement
    logic [4:0]  applies;   // number of TPS applications in the session
  } core_report_t;

  // Clock source of a core: functional clock, SoC (production) test clock, or aging test pulses.
  typedef enum logic [1:0] {
    MODE_FUNC = 2'd0,
    MODE_PROD_TEST = 2'd1,
    MODE_AGING_TEST = 2'd2
  } clk_mode_e;

  // Cause of an error reported to the system.
  typedef enum logic [1:0] {
    ERR_NONE = 2'd0,
    ERR_SUDDEN = 2'd1,     // failed at LCP_max
    ERR_WARNING = 2'd2     // translated delay reached the warning point
  } err_e;

endpackage
