// test_clock_gen: launch/capture pulse generator with launch timing shift, and the core clock
// bypass.
//
// In aging test the period between the launch edge and the capture edge (the launch-to-capture
// period, LCP) is LCP_MIN_TICKS + level * LCP_STEP_TICKS periods of clk, so clk stands for the
// finest clock resolution the SoC offers and level 0..LCP_LEVELS-1 selects one step of the
// launch timing window. A pulse on lc_req (while idle) starts one launch/capture pair: launch is
// high for the cycle after the request, capture exactly LCP ticks later; lc_done marks the
// capture cycle. core_clk carries these two pulses in the low phase of clk during aging test, and
// passes the functional clock or the SoC test clock through in the other modes.
//
// Following the method: a settable capture timing and the clock bypass outside aging test. This
// design's own choices: a counter on one fast clock realises the delay logic, and the clock
// multiplexer is a plain combinational one (the mode is changed only while the core is idle).
module test_clock_gen
  import aging_pkg::*;
#(
  parameter int unsigned LCP_MIN_TICKS  = 8,
  parameter int unsigned LCP_STEP_TICKS = 1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  clk_mode_e mode,
  input  logic      func_clk,
  input  logic      soc_test_clk,
  input  lcp_t      level,
  input  logic      lc_req,
  output logic      busy,
  output logic      launch,
  output logic      capture,
  output logic      lc_done,
  output logic      core_clk
);

  localparam int unsigned MAX_TICKS = LCP_MIN_TICKS + (LCP_LEVELS - 1) * LCP_STEP_TICKS;
  localparam int unsigned CNT_W = $clog2(MAX_TICKS + 1);

  logic [CNT_W-1:0] cnt;
  logic [CNT_W-1:0] ticks;

  always_comb ticks = CNT_W'(LCP_MIN_TICKS + int'(level) * LCP_STEP_TICKS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      busy    <= 1'b0;
      launch  <= 1'b0;
      capture <= 1'b0;
    end else begin
      launch  <= 1'b0;
      capture <= 1'b0;
      if (!busy) begin
        if (lc_req && mode == MODE_AGING_TEST) begin
          launch <= 1'b1;
          cnt    <= ticks;
          busy   <= 1'b1;
        end
      end else begin
        cnt <= cnt - 1'b1;
        if (cnt == CNT_W'(1)) begin
          capture <= 1'b1;
          busy    <= 1'b0;
        end
      end
    end
  end

  assign lc_done = capture;

  always_comb begin
    unique case (mode)
      MODE_AGING_TEST: core_clk = ~clk & (launch | capture);
      MODE_PROD_TEST:  core_clk = soc_test_clk;
      default:         core_clk = func_clk;
    endcase
  end

  initial begin
    assert (LCP_MIN_TICKS >= 1) else $error("LCP_MIN_TICKS must be at least 1");
  end

endmodule
