// aging_analyzer: degree-of-aging and warning decision for one TPS.
//
// Inputs are the newest and the oldest translated delays in the TPS's log and the number of
// logged values. The aging delay increase over the logged history is
// shift = newest - oldest (zero with fewer than two values or if the delay went down). The
// danger level is the number of thresholds k * danger_step (k = 1..NUM_LEVELS) that shift
// reaches, so 0 means "not in danger" and NUM_LEVELS is the highest level; a zero danger_step
// disables the levels. warning is high when the newest translated delay has reached
// warn_point. Purely combinational.
//
// Following the method, a part is judged by its increase in delay rather than its absolute
// delay, since a part with a small initial delay can age faster and overtake another, and an
// error is reported at the warning point. The linear thresholds are this design's own choice.
module aging_analyzer
  import aging_pkg::*;
#(
  parameter int unsigned NUM_LEVELS = 4,
  parameter int unsigned LOG_DEPTH  = 10,
  localparam int unsigned LVL_W     = $clog2(NUM_LEVELS + 1),
  localparam int unsigned CNT_W     = $clog2(LOG_DEPTH + 1)
) (
  input  delay_t           newest,
  input  delay_t           oldest,
  input  logic [CNT_W-1:0] count,
  input  delay_t           danger_step,
  input  delay_t           warn_point,
  output delay_t           shift,
  output logic [LVL_W-1:0] level,
  output logic             warning
);

  always_comb begin
    shift = (count >= CNT_W'(2) && newest > oldest) ? newest - oldest : '0;
    level = '0;
    if (danger_step != '0) begin
      for (int k = 1; k <= int'(NUM_LEVELS); k++) begin
        if (32'(shift) >= 32'(k) * 32'(danger_step)) level = LVL_W'(k);
      end
    end
    warning = (count != '0) && (newest >= warn_point);
  end

endmodule
