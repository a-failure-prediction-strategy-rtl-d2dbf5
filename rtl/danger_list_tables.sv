// danger_list_tables: the danger list tables and their period indicators.
//
// NUM_LEVELS first-in first-out tables of TPS numbers, index 0 being danger level 1 (the
// lowest). Each holds up to DEPTH entries; push appends to the table named by push_level and
// pop removes the head of the table named by pop_level, whose entry is shown combinationally on
// head[pop_level]. A push and a pop may happen in the same cycle, to the same table as well.
// Every table has a period indicator, a counter that a pi_tick pulse (one per power-on or
// power-off test window) raises by one. Level l (0-based) has the period
// BASE_PERIOD >> l windows, so the higher the danger level, the shorter the period. The
// indicator saturates there and pi_full[l] is then high until pi_clear[l] resets it, which the
// SoC test controller does when it starts to serve that table. Reset empties all tables.
//
// Tables per danger level, FIFO service and period indicators that count power-on/-off windows
// follow the method. The number of levels, the table depth and the halving of the period per
// level are this design's own choices.
module danger_list_tables #(
  parameter int unsigned NUM_TPS     = 100,
  parameter int unsigned NUM_LEVELS  = 4,
  parameter int unsigned DEPTH       = 16,
  parameter int unsigned BASE_PERIOD = 8,
  localparam int unsigned TPS_W      = (NUM_TPS > 1) ? $clog2(NUM_TPS) : 1,
  localparam int unsigned LVL_W      = (NUM_LEVELS > 1) ? $clog2(NUM_LEVELS) : 1,
  localparam int unsigned PTR_W      = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CNT_W      = $clog2(DEPTH + 1),
  localparam int unsigned PI_W       = $clog2(BASE_PERIOD + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  push,
  input  logic [LVL_W-1:0]      push_level,
  input  logic [TPS_W-1:0]      push_tps,
  input  logic                  pop,
  input  logic [LVL_W-1:0]      pop_level,
  output logic [TPS_W-1:0]      head       [NUM_LEVELS],
  output logic [CNT_W-1:0]      count      [NUM_LEVELS],
  output logic [NUM_LEVELS-1:0] fifo_full,
  input  logic                  pi_tick,
  input  logic [NUM_LEVELS-1:0] pi_clear,
  output logic [NUM_LEVELS-1:0] pi_full
);

  logic [TPS_W-1:0] mem   [NUM_LEVELS][DEPTH];
  logic [PTR_W-1:0] rptr  [NUM_LEVELS];
  logic [PTR_W-1:0] wptr  [NUM_LEVELS];
  logic [PI_W-1:0]  pi    [NUM_LEVELS];

  function automatic logic [PTR_W-1:0] incr(logic [PTR_W-1:0] p);
    return (int'(p) == int'(DEPTH) - 1) ? '0 : p + 1'b1;
  endfunction

  for (genvar l = 0; l < int'(NUM_LEVELS); l++) begin : g_level
    localparam int unsigned PERIOD = (BASE_PERIOD >> l) > 0 ? (BASE_PERIOD >> l) : 1;
    logic do_push, do_pop;

    always_comb begin
      do_pop       = pop && int'(pop_level) == l && count[l] != '0;
      do_push      = push && int'(push_level) == l && (count[l] != CNT_W'(DEPTH) || do_pop);
      head[l]      = mem[l][rptr[l]];
      fifo_full[l] = (count[l] == CNT_W'(DEPTH));
      pi_full[l]   = (pi[l] >= PI_W'(PERIOD));
    end

    always_ff @(posedge clk) begin
      if (do_push) mem[l][wptr[l]] <= push_tps;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        rptr[l]  <= '0;
        wptr[l]  <= '0;
        count[l] <= '0;
        pi[l]    <= '0;
      end else begin
        if (do_push) wptr[l] <= incr(wptr[l]);
        if (do_pop)  rptr[l] <= incr(rptr[l]);
        if (do_push && !do_pop)      count[l] <= count[l] + 1'b1;
        else if (do_pop && !do_push) count[l] <= count[l] - 1'b1;
        if (pi_clear[l])                         pi[l] <= '0;
        else if (pi_tick && !pi_full[l])         pi[l] <= pi[l] + 1'b1;
      end
    end
  end

endmodule
