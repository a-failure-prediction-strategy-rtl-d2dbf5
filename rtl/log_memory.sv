// log_memory: delay log of every test pattern set (TPS).
//
// For each of NUM_TPS sets the last LOG_DEPTH translated delays are kept in a circular buffer;
// a write replaces the oldest entry once the buffer is full. For the TPS on rd_tps the newest
// and the oldest stored entries and the number of valid entries are read combinationally, so
// a value written on one clock edge is visible on the next cycle. The log is cleared by reset;
// in a product it would live in non-volatile memory.
//
// Ten logged delays of one byte per TPS follow the reference configuration; the circular
// organisation is this design's own choice.
module log_memory
  import aging_pkg::*;
#(
  parameter int unsigned NUM_TPS   = 100,
  parameter int unsigned LOG_DEPTH = 10,
  localparam int unsigned TPS_W    = (NUM_TPS > 1) ? $clog2(NUM_TPS) : 1,
  localparam int unsigned PTR_W    = (LOG_DEPTH > 1) ? $clog2(LOG_DEPTH) : 1,
  localparam int unsigned CNT_W    = $clog2(LOG_DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [TPS_W-1:0] wr_tps,
  input  delay_t           wr_delay,
  input  logic [TPS_W-1:0] rd_tps,
  output delay_t           rd_newest,
  output delay_t           rd_oldest,
  output logic [CNT_W-1:0] rd_count
);

  delay_t           mem   [NUM_TPS][LOG_DEPTH];
  logic [PTR_W-1:0] wptr  [NUM_TPS];   // next slot to write
  logic [CNT_W-1:0] count [NUM_TPS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < int'(NUM_TPS); t++) begin
        wptr[t]  <= '0;
        count[t] <= '0;
        for (int e = 0; e < int'(LOG_DEPTH); e++) mem[t][e] <= '0;
      end
    end else if (wr_en) begin
      mem[wr_tps][wptr[wr_tps]] <= wr_delay;
      wptr[wr_tps] <= (int'(wptr[wr_tps]) == int'(LOG_DEPTH) - 1) ? '0 : wptr[wr_tps] + 1'b1;
      if (int'(count[wr_tps]) < int'(LOG_DEPTH)) count[wr_tps] <= count[wr_tps] + 1'b1;
    end
  end

  logic [PTR_W-1:0] newest_idx, oldest_idx;

  always_comb begin
    rd_count   = count[rd_tps];
    newest_idx = (wptr[rd_tps] == '0) ? PTR_W'(LOG_DEPTH - 1) : wptr[rd_tps] - 1'b1;
    oldest_idx = (int'(count[rd_tps]) < int'(LOG_DEPTH)) ? '0 : wptr[rd_tps];
    rd_newest  = mem[rd_tps][newest_idx];
    rd_oldest  = mem[rd_tps][oldest_idx];
  end

endmodule
