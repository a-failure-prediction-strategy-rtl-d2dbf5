// sched_table: the round-robin scheduling table.
//
// SCHED_DEPTH rows, each holding a TPS number; the first cfg_len rows are in use. A TPS may be
// listed more than once, so that parts expected to age faster are tested more often. On a
// next_req pulse the table walks from its round-robin pointer, one row per clock cycle, and
// stops at the first row whose TPS has DF = 0 in df_vec (TPSs in a danger list are not served
// from here). It then pulses found with that TPS number, and the pointer moves past the row.
// If all cfg_len rows are visited without a match it pulses none instead. A search of k rows
// takes k + 1 cycles. Rows are written through the cfg port while idle; reset clears the pointer.
//
// Round-robin service from the top row to the bottom and the DF skip follow the method; the
// row-per-cycle walk is this design's own choice.
module sched_table #(
  parameter int unsigned NUM_TPS     = 100,
  parameter int unsigned SCHED_DEPTH = 128,
  localparam int unsigned TPS_W      = (NUM_TPS > 1) ? $clog2(NUM_TPS) : 1,
  localparam int unsigned ROW_W      = (SCHED_DEPTH > 1) ? $clog2(SCHED_DEPTH) : 1,
  localparam int unsigned LEN_W      = $clog2(SCHED_DEPTH + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cfg_we,
  input  logic [ROW_W-1:0]   cfg_row,
  input  logic [TPS_W-1:0]   cfg_tps,
  input  logic [LEN_W-1:0]   cfg_len,
  input  logic [NUM_TPS-1:0] df_vec,
  input  logic               next_req,
  output logic               busy,
  output logic               found,
  output logic               none,
  output logic [TPS_W-1:0]   next_tps
);

  logic [TPS_W-1:0] rows [SCHED_DEPTH];
  logic [ROW_W-1:0] ptr;
  logic [LEN_W-1:0] visited;
  logic [TPS_W-1:0] cur;
  logic [ROW_W-1:0] ptr_next;

  always_comb begin
    cur      = rows[ptr];
    ptr_next = (LEN_W'(ptr) + 1'b1 >= cfg_len) ? '0 : ptr + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (cfg_we) rows[cfg_row] <= cfg_tps;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr      <= '0;
      visited  <= '0;
      busy     <= 1'b0;
      found    <= 1'b0;
      none     <= 1'b0;
      next_tps <= '0;
    end else begin
      found <= 1'b0;
      none  <= 1'b0;
      if (!busy) begin
        if (next_req) begin
          busy    <= 1'b1;
          visited <= '0;
          if (LEN_W'(ptr) >= cfg_len) ptr <= '0;
        end
      end else if (visited >= cfg_len) begin
        busy <= 1'b0;
        none <= 1'b1;
      end else begin
        visited <= visited + 1'b1;
        ptr     <= ptr_next;
        if (int'(cur) < int'(NUM_TPS) && !df_vec[cur]) begin
          busy     <= 1'b0;
          found    <= 1'b1;
          next_tps <= cur;
        end
      end
    end
  end

endmodule
