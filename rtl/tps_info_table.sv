// tps_info_table: the TPS information table.
//
// One row per test pattern set (TPS), addressed by the TPS number: the core the TPS covers, its
// LCP_max level, its test strategy TS (0: tested at LCP_max only; 1: full delay measurement
// flow) and its danger flag DF (1 while the TPS sits in a danger list table). Rows are written
// through the cfg port, which also clears DF; DF alone is updated through the df port by the SoC
// test controller. The read port is combinational, and all DF bits are also output as a vector
// for the scheduling table. Reset clears every row.
//
// The four fields follow the method's table; their widths are this design's choices.
module tps_info_table
  import aging_pkg::*;
#(
  parameter int unsigned NUM_TPS   = 100,
  parameter int unsigned NUM_CORES = 32,
  localparam int unsigned TPS_W    = (NUM_TPS > 1) ? $clog2(NUM_TPS) : 1,
  localparam int unsigned CORE_W   = (NUM_CORES > 1) ? $clog2(NUM_CORES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  logic [TPS_W-1:0]  cfg_tps,
  input  logic [CORE_W-1:0] cfg_core,
  input  lcp_t              cfg_lcp_max,
  input  logic              cfg_ts,
  input  logic              df_we,
  input  logic [TPS_W-1:0]  df_tps,
  input  logic              df_val,
  input  logic [TPS_W-1:0]  rd_tps,
  output logic [CORE_W-1:0] rd_core,
  output lcp_t              rd_lcp_max,
  output logic              rd_ts,
  output logic              rd_df,
  output logic [NUM_TPS-1:0] df_vec
);

  logic [CORE_W-1:0] core_q    [NUM_TPS];
  lcp_t              lcp_max_q [NUM_TPS];
  logic [NUM_TPS-1:0] ts_q;
  logic [NUM_TPS-1:0] df_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < int'(NUM_TPS); t++) begin
        core_q[t]    <= '0;
        lcp_max_q[t] <= '0;
      end
      ts_q <= '0;
      df_q <= '0;
    end else begin
      if (df_we && int'(df_tps) < int'(NUM_TPS)) df_q[df_tps] <= df_val;
      if (cfg_we && int'(cfg_tps) < int'(NUM_TPS)) begin
        core_q[cfg_tps]    <= cfg_core;
        lcp_max_q[cfg_tps] <= cfg_lcp_max;
        ts_q[cfg_tps]      <= cfg_ts;
        df_q[cfg_tps]      <= 1'b0;
      end
    end
  end

  always_comb begin
    rd_core    = core_q[rd_tps];
    rd_lcp_max = lcp_max_q[rd_tps];
    rd_ts      = ts_q[rd_tps];
    rd_df      = df_q[rd_tps];
    df_vec     = df_q;
  end

endmodule
