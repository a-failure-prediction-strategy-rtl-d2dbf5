// tb_tps_info_table: writes rows and danger flags in random order and checks every field of
// every row and the DF vector against a model after each write.
module tb_tps_info_table;
  import aging_pkg::*;

  localparam int unsigned NT = 12, NC = 5;
  localparam int unsigned TW = $clog2(NT), CW = $clog2(NC);

  logic clk = 1'b0, rst_n = 1'b0, cfg_we = 1'b0, cfg_ts = 1'b0, df_we = 1'b0, df_val = 1'b0;
  logic [TW-1:0] cfg_tps = '0, df_tps = '0, rd_tps = '0;
  logic [CW-1:0] cfg_core = '0, rd_core;
  lcp_t cfg_lcp_max = '0, rd_lcp_max;
  logic rd_ts, rd_df;
  logic [NT-1:0] df_vec;
  int checks = 0, failures = 0;
  int m_core [NT], m_lcp [NT];
  bit m_ts [NT], m_df [NT];

  tps_info_table #(.NUM_TPS(NT), .NUM_CORES(NC)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic check_all();
    for (int t = 0; t < int'(NT); t++) begin
      rd_tps = TW'(t);
      #1;
      check(int'(rd_core) == m_core[t] && int'(rd_lcp_max) == m_lcp[t] && rd_ts == m_ts[t]
            && rd_df == m_df[t], $sformatf("row %0d", t));
      check(df_vec[t] == m_df[t], $sformatf("df_vec[%0d]", t));
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check_all();
    for (int i = 0; i < 300; i++) begin
      automatic int t = $urandom_range(NT - 1);
      if ($urandom_range(2) == 0) begin
        m_core[t] = $urandom_range(NC - 1);
        m_lcp[t] = $urandom_range(15);
        m_ts[t] = 1'($urandom);
        m_df[t] = 1'b0;
        cfg_we <= 1'b1;
        cfg_tps <= TW'(t);
        cfg_core <= CW'(m_core[t]);
        cfg_lcp_max <= lcp_t'(m_lcp[t]);
        cfg_ts <= m_ts[t];
      end else begin
        m_df[t] = 1'($urandom);
        df_we <= 1'b1;
        df_tps <= TW'(t);
        df_val <= m_df[t];
      end
      @(posedge clk);
      cfg_we <= 1'b0;
      df_we <= 1'b0;
      check_all();
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
