// tb_sched_table: a table with repeated entries and random danger flags; every search result
// (found TPS or none) and its duration are checked against a round-robin model.
module tb_sched_table;

  localparam int unsigned NT = 8, SD = 16, LEN = 11;
  localparam int unsigned TW = $clog2(NT), RW = $clog2(SD), LW = $clog2(SD + 1);

  logic clk = 1'b0, rst_n = 1'b0, cfg_we = 1'b0, next_req = 1'b0;
  logic [RW-1:0] cfg_row = '0;
  logic [TW-1:0] cfg_tps = '0, next_tps;
  logic [LW-1:0] cfg_len = '0;
  logic [NT-1:0] df_vec = '0;
  logic busy, found, none;
  int checks = 0, failures = 0;
  int rows [LEN];
  int ptr = 0;

  sched_table #(.NUM_TPS(NT), .SCHED_DEPTH(SD)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
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
    int n_found = 0, n_none = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    foreach (rows[r]) begin
      rows[r] = (r < int'(NT)) ? r : $urandom_range(NT - 1);   // every TPS at least once
      cfg_we <= 1'b1;
      cfg_row <= RW'(r);
      cfg_tps <= TW'(rows[r]);
      @(posedge clk);
    end
    cfg_we <= 1'b0;
    cfg_len <= LW'(LEN);
    @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      automatic int exp_tps = -1, visits = 0, cyc = 0;
      df_vec = (i % 40 == 39) ? '1 : NT'($urandom & $urandom);
      @(posedge clk);
      // model
      for (int k = 0; k < int'(LEN); k++) begin
        automatic int r = (ptr + k) % LEN;
        if (!df_vec[rows[r]]) begin
          exp_tps = rows[r];
          visits = k + 1;
          break;
        end
      end
      if (exp_tps >= 0) ptr = (ptr + visits) % LEN;
      next_req <= 1'b1;
      @(posedge clk);
      next_req <= 1'b0;
      #1;
      while (!found && !none && cyc < 100) begin
        @(posedge clk);
        #1;
        cyc++;
      end
      if (exp_tps >= 0) begin
        n_found++;
        check(found && int'(next_tps) == exp_tps, $sformatf("search %0d: got %0d expected %0d", i, next_tps, exp_tps));
        check(cyc == visits, $sformatf("search %0d took %0d cycles, expected %0d", i, cyc, visits));
      end else begin
        n_none++;
        check(none, $sformatf("search %0d: expected none", i));
        check(cyc == int'(LEN) + 1, "no-match search visits every row once");
      end
    end
    check(n_found > 0 && n_none > 0, "both outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
