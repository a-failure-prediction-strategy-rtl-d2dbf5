// tb_danger_list_tables: random pushes and pops on all levels (including simultaneous ones and
// pushes into full tables) checked against queue models, and the period indicators checked
// against the expected period of each level.
module tb_danger_list_tables;

  localparam int unsigned NT = 16, NL = 4, DP = 4, BP = 8;
  localparam int unsigned TW = $clog2(NT), LW = $clog2(NL), CW = $clog2(DP + 1);

  logic clk = 1'b0, rst_n = 1'b0, push = 1'b0, pop = 1'b0, pi_tick = 1'b0;
  logic [LW-1:0] push_level = '0, pop_level = '0;
  logic [TW-1:0] push_tps = '0;
  logic [TW-1:0] head [NL];
  logic [CW-1:0] count [NL];
  logic [NL-1:0] fifo_full, pi_clear = '0, pi_full;
  int checks = 0, failures = 0;
  int q [NL][$];
  int pi [NL];

  danger_list_tables #(.NUM_TPS(NT), .NUM_LEVELS(NL), .DEPTH(DP), .BASE_PERIOD(BP)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic check_state();
    for (int l = 0; l < int'(NL); l++) begin
      check(int'(count[l]) == q[l].size(), $sformatf("level %0d count %0d expected %0d", l, count[l], q[l].size()));
      if (q[l].size() > 0) check(int'(head[l]) == q[l][0], $sformatf("level %0d head", l));
      check(fifo_full[l] == (q[l].size() == int'(DP)), "full flag");
      check(pi_full[l] == (pi[l] >= int'(BP >> l)), $sformatf("level %0d period indicator", l));
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
    int n_both = 0, n_overflow = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1;
    check_state();
    for (int i = 0; i < 2000; i++) begin
      automatic int pl = $urandom_range(NL - 1);
      automatic int ol = $urandom_range(NL - 1);
      automatic bit pu = ($urandom_range(2) != 0);
      automatic bit po = ($urandom_range(2) == 0);
      automatic int tps = $urandom_range(NT - 1);
      automatic bit tick = ($urandom_range(5) == 0);
      automatic logic [NL-1:0] clr = ($urandom_range(7) == 0) ? NL'($urandom) : '0;
      if (i % 200 < 10) ol = pl;    // same table
      push = pu; push_level = LW'(pl); push_tps = TW'(tps);
      pop = po; pop_level = LW'(ol);
      pi_tick = tick; pi_clear = clr;
      // model
      begin
        automatic bit did_pop = po && q[ol].size() > 0;
        automatic bit room = (q[pl].size() < int'(DP)) || (did_pop && ol == pl);
        if (did_pop) void'(q[ol].pop_front());
        if (pu && room) q[pl].push_back(tps);
        if (pu && !room) n_overflow++;
        if (pu && did_pop && pl == ol) n_both++;
        for (int l = 0; l < int'(NL); l++) begin
          if (clr[l]) pi[l] = 0;
          else if (tick && pi[l] < int'(BP >> l)) pi[l]++;
        end
      end
      @(posedge clk);
      #1;
      push = 1'b0; pop = 1'b0; pi_tick = 1'b0; pi_clear = '0;
      check_state();
    end
    check(n_both > 0 && n_overflow > 0, "simultaneous push/pop and overflow seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
