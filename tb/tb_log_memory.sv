// tb_log_memory: random writes to several TPS logs, checked against a queue model that keeps
// the last LOG_DEPTH values of each TPS (newest, oldest and count), before and after wrap-around.
module tb_log_memory;
  import aging_pkg::*;

  localparam int unsigned NT = 6, LD = 10;

  logic clk = 1'b0, rst_n = 1'b0, wr_en = 1'b0;
  logic [$clog2(NT)-1:0] wr_tps = '0, rd_tps = '0;
  delay_t wr_delay = '0, rd_newest, rd_oldest;
  logic [$clog2(LD+1)-1:0] rd_count;
  int checks = 0, failures = 0;
  int unsigned model [NT][$];

  log_memory #(.NUM_TPS(NT), .LOG_DEPTH(LD)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic check_tps(int t);
    rd_tps = $bits(rd_tps)'(t);
    #1;
    check(int'(rd_count) == model[t].size(), $sformatf("TPS %0d count %0d expected %0d", t, rd_count, model[t].size()));
    if (model[t].size() > 0) begin
      check(int'(rd_newest) == model[t][$], $sformatf("TPS %0d newest %0d expected %0d", t, rd_newest, model[t][$]));
      check(int'(rd_oldest) == model[t][0], $sformatf("TPS %0d oldest %0d expected %0d", t, rd_oldest, model[t][0]));
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
    for (int t = 0; t < int'(NT); t++) check_tps(t);
    for (int i = 0; i < 400; i++) begin
      automatic int t = $urandom_range(NT - 1);
      automatic int unsigned d = $urandom_range(255);
      wr_en <= 1'b1;
      wr_tps <= $bits(wr_tps)'(t);
      wr_delay <= delay_t'(d);
      @(posedge clk);
      wr_en <= 1'b0;
      model[t].push_back(d);
      if (model[t].size() > LD) void'(model[t].pop_front());
      #1;
      check_tps(t);
      check_tps($urandom_range(NT - 1));
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
