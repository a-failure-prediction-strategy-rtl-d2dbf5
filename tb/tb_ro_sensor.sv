// tb_ro_sensor: drives the sensor input with square waves of known period (in clk cycles,
// asynchronous phase) and checks the edge count of each window, the start-to-done latency and
// saturation of the code.
module tb_ro_sensor;
  import aging_pkg::*;

  localparam int unsigned WIN = 960;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, ro_in = 1'b0;
  logic busy, done;
  code_t code;
  int checks = 0, failures = 0;
  int half_period = 3;     // in units of 1/10 clk period

  ro_sensor #(.WINDOW(WIN)) dut (.*);

  always #5 clk = ~clk;
  always #(half_period) ro_in = ~ro_in;

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
    int hp[7] = '{23, 31, 47, 60, 97, 151, 15};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    foreach (hp[i]) begin
      int expect_n, lat;
      half_period = hp[i];
      repeat (5) @(posedge clk);
      start <= 1'b1;
      @(posedge clk);
      #1;
      start <= 1'b0;
      lat = 0;
      while (!done && lat < 2000) begin
        @(posedge clk);
        #1;
        lat++;
      end
      check(lat == int'(WIN), $sformatf("latency %0d expected %0d", lat, WIN + 1));
      expect_n = (int'(WIN) * 10) / (2 * hp[i]);
      if (expect_n > 255) expect_n = 255;
      check(int'(code) >= expect_n - 1 && int'(code) <= expect_n + 1,
            $sformatf("half period %0d: code %0d expected %0d +-1", hp[i], code, expect_n));
      repeat (20) @(posedge clk);
      check(int'(code) >= expect_n - 1 && int'(code) <= expect_n + 1, "code held after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
