// tb_aging_analyzer: random and corner-case inputs checked against a reference computation of
// the delay shift, the danger level and the warning.
module tb_aging_analyzer;
  import aging_pkg::*;

  localparam int unsigned NL = 4, LD = 10;

  delay_t newest = '0, oldest = '0, danger_step = '0, warn_point = '0, shift;
  logic [$clog2(LD+1)-1:0] count = '0;
  logic [$clog2(NL+1)-1:0] level;
  logic warning;
  int checks = 0, failures = 0;

  aging_analyzer #(.NUM_LEVELS(NL), .LOG_DEPTH(LD)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int s, l, n, o, c, st, w;
      n = $urandom_range(255);
      o = (i % 3 == 0) ? $urandom_range(255) : n - $urandom_range(0, 12);
      if (o < 0) o = 0;
      c = $urandom_range(LD);
      st = (i % 50 == 0) ? 0 : $urandom_range(1, 4);
      w = $urandom_range(100, 255);
      newest = delay_t'(n); oldest = delay_t'(o); count = 4'(c);
      danger_step = delay_t'(st); warn_point = delay_t'(w);
      #1;
      s = (c >= 2 && n > o) ? n - o : 0;
      l = (st == 0) ? 0 : s / st;
      if (l > int'(NL)) l = NL;
      check(int'(shift) == s, $sformatf("shift %0d expected %0d", shift, s));
      check(int'(level) == l, $sformatf("n %0d o %0d c %0d step %0d: level %0d expected %0d", n, o, c, st, level, l));
      check(warning == (c != 0 && n >= w), "warning");
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
