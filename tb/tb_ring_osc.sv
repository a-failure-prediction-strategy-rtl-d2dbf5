// tb_ring_osc: measures the oscillation period of the ring oscillator model at several supply
// voltages and temperatures and compares it with the first-order delay formula; also checks
// that the oscillator stops when disabled and that it slows down with temperature and with a
// falling supply.
module tb_ring_osc;
  localparam int unsigned STAGES = 27;
  localparam real T0 = 2.0;

  logic en = 1'b0;
  int unsigned vdd_mv = 1800;
  int temp_c = 25;
  logic ro_out;
  int checks = 0, failures = 0;

  ring_osc #(.STAGES(STAGES), .T0(T0)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real expected_period(int unsigned v, int t);
    return 2.0 * STAGES * T0 * (1.0 + 0.002 * (real'(t) - 25.0)) * (1800.0 / real'(v));
  endfunction

  initial begin
    int unsigned vs[3] = '{1620, 1800, 1980};
    int ts[3] = '{-40, 25, 125};
    real prev;
    #100;
    check(ro_out == 1'b0, "stopped while disabled");
    foreach (vs[i]) begin
      foreach (ts[j]) begin
        realtime t1, t2;
        real p, e;
        vdd_mv = vs[i];
        temp_c = ts[j];
        en = 1'b1;
        @(posedge ro_out);
        t1 = $realtime;
        repeat (10) @(posedge ro_out);
        t2 = $realtime;
        p = (t2 - t1) / 10.0;
        e = expected_period(vs[i], ts[j]);
        check(p > e * 0.97 && p < e * 1.03,
              $sformatf("V=%0d T=%0d: period %f expected %f", vs[i], ts[j], p, e));
        if (j > 0) check(p > prev, "period grows with temperature");
        prev = p;
        en = 1'b0;
        #1000;
        check(ro_out == 1'b0, "stopped after disable");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
