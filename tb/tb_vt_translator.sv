// tb_vt_translator: fills the factor table with random values and checks random translations
// against a reference computed in the testbench, including saturation and the reset value 1.0.
module tb_vt_translator;
  import aging_pkg::*;

  localparam int unsigned NC = 4;
  localparam int unsigned AW = $clog2(NC) + 2 * BIN_W;

  logic clk = 1'b0, rst_n = 1'b0, cfg_we = 1'b0;
  logic [AW-1:0] cfg_addr = '0;
  logic [7:0] cfg_factor = '0;
  logic [$clog2(NC)-1:0] core = '0;
  code_t v_code = '0, t_code = '0;
  delay_t delay_in = '0, delay_out;
  int checks = 0, failures = 0;
  int unsigned ref_f [NC << (2 * BIN_W)];

  vt_translator #(.NUM_CORES(NC)) dut (.*);

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
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // after reset every factor is 1.0
    for (int i = 0; i < 50; i++) begin
      core = $urandom_range(NC - 1);
      v_code = code_t'($urandom);
      t_code = code_t'($urandom);
      delay_in = delay_t'($urandom);
      #1;
      check(delay_out == delay_in, "identity after reset");
      @(posedge clk);
    end
    foreach (ref_f[a]) begin
      ref_f[a] = (a % 5 == 0) ? 255 : $urandom_range(32, 120);
      cfg_we <= 1'b1;
      cfg_addr <= AW'(a);
      cfg_factor <= 8'(ref_f[a]);
      @(posedge clk);
    end
    cfg_we <= 1'b0;
    @(posedge clk);
    for (int i = 0; i < 2000; i++) begin
      int unsigned idx, e;
      core = $urandom_range(NC - 1);
      v_code = code_t'($urandom);
      t_code = code_t'($urandom);
      delay_in = delay_t'($urandom_range(0, (i % 2) ? 255 : 60));
      idx = (int'(core) * 16) + int'(v_code[7:6]) * 4 + int'(t_code[7:6]);
      e = (int'(delay_in) * ref_f[idx] + 32) / 64;
      if (e > 255) e = 255;
      #1;
      check(int'(delay_out) == e, $sformatf("core %0d v %0d t %0d in %0d: out %0d expected %0d",
            core, v_code, t_code, delay_in, delay_out, e));
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
