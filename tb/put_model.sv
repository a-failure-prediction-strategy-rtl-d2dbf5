// put_model: behavioural model of a part under test with its scan logic, for testbenches.
//
// After reset is released, on each cut_start it applies NPAT patterns. For each it spends SHIFT cycles shifting, pulses
// cut_lc_req, and waits for the launch and capture strobes of the test clock generator. A
// pattern passes when the launch-to-capture distance in clk cycles is at least the part's
// current path delay, given on the delay input. After the last pattern cut_done pulses with
// cut_pass, the AND of all pattern results. launches counts launch strobes seen, so that a
// testbench can check how many launch/capture pairs a session used.
module put_model #(
  parameter int unsigned NPAT  = 2,
  parameter int unsigned SHIFT = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cut_start,
  input  int unsigned delay,
  input  logic        launch,
  input  logic        capture,
  output logic        cut_lc_req,
  output logic        cut_done,
  output logic        cut_pass,
  output int unsigned launches
);

  initial begin
    cut_lc_req = 1'b0;
    cut_done   = 1'b0;
    cut_pass   = 1'b0;
    launches   = 0;
    wait (rst_n === 1'b1);
    forever begin
      logic all_pass;
      @(posedge clk);
      if (cut_start) begin
        all_pass = 1'b1;
        for (int p = 0; p < int'(NPAT); p++) begin
          int unsigned distance;
          repeat (SHIFT) @(posedge clk);
          cut_lc_req <= 1'b1;
          @(posedge clk);
          cut_lc_req <= 1'b0;
          while (!launch) @(posedge clk);
          launches++;
          distance = 0;
          @(posedge clk);
          distance = 1;
          while (!capture) begin
            @(posedge clk);
            distance++;
          end
          if (distance < delay) all_pass = 1'b0;
        end
        cut_pass <= all_pass;
        cut_done <= 1'b1;
        @(posedge clk);
        cut_done <= 1'b0;
      end
    end
  end

endmodule
