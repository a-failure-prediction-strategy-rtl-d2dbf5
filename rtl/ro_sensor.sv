// ro_sensor: digital readout of a ring-oscillator voltage or temperature sensor.
//
// The oscillator output ro_in is asynchronous to clk. It is brought in through a two-flop
// synchroniser, and its rising edges are counted for WINDOW cycles of clk after a start pulse.
// When the window closes, done pulses for one cycle and code holds the count (saturating at
// 2**CODE_W-1) until the next start. The oscillator must run below half the clk frequency.
// done rises WINDOW cycles after the clock edge that samples start.
//
// The method assumes ring-oscillator based voltage and temperature sensors; this counting
// readout, its window length and code width are this design's own choices.
module ro_sensor
  import aging_pkg::*;
#(
  parameter int unsigned WINDOW = 256
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  ro_in,
  output logic  busy,
  output logic  done,
  output code_t code
);

  localparam int unsigned WIN_W = $clog2(WINDOW + 1);

  logic [2:0]       sync;      // two synchroniser stages and one for edge detection
  logic [WIN_W-1:0] win_cnt;
  code_t            edges;
  logic             rise;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= '0;
    else        sync <= {sync[1:0], ro_in};
  end

  assign rise = sync[1] & ~sync[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      win_cnt <= '0;
      edges   <= '0;
      code    <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          win_cnt <= WIN_W'(WINDOW);
          edges   <= '0;
        end
      end else begin
        if (rise && edges != '1) edges <= edges + 1'b1;
        win_cnt <= win_cnt - 1'b1;
        if (win_cnt == WIN_W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          code <= (rise && edges != '1) ? edges + 1'b1 : edges;
        end
      end
    end
  end

endmodule
