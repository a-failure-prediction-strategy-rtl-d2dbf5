// vt_translator: voltage/temperature translation table for measured delays.
//
// A delay measured at some voltage and temperature is mapped to the delay expected at another
// condition by one scale factor per (core, voltage bin, temperature bin):
//   delay_out = min(2**DELAY_W - 1, (delay_in * factor + 2**(FRAC-1)) >> FRAC).
// The bin of a sensor code is its top BIN_W bits. The factors are fixed point with FRAC fraction
// bits (2**FRAC is 1.0) and are written through the cfg port, since they come from a
// characterisation of each core; after reset every factor is 1.0. One instance holding the
// "measured -> typical" factors translates reported delays; one holding "typical -> measured"
// factors predicts the starting LCP_test of a search. The read path is combinational; a write
// takes effect on the next clock edge.
//
// The method calls for translation equations or lookup tables kept per core; the binning, the
// linear scale factor and its format are this design's own choices.
module vt_translator
  import aging_pkg::*;
#(
  parameter int unsigned NUM_CORES = 32,
  parameter int unsigned FRAC      = 6,
  localparam int unsigned CORE_W   = (NUM_CORES > 1) ? $clog2(NUM_CORES) : 1,
  localparam int unsigned ADDR_W   = CORE_W + 2 * BIN_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  logic [ADDR_W-1:0] cfg_addr,   // {core, v_bin, t_bin}
  input  logic [7:0]        cfg_factor,
  input  logic [CORE_W-1:0] core,
  input  code_t             v_code,
  input  code_t             t_code,
  input  delay_t            delay_in,
  output delay_t            delay_out
);

  localparam int unsigned DEPTH = NUM_CORES << (2 * BIN_W);

  logic [7:0]          factor_q [DEPTH];
  int unsigned         rd_idx;
  logic [7:0]          factor;
  logic [DELAY_W+8:0]  product;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) factor_q[i] <= 8'(1 << FRAC);
    end else if (cfg_we && int'(cfg_addr) < int'(DEPTH)) begin
      factor_q[int'(cfg_addr)] <= cfg_factor;
    end
  end

  always_comb begin
    rd_idx    = (int'(core) << (2 * BIN_W)) + int'({v_code[CODE_W-1 -: BIN_W], t_code[CODE_W-1 -: BIN_W]});
    factor    = (rd_idx < DEPTH) ? factor_q[rd_idx] : 8'(1 << FRAC);
    product   = ((DELAY_W+9)'(delay_in) * (DELAY_W+9)'(factor) + (DELAY_W+9)'(1 << (FRAC-1))) >> FRAC;
    delay_out = (product > (DELAY_W+9)'({DELAY_W{1'b1}})) ? '1 : DELAY_W'(product);
  end

endmodule
