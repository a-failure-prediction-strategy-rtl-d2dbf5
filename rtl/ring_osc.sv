// ring_osc: behavioural model of a ring-oscillator sensor (not synthesizable).
//
// A chain of STAGES inverters oscillates with a period of 2 * STAGES stage delays. The stage
// delay follows the supply voltage and the junction temperature: it grows as the supply drops
// and as the temperature rises, the trend the method shows for a 27-stage ring oscillator. The
// model uses a first-order fit, stage delay = T0 * (1 + K_T*(temp - 25)) * (VNOM/vdd), with
// coefficients of this design's own choosing, not characterised data. The physical conditions
// enter as the model inputs vdd_mv and temp_c; en stops the oscillator (output low).
// Delays are in simulation time units (the default time unit of the simulator).
module ring_osc #(
  parameter int unsigned STAGES  = 27,
  parameter real         T0      = 40.0,    // stage delay at VNOM and 25 C, in time units
  parameter real         VNOM_MV = 1800.0,
  parameter real         K_T     = 0.002    // relative delay change per degree C
) (
  input  logic        en,
  input  int unsigned vdd_mv,
  input  int          temp_c,
  output logic        ro_out
);

  real half_period;

  always_comb begin
    half_period = real'(STAGES) * T0 * (1.0 + K_T * (real'(temp_c) - 25.0))
                     * (VNOM_MV / ((vdd_mv == 0) ? 1.0 : real'(vdd_mv)));
  end

  initial ro_out = 1'b0;

  always begin
    if (en) begin
      #(half_period) ro_out = ~ro_out;
    end else begin
      ro_out = 1'b0;
      @(en);
    end
  end

endmodule
