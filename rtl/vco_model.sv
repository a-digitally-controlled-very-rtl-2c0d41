// Behavioural model of the voltage-controlled oscillator (not synthesizable).
//
// The real VCO is a grounded-base transistor oscillator with a parallel-tuned
// tank; two varactors in parallel set the tank capacitance, one from the
// coarse-tuning voltage and one from the fine-tuning (loop) voltage. It covers
// 98-108 MHz and delivers about 1 V peak-to-peak to the divider.
//
// The model is a square wave whose frequency is recomputed every half period:
//   f = F0_MHZ + KC_MHZ_PER_V * v_coarse + KV_MHZ_PER_V * (v_fine - V_FINE_MID)
// limited to F_MIN_MHZ..F_MAX_MHZ. KV_MHZ_PER_V = 1.8 is the VCO gain of the
// original design's stability analysis (2*pi * 1.8e6 rad/s per volt). F0, the coarse
// gain and the fine-voltage midpoint are this model's values, chosen to pair
// with the coarse-tuning and sample-and-hold models: the coarse voltage puts the
// VCO within 0.5 MHz of the channel and the fine voltage covers about +/-3 MHz.
// While enable is low the output stays low. The half-period delay is computed
// at run time, so a simulator cannot prove it nonzero and may warn about it;
// the frequency limits keep it between about 4.2 ns and 5.6 ns.
module vco_model #(
  parameter real F0_MHZ       = 98.5,
  parameter real KC_MHZ_PER_V = 4.0,
  parameter real KV_MHZ_PER_V = 1.8,
  parameter real V_FINE_MID   = 1.645,
  parameter real F_MIN_MHZ    = 90.0,
  parameter real F_MAX_MHZ    = 120.0
) (
  input  logic enable,
  input  real  v_coarse,
  input  real  v_fine,
  output logic f_out
);
  timeunit 1ns;
  timeprecision 1ps;

  real f_mhz;

  // Output frequency for the present control voltages, limited to the range.
  function automatic real freq_mhz(real vc, real vf);
    real f;
    f = F0_MHZ + KC_MHZ_PER_V * vc + KV_MHZ_PER_V * (vf - V_FINE_MID);
    if (f < F_MIN_MHZ) f = F_MIN_MHZ;
    if (f > F_MAX_MHZ) f = F_MAX_MHZ;
    return f;
  endfunction

  always_comb f_mhz = freq_mhz(v_coarse, v_fine);

  initial f_out = 1'b0;

  // The half period is recomputed from the inputs at every edge, so it is
  // never zero, even before f_mhz has first been evaluated.
  always begin
    #(500.0 / freq_mhz(v_coarse, v_fine));
    f_out = enable ? !f_out : 1'b0;
  end
endmodule
