// Behavioural model of the crystal reference oscillator (not synthesizable).
//
// The real part is a high-speed differential comparator with a 500 kHz
// crystal from its output to its non-inverting input; resistors bias it into
// its linear region and its TTL-compatible output drives the reference
// divider directly. The model only produces that output: a square wave of
// FREQ_HZ, offset by ERROR_PPM to study the effect of crystal error (the
// original design specifies a stability of 0.005 percent, i.e. 50 ppm). While enable is
// low the output stays low.
//
// Frequency and stability are the original design's; the model itself (ideal square
// wave, no start-up) is a simplification.
module ref_osc_model #(
  parameter real FREQ_HZ   = 500.0e3,
  parameter real ERROR_PPM = 0.0
) (
  input  logic enable,
  output logic clk_out
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam real HALF_NS = 0.5e9 / (FREQ_HZ * (1.0 + ERROR_PPM * 1.0e-6));

  initial clk_out = 1'b0;

  always begin
    #(HALF_NS);
    clk_out = enable ? !clk_out : 1'b0;
  end
endmodule
