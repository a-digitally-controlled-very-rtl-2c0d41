// Behavioural model of the coarse-tuning network (not synthesizable).
//
// The real network is a weighted resistor configuration switched by the
// frequency-selection digits; it raises the VCO coarse-tuning voltage in steps
// as the selected frequency rises and brings the VCO within about 1 MHz of the
// selected channel, inside the pull-in range of the loop.
//
// The model weights the whole-MHz digits W, X, Y by 100, 10 and 1 (one step per
// MHz) and gives v_coarse = V_PER_MHZ * (100W + 10X + Y - BASE_MHZ). The
// fraction digit Z does not take part, so the network alone leaves an error
// of up to one MHz step, corrected by the loop. Step size and base are this
// model's values; the original design gives no component values for the network.
module coarse_tuning_model #(
  parameter real V_PER_MHZ = 0.25,
  parameter real BASE_MHZ  = 98.0
) (
  input  logic       w,
  input  logic [3:0] x,
  input  logic [3:0] y,
  output real        v_coarse
);
  timeunit 1ns;
  timeprecision 1ps;

  always_comb
    v_coarse = V_PER_MHZ * (100.0 * real'(w) + 10.0 * real'(x) + real'(y) - BASE_MHZ);
endmodule
