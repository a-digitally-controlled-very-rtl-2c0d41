// Behavioural model of the sample-and-hold half of the phase detector (not
// synthesizable).
//
// In the real circuit each of the capacitors C1 and C2 (0.01 uF) is charged by
// a transistor current source while its "charge" gate is on, discharged by a
// second transistor while its "discharge" gate is on, and otherwise holds its
// voltage. The charging time is the phase-error pulse, so the held voltage is
// proportional to the phase error. The two capacitor voltages are combined
// through two diodes and a differential transistor pair into the error voltage.
//
// The model charges a capacitor linearly at SLEW_V_PER_NS for as long as its
// charge input is high (the voltage is updated at the end of the charge pulse
// and limited to V_MAX), sets it to 0 on its discharge input, and gives the
// larger of the two voltages as v_out (ideal diodes, no offset). The default
// slew makes a full reference period (20 us, 2*pi of phase) worth
// Kp * 2*pi = (pi/6 V/rad) * 2*pi, the detector gain used in the original
// stability analysis.
module sample_hold_model #(
  parameter real SLEW_V_PER_NS = (3.14159265358979 / 6.0) * 2.0 * 3.14159265358979 / 20000.0,
  parameter real V_MAX         = 5.0
) (
  input  logic charge_c1,
  input  logic discharge_c1,
  input  logic charge_c2,
  input  logic discharge_c2,
  output real  v_out
);
  timeunit 1ns;
  timeprecision 1ps;

  real     vc1, vc2;
  realtime t1, t2;

  initial begin
    vc1 = 0.0;
    vc2 = 0.0;
    t1  = 0.0;
    t2  = 0.0;
  end

  function automatic real held(realtime width);
    real v;
    v = SLEW_V_PER_NS * width;
    return (v > V_MAX) ? V_MAX : v;
  endfunction

  always @(posedge charge_c1) t1 <= $realtime;
  always @(posedge charge_c2) t2 <= $realtime;

  always @(negedge charge_c1 or posedge discharge_c1)
    if (discharge_c1) vc1 <= 0.0;
    else              vc1 <= held($realtime - t1);

  always @(negedge charge_c2 or posedge discharge_c2)
    if (discharge_c2) vc2 <= 0.0;
    else              vc2 <= held($realtime - t2);

  always_comb v_out = (vc1 > vc2) ? vc1 : vc2;
endmodule
