// VHF frequency synthesizer, 98-108 MHz in 50 kHz steps.
//
// A VCO is divided by N and phase locked to a 50 kHz reference, so that in
// lock F_o = N * 50 kHz. The channel is dialled as BCD digits of the frequency
// in MHz; freq_select turns them into W, X, Y, Z with N = 2000W + 200X + 20Y + Z.
// The variable divider counts VCO cycles without ever resetting its fastest
// stage. The phase detector compares F_o/N with F_R; its sample-and-hold turns
// the phase error into a voltage, the loop filter removes the 25 kHz and
// 50 kHz ripple, and the result fine-tunes the VCO. A coarse-tuning voltage,
// stepped by the whole-MHz digits, brings the VCO within the pull-in range.
//
// Interface: rst_n resets the digital logic (asynchronous, active low); the
// selection digits may change at any time and a new channel is acquired in a
// few milliseconds. f_out is the VCO output, f_ref the reference, f_div the
// divider output, sel_valid flags a channel inside the band.
//
// The reference oscillator, sample-and-hold, loop filter, coarse-tuning
// network and VCO are behavioural models with real-valued signals; the
// divider, the reference divider, the phase-detector logic and the frequency
// select are synthesizable. The phase detector samples with the VCO clock.
module synthesizer_top
  import synth_pkg::*;
(
  input  logic       rst_n,
  input  logic       sel_w,
  input  logic [3:0] sel_x,
  input  logic [3:0] sel_y,
  input  logic [3:0] sel_tenths,
  input  logic [3:0] sel_hundredths,
  output logic       sel_valid,
  output logic       f_out,
  output logic       f_ref,
  output logic       f_div
);
  timeunit 1ns;
  timeprecision 1ps;

  nsel_t sel;
  logic  xtal;
  logic  q1, q2, chg1, dis1, chg2, dis2;
  real   v_error, v_fine, v_coarse;

  freq_select u_fsel (
    .mhz_hundreds(sel_w), .mhz_tens(sel_x), .mhz_units(sel_y),
    .tenths(sel_tenths), .hundredths(sel_hundredths),
    .sel, .valid(sel_valid)
  );

  ref_osc_model u_xtal (.enable(1'b1), .clk_out(xtal));

  ref_divider u_refdiv (.clk(xtal), .rst_n, .f_ref);

  variable_divider u_div (.clk(f_out), .rst_n, .sel, .div_out(f_div));

  phase_detector u_pd (
    .clk(f_out), .rst_n, .div_in(f_div), .ref_in(f_ref),
    .q1, .q2, .charge_c1(chg1), .discharge_c1(dis1),
    .charge_c2(chg2), .discharge_c2(dis2)
  );

  sample_hold_model u_sh (
    .charge_c1(chg1), .discharge_c1(dis1),
    .charge_c2(chg2), .discharge_c2(dis2), .v_out(v_error)
  );

  loop_filter_model u_filter (.vin(v_error), .vout(v_fine));

  coarse_tuning_model u_coarse (.w(sel.w), .x(sel.x), .y(sel.y), .v_coarse);

  vco_model u_vco (.enable(1'b1), .v_coarse, .v_fine, .f_out);
endmodule
