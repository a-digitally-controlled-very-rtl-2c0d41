// Variable divider: divides the VCO frequency by N = 2000W + 200X + 20Y + Z.
//
// The first stage (1A) divides by 20 and is never reset; its control circuitry
// (vd_first_stage) makes the first 20 - Z of its output pulses arrive after 19
// input cycles instead of 20. Stages 2, 3 and 4 divide by 10, 10 and 2 and
// carry weights 20, 200 and 2000. The output pulse is produced as soon as all
// three stages equal Y, X and W; it reloads stage 2 with 9 (one extra pulse,
// +20 input cycles), stages 3 and 4 with 0, and 1C with 20. One cycle thus
// takes 20(100W + 10X + Y + 1) - (20 - Z) = N input cycles.
//
// Interface: clk is the VCO output F_o; sel holds W, X, Y, Z; div_out is F_o/N
// as a pulse one clk wide every N clk cycles. The first output after reset
// comes early, after that the period is exactly N. A change of sel takes
// effect in the cycle after the next output. Valid for Z in 0..19 and
// 100W + 10X + Y >= 20 - Z, which covers N = 1960..2160.
//
// Structure and counting scheme follow the original design. This implementation's
// choices: a single clock with clock enables in place of the rippled stage
// clocks, an output one clk wide, and the comparators combined as "all three
// equal", as the original design describes the output condition.
module variable_divider
  import synth_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  nsel_t sel,
  output logic  div_out
);
  timeunit 1ns;
  timeprecision 1ps;

  logic       en2, inhibit, short_iv;
  logic       carry2, carry3, carry4;
  logic       m2, m3, m4;
  logic [3:0] c2, c3;
  logic       c4;

  assign div_out = m2 && m3 && m4;

  vd_first_stage #(.MOD(FIRST_MOD)) u_first (
    .clk, .rst_n, .z(sel.z), .cycle_end(div_out),
    .stage2_en(en2), .inhibit, .short_interval(short_iv)
  );

  vd_stage #(.MOD(STAGE2_MOD), .RESET_VAL(STAGE2_RESET)) u_stage2 (
    .clk, .rst_n, .en(en2), .clear(div_out), .sel(sel.y),
    .count(c2), .carry(carry2), .match(m2)
  );

  vd_stage #(.MOD(STAGE3_MOD), .RESET_VAL(0)) u_stage3 (
    .clk, .rst_n, .en(carry2), .clear(div_out), .sel(sel.x),
    .count(c3), .carry(carry3), .match(m3)
  );

  vd_stage #(.MOD(STAGE4_MOD), .RESET_VAL(0)) u_stage4 (
    .clk, .rst_n, .en(carry3), .clear(div_out), .sel(sel.w),
    .count(c4), .carry(carry4), .match(m4)
  );

  // The output reloads the stages, so it can never last two cycles.
  a_out_single: assert property (@(posedge clk) disable iff (!rst_n)
    div_out |=> !div_out);

  // carry4 and short_iv are not needed by the divider itself (the fourth
  // stage never wraps within a cycle for N <= 3999); short_iv is observed by
  // testbenches through hierarchy.
endmodule
