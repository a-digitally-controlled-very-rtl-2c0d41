// First stage of the variable divider and its control circuitry.
//
// Counter 1A runs freely from 0 to MOD-1 on every VCO cycle and is never
// reset, so nothing in this stage has to be reset within one input period.
// Counter 1B counts down; whenever 1A equals 1B a one-cycle pulse (stage2_en)
// clocks the second stage. The same pulse decrements 1B, so the next pulse
// comes after MOD-1 input cycles instead of MOD. Counter 1C starts at MOD and
// is decremented with 1B; once it has come down to Z the inhibit output is
// high and 1B and 1C stop. So in every divider cycle exactly MOD - Z intervals
// are one input cycle short. The divider output (cycle_end) reloads 1C with
// MOD, which removes the inhibit.
//
// Interface: clk is the VCO output, rst_n an asynchronous active-low reset,
// z the selected Z (0..MOD-1). stage2_en is a one-clk pulse, meant as a clock
// enable of the second stage. cycle_end must be high for one clk once per
// divider cycle, at least one clk after the pulse that ended the cycle.
//
// Counter structure, the count directions, the reload of 1C to 20 and the
// inhibit follow the original design. Design choices: everything is
// synchronous to the VCO clock with clock enables instead of rippled clocks,
// all counters reset to 0 except 1C (MOD), and 1C also stops at 0 so that a
// Z above MOD-1 cannot make it wrap.
module vd_first_stage #(
  parameter int unsigned MOD = synth_pkg::FIRST_MOD,
  localparam int unsigned CW = $clog2(MOD + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [CW-1:0] z,
  input  logic          cycle_end,
  output logic          stage2_en,
  output logic          inhibit,
  output logic          short_interval   // high while 1B has been decremented, i.e. the next interval is MOD-1
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [CW-1:0] cnt_1a, cnt_1b, cnt_1c;
  logic          step_b;

  assign stage2_en = (cnt_1a == cnt_1b);
  assign inhibit   = (cnt_1c == z) || (cnt_1c == '0);
  assign step_b    = stage2_en && !inhibit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_1a <= '0;
      cnt_1b <= '0;
      cnt_1c <= CW'(MOD);
      short_interval <= 1'b0;
    end else begin
      cnt_1a <= (cnt_1a == CW'(MOD - 1)) ? '0 : cnt_1a + 1'b1;
      if (step_b)
        cnt_1b <= (cnt_1b == '0) ? CW'(MOD - 1) : cnt_1b - 1'b1;
      if (cycle_end)
        cnt_1c <= CW'(MOD);
      else if (step_b)
        cnt_1c <= cnt_1c - 1'b1;
      if (stage2_en)
        short_interval <= step_b;
    end
  end

  // 1A and 1B can only agree again after at least MOD-1 input cycles.
  a_stage2_pulse_single: assert property (@(posedge clk) disable iff (!rst_n)
    stage2_en |=> !stage2_en);
endmodule
