// Digital phase detector: set-reset flip-flop F1, toggle flip-flop F2 and the
// decoder that drives the two sample-and-hold capacitors.
//
// F1 is set by the divider output F_o/N and reset by the reference F_R, so Q1
// is low from a reference edge to the next divider edge: a pulse whose width is
// the phase error (pulse-duration modulation). Each time Q1 is reset, F2
// toggles, so successive error pulses alternate between the two capacitors.
// The four states of (Q1, Q2) are decoded:
//   Q1=0 Q2=1 : charge C2       Q1=1 Q2=1 : discharge C1
//   Q1=0 Q2=0 : charge C1       Q1=1 Q2=0 : discharge C2
// so each capacitor is discharged, charged for the phase-error time and then
// held for a full reference period while the other one goes through the same
// sequence.
//
// Interface: clk is a sampling clock (the VCO output in the synthesizer);
// div_in and ref_in are the divider output and reference. Both pass through
// SYNC flip-flops (ref_in comes from another clock domain) and act on their
// rising edges. Q1 and Q2 are flip-flops; the four gate outputs are decoded
// combinationally from them.
//
// F1 as set-reset with F_o/N on set and F_R on reset, F2 toggled by the PDM
// output and AND decoding of the four states are the original design's; the state to
// gate mapping is read off its timing diagram. This implementation's choices:
// the flip-flops are synchronous to a sampling clock instead of edge-triggered
// by the inputs, set wins when both edges arrive in the same clock, and F2
// toggles when a reset edge finds Q1 high (a Q1 falling edge, or a
// zero-width error pulse).
module phase_detector #(
  parameter int unsigned SYNC = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic div_in,
  input  logic ref_in,
  output logic q1,
  output logic q2,
  output logic charge_c1,
  output logic discharge_c1,
  output logic charge_c2,
  output logic discharge_c2
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [SYNC:0] div_sh, ref_sh;
  logic          set_edge, rst_edge;

  assign set_edge = div_sh[SYNC-1] && !div_sh[SYNC];
  assign rst_edge = ref_sh[SYNC-1] && !ref_sh[SYNC];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_sh <= '0;
      ref_sh <= '0;
      q1     <= 1'b1;
      q2     <= 1'b0;
    end else begin
      div_sh <= {div_sh[SYNC-1:0], div_in};
      ref_sh <= {ref_sh[SYNC-1:0], ref_in};
      if (set_edge)
        q1 <= 1'b1;
      else if (rst_edge)
        q1 <= 1'b0;
      if (rst_edge && q1)
        q2 <= !q2;
    end
  end

  always_comb begin
    charge_c2    = !q1 &&  q2;
    discharge_c1 =  q1 &&  q2;
    charge_c1    = !q1 && !q2;
    discharge_c2 =  q1 && !q2;
  end

  // Exactly one transistor gate is driven at any time.
  a_one_gate: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot({charge_c1, discharge_c1, charge_c2, discharge_c2}));
endmodule
