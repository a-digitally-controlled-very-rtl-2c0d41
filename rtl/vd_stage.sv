// One of the slower stages of the variable divider (stages 2, 3 and 4) with
// its comparator.
//
// The stage counts en pulses modulo MOD and gives a carry pulse (one clk,
// combinational from en) when it wraps from MOD-1 to 0. The comparator output
// match is high while the count equals the selected digit sel. At the end of
// a divider cycle clear loads RESET_VAL. The second stage is reloaded with 9,
// which makes it count one pulse more than its digit asks for; the step from
// that 9 to 0 is only this extra pulse and must not reach the next stage, so
// after a clear the stage is "fresh": its first wrap gives no carry and, for a
// nonzero RESET_VAL, its comparator stays low until it has counted once.
//
// Interface: clk, rst_n (asynchronous, active low, loads RESET_VAL), en count
// pulse (clock enable), clear (synchronous reload), sel digit to compare.
// Outputs count, carry and match.
//
// Moduli 10/10/2, reset values 9/0/0 and the comparators follow the original design.
// The fresh flag is this implementation's way of giving the reset-to-9 the
// meaning the original design states for it (one extra pulse, N unchanged otherwise).
module vd_stage #(
  parameter int unsigned MOD       = 10,
  parameter int unsigned RESET_VAL = 0,
  localparam int unsigned W = (MOD > 2) ? $clog2(MOD) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         clear,
  input  logic [W-1:0] sel,
  output logic [W-1:0] count,
  output logic         carry,
  output logic         match
);
  timeunit 1ns;
  timeprecision 1ps;

  logic fresh;
  logic wrap;

  assign wrap  = (count == W'(MOD - 1));
  assign carry = en && wrap && !fresh;
  assign match = (count == sel) && !(fresh && RESET_VAL != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= W'(RESET_VAL);
      fresh <= 1'b1;
    end else if (clear) begin
      count <= W'(RESET_VAL);
      fresh <= 1'b1;
    end else if (en) begin
      count <= wrap ? '0 : count + 1'b1;
      fresh <= 1'b0;
    end
  end
endmodule
