// Reference decade divider: divides the 500 kHz crystal oscillator output by
// DIV (10) to give the 50 kHz reference F_R.
//
// A counter runs from 0 to DIV-1 on the crystal clock; the registered output
// is high for the first DIV/2 counts of every period, so F_R is a square wave
// whose rising edge follows the counter's wrap to 0 by one clock.
// Interface: clk (crystal oscillator), rst_n (asynchronous, active low),
// f_ref. The ratio 10 is the original design's; the duty cycle and reset are this
// implementation's choice.
module ref_divider #(
  parameter int unsigned DIV = 10,
  localparam int unsigned CW = $clog2(DIV)
) (
  input  logic clk,
  input  logic rst_n,
  output logic f_ref
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      f_ref <= 1'b0;
    end else begin
      cnt   <= (cnt == CW'(DIV - 1)) ? '0 : cnt + 1'b1;
      f_ref <= (cnt < CW'(DIV / 2));
    end
  end
endmodule
