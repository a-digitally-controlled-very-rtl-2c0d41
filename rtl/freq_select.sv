// Frequency select: turns the channel dialled on BCD thumbwheel switches into
// the divider setting W, X, Y, Z and flags settings outside the band.
//
// The VCO frequency in MHz is dialled as hundreds, tens and units digits plus
// two fraction digits (tenths and hundredths). With a 50 kHz reference,
// N = F_o / 50 kHz = 20 * F_o[MHz], so the whole MHz digits go straight to
// W, X and Y and the fraction becomes Z = 20 * fraction = 2 * tenths + 1 if
// the hundredths digit is 5. Example: 105.75 MHz gives W=1, X=0, Y=5, Z=15,
// N = 2115. valid is high when every digit is a legal BCD digit, the
// hundredths digit is 0 or 5, and the frequency lies in 98.00-108.95 MHz.
//
// Purely combinational. The digit-to-W/X/Y mapping and the 0-19 range of Z are
// the original design's; the exact encoder and the valid flag are this
// implementation's, since the original design only says the fraction is "encoded".
module freq_select
  import synth_pkg::*;
(
  input  logic       mhz_hundreds,   // 0-1
  input  logic [3:0] mhz_tens,
  input  logic [3:0] mhz_units,
  input  logic [3:0] tenths,
  input  logic [3:0] hundredths,     // 0 or 5
  output nsel_t      sel,
  output logic       valid
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [6:0] whole_mhz;

  always_comb begin
    sel.w = mhz_hundreds;
    sel.x = mhz_tens;
    sel.y = mhz_units;
    sel.z = {tenths, 1'b0} + {4'd0, (hundredths == 4'd5)};
    whole_mhz = 7'(100 * int'(mhz_hundreds) + 10 * int'(mhz_tens) + int'(mhz_units));
    valid = (mhz_tens <= 4'd9) && (mhz_units <= 4'd9) && (tenths <= 4'd9)
         && (hundredths == 4'd0 || hundredths == 4'd5)
         && (whole_mhz >= 7'd98) && (whole_mhz <= 7'd108);
  end
endmodule
