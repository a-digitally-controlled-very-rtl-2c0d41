// Shared constants and types of the VHF synthesizer.
//
// The synthesizer locks a 98-108 MHz VCO to a 50 kHz reference by dividing the
// VCO output by N = 2000W + 200X + 20Y + Z. The selection digits W, X, Y and Z
// travel together as one struct. The constants are the values of the original
// navigation-band design: 50 kHz channel spacing, 500 kHz crystal divided by
// ten, first divider stage of modulus 20, N from 1960 to 2160.
package synth_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  // Moduli and reset values of the variable divider (see variable_divider).
  localparam int unsigned FIRST_MOD  = 20;   // first stage, divide-by-twenty
  localparam int unsigned STAGE2_MOD = 10;
  localparam int unsigned STAGE3_MOD = 10;
  localparam int unsigned STAGE4_MOD = 2;
  localparam int unsigned STAGE2_RESET = 9;  // stage 2 restarts at 9, not 0

  localparam int unsigned N_MIN = 1960;      // 98 MHz / 50 kHz
  localparam int unsigned N_MAX = 2160;      // 108 MHz / 50 kHz

  localparam real F_REF_HZ  = 50.0e3;        // reference / channel spacing
  localparam real F_XTAL_HZ = 500.0e3;       // crystal, divided by 10

  // Divider setting: N = 2000*w + 200*x + 20*y + z.
  typedef struct packed {
    logic       w;   // 0-1
    logic [3:0] x;   // 0-9
    logic [3:0] y;   // 0-9
    logic [4:0] z;   // 0-19
  } nsel_t;

  // Division ratio selected by a setting.
  function automatic int unsigned n_of(nsel_t s);
    return 2000 * int'(s.w) + 200 * int'(s.x) + 20 * int'(s.y) + int'(s.z);
  endfunction
endpackage
