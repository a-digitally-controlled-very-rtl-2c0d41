// Behavioural model of the loop filter (not synthesizable).
//
// The real filter is an active second-order Butterworth low-pass (one
// operational amplifier, unity dc gain, inverting), an inverting amplifier of
// gain -1 for isolation, and a passive RC section of about 25 kHz at the
// output. The overall dc gain is +1.
//
// The model integrates the same transfer function in time steps of DT_NS:
//   Butterworth: y'' = w0^2 (vin - y) - sqrt(2) w0 y',  w0 = 2*pi*FC_HZ
//   RC section : vout' = wr (y - vout),                 wr = 2*pi*RC_FC_HZ
// with semi-implicit Euler steps (w0*DT is about 1.6e-3 at the defaults).
// The corner frequencies 2.5 kHz and 25 kHz are the original design's; the step size and
// the initial state (V_INIT everywhere) are this model's.
module loop_filter_model #(
  parameter real FC_HZ    = 2.5e3,
  parameter real RC_FC_HZ = 25.0e3,
  parameter real DT_NS    = 100.0,
  parameter real V_INIT   = 0.0
) (
  input  real vin,
  output real vout
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam real TWO_PI = 6.28318530717959;
  localparam real W0     = TWO_PI * FC_HZ;
  localparam real WR     = TWO_PI * RC_FC_HZ;
  localparam real DT_S   = DT_NS * 1.0e-9;

  real y, yd, vo;

  initial begin
    y  = V_INIT;
    yd = 0.0;
    vo = V_INIT;
  end

  always begin
    #(DT_NS);
    yd = yd + (W0 * W0 * (vin - y) - 1.41421356237310 * W0 * yd) * DT_S;
    y  = y + yd * DT_S;
    vo = vo + WR * (y - vo) * DT_S;
  end

  always_comb vout = vo;
endmodule
