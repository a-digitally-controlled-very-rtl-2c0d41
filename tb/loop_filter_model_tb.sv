// Testbench of loop_filter_model.
//
// Checks the dc gain (+1 after a step) and the gain at 250 Hz, 2.5 kHz,
// 25 kHz and 50 kHz against |H| = 1/sqrt(1 + (f/2.5k)^4) * 1/sqrt(1 + (f/25k)^2)
// (second-order Butterworth and the RC section), computed here, within 10
// percent. At 25 kHz and 50 kHz this is about -43 dB and -59 dB, the ripple
// frequencies the filter has to suppress.
module loop_filter_model_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam real PI = 3.14159265358979;

  real vin = 0.0;
  real vout;
  real freq_hz = 0.0;
  real amp = 0.0;

  int checks = 0, failures = 0;

  loop_filter_model dut (.vin, .vout);

  // sine source, 20 ns steps
  always begin
    #20;
    vin = (freq_hz == 0.0) ? amp : amp * $sin(2.0 * PI * freq_hz * $realtime * 1.0e-9);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic gain_at(real f);
    real peak, expect_g, g, settle_ns, meas_ns;
    freq_hz = f; amp = 1.0;
    settle_ns = 5.0e6;                                  // 5 ms
    meas_ns = 4.0 * 1.0e9 / f;
    #(settle_ns);
    peak = 0.0;
    for (real t = 0.0; t < meas_ns; t += 20.0) begin
      #20;
      if (vout > peak) peak = vout;
      if (-vout > peak) peak = -vout;
    end
    expect_g = 1.0 / $sqrt(1.0 + (f / 2.5e3) ** 4) / $sqrt(1.0 + (f / 25.0e3) ** 2);
    g = peak;
    check(g > 0.9 * expect_g && g < 1.1 * expect_g,
          $sformatf("%f Hz: gain %e expected %e", f, g, expect_g));
  endtask

  initial begin
    amp = 1.0; freq_hz = 0.0;
    #5ms;
    check(vout > 0.999 && vout < 1.001, $sformatf("dc gain %f", vout));
    gain_at(250.0);
    gain_at(2.5e3);
    gain_at(25.0e3);
    gain_at(50.0e3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
