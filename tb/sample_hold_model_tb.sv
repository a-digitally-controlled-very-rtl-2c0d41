// Testbench of sample_hold_model.
//
// Drives the four gate inputs in the order of the phase detector (discharge
// C1, charge C1, discharge C2, charge C2, ...) with known charge times and
// checks that the output is the sample proportional to the charge time
// (Kp * 2*pi * t / 20 us, Kp = pi/6 V/rad), that it holds while the other
// capacitor is discharged, and that long charge times saturate at V_MAX.
module sample_hold_model_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam real SLEW = (3.14159265358979 / 6.0) * 2.0 * 3.14159265358979 / 20000.0;

  logic c1 = 0, d1 = 0, c2 = 0, d2 = 0;
  real  v;

  int checks = 0, failures = 0;

  sample_hold_model dut (.charge_c1(c1), .discharge_c1(d1), .charge_c2(c2),
                         .discharge_c2(d2), .v_out(v));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic bit near(real a, real b);
    return (a - b < 1.0e-6) && (b - a < 1.0e-6);
  endfunction

  // one half cycle on capacitor sel: discharge, charge for t ns, hold
  task automatic sample(int sel, real t);
    if (sel == 1) begin
      d1 = 1; #(500.0); d1 = 0;
      c1 = 1; #(t); c1 = 0;
    end else begin
      d2 = 1; #(500.0); d2 = 0;
      c2 = 1; #(t); c2 = 0;
    end
    #1;
  endtask

  initial begin
    real t, prev;
    prev = 0.0;
    #100;
    check(near(v, 0.0), "starts at 0");
    for (int k = 0; k < 40; k++) begin
      t = real'($urandom_range(100, 15000));
      sample((k % 2) + 1, t);
      check(near(v, (SLEW * t > prev) ? SLEW * t : prev) || near(v, SLEW * t),
            $sformatf("sample %0d: v=%f t=%f", k, v, t));
      // the other capacitor is discharged next: output is then this sample
      if ((k % 2) == 0) begin d2 = 1; #10; d2 = 0; end
      else begin d1 = 1; #10; d1 = 0; end
      check(near(v, SLEW * t), $sformatf("held sample %0d: v=%f expect %f", k, v, SLEW * t));
      prev = SLEW * t;
    end
    sample(1, 40000.0);
    d2 = 1; #10; d2 = 0;
    check(near(v, 5.0), "saturates at V_MAX");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
