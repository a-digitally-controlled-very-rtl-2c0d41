// Testbench of vco_model.
//
// Sets coarse and fine voltages and measures the output frequency over 1000
// periods: 98.5 MHz at the fine midpoint with no coarse voltage, +4 MHz per
// coarse volt, +1.8 MHz per fine volt, and the limit at 120 MHz.
module vco_model_tb;
  timeunit 1ns;
  timeprecision 1ps;

  logic en = 1'b1;
  real  vc, vf;
  logic f;

  int checks = 0, failures = 0;

  vco_model dut (.enable(en), .v_coarse(vc), .v_fine(vf), .f_out(f));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic measure(real c, real fi, real expect_mhz);
    realtime t0, t1;
    real fm;
    vc = c; vf = fi;
    repeat (3) @(posedge f);
    t0 = $realtime;
    repeat (1000) @(posedge f);
    t1 = $realtime;
    fm = 1000.0 * 1000.0 / (t1 - t0);
    check(fm > expect_mhz - 0.01 && fm < expect_mhz + 0.01,
          $sformatf("vc=%f vf=%f: %f MHz expected %f", c, fi, fm, expect_mhz));
  endtask

  initial begin
    vc = 0.0; vf = 1.645;
    measure(0.0, 1.645, 98.5);
    measure(1.0, 1.645, 102.5);
    measure(2.5, 1.645, 108.5);
    measure(1.0, 2.645, 104.3);
    measure(1.0, 0.645, 100.7);
    measure(10.0, 1.645, 120.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
