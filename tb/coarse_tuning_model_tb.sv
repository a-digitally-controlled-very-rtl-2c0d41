// Testbench of coarse_tuning_model.
//
// For every whole-MHz setting from 98 to 108 MHz checks that the coarse
// voltage is 0.25 V per MHz above 98 MHz, i.e. rises by one step per MHz.
module coarse_tuning_model_tb;
  timeunit 1ns;
  timeprecision 1ps;

  logic       w;
  logic [3:0] x, y;
  real        v;

  int checks = 0, failures = 0;

  coarse_tuning_model dut (.w, .x, .y, .v_coarse(v));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    real prev;
    prev = -1.0;
    for (int mhz = 98; mhz <= 108; mhz++) begin
      w = 1'(mhz / 100); x = 4'((mhz / 10) % 10); y = 4'(mhz % 10);
      #1;
      check(v > 0.25 * (mhz - 98) - 1.0e-9 && v < 0.25 * (mhz - 98) + 1.0e-9,
            $sformatf("%0d MHz: %f V", mhz, v));
      check(v > prev, "rises with frequency");
      prev = v;
    end
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
