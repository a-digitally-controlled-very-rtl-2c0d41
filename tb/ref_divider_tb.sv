// Testbench of ref_divider.
//
// A 500 kHz clock (2 us period) drives the divider. Sampling at every falling
// clock edge, the testbench checks that f_ref rises every 10 clocks (20 us,
// 50 kHz) and is high for 5 of them, over 200 reference periods.
module ref_divider_tb;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic f_ref;

  int checks = 0, failures = 0;

  ref_divider dut (.*);

  always #1000 clk = !clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int hi, per, rises;
    logic prev;
    realtime t_rise, t_prev;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    prev = f_ref; hi = 0; per = 0; rises = 0; t_prev = 0.0;
    while (rises < 201) begin
      @(negedge clk);
      if (f_ref && !prev) begin
        t_rise = $realtime;
        if (rises > 0) begin
          check(per == 10, $sformatf("period %0d clocks", per));
          check(hi == 5, $sformatf("high for %0d clocks", hi));
          check(t_rise - t_prev == 20000.0, "period 20 us");
        end
        rises++; t_prev = t_rise; per = 0; hi = 0;
      end
      per++;
      if (f_ref) hi++;
      prev = f_ref;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
