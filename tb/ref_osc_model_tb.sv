// Testbench of ref_osc_model.
//
// Measures 100 periods of the oscillator output with the default parameters
// (500 kHz: 2000 ns) and of a second instance detuned by +50 ppm (the 0.005
// percent stability limit), and checks that the output stays low while the
// enable is low.
module ref_osc_model_tb;
  timeunit 1ns;
  timeprecision 1ps;

  logic en = 1'b0;
  logic o_nom, o_off;

  int checks = 0, failures = 0;

  ref_osc_model u_nom (.enable(en), .clk_out(o_nom));
  ref_osc_model #(.ERROR_PPM(50.0)) u_off (.enable(en), .clk_out(o_off));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    realtime t0, t1;
    #10000;
    check(!o_nom && !o_off, "output low while disabled");
    en = 1'b1;
    @(posedge o_nom);
    t0 = $realtime;
    repeat (100) @(posedge o_nom);
    t1 = $realtime;
    check((t1 - t0) / 100.0 > 1999.99 && (t1 - t0) / 100.0 < 2000.01, $sformatf("period %f", (t1 - t0) / 100.0));
    @(posedge o_off);
    t0 = $realtime;
    repeat (100) @(posedge o_off);
    t1 = $realtime;
    check((t1 - t0) / 100.0 > 1999.85 && (t1 - t0) / 100.0 < 1999.95, $sformatf("detuned period %f", (t1 - t0) / 100.0));
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
