// Testbench of phase_detector.
//
// The reference is a square wave of 200 clocks; in each period the divider
// pulse follows the reference rising edge by a random delay d (0..190 clocks).
// The testbench checks, for every period:
//  - exactly one of the four decoded gate outputs is high in every clock;
//  - the charge pulse lasts exactly d clocks (the phase error);
//  - successive error pulses charge C1 and C2 alternately;
//  - a capacitor is discharged between two of its charge pulses, and is
//    neither charged nor discharged while the other one is being charged.
// A last part leaves out the divider pulse for one period: Q1 must then stay
// low and the same capacitor keeps charging (no extra toggle of F2).
module phase_detector_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int PER = 200;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic div_in, ref_in;
  logic q1, q2, charge_c1, discharge_c1, charge_c2, discharge_c2;

  int checks = 0, failures = 0;
  int mech_d0 = 0;

  phase_detector dut (.*);

  always #5 clk = !clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // monitor: pulse widths and discharge bookkeeping
  int  w1 = 0, w2 = 0;        // length of the current charge pulse
  int  last_w, last_cap;      // completed pulse
  bit  done = 0;
  bit  dis1_seen = 1, dis2_seen = 1;
  always @(negedge clk) if (rst_n) begin
    check($countones({charge_c1, discharge_c1, charge_c2, discharge_c2}) == 1, "one gate active");
    if (charge_c1) begin
      w1++;
      if (w1 == 1) begin
        check(dis1_seen, "C1 discharged before charging");
        dis1_seen = 0;
      end
    end else if (w1 > 0) begin
      last_w = w1; last_cap = 1; done = 1; w1 = 0;
    end
    if (charge_c2) begin
      w2++;
      if (w2 == 1) begin
        check(dis2_seen, "C2 discharged before charging");
        dis2_seen = 0;
      end
    end else if (w2 > 0) begin
      last_w = w2; last_cap = 2; done = 1; w2 = 0;
    end
    if (discharge_c1) dis1_seen = 1;
    if (discharge_c2) dis2_seen = 1;
  end

  initial begin
    int d, prev_cap, expect_cap;
    div_in = 0; ref_in = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    prev_cap = 0;
    expect_cap = 0;
    for (int k = 0; k < 300; k++) begin
      d = (k % 50 == 7) ? 0 : $urandom_range(1, 190);
      done = 0;
      ref_in = 1;
      for (int i = 0; i < PER; i++) begin
        if (i == d) div_in = 1;
        if (i == PER / 2) ref_in = 0;
        @(negedge clk);
        div_in = 0;
      end
      if (d == 0) begin
        check(!done, "zero phase error gives no charge pulse");
        mech_d0++;
        expect_cap = (expect_cap == 1) ? 2 : 1;   // F2 still toggled
      end else begin
        check(done, $sformatf("charge pulse seen (d=%0d)", d));
        check(last_w == d, $sformatf("charge width %0d, phase error %0d", last_w, d));
        if (expect_cap != 0)
          check(last_cap == ((expect_cap == 1) ? 2 : 1), "capacitors alternate");
        expect_cap = last_cap;
      end
    end
    // missing divider pulse: one period with no set
    ref_in = 1;
    for (int i = 0; i < PER; i++) begin
      if (i == PER / 2) ref_in = 0;
      @(negedge clk);
    end
    check(!q1, "Q1 stays low without a divider edge");
    prev_cap = charge_c1 ? 1 : (charge_c2 ? 2 : 0);
    check(prev_cap != 0, "still charging");
    ref_in = 1;
    for (int i = 0; i < PER; i++) begin
      if (i == PER / 2) ref_in = 0;
      if (i == 20) div_in = 1;
      @(negedge clk);
      div_in = 0;
      if (i == 10) check(charge_c1 ? prev_cap == 1 : prev_cap == 2, "no toggle on second reset");
    end
    check(q1, "Q1 set again by the divider");
    check(mech_d0 > 0, "zero phase error case exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
