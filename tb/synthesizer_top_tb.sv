// End-to-end testbench of the synthesizer, all parameters at their defaults.
//
// Dials a sequence of channels on the frequency-select inputs, starting from
// reset at 105.75 MHz, then 98.00, 108.00, 98.55 and back to 105.75 MHz
// (a 10 MHz step among them). For each channel it waits for lock and checks:
//  - the selection is flagged valid;
//  - lock is reached within 15 ms (declared when the VCO makes 10*N cycles, to
//    within 4 cycles, in each of five successive windows of ten reference
//    periods; in lock the phase wanders by a few VCO cycles because the
//    detector samples with the VCO clock);
//  - 1 ms after lock the VCO cycles counted over 200 reference periods are
//    200*N to within 4 cycles, i.e. the average frequency is N * 50 kHz,
//    with N = 20 * F[MHz] computed here;
//  - the divider output has the reference period (20 us) to within 50 ns.
// It also counts how often each mechanism of the design happened and fails
// if one never did: shortened (19-cycle) first-stage intervals, the inhibit,
// the stage-2 reload to 9 at the end of a divider cycle, a carry into the
// fourth stage, charging of each sample-and-hold capacitor, a coarse-tuning
// step, lock acquisition and channel switching.
module synthesizer_top_tb;
  timeunit 1ns;
  timeprecision 1ps;

  logic       rst_n = 1'b0;
  logic       sel_w;
  logic [3:0] sel_x, sel_y, sel_tenths, sel_hundredths;
  logic       sel_valid, f_out, f_ref, f_div;

  int checks = 0, failures = 0;

  synthesizer_top dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---- mechanism counters (observed inside the design) ----
  int n_short = 0, n_inhibit = 0, n_reload9 = 0, n_carry4 = 0;
  int n_chg1 = 0, n_chg2 = 0, n_coarse = 0, n_lock = 0, n_switch = 0;
  logic f_div_d = 1'b0;

  always @(posedge f_out) begin
    if (dut.u_div.u_first.stage2_en && !dut.u_div.u_first.inhibit) n_short++;
    if (dut.u_div.u_first.stage2_en && dut.u_div.u_first.inhibit) n_inhibit++;
    if (f_div_d && dut.u_div.u_stage2.fresh && dut.u_div.u_stage2.count == 4'd9) n_reload9++;
    f_div_d <= f_div;
    if (dut.u_div.carry3) n_carry4++;
  end
  always @(posedge dut.chg1) n_chg1++;
  always @(posedge dut.chg2) n_chg2++;
  always @(dut.v_coarse) n_coarse++;

  // ---- VCO cycle counting between reference edges ----
  longint vco_cycles = 0;
  always @(posedge f_out) vco_cycles++;

  task automatic count_window(int nref, output longint cyc);
    longint c0;
    @(posedge f_ref);
    c0 = vco_cycles;
    repeat (nref) @(posedge f_ref);
    cyc = vco_cycles - c0;
  endtask

  task automatic dial(int f100);     // frequency in units of 10 kHz, e.g. 10575
    sel_w          = 1'(f100 / 10000);
    sel_x          = 4'((f100 / 1000) % 10);
    sel_y          = 4'((f100 / 100) % 10);
    sel_tenths     = 4'((f100 / 10) % 10);
    sel_hundredths = 4'(f100 % 10);
  endtask

  task automatic channel(int f100);
    int n, good;
    longint cyc;
    realtime t0, t_lock, ta, tb_;
    n = f100 / 5;                      // N = F / 50 kHz
    dial(f100);
    #1;
    check(sel_valid, $sformatf("%0d valid", f100));
    t0 = $realtime;
    good = 0;
    while (good < 5 && $realtime - t0 < 15.0e6) begin
      count_window(10, cyc);
      if (cyc >= 10 * n - 4 && cyc <= 10 * n + 4) good++;
      else good = 0;
    end
    t_lock = $realtime - t0;
    check(good == 5, $sformatf("%0d.%02d MHz: lock within 15 ms", f100 / 100, f100 % 100));
    if (good == 5) n_lock++;
    $display("INFO %0d.%02d MHz N=%0d locked after %0.2f ms", f100 / 100, f100 % 100, n, t_lock / 1.0e6);
    #1ms;
    count_window(200, cyc);
    check(cyc >= 200 * n - 4 && cyc <= 200 * n + 4,
          $sformatf("VCO cycles in 200 reference periods: %0d expected %0d", cyc, 200 * n));
    @(posedge f_div); ta = $realtime;
    @(posedge f_div); tb_ = $realtime;
    check(tb_ - ta > 19950.0 && tb_ - ta < 20050.0, $sformatf("divider period %f ns", tb_ - ta));
  endtask

  initial begin
    dial(10575);
    #5000;
    rst_n = 1'b1;
    channel(10575);
    n_switch++; channel(9800);
    n_switch++; channel(10800);
    n_switch++; channel(9855);
    n_switch++; channel(10575);
    check(n_short > 0,   "mechanism: shortened first-stage interval");
    check(n_inhibit > 0, "mechanism: inhibit of 1B");
    check(n_reload9 > 0, "mechanism: end of divider cycle, stage 2 reload");
    check(n_carry4 > 0,  "mechanism: carry into fourth stage");
    check(n_chg1 > 0 && n_chg2 > 0, "mechanism: both capacitors charged");
    check(n_coarse > 1,  "mechanism: coarse-tuning step");
    check(n_lock == 5,   "mechanism: lock acquired on every channel");
    check(n_switch == 4, "mechanism: channel switch");
    $display("INFO short=%0d inhibit=%0d reload=%0d carry4=%0d chg1=%0d chg2=%0d coarse=%0d lock=%0d switch=%0d",
             n_short, n_inhibit, n_reload9, n_carry4, n_chg1, n_chg2, n_coarse, n_lock, n_switch);
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
