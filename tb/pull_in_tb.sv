// Acquisition range of the complete loop.
//
// The coarse-tuning network is meant to bring the VCO within about 1 MHz of the
// channel; the phase detector and filter must then pull the loop in over a
// 2 MHz range. This testbench overrides the coarse-tuning voltage of the
// synthesizer, and presets the filter and sample-and-hold to the fine-tuning
// midpoint, so that when the loop starts the VCO sits 0.5, 1.0 and 1.2 MHz
// below and above the selected channel (102.50 MHz, N = 2050). 1.2 MHz is half
// the 2.4 MHz pull-in range measured on the original hardware. It checks
// that the loop still locks within 15 ms and that the average VCO frequency
// over 200 reference periods is then N * 50 kHz (200*N cycles to within 4).
// Hold-in is checked next: from lock at 102.50 MHz the coarse voltage is
// moved in 0.25 MHz steps to 2.0 MHz above and below its proper value, and the
// loop must stay locked at every step (2.0 MHz each way is 4 MHz in all,
// inside the 4.7 MHz hold-in range measured on the original hardware). At a
// 3.5 MHz offset, beyond the fine-tuning swing of the models (about 3 MHz
// each way), the loop must be out of lock, which shows the hold-in range is
// limited by the fine-tuning swing as intended.
// All parameters are at their defaults; the VCO's coarse gain (4 MHz/V) is
// used to turn the frequency offsets into voltages.
module pull_in_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam real KC_MHZ_PER_V = 4.0;
  localparam int  N = 2050;

  logic       rst_n = 1'b0;
  logic       sel_w = 1'b1;
  logic [3:0] sel_x = 4'd0, sel_y = 4'd2, sel_tenths = 4'd5, sel_hundredths = 4'd0;
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

  longint vco_cycles = 0;
  always @(posedge f_out) vco_cycles++;

  task automatic count_window(int nref, output longint cyc);
    longint c0;
    @(posedge f_ref);
    c0 = vco_cycles;
    repeat (nref) @(posedge f_ref);
    cyc = vco_cycles - c0;
  endtask

  // Free-running VCO frequency with the fine input at its midpoint:
  // 98.5 MHz + 4 MHz/V * v_coarse. The channel is 102.50 MHz.
  task automatic acquire(real offset_mhz);
    int good;
    longint cyc;
    realtime t0;
    force dut.v_coarse = (102.5 + offset_mhz - 98.5) / KC_MHZ_PER_V;
    rst_n = 1'b0;
    #5000;
    // start the filter and both capacitors from the fine-tuning midpoint, so
    // that the VCO starts exactly offset_mhz away from the channel
    dut.u_filter.y  = 1.645;
    dut.u_filter.yd = 0.0;
    dut.u_filter.vo = 1.645;
    dut.u_sh.vc1    = 1.645;
    dut.u_sh.vc2    = 1.645;
    rst_n = 1'b1;
    #2;
    check(dut.v_coarse > (102.5 + offset_mhz - 98.5) / KC_MHZ_PER_V - 1.0e-9
          && dut.v_coarse < (102.5 + offset_mhz - 98.5) / KC_MHZ_PER_V + 1.0e-9,
          "coarse voltage overridden");
    $display("INFO v_coarse %f f_vco %f MHz", dut.v_coarse, dut.u_vco.f_mhz);
    t0 = $realtime;
    good = 0;
    while (good < 5 && $realtime - t0 < 15.0e6) begin
      count_window(10, cyc);
      if (cyc >= 10 * N - 4 && cyc <= 10 * N + 4) good++;
      else good = 0;
    end
    check(good == 5, $sformatf("coarse offset %0.1f MHz: lock within 15 ms", offset_mhz));
    $display("INFO coarse offset %0.2f MHz: locked after %0.2f ms", offset_mhz, ($realtime - t0) / 1.0e6);
    #1ms;
    count_window(200, cyc);
    check(cyc >= 200 * N - 4 && cyc <= 200 * N + 4,
          $sformatf("offset %0.1f MHz: %0d cycles in 200 periods, expected %0d", offset_mhz, cyc, 200 * N));
  endtask

  // Move the coarse voltage away from its proper value in small steps while
  // the loop is locked, then jump beyond the fine-tuning swing.
  task automatic hold_in(real sign);
    longint cyc;
    for (int k = 1; k <= 8; k++) begin
      force dut.v_coarse = (102.5 + sign * 0.25 * k - 98.5) / KC_MHZ_PER_V;
      #2ms;
      count_window(50, cyc);
      check(cyc >= 50 * N - 4 && cyc <= 50 * N + 4,
            $sformatf("hold-in at %0.2f MHz coarse offset: %0d cycles in 50 periods", sign * 0.25 * k, cyc));
    end
    $display("INFO held lock with coarse offset %0.2f MHz, fine voltage %0.3f V", sign * 2.0, dut.v_fine);
    force dut.v_coarse = (102.5 + sign * 3.5 - 98.5) / KC_MHZ_PER_V;
    #2ms;
    count_window(50, cyc);
    check(cyc < 50 * N - 4 || cyc > 50 * N + 4,
          $sformatf("out of lock at %0.2f MHz coarse offset: %0d cycles in 50 periods", sign * 3.5, cyc));
    $display("INFO coarse offset %0.2f MHz: %0d cycles in 50 periods against %0d in lock", sign * 3.5, cyc, 50 * N);
  endtask

  initial begin
    #1;
    check(sel_valid, "102.50 MHz valid");
    acquire(-1.2);
    acquire(-1.0);
    acquire(-0.5);
    acquire(0.5);
    acquire(1.0);
    acquire(1.2);
    acquire(0.0);
    hold_in(1.0);
    acquire(0.0);
    hold_in(-1.0);
    release dut.v_coarse;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
