// Channel sweep of the digital half of the synthesizer: frequency select
// feeding the variable divider, for every 50 kHz channel from 98.00 to
// 108.95 MHz (220 settings, of which the 200 from 98.00 to 107.95 MHz are the
// navigation-band local-oscillator channels).
//
// For each channel the testbench dials the digits, waits two divider outputs
// and measures two periods of the divider output in VCO clocks. Each must
// equal N = F / 50 kHz, computed here from the frequency in units of 10 kHz.
// It also checks that frequencies just outside the band are flagged invalid.
module channel_sweep_tb;
  import synth_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       h;
  logic [3:0] t, u, d, c;
  nsel_t      sel;
  logic       valid, div_out;

  int checks = 0, failures = 0;

  freq_select u_sel (.mhz_hundreds(h), .mhz_tens(t), .mhz_units(u), .tenths(d),
                     .hundredths(c), .sel, .valid);
  variable_divider u_div (.clk, .rst_n, .sel, .div_out);

  always #5 clk = !clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic dial(int f10);
    h = 1'(f10 / 10000);
    t = 4'((f10 / 1000) % 10);
    u = 4'((f10 / 100) % 10);
    d = 4'((f10 / 10) % 10);
    c = 4'(f10 % 10);
  endtask

  task automatic next_pulse(output int n);
    n = 0;
    do begin
      @(negedge clk);
      n++;
    end while (!div_out);
  endtask

  initial begin
    int n, channels;
    channels = 0;
    dial(9800);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f10 = 9800; f10 <= 10895; f10 += 5) begin
      dial(f10);
      #1;
      check(valid, $sformatf("%0d valid", f10));
      next_pulse(n);
      next_pulse(n);
      repeat (2) begin
        next_pulse(n);
        check(n == f10 / 5, $sformatf("%0d.%02d MHz: period %0d expected %0d",
                                      f10 / 100, f10 % 100, n, f10 / 5));
      end
      channels++;
    end
    check(channels == 220, "all channels visited");
    dial(9795);  #1; check(!valid, "97.95 MHz flagged invalid");
    dial(10900); #1; check(!valid, "109.00 MHz flagged invalid");
    dial(10052); #1; check(!valid, "hundredths digit 2 flagged invalid");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
