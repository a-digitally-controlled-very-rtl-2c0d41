// Testbench of freq_select.
//
// Every combination of the five digits (0-15 for the BCD digits, so illegal
// codes are included) is applied. The expected divider ratio is computed here
// from the frequency in units of 10 kHz, f10 = 10000h + 1000t + 100u + 10d + c:
// N = f10 / 5 for a legal channel, which must equal 2000W + 200X + 20Y + Z of
// the outputs; valid must be high exactly for legal BCD digits, c in {0, 5}
// and 98.00 <= f <= 108.95 MHz. The worked example 105.75 MHz -> W=1 X=0
// Y=5 Z=15 is checked on its own.
module freq_select_tb;
  import synth_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic       h;
  logic [3:0] t, u, d, c;
  nsel_t      sel;
  logic       valid;

  int checks = 0, failures = 0;

  freq_select dut (.mhz_hundreds(h), .mhz_tens(t), .mhz_units(u), .tenths(d),
                   .hundredths(c), .sel, .valid);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int f10;
    bit legal;
    h = 1; t = 0; u = 5; d = 7; c = 5;
    #1;
    check(sel.w == 1 && sel.x == 0 && sel.y == 5 && sel.z == 15 && valid, "105.75 MHz example");
    check(n_of(sel) == 2115, "105.75 MHz gives N = 2115");
    for (int ih = 0; ih < 2; ih++)
      for (int it = 0; it < 16; it++)
        for (int iu = 0; iu < 16; iu++)
          for (int id = 0; id < 16; id++)
            for (int ic = 0; ic < 16; ic++) begin
              h = 1'(ih); t = 4'(it); u = 4'(iu); d = 4'(id); c = 4'(ic);
              #1;
              f10 = 10000 * ih + 1000 * it + 100 * iu + 10 * id + ic;
              legal = it <= 9 && iu <= 9 && id <= 9 && (ic == 0 || ic == 5)
                      && f10 >= 9800 && f10 <= 10895;
              check(valid == legal, $sformatf("valid for %0d", f10));
              if (legal) check(n_of(sel) == f10 / 5, $sformatf("N for %0d", f10));
            end
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
