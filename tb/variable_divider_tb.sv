// Testbench of variable_divider.
//
// For the two worked examples of the design (N = 1971 for 98.55 MHz and
// N = 2115 for 105.75 MHz), the band edges 1960 and 2160 and a set of random
// settings inside the band, the testbench sets W, X, Y, Z, lets two output
// pulses pass (a new setting takes effect at the next cycle), and then measures
// the number of input cycles between successive output pulses, which must equal
// 2000W + 200X + 20Y + Z as computed here from the digits. It also checks that
// each output pulse is one cycle wide.
module variable_divider_tb;
  import synth_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  nsel_t sel;
  logic  div_out;

  int checks = 0, failures = 0;

  variable_divider dut (.*);

  always #5 clk = !clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // cycles from now to the next output pulse (sampled at negedge)
  task automatic next_pulse(output int n);
    n = 0;
    do begin
      @(negedge clk);
      n++;
    end while (!div_out);
  endtask

  task automatic try_n(int w, int x, int y, int z);
    int n, expect_n;
    expect_n = 2000 * w + 200 * x + 20 * y + z;
    sel = '{w: 1'(w), x: 4'(x), y: 4'(y), z: 5'(z)};
    next_pulse(n);
    next_pulse(n);
    for (int k = 0; k < 3; k++) begin
      next_pulse(n);
      check(n == expect_n, $sformatf("W=%0d X=%0d Y=%0d Z=%0d: period %0d expected %0d",
                                     w, x, y, z, n, expect_n));
      @(negedge clk);
      check(!div_out, "output one cycle wide");
      next_pulse(n);
      check(n + 1 == expect_n, "period after width check");
    end
  endtask

  initial begin
    int nn;
    sel = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    try_n(0, 9, 8, 11);   // 98.55 MHz, N = 1971
    try_n(1, 0, 5, 15);   // 105.75 MHz, N = 2115
    try_n(0, 9, 8, 0);    // 98.00 MHz, N = 1960
    try_n(1, 0, 8, 0);    // 108.00 MHz, N = 2160
    try_n(1, 0, 8, 19);   // 108.95 MHz, N = 2179
    for (int i = 0; i < 25; i++) begin
      nn = $urandom_range(N_MIN, N_MAX);
      try_n(nn / 2000, (nn % 2000) / 200, (nn % 200) / 20, nn % 20);
    end
    try_n(0, 1, 3, 7);    // small N = 267, outside the band
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
