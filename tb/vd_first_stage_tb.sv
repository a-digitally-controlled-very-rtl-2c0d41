// Testbench of vd_first_stage, the first divider stage with its control.
//
// The testbench plays the part of stages 2-4: it counts P stage-2 pulses per
// divider cycle and then pulses cycle_end one clock later. For each Z it checks
// that every interval between stage-2 pulses is 19 or 20 input cycles, that
// exactly 20 - Z of them per divider cycle are 19, that the inhibit is high
// from then until the cycle ends, and that a divider cycle lasts
// 20P - (20 - Z) input cycles.
module vd_first_stage_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int MOD = 20;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [4:0] z;
  logic       cycle_end;
  logic       stage2_en, inhibit, short_interval;

  int checks = 0, failures = 0;

  vd_first_stage #(.MOD(MOD)) dut (.*);

  always #5 clk = !clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Runs NCYC divider cycles of P stage-2 pulses each with the given Z.
  task automatic run(int zz, int p, int ncyc);
    int pulses, since, shorts, cyc_len, cyc;
    z = 5'(zz);
    pulses = 0; since = 0; shorts = 0; cyc_len = 0; cyc = 0;
    cycle_end = 1'b0;
    // align: wait for a pulse while inhibited, then end the cycle there
    @(negedge clk);
    while (!(stage2_en && inhibit)) @(negedge clk);
    @(negedge clk);
    cycle_end = 1'b1;
    @(negedge clk);
    cycle_end = 1'b0;
    since = 2; cyc_len = 2;
    while (cyc < ncyc) begin
      if (stage2_en) begin
        pulses++;
        check(since == MOD || since == MOD - 1, $sformatf("z=%0d interval %0d", zz, since));
        if (since == MOD - 1) shorts++;
        since = 0;
        if (pulses == p) begin
          check(shorts == MOD - zz, $sformatf("z=%0d short intervals %0d", zz, shorts));
          check(cyc_len == 20 * p - (MOD - zz), $sformatf("z=%0d cycle %0d", zz, cyc_len));
          check(inhibit, "inhibit high at end of cycle");
          @(negedge clk);
          cycle_end = 1'b1;
          since++; cyc_len = 1;
          @(negedge clk);
          cycle_end = 1'b0;
          since++; cyc_len++;
          check(!inhibit, "inhibit removed after cycle end");
          pulses = 0; shorts = 0; cyc++;
        end
      end
      since++; cyc_len++;
      @(negedge clk);
    end
  endtask

  initial begin
    z = '0;
    cycle_end = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int zz = 0; zz < MOD; zz++) run(zz, 99, 3);
    run(15, 106, 2);
    run(0, 21, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
