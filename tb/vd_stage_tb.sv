// Testbench of vd_stage, one slower divider stage with its comparator.
//
// Three instances are checked against a model kept in the testbench: the
// second-stage configuration (modulus 10, reloaded to 9), the third (10, 0)
// and the fourth (2, 0). Random count pulses, clears and compare digits are
// applied; count, carry and match are compared every clock. The model treats
// the reload value 9 as the count "-1": the step from it to 0 gives no carry
// and the comparator does not fire on it.
module vd_stage_tb;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en, clear;
  logic [3:0] sel10a, sel10b;
  logic       sel2;
  logic [3:0] cnt_a, cnt_b;
  logic       cnt_c;
  logic       carry_a, carry_b, carry_c, match_a, match_b, match_c;

  int checks = 0, failures = 0;

  vd_stage #(.MOD(10), .RESET_VAL(9)) u_a (.clk, .rst_n, .en, .clear, .sel(sel10a),
    .count(cnt_a), .carry(carry_a), .match(match_a));
  vd_stage #(.MOD(10), .RESET_VAL(0)) u_b (.clk, .rst_n, .en, .clear, .sel(sel10b),
    .count(cnt_b), .carry(carry_b), .match(match_b));
  vd_stage #(.MOD(2), .RESET_VAL(0)) u_c (.clk, .rst_n, .en, .clear, .sel(sel2),
    .count(cnt_c), .carry(carry_c), .match(match_c));

  always #5 clk = !clk;

  // model state: a is kept as -1..9, b as 0..9, c as 0..1
  int ma, mb, mc;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    en = 0; clear = 0; sel10a = 0; sel10b = 0; sel2 = 0;
    ma = -1; mb = 0; mc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      en     = ($urandom_range(0, 2) != 0);
      clear  = ($urandom_range(0, 40) == 0);
      sel10a = 4'($urandom_range(0, 9));
      sel10b = 4'($urandom_range(0, 9));
      sel2   = 1'($urandom_range(0, 1));
      #1;
      check(cnt_a == 4'((ma < 0) ? 9 : ma), $sformatf("stage a count %0d model %0d", cnt_a, ma));
      check(cnt_b == 4'(mb) && cnt_c == 1'(mc), "stage b/c count");
      check(carry_a == (en && ma == 9), "stage a carry");
      check(carry_b == (en && mb == 9), "stage b carry");
      check(carry_c == (en && mc == 1), "stage c carry");
      check(match_a == (ma >= 0 && 4'(ma) == sel10a), "stage a match");
      check(match_b == (4'(mb) == sel10b), "stage b match");
      check(match_c == (1'(mc) == sel2), "stage c match");
      @(negedge clk);
      if (clear) begin
        ma = -1; mb = 0; mc = 0;
      end else if (en) begin
        ma = (ma == 9) ? 0 : ma + 1;
        mb = (mb + 1) % 10;
        mc = (mc + 1) % 2;
      end
    end
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
