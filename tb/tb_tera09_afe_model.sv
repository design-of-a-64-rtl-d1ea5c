// tb_tera09_afe_model: self-checking test of the behavioural channel front
// end. With the pulse inputs driven by hand it checks the integration step
// I_in * T_clk, the removal and the addition of one charge quantum on the
// pulse edges taken while pulse_sel is high, that edges with pulse_sel low
// leave the integrator alone, the two comparator thresholds, the output
// clamp and the discharge by Reset_A.
module tb_tera09_afe_model;
  logic clk = 1'b0, reset_a = 1'b1, pulse_sel = 1'b0, pulse = 1'b0;
  logic cmp_pos, cmp_neg;
  real  iin_na = 0.0, q_int_fc;
  int checks = 0, failures = 0;

  tera09_afe_model dut (.*);

  always #2 clk = ~clk;

  task automatic check_q(string what, real exp);
    checks++;
    if (q_int_fc > exp + 0.01 || q_int_fc < exp - 0.01) begin
      failures++;
      $display("FAIL %s: q=%f expected %f", what, q_int_fc, exp);
    end
  endtask

  task automatic check_cmp(string what, logic p, logic n);
    checks++;
    if (cmp_pos !== p || cmp_neg !== n) begin
      failures++;
      $display("FAIL %s: cmp_pos=%b cmp_neg=%b expected %b %b", what, cmp_pos, cmp_neg, p, n);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check_q("reset", 0.0);
    reset_a = 1'b0;
    // 1 uA for 4 ns is 4 fC per clock.
    iin_na = 1000.0;
    repeat (24) @(negedge clk);
    check_q("integrate 24 clocks", 96.0);
    check_cmp("below +threshold", 1'b0, 1'b0);
    @(negedge clk);
    check_q("integrate 25 clocks", 100.0);
    check_cmp("at +threshold", 1'b1, 1'b0);
    // Positive sequence: pulse rises while pulse_sel is high.
    iin_na = 0.0;
    pulse_sel = 1'b1; @(negedge clk);
    pulse = 1'b1;     @(negedge clk);
    check_q("quantum removed", -100.0);
    pulse_sel = 1'b0; @(negedge clk);
    check_q("only one quantum removed", -100.0);
    check_cmp("at -threshold", 1'b0, 1'b1);
    pulse = 1'b0;     @(negedge clk);
    @(negedge clk);
    check_q("falling edge to reference", -100.0);
    // Negative sequence: pulse falls while pulse_sel is high.
    pulse = 1'b1;     @(negedge clk);
    pulse_sel = 1'b1; @(negedge clk);
    pulse = 1'b0;     @(negedge clk);
    pulse_sel = 1'b0; @(negedge clk);
    check_q("quantum added", 100.0);
    // Negative current: -2.5 uA, -10 fC per clock, 30 clocks.
    iin_na = -2500.0;
    repeat (30) @(negedge clk);
    check_q("negative integration", -200.0);
    check_cmp("below -threshold", 1'b0, 1'b1);
    // Clamp at the integrator swing.
    iin_na = 100000.0;
    repeat (10) @(negedge clk);
    check_q("clamped", 1000.0);
    // Reset_A.
    reset_a = 1'b1;
    @(negedge clk);
    check_q("Reset_A", 0.0);
    @(negedge clk);
    check_cmp("comparators after Reset_A", 1'b0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
