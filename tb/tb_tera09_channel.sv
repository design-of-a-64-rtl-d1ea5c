// tb_tera09_channel: self-checking test of one converter channel (front-end
// model, pulse generator and counter). For constant input currents of both
// polarities it compares the counter change over a window with the ideal
// count I_in * t / Q_c (within 2 counts, the charge left in the integrator),
// checks that above the saturation current the channel counts exactly once
// per 4 clocks, that Reset_A stops the conversion and that Reset_D zeroes the
// counter.
module tb_tera09_channel;
  logic clk = 1'b0, rst_n = 1'b0, reset_a = 1'b1;
  real  iin_na = 0.0, q_int_fc;
  logic [31:0] cnt;
  int checks = 0, failures = 0;

  tera09_channel dut (.*);

  always #2 clk = ~clk;

  task automatic check_near(string what, int got, int exp, int tol);
    checks++;
    if (got > exp + tol || got < exp - tol) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d +- %0d", what, got, exp, tol);
    end else
      $display("ok   %s: %0d (ideal %0d)", what, got, exp);
  endtask

  // Counter change over n clocks at a current of i_na.
  task automatic measure(real i_na, int n, output int delta);
    int c0;
    iin_na = i_na;
    repeat (20) @(negedge clk);
    c0 = int'(cnt);
    repeat (n) @(negedge clk);
    delta = int'(cnt) - c0;
  endtask

  initial begin
    int d;
    repeat (3) @(negedge clk);
    rst_n = 1'b1; reset_a = 1'b0;
    // Ideal count: I[nA] * n * 4 ns * 1e-3 fC / 200 fC.
    measure(1000.0, 10000, d);   check_near("+1 uA", d, 200, 2);
    measure(-500.0, 10000, d);   check_near("-0.5 uA", d, -100, 2);
    measure(10.0, 100000, d);    check_near("+10 nA", d, 20, 2);
    measure(-12000.0, 10000, d); check_near("-12 uA", d, -2400, 2);
    measure(12000.0, 10000, d);  check_near("+12 uA", d, 2400, 2);
    // Above the saturation current Q_c * f_clk / 4 = 12.5 uA.
    measure(20000.0, 10000, d);  check_near("+20 uA saturated", d, 2500, 1);
    measure(-50000.0, 10000, d); check_near("-50 uA saturated", d, -2500, 1);
    // Reset_A holds the integrator empty: no counts.
    iin_na = 1000.0;
    reset_a = 1'b1;
    measure(1000.0, 2000, d);    check_near("Reset_A held", d, 0, 0);
    reset_a = 1'b0;
    // Reset_D zeroes the counter asynchronously.
    #1 rst_n = 1'b0;
    #0.5 check_near("Reset_D", int'(cnt), 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
