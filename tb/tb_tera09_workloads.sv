// tb_tera09_workloads: the measurement set-ups of the chip's characterization,
// run on the full 64-channel design at 250 MHz and Q_c = 200 fC, each over an
// 80 us window (20000 clocks) and checked against I * t / Q_c:
//   1. transfer curve: the 64 channels get currents spaced logarithmically
//      from 10 nA to 12 uA, half of them negative; each must be within
//      3 counts of ideal (linear region up to the +-12.5 uA saturation);
//   2. all 64 inputs in parallel on one 700 uA source: the sum of 64 must be
//      within 64 counts (0.1 %) of ideal;
//   3. gain uniformity: 1 uA into every channel, each within 3 counts;
//   4. a 10 uA source shared equally by the 64 channels, read as the sum.
// Reset_D clears the chip between set-ups.
module tb_tera09_workloads;
  import tera09_pkg::*;
  logic clk = 1'b0, reset_d_n = 1'b0, reset_a = 1'b1, latch = 1'b0;
  real  iin_na [NCH];
  logic [ADDR_W-1:0] addr = '0;
  logic [OUT_W-1:0]  dout;
  logic              ws_any;
  logic [NREG-1:0]   ws;
  int checks = 0, failures = 0;

  localparam int WINDOW = 20000;

  tera09 dut (.*);

  always #2 clk = ~clk;

  function automatic longint sx(logic [63:0] v, int w);
    return longint'(v << (64 - w)) >>> (64 - w);
  endfunction


  task automatic check(string what, longint got, real exp, real tol);
    checks++;
    if (real'(got) > exp + tol || real'(got) < exp - tol) begin
      failures++;
      $display("FAIL %s: %0d vs ideal %.1f", what, got, exp);
    end
  endtask

  // Read register r through the multiplexer and compare with exp.
  task automatic check_reg(string what, int r, real exp, real tol);
    addr = ADDR_W'(r);
    #0.1;
    check(what, sx(64'(dout), OUT_W), exp, tol);
  endtask

  // Clear, convert for WINDOW clocks, take a snapshot; returns the number of
  // clocks between the end of Reset_A and the latch sampling edge.
  task automatic run_window(output int n);
    @(negedge clk) reset_d_n = 1'b0; reset_a = 1'b1;
    @(negedge clk) reset_d_n = 1'b1;
    @(negedge clk) reset_a = 1'b0;
    repeat (WINDOW) @(negedge clk);
    latch = 1'b1;
    n = WINDOW + 2;
    repeat (8) @(negedge clk);
    latch = 1'b0;
  endtask

  // Ideal count for a current in nA over n clocks of 4 ns.
  function automatic real ideal(real i_na, int n);
    return i_na * real'(n) * 4.0e-3 / 200.0;
  endfunction

  initial begin
    int n;
    real total;
    repeat (3) @(negedge clk);

    // 1. Transfer curve.
    for (int c = 0; c < NCH; c++) begin
      iin_na[c] = 10.0 * (1200.0 ** (real'(c / 2) / 31.0));
      if (c % 2 == 1) iin_na[c] = -iin_na[c];
    end
    run_window(n);
    for (int c = 0; c < NCH; c++)
      check_reg($sformatf("transfer curve, channel %0d at %.1f nA", c, iin_na[c]), c, ideal(iin_na[c], n), 3.0);

    // 2. 700 uA shared by all 64 channels.
    for (int c = 0; c < NCH; c++) iin_na[c] = 700000.0 / 64.0;
    run_window(n);
    total = ideal(700000.0, n);
    check_reg("700 uA over 64 channels, sum of 64", BASE_S64, total, 64.0);
    for (int g = 0; g < 4; g++)
      check_reg($sformatf("700 uA, sum of 16 #%0d", g), BASE_S16 + g, total / 4.0, 16.0);

    // 3. 1 uA into every channel.
    for (int c = 0; c < NCH; c++) iin_na[c] = 1000.0;
    run_window(n);
    for (int c = 0; c < NCH; c++)
      check_reg($sformatf("1 uA, channel %0d", c), c, ideal(1000.0, n), 3.0);

    // 4. 10 uA shared by the 64 channels.
    for (int c = 0; c < NCH; c++) iin_na[c] = 10000.0 / 64.0;
    run_window(n);
    check_reg("10 uA over 64 channels, sum of 64", BASE_S64, ideal(10000.0, n), 64.0);
    for (int c = 0; c < NCH; c++)
      check_reg($sformatf("10 uA / 64, channel %0d", c), c, ideal(10000.0 / 64.0, n), 3.0);

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
