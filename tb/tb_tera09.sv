// tb_tera09: end-to-end test of the whole 64-channel converter at its default
// parameters (250 MHz clock, 200 fC charge quantum).
//
// Each channel gets its own constant current: four channels tied to one
// 40 uA source (range extension through the sum of 4), two channels driven
// past saturation (+-20 uA), 16 channels at 1 uA, and the rest spread over
// -10..+10 uA. With Reset_A held the chip must count nothing. Then it
// converts for a window, the latch takes a snapshot and all 85 registers are
// read through the multiplexer. Every channel must match I * t / Q_c within a
// few counts, saturated channels must show f_clk/4, every sum register must
// equal the sum of its channels, and channels with negative counts must raise
// their warnings. A second snapshot, taken while the channels keep counting,
// must continue the first without lost counts; Reset_D must clear everything.
// Each of these mechanisms is counted and must occur at least once.
module tb_tera09;
  import tera09_pkg::*;
  logic clk = 1'b0, reset_d_n = 1'b0, reset_a = 1'b1, latch = 1'b0;
  real  iin_na [NCH];
  logic [ADDR_W-1:0] addr = '0;
  logic [OUT_W-1:0]  dout;
  logic              ws_any;
  logic [NREG-1:0]   ws;
  int checks = 0, failures = 0;

  tera09 dut (.*);

  always #2 clk = ~clk;

  // Mechanism counters.
  int n_count_up = 0, n_count_dn = 0, n_saturated = 0, n_range_ext = 0;
  int n_warning = 0, n_reset_a = 0, n_reset_d = 0, n_snapshot = 0, n_sums = 0;

  function automatic longint sx(logic [63:0] v, int w);
    return longint'(v << (64 - w)) >>> (64 - w);
  endfunction

  longint rd [NREG];

  task automatic read_all();
    for (int r = 0; r < NREG; r++) begin
      @(negedge clk) addr = ADDR_W'(r);
      #0.1 rd[r] = sx(64'(dout), OUT_W);
    end
  endtask

  task automatic take_snapshot();
    @(negedge clk) latch = 1'b1;
    repeat (8) @(negedge clk);
    latch = 1'b0;
  endtask

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Ideal count of a channel after n clocks: I[nA] * n * 4 ns / 200 fC,
  // limited to one count per 4 clocks.
  function automatic longint ideal(real i_na, longint n);
    real c;
    c = i_na * real'(n) * 4.0e-3 / 200.0;
    if (c >  real'(n) / 4.0) c =  real'(n) / 4.0;
    if (c < -real'(n) / 4.0) c = -real'(n) / 4.0;
    return longint'(c);
  endfunction

  task automatic check_snapshot(longint n, string tag);
    longint s;
    read_all();
    for (int c = 0; c < NCH; c++) begin
      longint e;
      e = ideal(iin_na[c], n);
      check($sformatf("%s channel %0d: %0d vs ideal %0d", tag, c, rd[c], e),
            rd[c] <= e + 3 && rd[c] >= e - 3);
      if (rd[c] > 0) n_count_up++;
      if (rd[c] < 0) n_count_dn++;
    end
    check($sformatf("%s saturated + %0d vs %0d", tag, rd[4], n / 4), rd[4] <= n / 4 + 1 && rd[4] >= n / 4 - 1);
    check($sformatf("%s saturated - %0d vs %0d", tag, rd[5], -n / 4), rd[5] >= -n / 4 - 1 && rd[5] <= -n / 4 + 1);
    if (rd[4] >= n / 4 - 1 && rd[5] <= -n / 4 + 1) n_saturated++;
    for (int g = 0; g < 16; g++) begin
      s = 0; for (int k = 0; k < 4; k++) s += rd[4*g+k];
      check($sformatf("%s sum of 4 #%0d", tag, g), rd[BASE_S4+g] == s);
      n_sums++;
    end
    for (int g = 0; g < 4; g++) begin
      s = 0; for (int k = 0; k < 16; k++) s += rd[16*g+k];
      check($sformatf("%s sum of 16 #%0d", tag, g), rd[BASE_S16+g] == s);
      n_sums++;
    end
    s = 0; for (int k = 0; k < 64; k++) s += rd[k];
    check($sformatf("%s sum of 64", tag), rd[BASE_S64] == s);
    // Range extension: 40 uA over channels 0..3, read as their sum.
    s = 4 * ideal(10000.0, n);
    check($sformatf("%s 40 uA source: %0d vs %0d", tag, rd[BASE_S4], s),
          rd[BASE_S4] <= s + 8 && rd[BASE_S4] >= s - 8);
    if (rd[BASE_S4] > 0 && rd[BASE_S4] > rd[0] + rd[1]) n_range_ext++;
    // Warnings: a register whose value is negative has had its MSB go 0 -> 1.
    for (int r = 0; r < NREG; r++) begin
      if (rd[r] < 0) begin
        check($sformatf("%s warning of register %0d", tag, r), ws[r]);
        n_warning++;
      end
    end
    check($sformatf("%s warning OR", tag), ws_any == (|ws));
  endtask

  initial begin
    longint t0, t1, t2;
    longint first [NCH];
    for (int c = 0; c < NCH; c++) begin
      if (c < 4)            iin_na[c] = 10000.0;          // 40 uA shared by 4
      else if (c == 4)      iin_na[c] = 20000.0;          // saturated
      else if (c == 5)      iin_na[c] = -20000.0;         // saturated
      else if (c >= 16 && c < 32) iin_na[c] = 1000.0;     // 1 uA each
      else                  iin_na[c] = -10000.0 + 20000.0 * real'((c * 37) % 64) / 63.0;
    end
    repeat (3) @(negedge clk);
    reset_d_n = 1'b1;
    // Reset_A held: currents flow but nothing is converted.
    repeat (2000) @(negedge clk);
    take_snapshot();
    read_all();
    begin
      automatic bit all_zero = 1'b1;
      for (int r = 0; r < NREG; r++) if (rd[r] != 0) all_zero = 1'b0;
      check("no counts while Reset_A is held", all_zero);
      if (all_zero) n_reset_a++;
    end
    // Convert.
    @(negedge clk) reset_a = 1'b0;
    t0 = longint'($time / 4);
    repeat (20000) @(negedge clk);
    @(negedge clk) latch = 1'b1;
    t1 = longint'($time / 4) + 2;   // the synchronizer samples the latch 2 clocks later
    repeat (8) @(negedge clk);
    latch = 1'b0;
    check_snapshot(t1 - t0, "snapshot 1");
    for (int c = 0; c < NCH; c++) first[c] = rd[c];
    // Second snapshot: conversion went on without a break.
    repeat (6000) @(negedge clk);
    @(negedge clk) latch = 1'b1;
    t2 = longint'($time / 4) + 2;
    repeat (8) @(negedge clk);
    latch = 1'b0;
    check_snapshot(t2 - t0, "snapshot 2");
    begin
      automatic bit cont = 1'b1;
      for (int c = 0; c < NCH; c++) begin
        longint e;
        e = ideal(iin_na[c], t2 - t1);
        if (rd[c] - first[c] > e + 3 || rd[c] - first[c] < e - 3) cont = 1'b0;
      end
      check("counts between snapshots", cont);
      if (cont) n_snapshot++;
    end
    // Reset_D clears counters, registers and warnings.
    #1 reset_d_n = 1'b0;
    #1 reset_d_n = 1'b1;
    reset_a = 1'b1;
    read_all();
    begin
      automatic bit all_zero = 1'b1;
      for (int r = 0; r < NREG; r++) if (rd[r] != 0) all_zero = 1'b0;
      check("Reset_D clears the registers", all_zero && !ws_any && ws == '0);
      if (all_zero && !ws_any) n_reset_d++;
    end
    $display("mechanisms: up=%0d down=%0d saturated=%0d range_ext=%0d sums=%0d warnings=%0d reset_a=%0d reset_d=%0d snapshots=%0d",
             n_count_up, n_count_dn, n_saturated, n_range_ext, n_sums, n_warning, n_reset_a, n_reset_d, n_snapshot);
    check("up counting happened", n_count_up > 0);
    check("down counting happened", n_count_dn > 0);
    check("saturation happened", n_saturated > 0);
    check("range extension happened", n_range_ext > 0);
    check("sums checked", n_sums > 0);
    check("warning happened", n_warning > 0);
    check("Reset_A happened", n_reset_a > 0);
    check("Reset_D happened", n_reset_d > 0);
    check("repeated snapshot happened", n_snapshot > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
