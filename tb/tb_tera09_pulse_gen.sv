// tb_tera09_pulse_gen: self-checking test of the channel pulse generator.
// Drives the comparator inputs with held and random levels and compares the
// pulse_sel/pulse/count outputs every clock against a phase-counter reference
// of the two charge-subtraction sequences. Also checks that a held comparator
// gives exactly one count per 4 clocks (the f_clk/4 maximum rate).
module tb_tera09_pulse_gen;
  logic clk = 1'b0, rst_n = 1'b0, cmp_pos = 1'b0, cmp_neg = 1'b0;
  logic pulse_sel, pulse, cnt_up, cnt_dn;
  int checks = 0, failures = 0;

  tera09_pulse_gen dut (.*);

  always #2 clk = ~clk;

  // Reference: phase 0 is idle, phases 1..3 a sequence in direction dir.
  int   ph  = 0;
  logic dir = 1'b0;
  logic e_sel, e_pulse, e_up, e_dn;

  always_comb begin
    e_sel = 0; e_pulse = 0; e_up = 0; e_dn = 0;
    if (ph == 1) begin e_sel = dir;  e_pulse = !dir; end
    if (ph == 2) begin e_sel = 1;    e_pulse = 1; e_up = dir; e_dn = !dir; end
    if (ph == 3) begin e_sel = !dir; e_pulse = dir; end
  end

  always @(posedge clk) if (rst_n) begin
    if (ph == 0) begin
      if (cmp_pos)      begin ph <= 1; dir <= 1'b1; end
      else if (cmp_neg) begin ph <= 1; dir <= 1'b0; end
    end else begin
      ph <= (ph + 1) % 4;
    end
  end

  int n_up = 0, n_dn = 0;
  always @(negedge clk) if (rst_n) begin
    checks++;
    if ({pulse_sel, pulse, cnt_up, cnt_dn} !== {e_sel, e_pulse, e_up, e_dn}) begin
      failures++;
      $display("FAIL t=%0t ph=%0d dir=%b got sel=%b p=%b up=%b dn=%b exp %b%b%b%b",
               $time, ph, dir, pulse_sel, pulse, cnt_up, cnt_dn, e_sel, e_pulse, e_up, e_dn);
    end
    n_up += int'(cnt_up);
    n_dn += int'(cnt_dn);
  end

  task automatic check_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Held positive comparator: one increment per 4 clocks.
    cmp_pos = 1'b1;
    n_up = 0;
    repeat (400) @(negedge clk);
    check_eq("max rate up", n_up, 100);
    cmp_pos = 1'b0;
    repeat (8) @(negedge clk);
    // Held negative comparator.
    cmp_neg = 1'b1;
    n_dn = 0; n_up = 0;
    repeat (400) @(negedge clk);
    check_eq("max rate down", n_dn, 100);
    check_eq("no up while negative", n_up, 0);
    cmp_neg = 1'b0;
    // Random comparator levels.
    repeat (3000) begin
      @(negedge clk);
      cmp_pos = ($urandom % 3) == 0;
      cmp_neg = ($urandom % 3) == 0;
    end
    // Asynchronous reset in the middle of a sequence.
    cmp_pos = 1'b1; cmp_neg = 1'b0;
    repeat (2) @(negedge clk);
    #1 rst_n = 1'b0;
    #0.5;
    checks++;
    if (pulse_sel || pulse || cnt_up || cnt_dn) begin
      failures++; $display("FAIL outputs not idle during reset");
    end
    ph = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
