// tb_tera09_updown_counter: self-checking test of the 32-bit up/down
// counter. Random up/down strobes against an integer reference, wrap-around
// below zero, hold when both strobes are high, and the asynchronous Reset_D.
module tb_tera09_updown_counter;
  logic clk = 1'b0, rst_n = 1'b0, up = 1'b0, dn = 1'b0;
  logic [31:0] cnt;
  logic [31:0] ref_cnt = '0;
  int checks = 0, failures = 0;

  tera09_updown_counter #(.W(32)) dut (.*);

  always #2 clk = ~clk;

  task automatic check(string what);
    checks++;
    if (cnt !== ref_cnt) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, cnt, ref_cnt);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check("after reset");
    // Count down from zero: wraps to all ones.
    dn = 1'b1;
    @(negedge clk);
    ref_cnt = 32'hFFFF_FFFF;
    check("wrap below zero");
    dn = 1'b0;
    repeat (5000) begin
      up = 1'($urandom % 2);
      dn = 1'($urandom % 2);
      @(negedge clk);
      if (up && !dn) ref_cnt = ref_cnt + 1;
      if (dn && !up) ref_cnt = ref_cnt - 1;
      check("random");
    end
    up = 1'b1; dn = 1'b0;
    repeat (50) @(negedge clk);
    ref_cnt = ref_cnt + 50;
    check("run of increments");
    // Asynchronous reset, between clock edges.
    #1 rst_n = 1'b0;
    #0.5 ref_cnt = '0;
    check("asynchronous reset");
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
