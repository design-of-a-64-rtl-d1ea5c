// tb_tera09_ws_register: self-checking test of a readout register with its
// warning signal. Loads random words and checks the register value, that the
// warning rises exactly on a load that takes the MSB from 0 to 1, that it then
// stays high, and that Reset_D clears both.
module tb_tera09_ws_register;
  localparam int W = 34;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [W-1:0] d = '0, q;
  logic ws;
  logic [W-1:0] ref_q = '0;
  logic ref_ws = 1'b0;
  int checks = 0, failures = 0;
  int n_ws_events = 0;

  tera09_ws_register #(.W(W)) dut (.*);

  always #2 clk = ~clk;

  task automatic check(string what);
    checks++;
    if (q !== ref_q || ws !== ref_ws) begin
      failures++;
      $display("FAIL %s: got q=%h ws=%b expected q=%h ws=%b", what, q, ws, ref_q, ref_ws);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check("after reset");
    repeat (20) begin
      // Several rounds: random loads until the warning has been seen, then
      // clear with Reset_D.
      repeat (40) begin
        load = ($urandom % 2) == 1;
        d = W'({$urandom, $urandom});
        if (($urandom % 4) != 0) d[W-1] = 1'b0;
        @(negedge clk);
        if (load) begin
          if (!ref_q[W-1] && d[W-1] && !ref_ws) n_ws_events++;
          if (!ref_q[W-1] && d[W-1]) ref_ws = 1'b1;
          ref_q = d;
        end
        check("load");
      end
      #1 rst_n = 1'b0;
      #0.5 ref_q = '0; ref_ws = 1'b0;
      check("reset");
      @(negedge clk) rst_n = 1'b1;
    end
    checks++;
    if (n_ws_events == 0) begin failures++; $display("FAIL warning never raised"); end
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
