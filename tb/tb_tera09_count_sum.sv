// tb_tera09_count_sum: self-checking test of the pulse count and sum logic.
// Drives the 64 counter values directly, pulses the asynchronous latch and
// reads all 85 registers through the multiplexer, comparing with channel
// values and group sums computed here. It checks the latch-to-data latency
// (channel registers 3 clocks, sum of 64 six clocks after the latch is first
// sampled), that counters changing after the latch do not disturb the
// snapshot, the warning signals and their OR across snapshots, and Reset_D.
module tb_tera09_count_sum;
  import tera09_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, latch = 1'b0;
  logic [NCH-1:0][CNT_W-1:0] cnt;
  logic [ADDR_W-1:0]         addr = '0;
  logic [OUT_W-1:0]          dout;
  logic                      ws_any;
  logic [NREG-1:0]           ws;
  int checks = 0, failures = 0;

  tera09_count_sum dut (.*);

  always #2 clk = ~clk;

  // Expected register contents (sign-extended to 64 bits) and warnings.
  longint exp_reg [NREG];
  logic   exp_msb [NREG];
  logic [NREG-1:0] exp_ws;
  int     reg_w   [NREG];

  function automatic longint sx(logic [63:0] v, int w);
    return longint'(v << (64 - w)) >>> (64 - w);
  endfunction

  // Work out the registers for a snapshot of the counters.
  task automatic expect_snapshot(logic [NCH-1:0][CNT_W-1:0] c);
    longint v [NREG];
    for (int i = 0; i < NCH; i++) v[i] = sx(64'(c[i]), CNT_W);
    for (int g = 0; g < 16; g++) begin
      v[64+g] = 0;
      for (int k = 0; k < 4; k++) v[64+g] += v[4*g+k];
    end
    for (int g = 0; g < 4; g++) begin
      v[80+g] = 0;
      for (int k = 0; k < 16; k++) v[80+g] += v[16*g+k];
    end
    v[84] = 0;
    for (int k = 0; k < 64; k++) v[84] += v[k];
    for (int r = 0; r < NREG; r++) begin
      logic msb;
      msb = v[r] < 0;
      if (!exp_msb[r] && msb) exp_ws[r] = 1'b1;
      exp_msb[r] = msb;
      exp_reg[r] = v[r];
    end
  endtask

  task automatic read_all(string what);
    for (int r = 0; r < NREG; r++) begin
      addr = ADDR_W'(r);
      #0.1;
      checks++;
      if (sx(64'(dout), OUT_W) != exp_reg[r]) begin
        failures++;
        $display("FAIL %s: register %0d = %0d expected %0d", what, r, sx(64'(dout), OUT_W), exp_reg[r]);
      end
    end
    checks++;
    if (ws !== exp_ws || ws_any !== |exp_ws) begin
      failures++;
      $display("FAIL %s: ws=%h ws_any=%b expected %h", what, ws, ws_any, exp_ws);
    end
  endtask

  task automatic do_latch();
    @(negedge clk) latch = 1'b1;
    repeat (8) @(negedge clk);
    latch = 1'b0;
    @(negedge clk);
  endtask

  int n_ws_raised = 0;

  initial begin
    logic [NCH-1:0][CNT_W-1:0] snap;
    for (int r = 0; r < NREG; r++) begin exp_reg[r] = 0; exp_msb[r] = 0; end
    exp_ws = '0;
    for (int i = 0; i < NCH; i++) cnt[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    read_all("after reset");

    // Snapshot 1: positive counts, some near the top of the 32-bit range.
    for (int i = 0; i < NCH; i++) cnt[i] = (i % 7 == 0) ? 32'h7FFF_F000 + i : $urandom % 100000;
    snap = cnt;
    // Latency: the latch is sampled at the next rising edge.
    addr = ADDR_W'(BASE_S64);
    @(negedge clk) latch = 1'b1;
    repeat (2) @(negedge clk);
    checks++;
    if (sx(64'(dout), OUT_W) != 0) begin failures++; $display("FAIL sum of 64 too early"); end
    addr = ADDR_W'(0);
    @(negedge clk);
    #0.1 checks++;
    if (dout[CNT_W-1:0] !== snap[0]) begin failures++; $display("FAIL channel register not loaded after 3 clocks"); end
    addr = ADDR_W'(BASE_S64);
    // Counters move on while the sums are formed.
    for (int i = 0; i < NCH; i++) cnt[i] = cnt[i] + 5;
    repeat (2) @(negedge clk);
    #0.1 checks++;
    if (sx(64'(dout), OUT_W) != 0) begin failures++; $display("FAIL sum of 64 loaded before 6 clocks"); end
    @(negedge clk);
    expect_snapshot(snap);
    #0.1 checks++;
    if (sx(64'(dout), OUT_W) != exp_reg[BASE_S64]) begin
      failures++; $display("FAIL sum of 64 not loaded after 6 clocks: %0d vs %0d", sx(64'(dout), OUT_W), exp_reg[BASE_S64]);
    end
    latch = 1'b0;
    repeat (2) @(negedge clk);
    read_all("snapshot 1");

    // Snapshots with negative counts: MSBs switch from 0 to 1.
    for (int s = 0; s < 6; s++) begin
      for (int i = 0; i < NCH; i++) begin
        case ($urandom % 4)
          0: cnt[i] = -($urandom % 50000);
          1: cnt[i] = $urandom % 50000;
          2: cnt[i] = 32'h8000_0000 + ($urandom % 100);
          default: cnt[i] = 32'h7FFF_FF00 + ($urandom % 100);
        endcase
      end
      snap = cnt;
      do_latch();
      expect_snapshot(snap);
      read_all($sformatf("snapshot %0d", s + 2));
    end
    n_ws_raised = $countones(exp_ws);
    checks++;
    if (n_ws_raised == 0 || !ws_any) begin failures++; $display("FAIL no warning raised"); end

    // Reset_D clears registers and warnings.
    #1 rst_n = 1'b0;
    #0.5;
    for (int r = 0; r < NREG; r++) begin exp_reg[r] = 0; exp_msb[r] = 0; end
    exp_ws = '0;
    read_all("Reset_D");
    $display("warnings raised: %0d", n_ws_raised);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
