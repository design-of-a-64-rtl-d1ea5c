// tb_tera09_adder4: self-checking test of the four-input signed adder at the
// widths of the three adder levels (32, 34 and 36 bits in). Random and
// extreme operands are compared with a 64-bit integer sum.
module tb_tera09_adder4;
  logic [3:0][31:0] a32;  logic [33:0] s34;
  logic [3:0][33:0] a34;  logic [35:0] s36;
  logic [3:0][35:0] a36;  logic [37:0] s38;
  int checks = 0, failures = 0;

  tera09_adder4 #(.W(32)) dut32 (.a (a32), .sum (s34));
  tera09_adder4 #(.W(34)) dut34 (.a (a34), .sum (s36));
  tera09_adder4 #(.W(36)) dut36 (.a (a36), .sum (s38));

  function automatic longint sx(logic [63:0] v, int w);
    return longint'(v << (64 - w)) >>> (64 - w);
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    longint e;
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < 4; i++) begin
        a32[i] = $urandom;
        a34[i] = 34'({$urandom, $urandom});
        a36[i] = 36'({$urandom, $urandom});
        if (n == 0) begin a32[i] = 32'h8000_0000; a34[i] = 34'h2_0000_0000; a36[i] = 36'h8_0000_0000; end
        if (n == 1) begin a32[i] = 32'h7FFF_FFFF; a34[i] = 34'h1_FFFF_FFFF; a36[i] = 36'h7_FFFF_FFFF; end
      end
      #1;
      e = 0; for (int i = 0; i < 4; i++) e += sx(64'(a32[i]), 32);
      check("W=32", sx(64'(s34), 34), e);
      e = 0; for (int i = 0; i < 4; i++) e += sx(64'(a34[i]), 34);
      check("W=34", sx(64'(s36), 36), e);
      e = 0; for (int i = 0; i < 4; i++) e += sx(64'(a36[i]), 36);
      check("W=36", sx(64'(s38), 38), e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
