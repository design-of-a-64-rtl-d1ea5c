// tb_tera09_readout_mux: self-checking test of the output multiplexer. Fills
// all 85 register inputs with random values and reads every one of the 128
// addresses, comparing with the sign-extended register expected at that
// address (zero above the last register).
module tb_tera09_readout_mux;
  import tera09_pkg::*;
  logic [ADDR_W-1:0]           addr;
  logic [NCH-1:0][CNT_W-1:0]   ch;
  logic [N_S4-1:0][S4_W-1:0]   s4;
  logic [N_S16-1:0][S16_W-1:0] s16;
  logic [S64_W-1:0]            s64;
  logic [OUT_W-1:0]            dout;
  int checks = 0, failures = 0;

  tera09_readout_mux dut (.*);

  function automatic logic [OUT_W-1:0] sx(logic [63:0] v, int w);
    return OUT_W'(longint'(v << (64 - w)) >>> (64 - w));
  endfunction

  initial begin
    logic [OUT_W-1:0] e;
    for (int round = 0; round < 20; round++) begin
      for (int i = 0; i < NCH; i++)   ch[i]  = $urandom;
      for (int i = 0; i < N_S4; i++)  s4[i]  = S4_W'({$urandom, $urandom});
      for (int i = 0; i < N_S16; i++) s16[i] = S16_W'({$urandom, $urandom});
      s64 = S64_W'({$urandom, $urandom});
      for (int a = 0; a < 2**ADDR_W; a++) begin
        addr = ADDR_W'(a);
        #1;
        if (a < 64)      e = sx(64'(ch[a]), 32);
        else if (a < 80) e = sx(64'(s4[a-64]), 34);
        else if (a < 84) e = sx(64'(s16[a-80]), 36);
        else if (a == 84) e = s64;
        else             e = '0;
        checks++;
        if (dout !== e) begin
          failures++;
          $display("FAIL addr %0d: got %h expected %h", a, dout, e);
        end
      end
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
