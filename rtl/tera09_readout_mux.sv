// tera09_readout_mux: the output multiplexer. It puts one of the 85 readout
// registers on the 38-bit output bus, selected by a 7-bit address:
//   0..63   channel registers (32 bits)
//   64..79  sums of 4 channels (34 bits)
//   80..83  sums of 16 channels (36 bits)
//   84      sum of all 64 channels (38 bits)
// Narrower registers are sign-extended to 38 bits; an address above 84 reads
// zero. Combinational, so a register can be read at any time independently of
// the converters. The set of registers and the 38-bit output follow the chip;
// the address map, the sign extension and the reading of unused addresses are
// this design's choices.
module tera09_readout_mux
  import tera09_pkg::*;
(
  input  logic [ADDR_W-1:0]           addr,
  input  logic [NCH-1:0][CNT_W-1:0]   ch,
  input  logic [N_S4-1:0][S4_W-1:0]   s4,
  input  logic [N_S16-1:0][S16_W-1:0] s16,
  input  logic [S64_W-1:0]            s64,
  output logic [OUT_W-1:0]            dout
);

  always_comb begin
    dout = '0;
    if (int'(addr) < BASE_S4) begin
      dout = OUT_W'(signed'(ch[addr[5:0]]));
    end else if (int'(addr) < BASE_S16) begin
      dout = OUT_W'(signed'(s4[4'(int'(addr) - BASE_S4)]));
    end else if (int'(addr) < BASE_S64) begin
      dout = OUT_W'(signed'(s16[2'(int'(addr) - BASE_S16)]));
    end else if (int'(addr) == BASE_S64) begin
      dout = s64;
    end
  end

endmodule
