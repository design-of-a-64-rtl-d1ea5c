// tera09_adder4: adds four two's-complement values of W bits into a result of
// W+2 bits, which cannot overflow. One instance forms each sum of 4 channels
// (32 -> 34 bits), each sum of 16 (34 -> 36) and the sum of 64 (36 -> 38).
// Combinational; the result is registered by the following tera09_ws_register.
// The four-input adders and their widths follow the chip; treating the counts
// as signed (sign extension) is this design's choice, needed because the
// channel counters count down for negative currents.
module tera09_adder4 #(
  parameter int unsigned W = 32
) (
  input  logic [3:0][W-1:0] a,
  output logic [W+1:0]      sum
);

  always_comb begin
    sum = '0;
    for (int i = 0; i < 4; i++) begin
      sum = sum + {{2{a[i][W-1]}}, a[i]};
    end
  end

endmodule
