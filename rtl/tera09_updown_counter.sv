// tera09_updown_counter: the per-channel up/down synchronous counter.
//
// It adds one on `up`, subtracts one on `dn` and holds otherwise; the value
// is a two's-complement number that wraps around at its width, so a channel
// can accumulate charge of either polarity. Reset_D (`rst_n`, active low)
// zeroes it asynchronously. The 32-bit width, the up/down operation and the
// asynchronous zeroing follow the chip; holding when both inputs are high is
// this design's choice (the pulse generator never asserts both).
//
// Interface: clk, rst_n, up, dn in; cnt out (W bits, registered).
module tera09_updown_counter #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         up,
  input  logic         dn,
  output logic [W-1:0] cnt
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         cnt <= '0;
    else if (up && !dn) cnt <= cnt + 1'b1;
    else if (dn && !up) cnt <= cnt - 1'b1;
  end

endmodule
