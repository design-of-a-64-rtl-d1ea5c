// tera09_ws_register: one readout register of the count and sum logic, with
// its warning signal.
//
// On `load` it takes `d`; Reset_D (`rst_n`, active low) clears it
// asynchronously. The warning signal `ws` is raised when a load makes the
// register's most significant bit go from 0 to 1, i.e. the accumulated count
// has reached half of the register's range and an overflow is approaching.
// Once raised it stays high until Reset_D, so a short excursion cannot be
// missed by a slow readout.
//
// From the chip: the register per channel and per sum, Reset_D, and the
// warning on the MSB switching from 0 to 1. This design's choices: the load
// strobe, and keeping `ws` high until Reset_D.
//
// Interface: clk, rst_n, load, d in; q, ws out (registered).
module tera09_ws_register #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         ws
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q  <= '0;
      ws <= 1'b0;
    end else if (load) begin
      q <= d;
      if (!q[W-1] && d[W-1]) ws <= 1'b1;
    end
  end

endmodule
