// tera09: a 64-channel current-to-frequency converter for reading out
// ionization chambers.
//
// Each channel integrates its input current and, whenever the integrator
// crosses one of two thresholds, subtracts a fixed charge quantum Q_c
// (200 fC) and counts one up or down, so the count rate is I_in / Q_c and
// currents of both polarities are measured without dead time. The clock is
// 250 MHz and a channel counts at most once per 4 clocks (62.5 MHz, i.e.
// about +-12.5 uA at 200 fC). An external latch copies all 64 counters at once
// into registers, an adder tree sums groups of 4, 16 and 64 channels, and
// any of the 85 registers can be read through a 38-bit multiplexer. Inputs
// tied together spread a large current over several channels, whose sum
// register then reads it: this extends the range to the full 64-channel sum.
//
// The channel front ends are behavioural models of the analog circuit
// (tera09_afe_model), so this top simulates the whole chip but synthesizes
// only in its digital part.
//
// Interface: clk (250 MHz master clock); reset_d_n (Reset_D, active low,
// asynchronous: zeroes counters, pulse generators and registers); reset_a
// (Reset_A, high: discharges all integrators); iin_na (64 input currents,
// nA, real); latch (asynchronous, rising edge takes a snapshot); addr (7-bit
// register address); dout (38-bit register value); ws_any (OR of all
// warnings); ws (the 85 warnings, in register address order). See
// tera09_count_sum for the readout timing.
module tera09
  import tera09_pkg::*;
#(
  parameter real CLK_PERIOD_NS = 4.0,
  parameter real QC_FC         = 200.0
) (
  input  logic              clk,
  input  logic              reset_d_n,
  input  logic              reset_a,
  input  real               iin_na [NCH],
  input  logic              latch,
  input  logic [ADDR_W-1:0] addr,
  output logic [OUT_W-1:0]  dout,
  output logic              ws_any,
  output logic [NREG-1:0]   ws
);

  logic [NCH-1:0][CNT_W-1:0] cnt;
  real                       q_int_fc [NCH];

  for (genvar c = 0; c < NCH; c++) begin : g_chan
    tera09_channel #(
      .CLK_PERIOD_NS (CLK_PERIOD_NS),
      .QC_FC         (QC_FC)
    ) u_chan (
      .clk     (clk),
      .rst_n   (reset_d_n),
      .reset_a (reset_a),
      .iin_na  (iin_na[c]),
      .cnt     (cnt[c]),
      .q_int_fc(q_int_fc[c])
    );
  end

  tera09_count_sum u_sum (
    .clk    (clk),
    .rst_n  (reset_d_n),
    .latch  (latch),
    .cnt    (cnt),
    .addr   (addr),
    .dout   (dout),
    .ws_any (ws_any),
    .ws     (ws)
  );

endmodule
