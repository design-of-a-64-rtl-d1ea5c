// tera09_channel: one input channel of the converter. The current-to-
// frequency converter (analog front end plus pulse generator) turns the input
// current into a train of charge-quantum subtractions, each of which
// increments (positive current) or decrements (negative current) the
// channel's 32-bit counter. The count rate is I_in / Q_c, up to f_clk/4.
// Because every quantum is subtracted while the integrator keeps integrating,
// no input charge is lost between counts.
//
// The structure (integrator, two comparators, pulse generator, subtraction
// capacitor, up/down counter) follows the chip. The analog front end is a
// behavioural model, so this module simulates but does not synthesize to the
// real channel.
//
// Interface: clk (master clock); rst_n (Reset_D, active low, asynchronous:
// zeroes the counter and the pulse generator); reset_a (Reset_A, high:
// discharges C_int); iin_na (input current, nA, real); cnt (counter value);
// q_int_fc (integrator charge in fC, for observation).
module tera09_channel
  import tera09_pkg::*;
#(
  parameter real CLK_PERIOD_NS = 4.0,
  parameter real QC_FC         = 200.0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             reset_a,
  input  real              iin_na,
  output logic [CNT_W-1:0] cnt,
  output real              q_int_fc
);

  logic cmp_pos, cmp_neg, pulse_sel, pulse, cnt_up, cnt_dn;

  tera09_afe_model #(
    .CLK_PERIOD_NS (CLK_PERIOD_NS),
    .QC_FC         (QC_FC)
  ) u_afe (
    .clk       (clk),
    .reset_a   (reset_a),
    .iin_na    (iin_na),
    .pulse_sel (pulse_sel),
    .pulse     (pulse),
    .cmp_pos   (cmp_pos),
    .cmp_neg   (cmp_neg),
    .q_int_fc  (q_int_fc)
  );

  tera09_pulse_gen u_pg (
    .clk       (clk),
    .rst_n     (rst_n),
    .cmp_pos   (cmp_pos),
    .cmp_neg   (cmp_neg),
    .pulse_sel (pulse_sel),
    .pulse     (pulse),
    .cnt_up    (cnt_up),
    .cnt_dn    (cnt_dn)
  );

  tera09_updown_counter #(.W(CNT_W)) u_cnt (
    .clk   (clk),
    .rst_n (rst_n),
    .up    (cnt_up),
    .dn    (cnt_dn),
    .cnt   (cnt)
  );

endmodule
