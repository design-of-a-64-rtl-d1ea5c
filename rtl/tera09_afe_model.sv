// tera09_afe_model: BEHAVIOURAL MODEL (not synthesizable) of the analog part
// of one converter channel: the OTA integrator on C_int, the two clocked
// threshold comparators and the C_sub charge-subtraction circuit.
//
// How it works. The integrator state is kept as the charge on C_int, in fC,
// with the sign of the input current (a positive current raises it). At every
// rising clock edge the charge grows by I_in * T_clk. The subtraction circuit
// is a switched capacitor: the pulse generator drives the top plate of C_sub
// with `pulse` and steers the bottom plate with `pulse_sel`. A rising edge of
// `pulse` moves +Q_c, a falling edge -Q_c, with Q_c = C_sub * (V_pulse+ -
// V_pulse-). The quantum reaches the integrator input only while `pulse_sel`
// is high; otherwise it is dumped on the OTA reference. So a rising edge of
// `pulse` with `pulse_sel` high removes Q_c from the integrator and a falling
// edge with `pulse_sel` high adds Q_c. The model sees the pulse edges one clock
// after the pulse generator makes them. The two comparators are synchronous:
// their outputs are registered on the clock, `cmp_pos` high while the charge
// is at or above +Q_TH_FC (threshold V_th+), `cmp_neg` high while it is at or
// below -Q_TH_FC (threshold V_th-). The integrator output swing is finite: the
// charge is clamped to +-Q_RAIL_FC, which is what makes a channel saturate.
// Reset_A (`reset_a`, high active) discharges C_int while it is high.
//
// From the chip: the charge-recycling principle, the two thresholds, the
// clocked comparators, the pulse/pulse_sel steering and Q_c = 200 fC at a
// 250 MHz clock. This model's own choices: charge units instead of voltages,
// the threshold and rail values, and an ideal (noise-free, offset-free) OTA.
//
// Interface: clk; reset_a; iin_na, the input current in nA (real);
// pulse_sel and pulse from the pulse generator; cmp_pos and cmp_neg to it;
// q_int_fc, the integrator charge, for observation.
module tera09_afe_model #(
  parameter real CLK_PERIOD_NS = 4.0,    // 250 MHz master clock
  parameter real QC_FC         = 200.0,  // charge quantum
  parameter real Q_TH_FC       = 100.0,  // comparator thresholds, as charge
  parameter real Q_RAIL_FC     = 1000.0  // integrator output swing, as charge
) (
  input  logic clk,
  input  logic reset_a,
  input  real  iin_na,
  input  logic pulse_sel,
  input  logic pulse,
  output logic cmp_pos,
  output logic cmp_neg,
  output real  q_int_fc
);

  real  q;
  logic pulse_q;

  // 1 nA for 1 ns is 1e-18 C, i.e. 1e-3 fC.
  localparam real FC_PER_NA_NS = 1.0e-3;

  initial begin
    q        = 0.0;
    pulse_q  = 1'b0;
    cmp_pos  = 1'b0;
    cmp_neg  = 1'b0;
  end

  // Charge on C_int after one clock period.
  function automatic real next_charge(real q0, real i_na, logic sel, logic p, logic p_q);
    real qn;
    qn = q0 + i_na * CLK_PERIOD_NS * FC_PER_NA_NS;
    if (sel && p && !p_q) qn = qn - QC_FC;
    if (sel && !p && p_q) qn = qn + QC_FC;
    if (qn > Q_RAIL_FC)  qn = Q_RAIL_FC;
    if (qn < -Q_RAIL_FC) qn = -Q_RAIL_FC;
    return qn;
  endfunction

  real q_nx;
  always_comb q_nx = reset_a ? 0.0 : next_charge(q, iin_na, pulse_sel, pulse, pulse_q);

  // The comparators decide on the charge after this clock's update.
  always @(posedge clk) begin
    q       <= q_nx;
    pulse_q <= pulse;
    cmp_pos <= (q_nx >= Q_TH_FC);
    cmp_neg <= (q_nx <= -Q_TH_FC);
  end

  assign q_int_fc = q;

endmodule
