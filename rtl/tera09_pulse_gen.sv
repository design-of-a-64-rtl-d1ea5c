// tera09_pulse_gen: the pulse generator of one converter channel, a Moore
// finite state machine on the 250 MHz master clock.
//
// It reads the two synchronous comparators. When the integrator has crossed
// the upper threshold (`cmp_pos`) it runs the positive sequence: pulse_sel
// rises, then pulse rises (the quantum +Q_c is taken from the input), then
// pulse_sel falls, then pulse falls (the opposite quantum goes to the OTA
// reference). When it has crossed the lower threshold (`cmp_neg`) it runs the
// mirror sequence, in which pulse rises while pulse_sel is low and falls while
// it is high, so that -Q_c reaches the input. During the second step of a
// sequence the machine asserts `cnt_up` or `cnt_dn` for one clock. Every
// sequence passes through IDLE, so one conversion takes at least 4 clocks
// and the count rate is at most f_clk/4 (62.5 MHz at 250 MHz).
//
// From the chip: the Moore machine, the pulse_sel/pulse order of the
// positive sequence, the increment/decrement outputs and the f_clk/4 limit.
// This design's choices: the state encoding, the mirrored sequence for
// negative input, the priority of cmp_pos if both comparators are high, and
// the asynchronous reset by Reset_D.
//
// Interface: clk; rst_n (Reset_D, active low, asynchronous); cmp_pos,
// cmp_neg in; pulse_sel, pulse, cnt_up, cnt_dn out, all registered state
// decodes. The assertion at the end uses rst_n to disable itself; a lint tool
// may report that as a reset used both synchronously and asynchronously,
// which does not affect the logic.
module tera09_pulse_gen
  import tera09_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic cmp_pos,
  input  logic cmp_neg,
  output logic pulse_sel,
  output logic pulse,
  output logic cnt_up,
  output logic cnt_dn
);

  pg_state_e state, state_nx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= PG_IDLE;
    else        state <= state_nx;
  end

  always_comb begin
    state_nx = PG_IDLE;
    unique case (state)
      PG_IDLE: begin
        if (cmp_pos)      state_nx = PG_P1;
        else if (cmp_neg) state_nx = PG_N1;
        else              state_nx = PG_IDLE;
      end
      PG_P1:   state_nx = PG_P2;
      PG_P2:   state_nx = PG_P3;
      PG_P3:   state_nx = PG_IDLE;
      PG_N1:   state_nx = PG_N2;
      PG_N2:   state_nx = PG_N3;
      PG_N3:   state_nx = PG_IDLE;
      default: state_nx = PG_IDLE;
    endcase
  end

  // Moore outputs: a function of the state only.
  always_comb begin
    pulse_sel = 1'b0;
    pulse     = 1'b0;
    cnt_up    = 1'b0;
    cnt_dn    = 1'b0;
    unique case (state)
      PG_IDLE: ;
      PG_P1:   pulse_sel = 1'b1;
      PG_P2:   begin pulse_sel = 1'b1; pulse = 1'b1; cnt_up = 1'b1; end
      PG_P3:   pulse = 1'b1;
      PG_N1:   pulse = 1'b1;
      PG_N2:   begin pulse_sel = 1'b1; pulse = 1'b1; cnt_dn = 1'b1; end
      PG_N3:   pulse_sel = 1'b1;
      default: ;
    endcase
  end

  // A count is never both up and down.
  a_cnt_excl: assert property (@(posedge clk) disable iff (!rst_n) !(cnt_up && cnt_dn));

endmodule
