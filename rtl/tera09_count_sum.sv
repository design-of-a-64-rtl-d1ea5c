// tera09_count_sum: the pulse count and sum logic of the chip.
//
// An external latch signal copies all 64 channel counters at the same clock
// edge into 32-bit channel registers. A tree of four-input adders then forms
// the 16 sums of 4 neighbouring channels (34-bit registers), the 4 sums of 16
// channels (36-bit registers) and the sum of all 64 channels (38-bit
// register). The sums serve the range extension: when one input current is
// spread over several channels tied together, the register holding their
// sum reads it in full. Every one of the 85 registers has a warning signal
// (raised when its MSB goes from 0 to 1); their OR tells the user an
// overflow is approaching. A multiplexer reads any register by address.
//
// Timing. `latch` is asynchronous to the master clock: it passes a two-flop
// synchronizer and its rising edge makes a one-clock strobe. The strobe loads
// the channel registers; the sums of 4 are loaded one clock later from the
// channel registers, the sums of 16 one clock after that and the sum of 64 one
// clock after that. So all registers hold the snapshot 2 + 3 = 5 clocks after
// the rising edge of `latch` reaches the synchronizer, and `dout` follows
// `addr` combinationally. The counters keep counting meanwhile: the latch
// causes no dead time.
//
// From the chip: the simultaneous latch, the register widths, the adder
// grouping, the warning signals and their OR, Reset_D on all registers and the
// multiplexer. This design's choices: the synchronizer, the one-level-per-
// clock pipelining of the adder tree, the address map (see
// tera09_readout_mux) and the sticky warnings.
//
// Interface: clk; rst_n (Reset_D, active low, asynchronous); latch; cnt (the
// 64 counters); addr; dout (38 bits); ws_any (OR of the warnings); ws (all 85
// warnings, in address order).
module tera09_count_sum
  import tera09_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      latch,
  input  logic [NCH-1:0][CNT_W-1:0] cnt,
  input  logic [ADDR_W-1:0]         addr,
  output logic [OUT_W-1:0]          dout,
  output logic                      ws_any,
  output logic [NREG-1:0]           ws
);

  // Latch synchronizer, edge detector and load pipeline.
  logic [2:0] latch_sync;
  logic [3:0] load;  // load[0]: channels, [1]: sums of 4, [2]: of 16, [3]: of 64

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      latch_sync <= '0;
      load[3:1]  <= '0;
    end else begin
      latch_sync <= {latch_sync[1:0], latch};
      load[3:1]  <= load[2:0];
    end
  end

  assign load[0] = latch_sync[1] && !latch_sync[2];

  // Channel registers.
  logic [NCH-1:0][CNT_W-1:0] ch_q;
  for (genvar c = 0; c < NCH; c++) begin : g_ch
    tera09_ws_register #(.W(CNT_W)) u_reg (
      .clk (clk), .rst_n (rst_n), .load (load[0]),
      .d (cnt[c]), .q (ch_q[c]), .ws (ws[BASE_CH + c])
    );
  end

  // Sums of 4 channels.
  logic [N_S4-1:0][S4_W-1:0] s4_d, s4_q;
  for (genvar g = 0; g < N_S4; g++) begin : g_s4
    tera09_adder4 #(.W(CNT_W)) u_add (.a (ch_q[4*g +: 4]), .sum (s4_d[g]));
    tera09_ws_register #(.W(S4_W)) u_reg (
      .clk (clk), .rst_n (rst_n), .load (load[1]),
      .d (s4_d[g]), .q (s4_q[g]), .ws (ws[BASE_S4 + g])
    );
  end

  // Sums of 16 channels.
  logic [N_S16-1:0][S16_W-1:0] s16_d, s16_q;
  for (genvar g = 0; g < N_S16; g++) begin : g_s16
    tera09_adder4 #(.W(S4_W)) u_add (.a (s4_q[4*g +: 4]), .sum (s16_d[g]));
    tera09_ws_register #(.W(S16_W)) u_reg (
      .clk (clk), .rst_n (rst_n), .load (load[2]),
      .d (s16_d[g]), .q (s16_q[g]), .ws (ws[BASE_S16 + g])
    );
  end

  // Sum of all 64 channels.
  logic [S64_W-1:0] s64_d, s64_q;
  tera09_adder4 #(.W(S16_W)) u_add64 (.a (s16_q), .sum (s64_d));
  tera09_ws_register #(.W(S64_W)) u_reg64 (
    .clk (clk), .rst_n (rst_n), .load (load[3]),
    .d (s64_d), .q (s64_q), .ws (ws[BASE_S64])
  );

  assign ws_any = |ws;

  tera09_readout_mux u_mux (
    .addr (addr), .ch (ch_q), .s4 (s4_q), .s16 (s16_q), .s64 (s64_q), .dout (dout)
  );

endmodule
