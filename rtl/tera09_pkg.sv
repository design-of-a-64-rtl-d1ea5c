// tera09_pkg: sizes and types shared by the 64-channel current-to-frequency
// converter. The channel count, the 32-bit channel counters and the register
// widths of the three adder levels (34, 36, 38 bits) are the chip's own; the
// readout address map (channels first, then the sums of 4, 16 and 64) is this
// design's choice.
package tera09_pkg;

  // Channels and counter width.
  localparam int unsigned NCH   = 64;
  localparam int unsigned CNT_W = 32;

  // Register widths of each level of the sum tree: every level adds 4 values
  // and so grows by 2 bits.
  localparam int unsigned S4_W  = CNT_W + 2;  // 34
  localparam int unsigned S16_W = CNT_W + 4;  // 36
  localparam int unsigned S64_W = CNT_W + 6;  // 38
  localparam int unsigned OUT_W = S64_W;      // width of the readout bus

  // Number of registers at each level and in total.
  localparam int unsigned N_S4  = NCH / 4;    // 16
  localparam int unsigned N_S16 = NCH / 16;   // 4
  localparam int unsigned N_S64 = NCH / 64;   // 1
  localparam int unsigned NREG  = NCH + N_S4 + N_S16 + N_S64;  // 85

  // Readout address map.
  localparam int unsigned ADDR_W    = $clog2(NREG);  // 7
  localparam int unsigned BASE_CH   = 0;
  localparam int unsigned BASE_S4   = NCH;            // 64
  localparam int unsigned BASE_S16  = NCH + N_S4;     // 80
  localparam int unsigned BASE_S64  = NCH + N_S4 + N_S16;  // 84

  // States of the channel pulse generator (Moore machine). The P* states
  // subtract a positive charge quantum (counter increment), the N* states a
  // negative one (counter decrement).
  typedef enum logic [2:0] {
    PG_IDLE = 3'd0,
    PG_P1   = 3'd1,
    PG_P2   = 3'd2,
    PG_P3   = 3'd3,
    PG_N1   = 3'd4,
    PG_N2   = 3'd5,
    PG_N3   = 3'd6
  } pg_state_e;

endpackage
