// Shared types and constants of the qubit readout platform.
//
// The sample format follows the board: two 14-bit ADCs sample the I and Q
// quadratures of the down-converted readout signal at 100 MHz, and the
// external ZBT SRAM has two banks of 32-bit words (8 MB per bank, so 2M
// words and a 21-bit word address). Reference-signal width (16 bit) and
// score accumulator width (48 bit, the width of a Virtex-4 DSP48
// accumulator) are this design's choices.
package qr_pkg;

  localparam int unsigned ADC_W     = 14;  // ADC resolution
  localparam int unsigned ZBT_DW    = 32;  // ZBT word width
  localparam int unsigned ZBT_AW    = 21;  // 2M words = 8 MB per bank
  localparam int unsigned ZBT_BANKS = 2;
  localparam int unsigned REF_W     = 16;  // reference sample, each part
  localparam int unsigned SCORE_W   = 48;  // score accumulator, each part
  localparam int unsigned NREF      = 2;   // reference signals s0, s1

  // One complex ADC sample: I from ADC A, Q from ADC B.
  typedef struct packed {
    logic signed [ADC_W-1:0] i;
    logic signed [ADC_W-1:0] q;
  } iq_t;

  // One complex reference sample s_r[k].
  typedef struct packed {
    logic signed [REF_W-1:0] re;
    logic signed [REF_W-1:0] im;
  } ref_t;

  // One complex score component <s_out|s_r> (unnormalised, N times the mean).
  typedef struct packed {
    logic signed [SCORE_W-1:0] re;
    logic signed [SCORE_W-1:0] im;
  } score_t;

  // Readout scheme: one tone scores against s0 only (a point in C),
  // two tone scores against s0 and s1 (a point in C^2).
  typedef enum logic {
    SCHEME_ONE_TONE = 1'b0,
    SCHEME_TWO_TONE = 1'b1
  } scheme_e;

  // One request to a ZBT bank controller.
  typedef struct packed {
    logic              valid;
    logic              we;
    logic [ZBT_AW-1:0] addr;
    logic [ZBT_DW-1:0] wdata;
  } zbt_req_t;

endpackage
