// fpdiv_pkg: types and constants shared by the multi-precision divider.
//
// The divider works on one 128-bit register format for all four precisions:
// the sign is always bit 127, the exponent field ends at bit 112 and grows
// upwards with the precision, and the fraction starts at bit 111 and grows
// downwards.  Keeping the binary point at the same place for every mode lets
// one datapath serve SP, DP, DPE (x87-style 15-bit exponent, 64-bit fraction)
// and QP.  The field positions follow the register format of the design; the
// mode encoding, the exception-class encoding and the flag order are this
// design's own choices.
package fpdiv_pkg;

  // Precision mode.  SP=00 and DP=01 are the encodings labelled on the FSM
  // transitions; DPE=10 follows from the "01/10 (DP/DPE)" label, QP=11 is
  // the remaining code.
  typedef enum logic [1:0] {
    MODE_SP  = 2'b00,
    MODE_DP  = 2'b01,
    MODE_DPE = 2'b10,
    MODE_QP  = 2'b11
  } mode_e;

  // Mantissa-division FSM states S0..S10.  S10 is the Done / idle state.
  typedef enum logic [3:0] {
    S0 = 4'd0, S1 = 4'd1, S2 = 4'd2, S3 = 4'd3, S4 = 4'd4, S5 = 4'd5,
    S6 = 4'd6, S7 = 4'd7, S8 = 4'd8, S9 = 4'd9, S10 = 4'd10
  } state_e;

  // Class of the quotient decided before the mantissa division.
  typedef enum logic [1:0] {
    SPEC_NONE = 2'd0,   // finite non-zero result, taken from the datapath
    SPEC_ZERO = 2'd1,
    SPEC_INF  = 2'd2,
    SPEC_NAN  = 2'd3
  } special_e;

  // Exception flags of one division.
  typedef struct packed {
    logic invalid;
    logic div_by_zero;
    logic overflow;
    logic underflow;   // the result is tiny (below the smallest normal)
  } flags_t;

  localparam int unsigned WORD_W = 128;  // register width (Fig. 1 layout)
  localparam int unsigned MANT_W = 113;  // hidden bit + 112 fraction bits
  localparam int unsigned EXP_W  = 18;   // signed internal exponent width
  localparam int unsigned FRAC_LSB_SP  = 89;
  localparam int unsigned FRAC_LSB_DP  = 60;
  localparam int unsigned FRAC_LSB_DPE = 48;
  localparam int unsigned FRAC_LSB_QP  = 0;

  // Width of the exponent field of a mode.
  function automatic int unsigned exp_width(mode_e m);
    case (m)
      MODE_SP:  return 8;
      MODE_DP:  return 11;
      default:  return 15;
    endcase
  endfunction

  // Lowest fraction bit of a mode (the fraction always ends at bit 111).
  function automatic int unsigned frac_lsb(mode_e m);
    case (m)
      MODE_SP:  return FRAC_LSB_SP;
      MODE_DP:  return FRAC_LSB_DP;
      MODE_DPE: return FRAC_LSB_DPE;
      default:  return FRAC_LSB_QP;
    endcase
  endfunction

  // Largest biased exponent of a mode (all ones: infinity / NaN).
  function automatic logic [14:0] exp_max(mode_e m);
    case (m)
      MODE_SP:  return 15'h00FF;
      MODE_DP:  return 15'h07FF;
      default:  return 15'h7FFF;
    endcase
  endfunction

  // Unified exponent bias: {0, 4{QP|DPE}, 3{QP|DPE|DP}, 7'h7F}
  // = 127 / 1023 / 16383 for SP / DP / DPE,QP.
  function automatic logic [14:0] unified_bias(mode_e m);
    logic qd, qdd;
    qd  = (m == MODE_QP) || (m == MODE_DPE);
    qdd = qd || (m == MODE_DP);
    return {1'b0, {4{qd}}, {3{qdd}}, 7'h7F};
  endfunction

endpackage
