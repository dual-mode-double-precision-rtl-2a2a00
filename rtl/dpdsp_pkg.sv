// Shared constants and types of the DP / dual-SP floating point divider.
//
// Lane numbering used throughout: lane 0 is SP-1 (bits [31:0] of a 64-bit word),
// lane 1 is SP-2 (bits [63:32]) and lane 2 is the double precision operand that
// occupies the whole word. dp_sp = 1 selects double precision, dp_sp = 0 selects
// two parallel single precision operations.
//
// The mantissa divider's state encoding S0..S8 follows the nine-state FSM of the
// design; the binary encoding itself is this design's choice.
package dpdsp_pkg;

  localparam int LANE_SP1 = 0;
  localparam int LANE_SP2 = 1;
  localparam int LANE_DP  = 2;

  localparam int DP_EW   = 11;
  localparam int DP_FW   = 52;
  localparam int SP_EW   = 8;
  localparam int SP_FW   = 23;
  localparam int DP_BIAS = 1023;
  localparam int SP_BIAS = 127;

  // Classification of one operand of one lane, as produced by data extraction.
  typedef struct packed {
    logic        sign;
    logic [10:0] exp;   // biased exponent field, zero-extended for SP
    logic        zero;
    logic        sub;   // sub-normal
    logic        inf;
    logic        nan;
  } fp_class_t;

  // Mantissa division FSM states.
  typedef enum logic [3:0] {
    S0 = 4'd0, S1 = 4'd1, S2 = 4'd2, S3 = 4'd3, S4 = 4'd4,
    S5 = 4'd5, S6 = 4'd6, S7 = 4'd7, S8 = 4'd8
  } mdiv_state_e;

  // Per-lane exponent information handed from stage 2 to stage 3.
  typedef struct packed {
    logic               sign;
    logic signed [12:0] ebase;  // biased quotient exponent assuming quotient in [1,2)
    logic [5:0]         rs0;    // right shift when the quotient is >= 1
    logic [5:0]         rs1;    // right shift when the quotient is < 1
  } lane_exp_t;

endpackage
