// srt_pkg: types and constants shared by the SRT floating-point components
// (division, reciprocal, inverse square root).
//
// - round_mode_e: the six rounding modes of the components. The set of modes
//   and their meaning follow the design description; the enum encoding is
//   this implementation's choice.
// - qdigit_t: a radix-4 quotient digit from {-2,-1,0,+1,+2} in one-hot form.
//   The codes (-2 = 1000, -1 = 0100, 0 = 0000, +1 = 0001, +2 = 0010) follow
//   the design description.
// - status bit positions of the 8-bit exception flag output. The meaning and
//   order of the flags are this implementation's choice.
package srt_pkg;

  typedef enum logic [2:0] {
    IEEE_NEAR = 3'd0,  // to nearest, ties to even significand
    IEEE_ZERO = 3'd1,  // toward zero
    IEEE_PINF = 3'd2,  // toward +infinity
    IEEE_NINF = 3'd3,  // toward -infinity
    NEAR_UP   = 3'd4,  // to nearest, ties toward +infinity
    AWAY_ZERO = 3'd5   // away from zero
  } round_mode_e;

  typedef logic [3:0] qdigit_t;
  localparam qdigit_t Q_M2 = 4'b1000;
  localparam qdigit_t Q_M1 = 4'b0100;
  localparam qdigit_t Q_Z  = 4'b0000;
  localparam qdigit_t Q_P1 = 4'b0001;
  localparam qdigit_t Q_P2 = 4'b0010;

  // status flag positions
  localparam int ST_ZERO    = 0;
  localparam int ST_INF     = 1;
  localparam int ST_INVALID = 2;
  localparam int ST_TINY    = 3;
  localparam int ST_HUGE    = 4;
  localparam int ST_INEXACT = 5;
  localparam int ST_DIVZERO = 7;

  // operation of a component, used by the shared exception handling
  typedef enum logic [1:0] {
    OP_DIV    = 2'd0,
    OP_RECIP  = 2'd1,
    OP_INVSQRT = 2'd2
  } srt_op_e;

  // digit value of a one-hot code, as a small signed number
  function automatic logic signed [2:0] qdigit_value(qdigit_t q);
    unique case (q)
      Q_M2:    return -3'sd2;
      Q_M1:    return -3'sd1;
      Q_P1:    return 3'sd1;
      Q_P2:    return 3'sd2;
      default: return 3'sd0;
    endcase
  endfunction

endpackage
