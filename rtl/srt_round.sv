// srt_round: rounds a normalized significand to sig_width fraction bits.
//
// Input: {1 integer bit, sig_width fraction bits, guard, round, sticky}. The
// guard bit tells whether the dropped part is above or below half an ulp, the
// round and sticky bits whether anything below the guard bit is non-zero
// (they break the tie). The rounding mode is a parameter, one of six
// (srt_pkg::round_mode_e):
//   IEEE_NEAR  nearest, ties to even      IEEE_ZERO  toward zero
//   IEEE_PINF  toward +infinity           IEEE_NINF  toward -infinity
//   NEAR_UP    nearest, ties to +infinity AWAY_ZERO  away from zero
// Output: the rounded significand with one extra carry bit on top (an input of
// 1.11..1 can round up to 10.00..0, which post-normalization handles) and an
// inexact flag. The mode set and the use of guard/round/sticky follow the
// design description. Purely combinational.
module srt_round
  import srt_pkg::*;
#(
  parameter int          sig_width = 23,
  parameter round_mode_e round       = IEEE_NEAR
) (
  input  logic                 sign,
  input  logic [sig_width+3:0] sig_in,
  output logic [sig_width+1:0] sig_out,
  output logic                 inexact
);

  logic lsb, g, rs, inc;

  assign lsb     = sig_in[3];
  assign g       = sig_in[2];
  assign rs      = sig_in[1] | sig_in[0];
  assign inexact = g | rs;

  always_comb begin
    unique case (round)
      IEEE_NEAR: inc = g & (lsb | rs);
      IEEE_ZERO: inc = 1'b0;
      IEEE_PINF: inc = ~sign & inexact;
      IEEE_NINF: inc = sign & inexact;
      NEAR_UP:   inc = g & (~sign | rs);
      AWAY_ZERO: inc = inexact;
      default:   inc = 1'b0;
    endcase
  end

  assign sig_out = {1'b0, sig_in[sig_width+3:3]} + (sig_width+2)'(inc);

endmodule
