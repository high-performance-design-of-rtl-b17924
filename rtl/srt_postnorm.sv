// srt_postnorm: post-normalization and range handling after rounding.
//
// If rounding carried into a new integer bit (significand 10.0...0) the
// significand is shifted right by one and the exponent incremented. The
// biased exponent (exp_width+2 bits, two's complement, so that under- and
// overflow stay visible) is then checked against the format range:
// - exponent >= all-ones: overflow ("huge"). The result is infinity or the
//   largest finite number, whichever the rounding mode rounds to.
// - exponent <= 0: the result would be denormal ("tiny"). Denormals are not
//   produced: the result is flushed to zero or to the smallest normal number
//   (MinNorm), with the sign kept. A denormal counts as nearer to zero than
//   to MinNorm, so the round-to-nearest modes and IEEE_ZERO give zero; the
//   directed modes that round away from zero for this sign give MinNorm.
// Flushing to Zero/MinNorm by rounding mode follows the design description;
// the flag set and the choice of where tininess is detected (after rounding)
// are this implementation's. Purely combinational.
module srt_postnorm
  import srt_pkg::*;
#(
  parameter int          sig_width = 23,
  parameter int          exp_width = 8,
  parameter round_mode_e round       = IEEE_NEAR
) (
  input  logic                          sign,
  input  logic signed [exp_width+1:0]   exp_in,     // biased, before the carry
  input  logic [sig_width+1:0]          sig_in,     // {carry, integer, fraction}
  input  logic                          inexact_in,
  output logic [sig_width+exp_width:0]  z,
  output logic                          is_huge,
  output logic                          is_tiny,
  output logic                          inexact,
  output logic                          is_inf,
  output logic                          is_zero
);

  localparam logic signed [exp_width+1:0] EMAX = (exp_width+2)'((1 << exp_width) - 1);

  logic signed [exp_width+1:0] e;
  logic [sig_width-1:0]        frac;
  logic                        away;   // this mode rounds the magnitude up for this sign

  always_comb begin
    if (sig_in[sig_width+1]) begin
      frac = sig_in[sig_width:1];
      e    = exp_in + (exp_width+2)'(1);
    end else begin
      frac = sig_in[sig_width-1:0];
      e    = exp_in;
    end
  end

  always_comb begin
    unique case (round)
      IEEE_PINF: away = ~sign;
      IEEE_NINF: away = sign;
      AWAY_ZERO: away = 1'b1;
      default:   away = 1'b0;
    endcase
  end

  always_comb begin
    is_huge    = 1'b0;
    is_tiny    = 1'b0;
    is_inf  = 1'b0;
    is_zero = 1'b0;
    inexact = inexact_in;
    if (e >= EMAX) begin
      is_huge    = 1'b1;
      inexact = 1'b1;
      // nearest modes and away-from-zero give infinity; a directed mode that
      // rounds toward zero for this sign gives the largest finite number
      if (round == IEEE_NEAR || round == NEAR_UP || away) begin
        is_inf = 1'b1;
        z = {sign, {exp_width{1'b1}}, {sig_width{1'b0}}};
      end else begin
        z = {sign, {(exp_width-1){1'b1}}, 1'b0, {sig_width{1'b1}}};
      end
    end else if (e <= 0) begin
      is_tiny    = 1'b1;
      inexact = 1'b1;
      if (away) begin
        z = {sign, {(exp_width-1){1'b0}}, 1'b1, {sig_width{1'b0}}};
      end else begin
        is_zero = 1'b1;
        z = {sign, {exp_width{1'b0}}, {sig_width{1'b0}}};
      end
    end else begin
      z = {sign, e[exp_width-1:0], frac};
    end
  end

endmodule
