// tb_srt_postnorm: self-checking testbench of post-normalization and range
// handling.
//
// Format: 8 fraction bits, 5 exponent bits (largest biased exponent 30). One
// instance per rounding mode. Inputs: significands with and without the
// rounding carry (10.0...0), exponents from below zero to above the range,
// both signs. Expected: the carry shifts the significand and increments the
// exponent; exponent >= 31 overflows to infinity (nearest modes, and directed
// modes rounding away from zero for that sign) or to the largest finite
// number; exponent <= 0 flushes to MinNorm (directed modes rounding away from
// zero for that sign) or to zero; flags huge/tiny/inexact/inf/zero match.
`timescale 1ns/1ps
module tb_srt_postnorm;
  import srt_pkg::*;

  localparam int SW = 8, EWD = 5;
  logic                   sign, inx;
  logic signed [EWD+1:0]  exp_in;
  logic [SW+1:0]          sig_in;
  logic [SW+EWD:0]        z [6];
  logic                   huge [6], tiny [6], inexact [6], is_inf [6], is_zero [6];
  int checks = 0, failures = 0;

  for (genvar m = 0; m < 6; m++) begin : g_mode
    srt_postnorm #(.sig_width(SW), .exp_width(EWD), .round(round_mode_e'(m))) dut (
      .sign(sign), .exp_in(exp_in), .sig_in(sig_in), .inexact_in(inx),
      .z(z[m]), .is_huge(huge[m]), .is_tiny(tiny[m]), .inexact(inexact[m]),
      .is_inf(is_inf[m]), .is_zero(is_zero[m]));
  end

  initial begin
    int e, fr;
    logic [SW+EWD:0] ez;
    logic eh, et, ex, ei, ezr, toward_big;
    for (int t = 0; t < 5000; t++) begin
      sign   = 1'($urandom);
      inx    = 1'($urandom);
      exp_in = (EWD+2)'(int'($urandom_range(0, 40)) - 4);
      if ($urandom_range(0, 3) == 0) sig_in = {2'b10, {SW{1'b0}}};
      else                           sig_in = {2'b01, SW'($urandom)};
      #1;
      e  = int'(exp_in) + int'(sig_in[SW+1]);
      fr = sig_in[SW+1] ? 0 : int'(sig_in[SW-1:0]);
      for (int m = 0; m < 6; m++) begin
        // does mode m round a value of this sign toward larger magnitude?
        toward_big = (m == 5) || (m == 2 && !sign) || (m == 3 && sign);
        eh = 0; et = 0; ex = inx; ei = 0; ezr = 0;
        if (e >= 31) begin
          eh = 1; ex = 1;
          if (m == 0 || m == 4 || toward_big) begin ei = 1; ez = {sign, 5'd31, 8'd0}; end
          else ez = {sign, 5'd30, 8'hff};
        end else if (e <= 0) begin
          et = 1; ex = 1;
          if (toward_big) ez = {sign, 5'd1, 8'd0};
          else begin ezr = 1; ez = {sign, 13'd0}; end
        end else begin
          ez = {sign, 5'(e), 8'(fr)};
        end
        checks++;
        if (z[m] != ez || huge[m] != eh || tiny[m] != et || inexact[m] != ex ||
            is_inf[m] != ei || is_zero[m] != ezr) begin
          failures++;
          if (failures < 10)
            $display("FAIL mode%0d sign=%b exp=%0d sig=%b z=%h expected %h", m, sign, exp_in, sig_in, z[m], ez);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
