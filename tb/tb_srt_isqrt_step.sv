// tb_srt_isqrt_step: self-checking testbench of one inverse-square-root step.
//
// Draws D in [1/2, 1), a small C (as in the later steps, C <= 1/64) and a
// residual |w| <= 2/3 D split at random into a carry-save pair. Checks that
// the new carry-save pair sums exactly to 4w - qD - q^2 C, that
// D' = D + 2qC and C' = C/4, that q is a legal digit, and that the new
// residual stays within 2/3 D + 4C (the digit choice bounds 4w - qD by 2/3 D).
`timescale 1ns/1ps
module tb_srt_isqrt_step;
  import srt_pkg::*;

  localparam int F = 24;
  localparam int W = F + 4;
  int checks = 0, failures = 0;

  logic [W-1:0] ws, wc, dq, c, ws1, wc1, dq1, c1;
  qdigit_t      q;

  srt_isqrt_step #(.F(F), .W(W)) dut (
    .ws_in(ws), .wc_in(wc), .dq_in(dq), .c_in(c),
    .ws_out(ws1), .wc_out(wc1), .dq_out(dq1), .c_out(c1), .q(q));

  initial begin
    longint dv, cv, wv, lim, nw, qv;
    for (int t = 0; t < 20000; t++) begin
      dv  = longint'((1 << (F - 1)) + $urandom_range(0, (1 << (F - 1)) - 1));
      cv  = longint'($urandom_range(0, (1 << (F - 6)) - 1)) & ~longint'(3);
      lim = (2 * dv) / 3;
      wv  = longint'($urandom_range(0, 2 * 32'(lim))) - lim;
      ws  = W'($urandom);
      wc  = W'(wv) - ws;
      dq  = W'(dv);
      c   = W'(cv);
      #1;
      qv = longint'(qdigit_value(q));
      nw = 4 * wv - qv * dv - qv * qv * cv;
      checks++;
      if (!(q inside {Q_M2, Q_M1, Q_Z, Q_P1, Q_P2}) || W'(ws1 + wc1) != W'(nw) ||
          nw > lim + 4 * cv || nw < -lim - 4 * cv) begin
        failures++;
        if (failures < 10)
          $display("FAIL D=%0d C=%0d w=%0d q=%0d sum=%0d expected %0d", dv, cv, wv, qv,
                   $signed(W'(ws1 + wc1)), nw);
      end
      checks++;
      if (dq1 != W'(dv + 2 * qv * cv) || c1 != W'(cv / 4)) begin
        failures++;
        if (failures < 10) $display("FAIL D/C update D=%0d C=%0d q=%0d", dv, cv, qv);
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
