// tb_srt_div_step: self-checking testbench of one division recurrence step.
//
// For both selection tables: draws a divisor d in [1/2, 1) and a residual w
// with |w| <= 2/3 d (the bound the recurrence keeps), splits w at random into
// a carry-save pair, and checks that the step returns a carry-save pair whose
// sum is exactly 4w - q d, that the new residual is again within 2/3 d, that
// q is a legal digit, and that Q and QM were advanced by that digit.
`timescale 1ns/1ps
module tb_srt_div_step;
  import srt_pkg::*;

  localparam int F  = 20;
  localparam int W  = F + 3;
  localparam int QW = 16;
  int checks = 0, failures = 0;

  logic [W-1:0]  ws, wc, d;
  logic [QW-1:0] qi, qmi;
  logic [W-1:0]  ws1 [2], wc1 [2];
  logic [QW-1:0] qo [2], qmo [2];
  qdigit_t       q [2];

  srt_div_step #(.F(F), .W(W), .QW(QW), .TABLE(1)) dut1 (
    .ws_in(ws), .wc_in(wc), .d(d), .q_in(qi), .qm_in(qmi),
    .ws_out(ws1[0]), .wc_out(wc1[0]), .q_out(qo[0]), .qm_out(qmo[0]), .q(q[0]));
  srt_div_step #(.F(F), .W(W), .QW(QW), .TABLE(2)) dut2 (
    .ws_in(ws), .wc_in(wc), .d(d), .q_in(qi), .qm_in(qmi),
    .ws_out(ws1[1]), .wc_out(wc1[1]), .q_out(qo[1]), .qm_out(qmo[1]), .q(q[1]));

  initial begin
    longint dv, wv, lim, nw, qv, rq;
    for (int t = 0; t < 20000; t++) begin
      dv  = longint'((1 << (F - 1)) + $urandom_range(0, (1 << (F - 1)) - 1));
      lim = (2 * dv) / 3;
      wv  = longint'($urandom_range(0, 2 * 32'(lim))) - lim;
      ws  = W'($urandom);
      wc  = W'(wv) - ws;
      d   = W'(dv);
      qi  = QW'($urandom); qmi = qi - 1'b1;
      #1;
      for (int k = 0; k < 2; k++) begin
        qv = longint'(qdigit_value(q[k]));
        nw = 4 * wv - qv * dv;
        checks++;
        if (!(q[k] inside {Q_M2, Q_M1, Q_Z, Q_P1, Q_P2}) || W'(ws1[k] + wc1[k]) != W'(nw) ||
            nw > lim || nw < -lim) begin
          failures++;
          if (failures < 10)
            $display("FAIL table%0d d=%0d w=%0d q=%0d sum=%0d expected %0d", k + 1, dv, wv, qv,
                     $signed(W'(ws1[k] + wc1[k])), nw);
        end
        rq = longint'(qi) * 4 + qv;
        checks++;
        if (qo[k] != QW'(rq) || qmo[k] != QW'(rq - 1)) begin
          failures++;
          if (failures < 10) $display("FAIL table%0d on-the-fly conversion", k + 1);
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
