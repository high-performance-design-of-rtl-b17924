// tb_srt_sel_t2: exhaustive check of the quotient-digit selection for the
// reciprocal (8 intervals of d in [1/2,1)).
//
// For every divisor interval and every 7-bit residual estimate y the chosen
// digit q must keep the next residual bounded: |4w - q d| <= 2/3 d for every
// true value 4w in [y, y + 2/16) (the carry-save estimate error) and every d
// in the interval, wherever |4w| <= 8/3 d can occur. Both conditions are
// linear, so the interval ends are checked, in integers scaled by 96*8.
// The one-hot code must be one of the five legal codes, and all five digits
// must occur.
`timescale 1ns/1ps
module tb_srt_sel_t2;
  import srt_pkg::*;

  localparam int NI = 8;
  logic [2:0] d_idx;
  logic [6:0] y;
  qdigit_t    q;
  int checks = 0, failures = 0;
  int seen [5] = '{0, 0, 0, 0, 0};

  srt_sel_t2 dut (.d_idx(d_idx), .y(y), .q(q));

  initial begin
    int qv, yv, dsc, ysc;
    for (int i = 0; i < NI; i++) begin
      for (int yy = -64; yy < 64; yy++) begin
        d_idx = 3'(i);
        y     = 7'(yy);
        #1;
        checks++;
        if (!(q inside {Q_M2, Q_M1, Q_Z, Q_P1, Q_P2})) begin
          failures++;
          $display("FAIL illegal code %b at i=%0d y=%0d", q, i, yy);
        end
        qv = int'(qdigit_value(q));
        seen[qv + 2]++;
        for (int de = 0; de < 2; de++) begin
          dsc = 48 * (NI + i + de);                  // d * 96 * NI
          for (int ye = 0; ye < 2; ye++) begin
            yv  = yy + 2 * ye;                       // upper end approached from below
            ysc = 6 * NI * yv;                       // y/16 * 96 * NI
            if (ysc > 128 * (NI + i + de) || ysc < -128 * (NI + i + de)) continue;
            checks++;
            if (ysc - qv * dsc > 32 * (NI + i + de) || qv * dsc - ysc > 32 * (NI + i + de)) begin
              failures++;
              if (failures < 10)
                $display("FAIL bound i=%0d y=%0d q=%0d d_end=%0d y_end=%0d", i, yy, qv, de, ye);
            end
          end
        end
      end
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("FAIL digit %0d never selected", k - 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
