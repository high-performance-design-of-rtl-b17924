// tb_srt_round: self-checking testbench of the rounding unit.
//
// One instance per rounding mode (8 fraction bits). For random inputs and
// both signs the expected result is derived from the dropped part r = the
// three bits guard/round/sticky read as a fraction of one ulp (r/8): nearest
// modes compare r with one half, directed modes ask whether r is non-zero.
// Checked: rounded significand (with its carry bit) and the inexact flag.
`timescale 1ns/1ps
module tb_srt_round;
  import srt_pkg::*;

  localparam int SW = 8;
  logic             sign;
  logic [SW+3:0]    sig_in;
  logic [SW+1:0]    sig_out [6];
  logic             inexact [6];
  int checks = 0, failures = 0;

  for (genvar m = 0; m < 6; m++) begin : g_mode
    srt_round #(.sig_width(SW), .round(round_mode_e'(m))) dut (
      .sign(sign), .sig_in(sig_in), .sig_out(sig_out[m]), .inexact(inexact[m]));
  end

  initial begin
    int trunc, r, up, expv;
    for (int t = 0; t < 4000; t++) begin
      sign   = 1'($urandom);
      sig_in = {1'b1, (SW+3)'($urandom)};
      if (t < 16) sig_in = {1'b1, {SW{1'b1}}, 3'(t)};    // carry out of the top
      #1;
      trunc = int'(sig_in >> 3);
      r     = int'(sig_in[2:0]);
      for (int m = 0; m < 6; m++) begin
        case (m)
          0: up = (r > 4) || (r == 4 && trunc % 2 == 1);
          1: up = 0;
          2: up = (r != 0) && !sign;
          3: up = (r != 0) && sign;
          4: up = (r > 4) || (r == 4 && !sign);
          default: up = (r != 0);
        endcase
        expv = trunc + up;
        checks++;
        if (int'(sig_out[m]) != expv || inexact[m] != (r != 0)) begin
          failures++;
          if (failures < 10)
            $display("FAIL mode%0d sign=%b in=%h out=%h expected %h", m, sign, sig_in, sig_out[m], expv);
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
