// tb_srt_otf: self-checking testbench of the on-the-fly converter.
//
// Feeds random strings of radix-4 digits from {-2..2} through the converter,
// one step at a time starting from Q = 0 and QM = -1, and compares after
// every step Q with the integer sum of the digits weighted by powers of 4, and
// QM with Q - 1, both as QW-bit two's complement words.
`timescale 1ns/1ps
module tb_srt_otf;
  import srt_pkg::*;

  localparam int QW = 26;
  localparam int K  = 12;   // digits per string
  qdigit_t       q;
  logic [QW-1:0] q_in, qm_in, q_out, qm_out;
  int checks = 0, failures = 0;

  srt_otf #(.QW(QW)) dut (.q(q), .q_in(q_in), .qm_in(qm_in), .q_out(q_out), .qm_out(qm_out));

  function automatic qdigit_t code(int v);
    case (v)
      -2: return 4'b1000;
      -1: return 4'b0100;
       1: return 4'b0001;
       2: return 4'b0010;
      default: return 4'b0000;
    endcase
  endfunction

  initial begin
    longint val;
    for (int t = 0; t < 2000; t++) begin
      q_in = '0; qm_in = '1; val = 0;
      for (int j = 0; j < K; j++) begin
        int dv;
        dv = int'($urandom_range(0, 4)) - 2;
        if (j == 0 && t % 2 == 0) dv = int'($urandom_range(1, 2));  // positive strings too
        q = code(dv);
        #1;
        val = val * 4 + longint'(dv);
        checks++;
        if (q_out != QW'(val) || qm_out != QW'(val - 1)) begin
          failures++;
          if (failures < 10)
            $display("FAIL t=%0d j=%0d digit=%0d Q=%h QM=%h expected %h", t, j, dv, q_out, qm_out, QW'(val));
        end
        q_in = q_out; qm_in = qm_out;
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
