// tb_srt_pipe_reg: self-checking testbench of the optional register rank.
//
// Instantiates all twelve combinations of pipe_stages (0..3) and rank (1..3)
// on a common random input stream. A rank must delay its input by exactly
// one cycle when present and pass it through unchanged when absent; the
// presence pattern must be rank 1 and 3 for pipe_stages 2 and 3, rank 2 for
// pipe_stages 1 and 3, so the number of present ranks equals pipe_stages.
// The reset must clear a present rank.
`timescale 1ns/1ps
module tb_srt_pipe_reg;

  localparam int W = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [W-1:0] d, d_prev;
  logic [W-1:0] q [4][3];
  int checks = 0, failures = 0;

  for (genvar s = 0; s < 4; s++) begin : g_s
    for (genvar r = 0; r < 3; r++) begin : g_r
      srt_pipe_reg #(.W(W), .pipe_stages(s), .RANK(r + 1)) dut (
        .clk(clk), .rst_n(rst_n), .d(d), .q(q[s][r]));
    end
  end

  function automatic bit present(int s, int r);
    return (r == 2) ? (s == 1 || s == 3) : (s >= 2);
  endfunction

  initial begin
    int npres;
    d = W'($urandom);
    #1;
    // during reset a present rank holds zero
    for (int s = 0; s < 4; s++)
      for (int r = 1; r <= 3; r++) begin
        checks++;
        if (present(s, r) && q[s][r-1] != '0) begin
          failures++; $display("FAIL reset s=%0d r=%0d", s, r);
        end
      end
    @(negedge clk); rst_n = 1;
    for (int c = 0; c < 200; c++) begin
      d_prev = d;
      @(posedge clk);
      #1;
      d = W'($urandom);
      #1;
      for (int s = 0; s < 4; s++) begin
        npres = 0;
        for (int r = 1; r <= 3; r++) begin
          npres += present(s, r);
          checks++;
          if (q[s][r-1] != (present(s, r) ? d_prev : d)) begin
            failures++;
            if (failures < 10) $display("FAIL s=%0d r=%0d q=%h", s, r, q[s][r-1]);
          end
        end
        checks++;
        if (npres != s) begin failures++; $display("FAIL rank count for s=%0d", s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
