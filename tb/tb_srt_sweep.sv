// tb_srt_sweep: parameter sweep of the three SRT components.
//
// Every combination of format (half, single, bfloat16), rounding mode (all
// six) and pipe_stages (0..3) is instantiated for division, reciprocal and
// inverse square root: 3 x 3 x 6 x 4 = 216 instances. All instances of one
// format share the operands applied in a cycle; each output is compared,
// pipe_stages cycles later, with the reference model, value and status.
`timescale 1ns/1ps
module tb_srt_sweep;
  import srt_pkg::*;
  import srt_ref_pkg::*;

  localparam int NCYC = 4000;
  localparam int HIST = 4;
  localparam int SW [3] = '{10, 23, 7};
  localparam int EW [3] = '{5, 8, 8};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] opa [3], opb [3];
  logic [31:0] zz [3][3][6][4];    // [op][format][mode][pipe]
  logic [7:0]  ss [3][3][6][4];

  for (genvar f = 0; f < 3; f++) begin : g_fmt
    localparam int N = 1 + SW[f] + EW[f];
    for (genvar m = 0; m < 6; m++) begin : g_mode
      for (genvar p = 0; p < 4; p++) begin : g_pipe
        logic [N-1:0] zd, zr, zi;
        srt_div #(.sig_width(SW[f]), .exp_width(EW[f]), .round(round_mode_e'(m)),
                  .pipe_stages(p)) u_div (
          .clk(clk), .rst_n(rst_n), .a(opa[f][N-1:0]), .b(opb[f][N-1:0]),
          .z(zd), .status(ss[0][f][m][p]));
        srt_recip #(.sig_width(SW[f]), .exp_width(EW[f]), .round(round_mode_e'(m)),
                    .pipe_stages(p)) u_recip (
          .clk(clk), .rst_n(rst_n), .a(opa[f][N-1:0]), .z(zr), .status(ss[1][f][m][p]));
        srt_invsqrt #(.sig_width(SW[f]), .exp_width(EW[f]), .round(round_mode_e'(m)),
                      .pipe_stages(p)) u_isqrt (
          .clk(clk), .rst_n(rst_n), .a(opa[f][N-1:0]), .z(zi), .status(ss[2][f][m][p]));
        assign zz[0][f][m][p] = 32'(zd);
        assign zz[1][f][m][p] = 32'(zr);
        assign zz[2][f][m][p] = 32'(zi);
      end
    end
  end

  u64 ha [HIST][3], hb [HIST][3];   // operands applied 0..HIST-1 cycles ago
  int applied = 0;

  initial begin
    u64 ez; logic [7:0] es;
    for (int f = 0; f < 3; f++) begin opa[f] = 0; opb[f] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < NCYC; c++) begin
      @(negedge clk);
      for (int i = HIST - 1; i > 0; i--) begin ha[i] = ha[i-1]; hb[i] = hb[i-1]; end
      for (int f = 0; f < 3; f++) begin
        ha[0][f] = gen_operand(SW[f], EW[f]);
        hb[0][f] = gen_operand(SW[f], EW[f]);
        opa[f] = 32'(ha[0][f]);
        opb[f] = 32'(hb[0][f]);
      end
      applied++;
      #1;
      for (int f = 0; f < 3; f++)
        for (int p = 0; p < 4; p++) begin
          if (applied <= p) continue;
          for (int m = 0; m < 6; m++)
            for (int op = 0; op < 3; op++) begin
              case (op)
                0: ref_div(ha[p][f], hb[p][f], SW[f], EW[f], m, ez, es);
                1: ref_recip(ha[p][f], SW[f], EW[f], m, ez, es);
                default: ref_invsqrt(ha[p][f], SW[f], EW[f], m, ez, es);
              endcase
              checks++;
              if (u64'(zz[op][f][m][p]) != ez || ss[op][f][m][p] != es) begin
                failures++;
                if (failures <= 10)
                  $display("FAIL op%0d fmt%0d mode%0d pipe%0d a=%h b=%h z=%h exp=%h status=%b exp=%b",
                           op, f, m, p, ha[p][f], hb[p][f], zz[op][f][m][p], ez,
                           ss[op][f][m][p], es);
              end
            end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
