// tb_srt_recip: self-checking testbench of the floating-point reciprocal.
//
// Instantiates the reciprocal in single precision once per rounding mode
// (combinational, pipe_stages = 0), in half precision with pipe_stages = 2
// and in bfloat16 with pipe_stages = 3 and 1. Every cycle a new operand
// is applied (random values, values near the exponent limits so that
// results overflow and underflow, and the special classes zero, infinity,
// NaN and denormal); each output is compared, pipe_stages cycles later, with
// the exact result of the reference model (srt_ref_pkg). This also checks the
// latency and that a new operation can start every cycle.
`timescale 1ns/1ps
module tb_srt_recip;
  import srt_pkg::*;
  import srt_ref_pkg::*;

  localparam int NCYC = 6000;
  localparam int HIST = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ---------------- operand generator
  function automatic u64 gen(int sw, int ew);
    u64 v; int kind; int e;
    kind = int'($urandom_range(0, 19));
    v = {$urandom, $urandom} & ((u64'(1) << (sw + ew + 1)) - 1);
    e = int'((v >> sw) & ((u64'(1) << ew) - 1));
    case (kind)
      0: e = 0;                                        // zero or denormal
      1: e = (1 << ew) - 1;                            // inf or NaN
      2: v = v & ~((u64'(1) << sw) - 1);               // power of two
      3: e = int'($urandom_range(1, 3));               // tiny operand
      4: e = (1 << ew) - 2 - int'($urandom_range(0, 2)); // huge operand
      5: v = v & ~((u64'(1) << sw) - 1) | ((u64'(1) << sw) - 1); // all-ones fraction
      default: ;
    endcase
    if (kind == 0 && $urandom_range(0, 1) == 0) v = v & ~((u64'(1) << sw) - 1);
    if (kind == 1 && $urandom_range(0, 1) == 0) v = v & ~((u64'(1) << sw) - 1);
    v = (v & ~(((u64'(1) << ew) - 1) << sw)) | (u64'(e) << sw);
    return v;
  endfunction

  // ---------------- single precision, all six rounding modes, combinational
  logic [31:0] a32, b32;
  logic [31:0] z32 [6];
  logic [7:0]  s32 [6];
  for (genvar m = 0; m < 6; m++) begin : g_mode
    srt_recip #(.sig_width(23), .exp_width(8), .round(round_mode_e'(m)), .pipe_stages(0)) dut (
      .clk(clk), .rst_n(rst_n), .a(a32), .z(z32[m]), .status(s32[m]));
  end

  // ---------------- pipelined instances
  logic [15:0] ah, bh, zh, zb3, zb1, abf, bbf;
  logic [7:0]  sh, sb3, sb1;
  srt_recip #(.sig_width(10), .exp_width(5), .round(IEEE_NEAR), .pipe_stages(2)) dut_h (
    .clk(clk), .rst_n(rst_n), .a(ah), .z(zh), .status(sh));
  srt_recip #(.sig_width(7), .exp_width(8), .round(IEEE_PINF), .pipe_stages(3)) dut_b3 (
    .clk(clk), .rst_n(rst_n), .a(abf), .z(zb3), .status(sb3));
  srt_recip #(.sig_width(7), .exp_width(8), .round(AWAY_ZERO), .pipe_stages(1)) dut_b1 (
    .clk(clk), .rst_n(rst_n), .a(abf), .z(zb1), .status(sb1));

  // expected values history (index 0 = applied this cycle)
  u64 eh [HIST], eb3 [HIST], eb1 [HIST];
  logic [7:0] esh [HIST], esb3 [HIST], esb1 [HIST];
  int valid_cnt = 0;

  task automatic check(string tag, u64 got, u64 exp, logic [7:0] gs, logic [7:0] es,
                       u64 a, u64 b);
    checks++;
    if (got != exp || gs != es) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s a=%h b=%h z=%h exp=%h status=%b exp=%b", tag, a, b, got, exp, gs, es);
    end
  endtask

  u64 ah_h [HIST], bh_h [HIST], abf_h [HIST], bbf_h [HIST];

  initial begin
    u64 ez; logic [7:0] es;
    a32 = 0; b32 = 0; ah = 0; bh = 0; abf = 0; bbf = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < NCYC; c++) begin
      // new operands after the clock edge
      @(negedge clk);
      a32 = 32'(gen(23, 8)); b32 = 32'(gen(23, 8));
      ah  = 16'(gen(10, 5)); bh  = 16'(gen(10, 5));
      abf = 16'(gen(7, 8));  bbf = 16'(gen(7, 8));
      for (int i = HIST - 1; i > 0; i--) begin
        eh[i] = eh[i-1]; esh[i] = esh[i-1]; eb3[i] = eb3[i-1]; esb3[i] = esb3[i-1];
        eb1[i] = eb1[i-1]; esb1[i] = esb1[i-1];
        ah_h[i] = ah_h[i-1]; bh_h[i] = bh_h[i-1]; abf_h[i] = abf_h[i-1]; bbf_h[i] = bbf_h[i-1];
      end
      ref_recip(u64'(ah), 10, 5, 0, eh[0], esh[0]);
      ref_recip(u64'(abf), 7, 8, 2, eb3[0], esb3[0]);
      ref_recip(u64'(abf), 7, 8, 5, eb1[0], esb1[0]);
      ah_h[0] = u64'(ah); bh_h[0] = u64'(bh); abf_h[0] = u64'(abf); bbf_h[0] = u64'(bbf);
      #1;
      for (int m = 0; m < 6; m++) begin
        ref_recip(u64'(a32), 23, 8, m, ez, es);
        check($sformatf("sp mode%0d", m), u64'(z32[m]), ez, s32[m], es, u64'(a32), u64'(b32));
      end
      valid_cnt++;
      // pipelined outputs present the result of the operands of L cycles ago
      if (valid_cnt > 2) check("hp pipe2", u64'(zh), eh[2], sh, esh[2], ah_h[2], bh_h[2]);
      if (valid_cnt > 3) check("bf pipe3", u64'(zb3), eb3[3], sb3, esb3[3], abf_h[3], bbf_h[3]);
      if (valid_cnt > 1) check("bf pipe1", u64'(zb1), eb1[1], sb1, esb1[1], abf_h[1], bbf_h[1]);
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
