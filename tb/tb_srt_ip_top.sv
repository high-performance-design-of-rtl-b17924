// tb_srt_ip_top: end-to-end testbench of the three SRT components.
//
// Drives the top level twice over: once at its default parameters (single
// precision, round to nearest even, combinational) and once in half precision
// rounding away from zero with three pipeline ranks. Every cycle each
// component gets new operands; outputs are compared with the exact reference
// model (srt_ref_pkg), the pipelined copy three cycles later. The test counts
// how often each mechanism of the design occurred and fails if one never did:
// quotient normalization by 2 and by 3 bit positions, negative digits, the
// final QM correction, a reciprocal or inverse square root equal to 2, odd and
// even exponents in the inverse square root, a rounding increment, a rounding
// carry renormalized (which for these operations needs a directed rounding
// mode), overflow, a tiny result flushed to zero and to MinNorm,
// divide-by-zero, invalid operations and results through pipeline registers.
`timescale 1ns/1ps
module tb_srt_ip_top;
  import srt_pkg::*;
  import srt_ref_pkg::*;

  localparam int NCYC = 20000;
  localparam int NMECH = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int mech [NMECH];
  string mech_name [NMECH] = '{"div normalize by 2", "div normalize by 3", "negative digit",
    "QM correction", "reciprocal equals 2", "inverse sqrt equals 2", "odd exponent",
    "even exponent", "rounding increment", "rounding carry", "overflow", "flush to zero",
    "flush to MinNorm", "divide by zero", "invalid", "pipelined result"};

  // default instance
  logic [31:0] da, db, dz, ra, rz, ia, iz;
  logic [7:0]  ds, rs, is_;
  srt_ip_top dut (
    .clk(clk), .rst_n(rst_n),
    .div_a(da), .div_b(db), .div_z(dz), .div_status(ds),
    .recip_a(ra), .recip_z(rz), .recip_status(rs),
    .isqrt_a(ia), .isqrt_z(iz), .isqrt_status(is_));

  // half precision, away from zero, three pipeline ranks
  logic [15:0] hda, hdb, hdz, hra, hrz, hia, hiz;
  logic [7:0]  hds, hrs, his;
  srt_ip_top #(.sig_width(10), .exp_width(5), .round(AWAY_ZERO), .pipe_stages(3)) dut_h (
    .clk(clk), .rst_n(rst_n),
    .div_a(hda), .div_b(hdb), .div_z(hdz), .div_status(hds),
    .recip_a(hra), .recip_z(hrz), .recip_status(hrs),
    .isqrt_a(hia), .isqrt_z(hiz), .isqrt_status(his));

  task automatic check(string tag, u64 got, u64 exp, logic [7:0] gs, logic [7:0] es);
    checks++;
    if (got != exp || gs != es) begin
      failures++;
      if (failures <= 10) $display("FAIL %s z=%h expected %h status=%b expected %b", tag, got, exp, gs, es);
    end
  endtask

  // expected results of the pipelined copy, 3 deep
  u64 hq [4][3];
  logic [7:0] hqs [4][3];

  initial begin
    u64 ez; logic [7:0] es;
    foreach (mech[i]) mech[i] = 0;
    da = 0; db = 0; ra = 0; ia = 0; hda = 0; hdb = 0; hra = 0; hia = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < NCYC; c++) begin
      @(negedge clk);
      da = 32'(gen_operand(23, 8)); db = 32'(gen_operand(23, 8));
      ra = 32'(gen_operand(23, 8)); ia = 32'(gen_operand(23, 8));
      if (c % 7 == 0) ia[31] = 1'b0;
      hda = 16'(gen_operand(10, 5)); hdb = 16'(gen_operand(10, 5));
      hra = 16'(gen_operand(10, 5)); hia = 16'(gen_operand(10, 5));
      // 1/sqrt of a value just above a power of four lies just below 2 and
      // rounds away from zero to 2
      if (c % 50 == 0) hia = {1'b0, 5'(2 * $urandom_range(1, 14) + 1), 10'($urandom_range(1, 2))};
      for (int k = 3; k > 0; k--) begin hq[k] = hq[k-1]; hqs[k] = hqs[k-1]; end
      ref_div(u64'(hda), u64'(hdb), 10, 5, 5, hq[0][0], hqs[0][0]);
      ref_recip(u64'(hra), 10, 5, 5, hq[0][1], hqs[0][1]);
      ref_invsqrt(u64'(hia), 10, 5, 5, hq[0][2], hqs[0][2]);
      #1;
      ref_div(u64'(da), u64'(db), 23, 8, 0, ez, es);   check("div", u64'(dz), ez, ds, es);
      ref_recip(u64'(ra), 23, 8, 0, ez, es);           check("recip", u64'(rz), ez, rs, es);
      ref_invsqrt(u64'(ia), 23, 8, 0, ez, es);         check("isqrt", u64'(iz), ez, is_, es);
      if (c >= 3) begin
        check("half div", u64'(hdz), hq[3][0], hds, hqs[3][0]);
        check("half recip", u64'(hrz), hq[3][1], hrs, hqs[3][1]);
        check("half isqrt", u64'(hiz), hq[3][2], his, hqs[3][2]);
        if (hqs[3][0][ST_ZERO] == 0 && hqs[3][0][ST_INF] == 0) mech[15]++;
      end
      // mechanism counters (internal signals of the default instance, taken
      // only for normal operands, where the datapath result is used)
      if (ds[ST_INF:ST_ZERO] == 0 && ds[ST_INVALID] == 0 && ds[ST_TINY] == 0) begin
        if (dut.u_div.hi)  mech[0]++;
        else               mech[1]++;
        if (dut.u_div.w[$bits(dut.u_div.w)-1]) mech[3]++;
        if (dut.u_div.u_round.inc) mech[8]++;
      end
      if (dut.u_div.g_step[1].q_dig inside {Q_M1, Q_M2}) mech[2]++;
      if (rs[ST_INF:ST_ZERO] == 0 && rs[ST_TINY] == 0 && dut.u_recip.hi) mech[4]++;
      if (is_[ST_INF:ST_ZERO] == 0 && is_[ST_INVALID] == 0) begin
        if (dut.u_isqrt.hi) mech[5]++;
        if (dut.u_isqrt.odd) mech[6]++;
        else                 mech[7]++;
      end
      if (dut_h.u_isqrt.sig_r[$bits(dut_h.u_isqrt.sig_r)-1] && his[ST_INF:ST_ZERO] == 0 &&
          his[ST_INVALID] == 0) mech[9]++;
      if (ds[ST_HUGE]) mech[10]++;
      if (ds[ST_TINY] || rs[ST_TINY]) mech[11]++;
      if (hds[ST_TINY] && !hds[ST_ZERO]) mech[12]++;
      if (ds[ST_DIVZERO] || rs[ST_DIVZERO] || is_[ST_DIVZERO]) mech[13]++;
      if (ds[ST_INVALID] || is_[ST_INVALID]) mech[14]++;
    end
    for (int i = 0; i < NMECH; i++) begin
      $display("mechanism %-24s %0d", mech_name[i], mech[i]);
      checks++;
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL mechanism %s never occurred", mech_name[i]);
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
