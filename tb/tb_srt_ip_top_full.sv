// tb_srt_ip_top_full: the top level at its default parameters (single
// precision, round to nearest even, no pipeline registers), run on the
// verification workload of the components:
// - the twelve corner-case operands (+-signalling NaN, +-quiet NaN, +-normal,
//   +-denormal, +-infinity, +-zero) on every component, crossed with each
//   other for the division (144 pairs);
// - NDIV = 10 million random operand pairs for the division and NONE = 5
//   million random operands each for the reciprocal and the inverse square
//   root (the operand counts used to verify the original design).
// Every result and status is compared with the exact reference model.
// Coverage is counted with plain bin counters, and a bin that is never hit
// counts as a failure:
// - reciprocal and inverse square root: 64 bins each on the top six fraction
//   bits of normal operands and of normal results;
// - division: the top five fraction bits of normal a crossed with those of
//   normal b (32 x 32), and the operand class (normal, +-zero, +-denormal,
//   +-infinity, +-NaN) of a crossed with that of b (9 x 9); 64 bins on the
//   top six fraction bits of normal quotients.
// Outputs that must never appear count as failures when they do: a denormal
// or NaN result, and status bit 6, which no component drives.
`timescale 1ns/1ps
module tb_srt_ip_top_full;
  import srt_pkg::*;
  import srt_ref_pkg::*;

  localparam int NDIV = 10000000;
  localparam int NONE = 5000000;

  logic clk = 0, rst_n = 0;
  logic [31:0] da, db, dz, ra, rz, ia, iz;
  logic [7:0]  ds, rs, is_;
  int checks = 0, failures = 0;

  srt_ip_top dut (
    .clk(clk), .rst_n(rst_n),
    .div_a(da), .div_b(db), .div_z(dz), .div_status(ds),
    .recip_a(ra), .recip_z(rz), .recip_status(rs),
    .isqrt_a(ia), .isqrt_z(iz), .isqrt_status(is_));

  localparam logic [31:0] CORNER [12] = '{
    32'h7f80_0001, 32'hff80_0001,   // signalling NaN
    32'h7fc0_0000, 32'hffc0_0000,   // quiet NaN
    32'h3fc0_0000, 32'hbfc0_0000,   // normal +-1.5
    32'h0000_0f00, 32'h8000_0f00,   // denormal
    32'h7f80_0000, 32'hff80_0000,   // infinity
    32'h0000_0000, 32'h8000_0000};  // zero

  // ---------------- coverage bins
  int cov_r_in [64], cov_r_out [64], cov_i_in [64], cov_i_out [64], cov_d_out [64];
  int cov_d_norm [32][32], cov_d_cls [9][9];
  int illegal = 0;

  function automatic int cls(logic [31:0] x);
    logic [7:0] e; logic nz;
    e = x[30:23]; nz = |x[22:0];
    if (e != 8'h00 && e != 8'hff) return 0;
    return (e == 8'h00 ? (nz ? 3 : 1) : (nz ? 7 : 5)) + int'(x[31]);
  endfunction

  function automatic void cover_out(logic [31:0] z, logic [7:0] st, ref int cnt [64]);
    if (cls(z) == 0) cnt[z[22:17]]++;
    if (cls(z) == 3 || cls(z) == 4 || cls(z) >= 7 || st[6]) illegal++;
  endfunction

  task automatic check_all();
    u64 ez; logic [7:0] es;
    #1;
    cov_d_cls[cls(da)][cls(db)]++;
    if (cls(da) == 0 && cls(db) == 0) cov_d_norm[da[22:18]][db[22:18]]++;
    if (cls(ra) == 0) cov_r_in[ra[22:17]]++;
    if (cls(ia) == 0) cov_i_in[ia[22:17]]++;
    cover_out(dz, ds, cov_d_out);
    cover_out(rz, rs, cov_r_out);
    cover_out(iz, is_, cov_i_out);
    ref_div(u64'(da), u64'(db), 23, 8, 0, ez, es);
    checks++;
    if (u64'(dz) != ez || ds != es) begin
      failures++;
      if (failures < 10) $display("FAIL div %h / %h = %h (%b) expected %h (%b)", da, db, dz, ds, ez, es);
    end
    ref_recip(u64'(ra), 23, 8, 0, ez, es);
    checks++;
    if (u64'(rz) != ez || rs != es) begin
      failures++;
      if (failures < 10) $display("FAIL recip %h = %h expected %h", ra, rz, ez);
    end
    ref_invsqrt(u64'(ia), 23, 8, 0, ez, es);
    checks++;
    if (u64'(iz) != ez || is_ != es) begin
      failures++;
      if (failures < 10) $display("FAIL isqrt %h = %h expected %h", ia, iz, ez);
    end
  endtask

  initial begin
    for (int i = 0; i < 12; i++)
      for (int k = 0; k < 12; k++) begin
        da = CORNER[i]; db = CORNER[k]; ra = CORNER[k]; ia = CORNER[k];
        check_all();
      end
    for (int n = 0; n < NDIV; n++) begin
      da = 32'(gen_operand(23, 8)); db = 32'(gen_operand(23, 8));
      ra = 32'(gen_operand(23, 8)); ia = 32'(gen_operand(23, 8));
      if (n % 2 == 0) ia[31] = 1'b0;
      if (n >= NONE) begin ra = 32'h3f80_0000; ia = 32'h3f80_0000; end
      check_all();
    end
    report_coverage();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int empty64(int cnt [64]);
    int n = 0;
    foreach (cnt[i]) if (cnt[i] == 0) n++;
    return n;
  endfunction

  function automatic void report_coverage();
    int e_dn = 0, e_dc = 0, e [5];
    foreach (cov_d_norm[i, k]) if (cov_d_norm[i][k] == 0) e_dn++;
    foreach (cov_d_cls[i, k]) if (cov_d_cls[i][k] == 0) e_dc++;
    e[0] = empty64(cov_r_in); e[1] = empty64(cov_r_out);
    e[2] = empty64(cov_i_in); e[3] = empty64(cov_i_out); e[4] = empty64(cov_d_out);
    $display("empty bins: div normal cross %0d/1024, div class cross %0d/81, div out %0d/64,",
             e_dn, e_dc, e[4]);
    $display("            recip in %0d/64 out %0d/64, isqrt in %0d/64 out %0d/64; illegal outputs %0d",
             e[0], e[1], e[2], e[3], illegal);
    checks += 7;
    failures += (e_dn != 0) + (e_dc != 0) + (illegal != 0);
    foreach (e[i]) failures += (e[i] != 0);
  endfunction

  initial begin
    #(64'd2 * NDIV + 64'd100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
