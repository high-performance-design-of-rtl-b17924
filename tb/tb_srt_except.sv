// tb_srt_except: self-checking testbench of the special-case handling.
//
// Half-precision format. Instances for division, reciprocal and inverse
// square root. Operands are drawn from the classes +-zero, +-denormal,
// +-infinity, +-NaN and +-normal; the datapath inputs are random. For
// special operands the result and status must follow the rules below, for
// normal operands the datapath result and flags must pass unchanged.
// The rules are listed next to the checks below.
`timescale 1ns/1ps
module tb_srt_except;
  import srt_pkg::*;

  localparam int SW = 10, EWD = 5;
  localparam logic [15:0] PINF = 16'h7c00;
  logic [15:0] a, b, zdp;
  logic        dh, dt, dx, di, dz;
  logic [15:0] z [3];
  logic [7:0]  st [3];
  int checks = 0, failures = 0;

  srt_except #(.sig_width(SW), .exp_width(EWD), .op(OP_DIV)) dut_div (
    .a(a), .b(b), .z_dp(zdp), .dp_huge(dh), .dp_tiny(dt), .dp_inexact(dx), .dp_inf(di),
    .dp_zero(dz), .z(z[0]), .status(st[0]));
  srt_except #(.sig_width(SW), .exp_width(EWD), .op(OP_RECIP)) dut_rec (
    .a(a), .b(b), .z_dp(zdp), .dp_huge(dh), .dp_tiny(dt), .dp_inexact(dx), .dp_inf(di),
    .dp_zero(dz), .z(z[1]), .status(st[1]));
  srt_except #(.sig_width(SW), .exp_width(EWD), .op(OP_INVSQRT)) dut_isq (
    .a(a), .b(b), .z_dp(zdp), .dp_huge(dh), .dp_tiny(dt), .dp_inexact(dx), .dp_inf(di),
    .dp_zero(dz), .z(z[2]), .status(st[2]));

  // class: 0 zero, 1 denormal, 2 inf, 3 NaN, 4 normal
  function automatic logic [15:0] make(int cls, logic s);
    logic [9:0] f;
    f = 10'($urandom) | 10'd1;
    case (cls)
      0: return {s, 15'd0};
      1: return {s, 5'd0, f};
      2: return {s, 5'd31, 10'd0};
      3: return {s, 5'd31, f};
      default: return {s, 5'(int'($urandom_range(1, 30))), 10'($urandom)};
    endcase
  endfunction

  task automatic expect_val(int k, logic [15:0] ez, logic [7:0] es);
    checks++;
    if (z[k] != ez || st[k] != es) begin
      failures++;
      if (failures < 12)
        $display("FAIL op%0d a=%h b=%h z=%h st=%b expected %h %b", k, a, b, z[k], st[k], ez, es);
    end
  endtask

  initial begin
    int ca, cb;
    logic sa, sb, s;
    logic [7:0] dps;
    bit az, ai, bz, bi;
    for (int t = 0; t < 3000; t++) begin
      ca = int'($urandom_range(0, 4)); cb = int'($urandom_range(0, 4));
      sa = 1'($urandom); sb = 1'($urandom);
      a = make(ca, sa); b = make(cb, sb);
      zdp = 16'($urandom);
      {dh, dt, dx, di, dz} = 5'($urandom);
      #1;
      dps = {1'b0, 1'b0, dx, dh, dt, 1'b0, di, dz};
      az = (ca <= 1); ai = (ca == 2 || ca == 3);
      bz = (cb <= 1); bi = (cb == 2 || cb == 3);
      s  = sa ^ sb;
      // division
      if ((az && bz) || (ai && bi))  expect_val(0, PINF, 8'b0000_0110);
      else if (ai)                   expect_val(0, {s, 15'h7c00}, 8'b0000_0010);
      else if (bz)                   expect_val(0, {s, 15'h7c00}, 8'b1000_0010);
      else if (az || bi)             expect_val(0, {s, 15'd0}, 8'b0000_0001);
      else                           expect_val(0, zdp, dps);
      // reciprocal
      if (az)                        expect_val(1, {sa, 15'h7c00}, 8'b1000_0010);
      else if (ai)                   expect_val(1, {sa, 15'd0}, 8'b0000_0001);
      else                           expect_val(1, zdp, dps);
      // inverse square root
      if (az)                        expect_val(2, {sa, 15'h7c00}, 8'b1000_0010);
      else if (sa)                   expect_val(2, PINF, 8'b0000_0110);
      else if (ai)                   expect_val(2, 16'd0, 8'b0000_0001);
      else                           expect_val(2, zdp, dps);
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
