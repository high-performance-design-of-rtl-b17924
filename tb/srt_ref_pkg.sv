// srt_ref_pkg: reference model for the SRT floating-point testbenches.
//
// Computes the expected result and status flags of division, reciprocal and
// inverse square root directly from the operands with wide integer
// arithmetic (long division and integer square root), independent of the
// digit-recurrence hardware. Formats are given at run time (sw = fraction
// bits, ew = exponent bits, up to 60 bits in all); rounding modes use the
// encoding of srt_pkg::round_mode_e. Conventions checked: denormal operands
// count as zero, NaN operands as infinity, results never denormal (tiny
// results flush to zero or MinNorm by mode), invalid operations give +inf
// with the invalid flag; status = {divzero, 0, inexact, huge, tiny, invalid,
// inf, zero}.
package srt_ref_pkg;

  typedef logic [63:0]  u64;
  typedef logic [127:0] u128;

  // integer square root, floor
  function automatic u128 isqrt(u128 v);
    u128 r, bitv;
    r = 0;
    for (int i = 63; i >= 0; i--) begin
      bitv = r | (u128'(1) << i);
      if (bitv * bitv <= v) r = bitv;
    end
    return r;
  endfunction

  // round m = {1, sw fraction bits, 2 more bits} (sw+3 bits) plus sticky,
  // biased exponent e, to the format; returns z and status
  function automatic void round_pack(input int sw, input int ew, input int mode,
                                     input logic sign, input u128 m, input logic st,
                                     input int e, output u64 z, output logic [7:0] status);
    logic lsb, g, rest, inc, away;
    u128  mr;
    int   emax;
    emax   = (1 << ew) - 1;
    status = '0;
    lsb  = m[2];
    g    = m[1];
    rest = m[0] | st;
    case (mode)
      0: inc = g & (lsb | rest);
      1: inc = 0;
      2: inc = !sign & (g | rest);
      3: inc = sign & (g | rest);
      4: inc = g & (!sign | rest);
      default: inc = g | rest;
    endcase
    away = (mode == 5) || (mode == 2 && !sign) || (mode == 3 && sign);
    mr = (m >> 2) + u128'(inc);
    if (mr >= (u128'(1) << (sw + 1))) begin
      mr = mr >> 1;
      e  = e + 1;
    end
    status[5] = g | rest;
    if (e >= emax) begin
      status[4] = 1; status[5] = 1;
      if (mode == 0 || mode == 4 || away) begin
        z = (u64'(sign) << (sw + ew)) | (u64'(emax) << sw);
        status[1] = 1;
      end else begin
        z = (u64'(sign) << (sw + ew)) | (u64'(emax - 1) << sw) | ((u64'(1) << sw) - 1);
      end
    end else if (e <= 0) begin
      status[3] = 1; status[5] = 1;
      if (away) z = (u64'(sign) << (sw + ew)) | (u64'(1) << sw);
      else begin
        z = u64'(sign) << (sw + ew);
        status[0] = 1;
      end
    end else begin
      z = (u64'(sign) << (sw + ew)) | (u64'(e) << sw) | u64'(mr & ((u128'(1) << sw) - 1));
    end
  endfunction

  function automatic u64 inf_of(int sw, int ew, logic s);
    return (u64'(s) << (sw + ew)) | (((u64'(1) << ew) - 1) << sw);
  endfunction

  function automatic void fields(u64 x, int sw, int ew, output logic s, output int e,
                                 output u128 m, output logic is_z, output logic is_i);
    s    = x[sw + ew];
    e    = int'((x >> sw) & ((u64'(1) << ew) - 1));
    m    = u128'(x & ((u64'(1) << sw) - 1)) | (u128'(1) << sw);
    is_z = (e == 0);
    is_i = (e == (1 << ew) - 1);
  endfunction

  function automatic void ref_div(input u64 a, input u64 b, input int sw, input int ew,
                                  input int mode, output u64 z, output logic [7:0] status);
    logic sa, sb, za, zb, ia, ib, s;
    int   ea, eb, bias;
    u128  ma, mb, qi, m;
    logic st;
    bias = (1 << (ew - 1)) - 1;
    fields(a, sw, ew, sa, ea, ma, za, ia);
    fields(b, sw, ew, sb, eb, mb, zb, ib);
    s = sa ^ sb;
    status = '0;
    if ((za && zb) || (ia && ib)) begin
      z = inf_of(sw, ew, 0); status[2] = 1; status[1] = 1;
    end else if (ia || zb) begin
      z = inf_of(sw, ew, s); status[1] = 1; status[7] = zb && !ia;
    end else if (za || ib) begin
      z = u64'(s) << (sw + ew); status[0] = 1;
    end else begin
      // ma/mb in (1/2, 2): qi = floor(ma * 2^(sw+3) / mb)
      qi = (ma << (sw + 3)) / mb;
      st = ((ma << (sw + 3)) % mb) != 0;
      if (qi >= (u128'(1) << (sw + 3))) begin
        m = qi >> 1; st = st | qi[0];
        round_pack(sw, ew, mode, s, m, st, ea - eb + bias, z, status);
      end else begin
        round_pack(sw, ew, mode, s, qi, st, ea - eb + bias - 1, z, status);
      end
    end
  endfunction

  function automatic void ref_recip(input u64 a, input int sw, input int ew,
                                    input int mode, output u64 z, output logic [7:0] status);
    u64 one;
    // 1/a = 1.0 / a with 1.0 = biased exponent bias, fraction 0
    one = u64'((1 << (ew - 1)) - 1) << sw;
    if (((a >> sw) & ((u64'(1) << ew) - 1)) == 0) begin
      z = inf_of(sw, ew, a[sw + ew]); status = '0; status[1] = 1; status[7] = 1;
    end else begin
      ref_div(one, a, sw, ew, mode, z, status);
    end
  endfunction

  function automatic void ref_invsqrt(input u64 a, input int sw, input int ew,
                                      input int mode, output u64 z, output logic [7:0] status);
    logic sa, za, ia, st;
    int   ea, bias, eu, k;
    u128  ma, num, qi;
    bias = (1 << (ew - 1)) - 1;
    fields(a, sw, ew, sa, ea, ma, za, ia);
    status = '0;
    if (za) begin
      z = inf_of(sw, ew, sa); status[1] = 1; status[7] = 1;
    end else if (sa) begin
      z = inf_of(sw, ew, 0); status[2] = 1; status[1] = 1;
    end else if (ia) begin
      z = 0; status[0] = 1;
    end else begin
      // a = m * 2^eu, m = ma / 2^sw. Make the exponent even: a = m' * 2^(2k),
      // m' = ma * 2^t / 2^sw with t = 0 or 1. 1/sqrt(a) = 2^-k / sqrt(m').
      eu = ea - bias;
      if (eu % 2 != 0) begin
        k   = (eu - 1) / 2;
        if ((eu - 1) % 2 != 0) k = k - 1;
        num = ma << 1;
      end else begin
        k   = eu / 2;
        num = ma;
      end
      // qi = floor(2^(sw+3) / sqrt(num / 2^sw)) = isqrt(2^(2sw+6+sw) / num)
      qi = isqrt((u128'(1) << (3 * sw + 6)) / num);
      st = (qi * qi * num) != (u128'(1) << (3 * sw + 6));
      // 1/sqrt(m') lies in (1/sqrt 2, 1]; qi has sw+3 or sw+4 bits
      if (qi >= (u128'(1) << (sw + 3))) begin
        st = st | qi[0];
        round_pack(sw, ew, mode, 0, qi >> 1, st, bias - k, z, status);
      end else begin
        round_pack(sw, ew, mode, 0, qi, st, bias - k - 1, z, status);
      end
    end
  endfunction

  // random operand: plain random bits, or (by chance) zero, denormal,
  // infinity, NaN, a power of two, an all-ones fraction, or an exponent at
  // either end of the range
  function automatic u64 gen_operand(int sw, int ew);
    u64 v; int kind; int e;
    kind = int'($urandom_range(0, 19));
    v = {$urandom, $urandom} & ((u64'(1) << (sw + ew + 1)) - 1);
    e = int'((v >> sw) & ((u64'(1) << ew) - 1));
    case (kind)
      0: e = 0;
      1: e = (1 << ew) - 1;
      2: v = v & ~((u64'(1) << sw) - 1);
      3: e = int'($urandom_range(1, 3));
      4: e = (1 << ew) - 2 - int'($urandom_range(0, 2));
      5: v = v | ((u64'(1) << sw) - 1);
      default: ;
    endcase
    if (kind <= 1 && $urandom_range(0, 1) == 0) v = v & ~((u64'(1) << sw) - 1);
    v = (v & ~(((u64'(1) << ew) - 1) << sw)) | (u64'(e) << sw);
    return v;
  endfunction

endpackage
