// srt_except: special-case handling for the three SRT components.
//
// Classifies the operands by their exponent field:
//   exponent 0         -> zero (denormal operands are treated as zero)
//   exponent all ones  -> infinity (NaN operands are treated as infinity)
//   otherwise          -> normal, the datapath result is used
// and replaces the result where an operand is special:
//   division     x/0 = inf (divide-by-zero), inf/x = inf, 0/x = 0, x/inf = 0,
//                0/0 and inf/inf are invalid
//   reciprocal   1/0 = inf (divide-by-zero), 1/inf = 0
//   inv. sqrt    1/sqrt(0) = inf with the sign of the zero (divide-by-zero),
//                1/sqrt(+inf) = +0, a negative operand is invalid
// Signs follow the usual rules (xor of the operand signs for division). An
// invalid operation gives the +infinity pattern with the invalid flag, so the
// output is never a NaN or a denormal.
// status: [0] zero [1] infinity [2] invalid [3] tiny [4] huge [5] inexact
//         [6] always 0 [7] divide by zero.
// The special-value classes follow the design description; treating NaN
// operands as infinity, the invalid-result pattern and the flag layout are this
// implementation's. Purely combinational.
module srt_except
  import srt_pkg::*;
#(
  parameter int      sig_width = 23,
  parameter int      exp_width = 8,
  parameter srt_op_e op        = OP_DIV
) (
  input  logic [sig_width+exp_width:0] a,
  input  logic [sig_width+exp_width:0] b,        // division only
  input  logic [sig_width+exp_width:0] z_dp,     // datapath result
  input  logic                         dp_huge,
  input  logic                         dp_tiny,
  input  logic                         dp_inexact,
  input  logic                         dp_inf,
  input  logic                         dp_zero,
  output logic [sig_width+exp_width:0] z,
  output logic [7:0]                   status
);

  localparam int N = sig_width + exp_width + 1;

  logic sa, sb, za, zb, ia, ib, s;

  assign sa = a[N-1];
  assign sb = b[N-1];
  assign za = (a[N-2:sig_width] == '0);
  assign zb = (b[N-2:sig_width] == '0);
  assign ia = (a[N-2:sig_width] == '1);
  assign ib = (b[N-2:sig_width] == '1);
  assign s  = (op == OP_DIV) ? (sa ^ sb) : sa;

  function automatic logic [N-1:0] inf_val(logic sg);
    return {sg, {exp_width{1'b1}}, {sig_width{1'b0}}};
  endfunction

  function automatic logic [N-1:0] zero_val(logic sg);
    return {sg, {(N-1){1'b0}}};
  endfunction

  always_comb begin
    z      = z_dp;
    status = '0;
    status[ST_ZERO]    = dp_zero;
    status[ST_INF]     = dp_inf;
    status[ST_TINY]    = dp_tiny;
    status[ST_HUGE]    = dp_huge;
    status[ST_INEXACT] = dp_inexact;
    unique case (op)
      OP_DIV: begin
        if ((za && zb) || (ia && ib)) begin
          z = inf_val(1'b0);
          status = '0; status[ST_INVALID] = 1'b1; status[ST_INF] = 1'b1;
        end else if (ia || zb) begin
          z = inf_val(s);
          status = '0; status[ST_INF] = 1'b1; status[ST_DIVZERO] = zb && !ia;
        end else if (za || ib) begin
          z = zero_val(s);
          status = '0; status[ST_ZERO] = 1'b1;
        end
      end
      OP_RECIP: begin
        if (za) begin
          z = inf_val(s);
          status = '0; status[ST_INF] = 1'b1; status[ST_DIVZERO] = 1'b1;
        end else if (ia) begin
          z = zero_val(s);
          status = '0; status[ST_ZERO] = 1'b1;
        end
      end
      default: begin  // OP_INVSQRT
        if (za) begin
          z = inf_val(sa);
          status = '0; status[ST_INF] = 1'b1; status[ST_DIVZERO] = 1'b1;
        end else if (sa) begin
          z = inf_val(1'b0);
          status = '0; status[ST_INVALID] = 1'b1; status[ST_INF] = 1'b1;
        end else if (ia) begin
          z = zero_val(1'b0);
          status = '0; status[ST_ZERO] = 1'b1;
        end
      end
    endcase
  end

endmodule
