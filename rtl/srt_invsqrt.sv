// srt_invsqrt: floating-point inverse square root z = 1 / sqrt(a), radix-4 SRT.
//
// Operand and result are sign | biased exponent (exp_width) | fraction
// (sig_width), hidden leading one, no denormals produced. The parts:
// - exponent: with E the unbiased exponent of a, the operand is written as
//   a = d * 4^k with d in [1/4, 1): d = 1.f/4 when E is even, d = 1.f/2 when E
//   is odd (the significand is shifted one bit further left, so that halving
//   the exponent is exact). The result is 1/sqrt(d) * 2^-k with
//   1/sqrt(d) in (1, 2], so the biased result exponent is bias - k, plus one
//   when 1/sqrt(d) is exactly 2 (d = 1/4).
// - significand: the residual w[j] = 4^j (1 - d Q[j]^2) / 2 is reduced by the
//   recurrence of srt_isqrt_step, which keeps D[j] = d Q[j] and
//   C[j] = d 4^-(j+1) / 2 alongside so that every product by a digit is a
//   multiplexer. Digits come from selection table 1 indexed by D. The
//   recurrence starts from a first approximation Q[0] in eighths, read from a
//   six-entry table on the top three bits of d:
//     d in [2/8,3/8) -> 14/8, [3/8,4/8) -> 12/8, [4/8,5/8) -> 11/8,
//     [5/8,6/8) -> 10/8,  [6/8,7/8) -> 9/8,  [7/8,1) -> 8/8
//   which keeps w[0] inside the convergence bound (|w| < 2/3 D) and D near
//   [1/2, 1). The digits are converted on the fly (srt_otf) and added to
//   Q[0] at the end. N = ceil((sig_width+3)/2) steps; a final carry-propagate
//   addition of the residual selects Q or QM = Q - 4^-N and gives the sticky
//   information;
// - rounding (srt_round), post-normalization (srt_postnorm) and exception
//   handling (srt_except).
// Pipelining as in the divider: pipe_stages = 0..3 register ranks between
// recurrence steps, latency pipe_stages cycles, one operation per cycle.
// The recurrences, variables D and C, the table, the step count and the
// structure follow the design description. The starting approximation table,
// word widths, the final addition of Q[0], register placement and reset are
// this implementation's choices.
module srt_invsqrt
  import srt_pkg::*;
#(
  parameter int          sig_width   = 23,
  parameter int          exp_width   = 8,
  parameter round_mode_e round         = IEEE_NEAR,
  parameter int          pipe_stages = 0
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [sig_width+exp_width:0] a,
  output logic [sig_width+exp_width:0] z,
  output logic [7:0]                   status
);

  localparam int NB    = sig_width + exp_width + 1;
  localparam int NSTEP = (sig_width + 4) / 2;        // ceil((sig_width+3)/2)
  localparam int F     = sig_width + 3 + 2 * NSTEP;  // keeps every bit of C
  localparam int W     = F + 4;
  localparam int QW    = 2 * NSTEP + 4;
  localparam int BIAS  = (1 << (exp_width - 1)) - 1;
  localparam int EW    = exp_width + 2;
  localparam int P1 = (pipe_stages == 3) ? (NSTEP + 3) / 4 : (NSTEP + 2) / 3;
  localparam int P2 = (NSTEP + 1) / 2;
  localparam int P3 = (pipe_stages == 3) ? (3 * NSTEP + 3) / 4 : (2 * NSTEP + 2) / 3;

  typedef struct packed {
    logic [W-1:0]  ws;
    logic [W-1:0]  wc;
    logic [W-1:0]  dq;
    logic [W-1:0]  c;
    logic [QW-1:0] q;
    logic [QW-1:0] qm;
    logic [3:0]    q0;
    logic [EW-1:0] e;
    logic [NB-1:0] a;
  } state_t;
  localparam int SW = $bits(state_t);

  state_t st0, fin;

  // ---- operand alignment, first approximation, exponent
  logic signed [EW-1:0] e_unb, e_k;
  logic                 odd;
  logic [sig_width+1:0] dw;       // d, sig_width+2 fraction bits
  logic [W-1:0]         dd;       // d, F fraction bits
  logic [3:0]           q0;
  logic [7:0]           q0sq;
  logic [W+3:0]         dq0;
  logic [W+7:0]         w0;

  always_comb begin
    e_unb = signed'(EW'(a[NB-2:sig_width])) - EW'(BIAS);
    odd   = e_unb[0];
    dw    = odd ? {1'b1, a[sig_width-1:0], 1'b0} : {1'b0, 1'b1, a[sig_width-1:0]};
    dd    = W'(dw) << (F - sig_width - 2);
    unique case (dw[sig_width+1:sig_width-1])
      3'd2:    q0 = 4'd14;
      3'd3:    q0 = 4'd12;
      3'd4:    q0 = 4'd11;
      3'd5:    q0 = 4'd10;
      3'd6:    q0 = 4'd9;
      default: q0 = 4'd8;
    endcase
    q0sq  = 8'(q0) * 8'(q0);
    dq0   = (W+4)'(dd) * (W+4)'(q0);
    // w[0] = (1 - d q0^2 / 64) / 2
    w0    = ((W+8)'(1) << (F + 6)) - (W+8)'(dd) * (W+8)'(q0sq);
    e_k   = e_unb + (odd ? EW'(1) : EW'(2));               // even
    st0.ws = w0[W+6:7];
    st0.wc = '0;
    st0.dq = dq0[W+2:3];                                    // d q0 / 8
    st0.c  = dd >> 3;                                       // d / 8
    st0.q  = '0;
    st0.qm = '1;
    st0.q0 = q0;
    st0.e  = EW'(BIAS) - EW'(e_k >>> 1);
    st0.a  = a;
  end

  // ---- recurrence with optional pipeline ranks
  for (genvar j = 0; j < NSTEP; j++) begin : g_step
    state_t  s_in, s_out, r1, r2, s_next;
    qdigit_t q_dig;
    if (j == 0) begin : g_first
      assign s_in = st0;
    end else begin : g_next
      assign s_in = g_step[j-1].s_next;
    end
    srt_isqrt_step #(.F(F), .W(W)) u_step (
      .ws_in(s_in.ws), .wc_in(s_in.wc), .dq_in(s_in.dq), .c_in(s_in.c),
      .ws_out(s_out.ws), .wc_out(s_out.wc), .dq_out(s_out.dq), .c_out(s_out.c),
      .q(q_dig));
    srt_otf #(.QW(QW)) u_otf (
      .q(q_dig), .q_in(s_in.q), .qm_in(s_in.qm), .q_out(s_out.q), .qm_out(s_out.qm));
    assign s_out.q0 = s_in.q0;
    assign s_out.e  = s_in.e;
    assign s_out.a  = s_in.a;

    srt_pipe_reg #(.W(SW), .pipe_stages((P1 == j + 1) ? pipe_stages : 0), .RANK(1)) u_r1 (
      .clk(clk), .rst_n(rst_n), .d(s_out), .q(r1));
    srt_pipe_reg #(.W(SW), .pipe_stages((P2 == j + 1) ? pipe_stages : 0), .RANK(2)) u_r2 (
      .clk(clk), .rst_n(rst_n), .d(r1), .q(r2));
    srt_pipe_reg #(.W(SW), .pipe_stages((P3 == j + 1) ? pipe_stages : 0), .RANK(3)) u_r3 (
      .clk(clk), .rst_n(rst_n), .d(r2), .q(s_next));
  end

  // ---- final residual, result assembly, normalization
  logic [W-1:0]         w;
  logic [QW-1:0]        qsel, qv;
  logic [2*NSTEP+1:0]   qn;
  logic                 hi, rem_nz;
  logic [sig_width+3:0] rnd_in;
  logic signed [EW-1:0] e_pre;

  assign fin    = g_step[NSTEP-1].s_next;
  assign w      = fin.ws + fin.wc;
  assign rem_nz = (w != '0);
  assign qsel   = w[W-1] ? fin.qm : fin.q;
  assign qv     = (QW'(fin.q0) << (2 * NSTEP - 3)) + qsel;   // Q[0] + digits
  assign hi     = qv[2*NSTEP+1];                             // result is 2
  assign qn     = hi ? qv[2*NSTEP+1:0] : {qv[2*NSTEP:0], 1'b0};
  assign rnd_in = {qn[2*NSTEP+1 -: sig_width+3], (|qn[2*NSTEP-sig_width-2:0]) | rem_nz};
  assign e_pre  = hi ? signed'(fin.e) + EW'(1) : signed'(fin.e);

  // ---- rounding, post-normalization, exceptions
  logic [sig_width+1:0] sig_r;
  logic                 inx_r, p_huge, p_tiny, p_inx, p_inf, p_zero;
  logic [NB-1:0]        z_dp;

  srt_round #(.sig_width(sig_width), .round(round)) u_round (
    .sign(1'b0), .sig_in(rnd_in), .sig_out(sig_r), .inexact(inx_r));

  srt_postnorm #(.sig_width(sig_width), .exp_width(exp_width), .round(round)) u_post (
    .sign(1'b0), .exp_in(e_pre), .sig_in(sig_r), .inexact_in(inx_r),
    .z(z_dp), .is_huge(p_huge), .is_tiny(p_tiny), .inexact(p_inx),
    .is_inf(p_inf), .is_zero(p_zero));

  srt_except #(.sig_width(sig_width), .exp_width(exp_width), .op(OP_INVSQRT)) u_exc (
    .a(fin.a), .b('0), .z_dp(z_dp),
    .dp_huge(p_huge), .dp_tiny(p_tiny), .dp_inexact(p_inx), .dp_inf(p_inf), .dp_zero(p_zero),
    .z(z), .status(status));

endmodule
