// srt_recip: floating-point reciprocal z = 1 / a, radix-4 SRT.
//
// Operands and result are sign | biased exponent (exp_width) | fraction
// (sig_width), hidden leading one, no denormals produced. The component has
// four parts:
// - exponent: e = 2*bias - e_a - 1, plus one in the single case where the
//   significand of a is exactly 1 (the result significand is then 2);
// - significand: the operand is placed as divisor d = 1.f_a / 2 in [1/2, 1),
//   the initial residual is w[0] = 1/4. N = ceil((sig_width+4)/2) radix-4
//   carry-save steps (srt_div_step with selection table 2, eight divisor
//   intervals) give Q ~ 1/(4d) in (1/4, 1/2] with on-the-fly conversion, so
//   4Q = 1/d lies in (1, 2] and needs no normalization shift (only the
//   value 2 is renormalized). A final carry-propagate addition of the residual
//   picks Q (w >= 0) or QM = Q - 4^-N (w < 0) and gives the sticky
//   information (w != 0);
// - rounding (srt_round) and post-normalization (srt_postnorm);
// - exception handling (srt_except).
// Pipelining: pipe_stages = 0..3 register ranks (srt_pipe_reg) are placed
// between recurrence steps, splitting the chain into pipe_stages+1 parts of
// about equal length; the latency is pipe_stages clock cycles and a new
// operation can start every cycle. With pipe_stages = 0 the component is
// combinational and clk/rst_n are unused.
// The algorithm, result range (1, 2], use of the second selection table and
// the structure follow the design description. The initial residual 1/4 (the
// residual is 4^j (1/4 - d Q[j]), a scaled form of the description's
// 4^j (1 - d Q[j]), chosen so that it starts inside the convergence bound),
// the step count (one more bit than the description's count, for the two
// leading zeros of Q), word widths, register placement and the reset are this
// implementation's choices.
module srt_recip
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
  localparam int NSTEP = (sig_width + 5) / 2;        // ceil((sig_width+4)/2)
  localparam int F     = sig_width + 3;
  localparam int W     = F + 3;
  localparam int QW    = 2 * NSTEP + 2;
  localparam int BIAS  = (1 << (exp_width - 1)) - 1;
  localparam int EW    = exp_width + 2;
  // register positions (after this many steps)
  localparam int P1 = (pipe_stages == 3) ? (NSTEP + 3) / 4 : (NSTEP + 2) / 3;
  localparam int P2 = (NSTEP + 1) / 2;
  localparam int P3 = (pipe_stages == 3) ? (3 * NSTEP + 3) / 4 : (2 * NSTEP + 2) / 3;

  typedef struct packed {
    logic [W-1:0]  ws;
    logic [W-1:0]  wc;
    logic [W-1:0]  d;
    logic [QW-1:0] q;
    logic [QW-1:0] qm;
    logic [EW-1:0] e;
    logic [NB-1:0] a;
  } state_t;
  localparam int SW = $bits(state_t);

  state_t st0;   // entering the first step
  state_t fin;   // after the last step

  // ---- exponent and operand alignment
  always_comb begin
    st0.ws = W'(1) << (F - 2);                          // w[0] = 1/4
    st0.wc = '0;
    st0.d  = W'({1'b1, a[sig_width-1:0], 2'b00});    // d = 1.f_a / 2
    st0.q  = '0;
    st0.qm = '1;                                      // Q[0] - 1
    st0.e  = EW'(2 * BIAS - 1) - EW'(a[NB-2:sig_width]);
    st0.a  = a;
  end

  // ---- significand recurrence with optional pipeline ranks
  for (genvar j = 0; j < NSTEP; j++) begin : g_step
    state_t  s_in, s_out, r1, r2, s_next;
    qdigit_t q_dig;  // digit chosen in this step
    if (j == 0) begin : g_first
      assign s_in = st0;
    end else begin : g_next
      assign s_in = g_step[j-1].s_next;
    end
    srt_div_step #(.F(F), .W(W), .QW(QW), .TABLE(2)) u_step (
      .ws_in(s_in.ws), .wc_in(s_in.wc), .d(s_in.d),
      .q_in(s_in.q), .qm_in(s_in.qm),
      .ws_out(s_out.ws), .wc_out(s_out.wc),
      .q_out(s_out.q), .qm_out(s_out.qm), .q(q_dig)
    );
    assign s_out.d = s_in.d;
    assign s_out.e = s_in.e;
    assign s_out.a = s_in.a;

    srt_pipe_reg #(.W(SW), .pipe_stages((P1 == j + 1) ? pipe_stages : 0), .RANK(1)) u_r1 (
      .clk(clk), .rst_n(rst_n), .d(s_out), .q(r1));
    srt_pipe_reg #(.W(SW), .pipe_stages((P2 == j + 1) ? pipe_stages : 0), .RANK(2)) u_r2 (
      .clk(clk), .rst_n(rst_n), .d(r1), .q(r2));
    srt_pipe_reg #(.W(SW), .pipe_stages((P3 == j + 1) ? pipe_stages : 0), .RANK(3)) u_r3 (
      .clk(clk), .rst_n(rst_n), .d(r2), .q(s_next));
  end

  // ---- final residual, quotient choice, normalization
  logic [W-1:0]       w;
  logic [QW-1:0]      qsel;
  logic [2*NSTEP-1:0] qn;
  logic               hi, rem_nz;
  logic [sig_width+3:0] rnd_in;
  logic signed [EW-1:0] e_pre;

  assign fin    = g_step[NSTEP-1].s_next;
  assign w      = fin.ws + fin.wc;
  assign rem_nz = (w != '0);
  assign qsel   = w[W-1] ? fin.qm : fin.q;
  assign hi     = qsel[2*NSTEP-1];                    // Q = 1/2, 1/d = 2
  assign qn     = hi ? qsel[2*NSTEP-1:0] : {qsel[2*NSTEP-2:0], 1'b0};
  assign rnd_in = {qn[2*NSTEP-1 -: sig_width+3], (|qn[2*NSTEP-sig_width-4:0]) | rem_nz};
  assign e_pre  = hi ? signed'(fin.e) + EW'(1) : signed'(fin.e);

  // ---- rounding, post-normalization, exceptions
  logic [sig_width+1:0] sig_r;
  logic                 inx_r, p_huge, p_tiny, p_inx, p_inf, p_zero;
  logic [NB-1:0]        z_dp;
  logic                 sgn;

  assign sgn = fin.a[NB-1];

  srt_round #(.sig_width(sig_width), .round(round)) u_round (
    .sign(sgn), .sig_in(rnd_in), .sig_out(sig_r), .inexact(inx_r));

  srt_postnorm #(.sig_width(sig_width), .exp_width(exp_width), .round(round)) u_post (
    .sign(sgn), .exp_in(e_pre), .sig_in(sig_r), .inexact_in(inx_r),
    .z(z_dp), .is_huge(p_huge), .is_tiny(p_tiny), .inexact(p_inx),
    .is_inf(p_inf), .is_zero(p_zero));

  srt_except #(.sig_width(sig_width), .exp_width(exp_width), .op(OP_RECIP)) u_exc (
    .a(fin.a), .b('0), .z_dp(z_dp),
    .dp_huge(p_huge), .dp_tiny(p_tiny), .dp_inexact(p_inx), .dp_inf(p_inf), .dp_zero(p_zero),
    .z(z), .status(status));

endmodule
