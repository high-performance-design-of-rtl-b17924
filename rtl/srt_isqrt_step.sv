// srt_isqrt_step: one radix-4 step of the inverse-square-root recurrence
//   w[j+1] = 4 w[j] - q D[j] - q^2 C[j]
//   D[j+1] = D[j] + 2 q C[j]        (D[j] = d Q[j])
//   C[j+1] = C[j] / 4               (C[j] = d 4^-(j+1) / 2)
// where d is the operand and Q[j] the partial result.
//
// The residual is carry-save (ws, wc), W = F+4 bits two's complement with F
// fraction bits; D and C are plain binary words of the same format. The digit
// q comes from selection table 1 using the 7-bit estimate of 4w and the four
// bits after the leading one of D (D in [1/2, 1); a D outside that range, which
// can only occur in the first steps, uses the nearest table row). The two
// subtrahends q*D and q^2*C are multiplexed multiples added by two rows of
// 3:2 counters; the complement +1 of each enters a free carry LSB. D is updated
// with a carry-propagate adder. The recurrences and the use of table 1 follow
// the design description; the word widths, the row clamp and the plain-binary
// D are this implementation's. Purely combinational.
module srt_isqrt_step
  import srt_pkg::*;
#(
  parameter int F = 54,
  parameter int W = F + 4
) (
  input  logic [W-1:0] ws_in,
  input  logic [W-1:0] wc_in,
  input  logic [W-1:0] dq_in,    // D[j]
  input  logic [W-1:0] c_in,     // C[j]
  output logic [W-1:0] ws_out,
  output logic [W-1:0] wc_out,
  output logic [W-1:0] dq_out,   // D[j+1]
  output logic [W-1:0] c_out,    // C[j+1]
  output qdigit_t      q
);

  logic [W-1:0] ys, yc, t1, t2, s1, c1, maj1, maj2;
  logic [6:0]   y_est;
  logic [3:0]   d_idx;
  logic         inj1, inj2;

  assign ys    = {ws_in[W-3:0], 2'b00};
  assign yc    = {wc_in[W-3:0], 2'b00};
  assign y_est = ys[F+2:F-4] + yc[F+2:F-4];

  always_comb begin
    if (dq_in[W-1:F] != '0)  d_idx = 4'd15;
    else if (!dq_in[F-1])    d_idx = 4'd0;
    else                     d_idx = dq_in[F-2:F-5];
  end

  srt_sel_t1 u_sel (.d_idx(d_idx), .y(y_est), .q(q));

  always_comb begin
    unique case (q)
      Q_P1: begin
        t1 = ~dq_in;                  inj1 = 1'b1;
        t2 = ~c_in;                   inj2 = 1'b1;
        dq_out = dq_in + {c_in[W-2:0], 1'b0};
      end
      Q_P2: begin
        t1 = ~{dq_in[W-2:0], 1'b0};   inj1 = 1'b1;
        t2 = ~{c_in[W-3:0], 2'b00};   inj2 = 1'b1;
        dq_out = dq_in + {c_in[W-3:0], 2'b00};
      end
      Q_M1: begin
        t1 = dq_in;                   inj1 = 1'b0;
        t2 = ~c_in;                   inj2 = 1'b1;
        dq_out = dq_in - {c_in[W-2:0], 1'b0};
      end
      Q_M2: begin
        t1 = {dq_in[W-2:0], 1'b0};    inj1 = 1'b0;
        t2 = ~{c_in[W-3:0], 2'b00};   inj2 = 1'b1;
        dq_out = dq_in - {c_in[W-3:0], 2'b00};
      end
      default: begin
        t1 = '0; inj1 = 1'b0;
        t2 = '0; inj2 = 1'b0;
        dq_out = dq_in;
      end
    endcase
  end

  // first row: 4w - qD
  assign maj1   = (ys & yc) | (ys & t1) | (yc & t1);
  assign s1     = ys ^ yc ^ t1;
  assign c1     = {maj1[W-2:0], inj1};
  // second row: - q^2 C
  assign maj2   = (s1 & c1) | (s1 & t2) | (c1 & t2);
  assign ws_out = s1 ^ c1 ^ t2;
  assign wc_out = {maj2[W-2:0], inj2};

  assign c_out  = {2'b00, c_in[W-1:2]};

endmodule
