// srt_sel_t2: radix-4 quotient-digit selection for the reciprocal component.
//
// The divisor d lies in [1/2, 1). Its 3 bits after the leading one select one
// of 8 intervals (d_idx = 0..7 for 16*d = 8..15). For each interval four thresholds m_-1 < m_0 < m_1 < m_2,
// in units of 1/16, partition the 7-bit estimate y of the shifted residual 4w:
//   q = -2 if y < m_-1, q = k if m_k <= y < m_(k+1), q = +2 if y >= m_2.
// The threshold values are the ones of the design description's 8-entry
// table. That table lists its rows in the order m_2, m_1, m_0, m_-1 (largest
// first, as the selection rule requires m_-1 to be the most negative); this
// module uses them in that sense.
//
// Interface: d_idx (3 bits), y (7-bit two's complement, 4 fraction bits),
// q (one-hot digit, codes in srt_pkg). Purely combinational.
module srt_sel_t2
  import srt_pkg::*;
(
  input  logic [2:0] d_idx,
  input  logic [6:0] y,
  output qdigit_t    q
);

  localparam int M2 [8] = '{ 12,  14,  15,  16,  18,  20,  20,  24};
  localparam int M1 [8] = '{  4,   4,   4,   4,   6,   6,   8,   8};
  localparam int M0 [8] = '{ -4,  -6,  -6,  -6,  -8,  -8,  -8,  -8};
  localparam int MM1[8] = '{-13, -15, -16, -18, -20, -20, -22, -24};

  logic signed [7:0] ys;
  logic signed [7:0] m2, m1, m0, mm1;

  always_comb begin
    ys  = 8'(signed'(y));
    m2  = 8'(M2[d_idx]);
    m1  = 8'(M1[d_idx]);
    m0  = 8'(M0[d_idx]);
    mm1 = 8'(MM1[d_idx]);
    if (ys >= m2)       q = Q_P2;
    else if (ys >= m1)  q = Q_P1;
    else if (ys >= m0)  q = Q_Z;
    else if (ys >= mm1) q = Q_M1;
    else                q = Q_M2;
  end

endmodule
