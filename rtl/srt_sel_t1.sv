// srt_sel_t1: radix-4 quotient-digit selection for the division and the
// inverse square root components.
//
// The divisor (or, for the inverse square root, D = d*Q) lies in [1/2, 1). Its
// 4 bits after the leading one select one of 16 intervals (d_idx = 0..15 for
// 32*D = 16..31). For each interval four thresholds m_-1 < m_0 < m_1 < m_2,
// in units of 1/16, partition the 7-bit estimate y of the shifted residual 4w:
//   q = -2 if y < m_-1, q = k if m_k <= y < m_(k+1), q = +2 if y >= m_2.
// The threshold values are the ones of the design description's 16-entry
// table. That table lists its rows in the order m_2, m_1, m_0, m_-1 (largest
// first, as the selection rule requires m_-1 to be the most negative); this
// module uses them in that sense.
//
// Interface: d_idx (4 bits), y (7-bit two's complement, 4 fraction bits),
// q (one-hot digit, codes in srt_pkg). Purely combinational.
module srt_sel_t1
  import srt_pkg::*;
(
  input  logic [3:0] d_idx,
  input  logic [6:0] y,
  output qdigit_t    q
);

  localparam int M2 [16] = '{12, 13, 14, 14, 15, 15, 16, 17, 17, 18, 19, 19, 20, 21, 21, 22};
  localparam int M1 [16] = '{ 3,  4,  4,  4,  4,  4,  4,  5,  5,  7,  7,  6,  5,  6,  8,  8};
  localparam int M0 [16] = '{-5, -5, -5, -6, -6, -6, -7, -7, -7, -8, -8, -8, -9, -9, -9, -10};
  localparam int MM1[16] = '{-13, -14, -14, -15, -16, -17, -18, -18, -19, -19, -20, -21, -23, -23, -24, -25};

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
