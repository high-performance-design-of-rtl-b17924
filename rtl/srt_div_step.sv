// srt_div_step: one radix-4 SRT step of the division recurrence
//   w[j+1] = 4 w[j] - q[j+1] d
// shared by the division and the reciprocal components.
//
// The residual is kept in carry-save form (ws, wc), W = F+3 bits two's
// complement with F fraction bits. The digit is chosen from a 7-bit estimate of
// 4w, the sum of the top 7 bits (3 integer, 4 fraction) of the two shifted
// carry-save words, and from the bits after the leading one of the divisor
// d in [1/2, 1): four bits for selection table 1 (TABLE = 1, division) and
// three bits for table 2 (TABLE = 2, reciprocal). The multiple q*d is formed by
// a multiplexer (d, 2d, or their complements, the +1 of the two's complement
// entering the free LSB of the carry word), and one row of full adders
// (3:2 counters) adds it. The digit also advances the on-the-fly conversion of
// Q and QM. Radix 4, carry-save form, the digit set and the table choice per
// component follow the design description; the word widths are this
// implementation's. Purely combinational.
module srt_div_step
  import srt_pkg::*;
#(
  parameter int F     = 26,   // fraction bits of residual and divisor
  parameter int W     = F + 3,
  parameter int QW    = 28,
  parameter int TABLE = 1
) (
  input  logic [W-1:0]  ws_in,
  input  logic [W-1:0]  wc_in,
  input  logic [W-1:0]  d,       // divisor, 0 < d < 1, F fraction bits
  input  logic [QW-1:0] q_in,
  input  logic [QW-1:0] qm_in,
  output logic [W-1:0]  ws_out,
  output logic [W-1:0]  wc_out,
  output logic [QW-1:0] q_out,
  output logic [QW-1:0] qm_out,
  output qdigit_t       q
);

  logic [W-1:0] ys, yc, t, maj;
  logic [6:0]   y_est;
  logic         inj;

  assign ys    = {ws_in[W-3:0], 2'b00};
  assign yc    = {wc_in[W-3:0], 2'b00};
  assign y_est = ys[F+2:F-4] + yc[F+2:F-4];

  generate
    if (TABLE == 1) begin : g_t1
      srt_sel_t1 u_sel (.d_idx(d[F-2:F-5]), .y(y_est), .q(q));
    end else begin : g_t2
      srt_sel_t2 u_sel (.d_idx(d[F-2:F-4]), .y(y_est), .q(q));
    end
  endgenerate

  // -q*d in two's complement, the +1 carried by inj
  always_comb begin
    unique case (q)
      Q_P1:    begin t = ~d;                   inj = 1'b1; end
      Q_P2:    begin t = ~{d[W-2:0], 1'b0};    inj = 1'b1; end
      Q_M1:    begin t = d;                    inj = 1'b0; end
      Q_M2:    begin t = {d[W-2:0], 1'b0};     inj = 1'b0; end
      default: begin t = '0;                   inj = 1'b0; end
    endcase
  end

  assign maj    = (ys & yc) | (ys & t) | (yc & t);
  assign ws_out = ys ^ yc ^ t;
  assign wc_out = {maj[W-2:0], inj};

  srt_otf #(.QW(QW)) u_otf (
    .q(q), .q_in(q_in), .qm_in(qm_in), .q_out(q_out), .qm_out(qm_out)
  );

endmodule
