// srt_otf: one step of on-the-fly conversion of a signed radix-4 digit string
// into conventional binary.
//
// Two forms of the partial result are kept: Q[j] and QM[j] = Q[j] - 4^-j.
// A new digit q appends two bits to one of them, so no carry ever has to
// propagate:
//   q = +2 : Q = {Q ,10}  QM = {Q ,01}
//   q = +1 : Q = {Q ,01}  QM = {Q ,00}
//   q =  0 : Q = {Q ,00}  QM = {QM,11}
//   q = -1 : Q = {QM,11}  QM = {QM,10}
//   q = -2 : Q = {QM,10}  QM = {QM,01}
// This rule follows the design description. Both forms are QW-bit two's
// complement words that shift left by two bits per step, dropping their two
// top bits (QW is sized by the caller so that nothing of value is dropped).
// Purely combinational.
module srt_otf
  import srt_pkg::*;
#(
  parameter int QW = 28
) (
  input  qdigit_t         q,
  input  logic [QW-1:0]   q_in,
  input  logic [QW-1:0]   qm_in,
  output logic [QW-1:0]   q_out,
  output logic [QW-1:0]   qm_out
);

  always_comb begin
    unique case (q)
      Q_P2: begin q_out = {q_in[QW-3:0],  2'b10}; qm_out = {q_in[QW-3:0],  2'b01}; end
      Q_P1: begin q_out = {q_in[QW-3:0],  2'b01}; qm_out = {q_in[QW-3:0],  2'b00}; end
      Q_M1: begin q_out = {qm_in[QW-3:0], 2'b11}; qm_out = {qm_in[QW-3:0], 2'b10}; end
      Q_M2: begin q_out = {qm_in[QW-3:0], 2'b10}; qm_out = {qm_in[QW-3:0], 2'b01}; end
      default: begin q_out = {q_in[QW-3:0], 2'b00}; qm_out = {qm_in[QW-3:0], 2'b11}; end
    endcase
  end

endmodule
