// srt_ip_top: the three SRT floating-point components side by side.
//
// Division z = a/b, reciprocal z = 1/a and inverse square root
// z = 1/sqrt(a), each with its own operand, result and 8-bit status ports.
// All three share the format (sig_width fraction bits, exp_width exponent
// bits), the rounding mode and the number of pipeline register ranks
// (pipe_stages = 0..3, latency pipe_stages cycles, one new operation per
// cycle per component). The defaults are single precision, round to nearest
// even and no pipeline registers (purely combinational). Sharing one set of
// parameters is this implementation's choice; the components themselves can
// be instantiated alone with their own settings.
module srt_ip_top
  import srt_pkg::*;
#(
  parameter int          sig_width   = 23,
  parameter int          exp_width   = 8,
  parameter round_mode_e round         = IEEE_NEAR,
  parameter int          pipe_stages = 0
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // division
  input  logic [sig_width+exp_width:0] div_a,
  input  logic [sig_width+exp_width:0] div_b,
  output logic [sig_width+exp_width:0] div_z,
  output logic [7:0]                   div_status,
  // reciprocal
  input  logic [sig_width+exp_width:0] recip_a,
  output logic [sig_width+exp_width:0] recip_z,
  output logic [7:0]                   recip_status,
  // inverse square root
  input  logic [sig_width+exp_width:0] isqrt_a,
  output logic [sig_width+exp_width:0] isqrt_z,
  output logic [7:0]                   isqrt_status
);

  srt_div #(.sig_width(sig_width), .exp_width(exp_width), .round(round), .pipe_stages(pipe_stages)) u_div (
    .clk(clk), .rst_n(rst_n), .a(div_a), .b(div_b), .z(div_z), .status(div_status));

  srt_recip #(.sig_width(sig_width), .exp_width(exp_width), .round(round), .pipe_stages(pipe_stages)) u_recip (
    .clk(clk), .rst_n(rst_n), .a(recip_a), .z(recip_z), .status(recip_status));

  srt_invsqrt #(.sig_width(sig_width), .exp_width(exp_width), .round(round), .pipe_stages(pipe_stages)) u_isqrt (
    .clk(clk), .rst_n(rst_n), .a(isqrt_a), .z(isqrt_z), .status(isqrt_status));

endmodule
