// srt_pipe_reg: one optional pipeline register rank of an SRT component.
//
// A component has three possible register ranks. Which of them exist depends
// on the component's pipe_stages parameter (0..3), as in the design
// description:
//   rank 1 (early)  present for pipe_stages = 2 or 3
//   rank 2 (middle) present for pipe_stages = 1 or 3
//   rank 3 (late)   present for pipe_stages = 2 or 3
// so that pipe_stages ranks are present in all. A present rank is a W-bit
// register with an asynchronous active-low reset to zero (the reset is this
// implementation's choice); an absent rank is a wire. Timing: a present rank
// adds one clock cycle of latency.
module srt_pipe_reg #(
  parameter int W           = 8,
  parameter int pipe_stages = 0,
  parameter int RANK        = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  localparam bit PRESENT = (RANK == 2) ? (pipe_stages == 1 || pipe_stages == 3)
                                       : (pipe_stages == 2 || pipe_stages == 3);

  generate
    if (PRESENT) begin : g_reg
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) q <= '0;
        else        q <= d;
      end
    end else begin : g_wire
      assign q = d;
    end
  endgenerate

  initial begin
    assert (pipe_stages >= 0 && pipe_stages <= 3)
      else $error("srt_pipe_reg: pipe_stages must be 0..3");
    assert (RANK >= 1 && RANK <= 3)
      else $error("srt_pipe_reg: RANK must be 1..3");
  end

endmodule
