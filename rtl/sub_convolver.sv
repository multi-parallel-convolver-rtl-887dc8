// sub_convolver: a standard single-input convolver of TAPS cells.
//
// It computes y(m) = sum_{r=0}^{TAPS-1} w[r] * x(m-r), one output per time
// step.  The sample is broadcast to a chain of conv_cell stages (transposed
// form): cell r adds w[r]*x to the registered partial sum of cell r+1, and the
// register of cell 0 is the output.  Latency: y shows the convolution that
// ends with the sample taken at a ce edge right after that edge.  After reset
// all partial sums are zero, so samples before the first count as zero.
// The multi-parallel convolver uses this unit as a black box of known
// function; the transposed form is this design's choice.
module sub_convolver #(
  parameter int SW   = 8,
  parameter int WW   = 8,
  parameter int TAPS = 3,
  parameter int AW   = 20
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 ce,
  input  logic signed [SW-1:0] x,
  input  logic signed [WW-1:0] w [TAPS],
  output logic signed [AW-1:0] y
);

  // acc[r] is the registered partial sum of cell r; acc[TAPS] is the zero
  // that enters the end of the chain.
  logic signed [AW-1:0] acc [TAPS+1];
  assign acc[TAPS] = '0;

  for (genvar r = 0; r < TAPS; r++) begin : g_cell
    conv_cell #(.SW(SW), .WW(WW), .AW(AW)) u_cell (
      .clk    (clk),
      .rst    (rst),
      .ce     (ce),
      .x      (x),
      .w      (w[r]),
      .acc_in (acc[r+1]),
      .acc_out(acc[r])
    );
  end

  assign y = acc[0];

endmodule
