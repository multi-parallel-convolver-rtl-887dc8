// phase_adder: the output adder of one phase.
//
// Adds the P sub-convolutions a[0..P-1] of a phase and registers the sum on a
// clock edge with ce high, so the sum appears one step after its operands.
// Inputs are AW-bit and the output YW-bit signed words; YW must be wide
// enough for the full convolution (no saturation).  The adder's inner
// structure and its register are this design's choices.
module phase_adder #(
  parameter int P  = 3,
  parameter int AW = 20,
  parameter int YW = 20
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 ce,
  input  logic signed [AW-1:0] a [P],
  output logic signed [YW-1:0] s
);

  logic signed [YW-1:0] sum;

  always_comb begin
    sum = '0;
    for (int i = 0; i < P; i++) sum += YW'(a[i]);
  end

  always_ff @(posedge clk) begin
    if (rst)     s <= '0;
    else if (ce) s <= sum;
  end

endmodule
