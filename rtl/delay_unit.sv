// delay_unit: the "D" box of the multi-parallel convolver, a delay of one
// time step on a W-bit word.
//
// The register loads d on every clock edge where ce is high, so q holds the
// value d had at the previous time step.  One time step is one convolution
// step of the pipelined sub-convolvers; a stall (ce low) holds the word.
// Synchronous active-high reset clears it to zero, which makes the samples
// before the first one read as zero.  The reset and enable are this
// design's choice.
module delay_unit #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ce,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (ce) q <= d;
  end

endmodule
