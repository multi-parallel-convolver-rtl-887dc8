// conv_cell: one cell of a standard pipelined convolver.
//
// The cell multiplies the sample broadcast to all cells by its own weight,
// adds the partial sum arriving from the next cell of the chain and
// registers the result on each clock edge with ce high.  A chain of these
// cells is a transposed-form convolver doing one convolution step per clock
// period.  Signed two's complement throughout; acc_in and acc_out are AW bits
// and the product is sign-extended into them.  Widths, the word-level
// multiplier and the reset are this design's choices: the cell is only named
// as the unit of area.
module conv_cell #(
  parameter int SW = 8,
  parameter int WW = 8,
  parameter int AW = 20
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 ce,
  input  logic signed [SW-1:0] x,
  input  logic signed [WW-1:0] w,
  input  logic signed [AW-1:0] acc_in,
  output logic signed [AW-1:0] acc_out
);

  logic signed [SW+WW-1:0] prod;
  assign prod = x * w;

  always_ff @(posedge clk) begin
    if (rst)     acc_out <= '0;
    else if (ce) acc_out <= acc_in + AW'(prod);
  end

endmodule
