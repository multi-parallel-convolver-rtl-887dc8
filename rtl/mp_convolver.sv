// mp_convolver: the p-parallel convolver.
//
// P samples enter together, x[q] = X(P*t+q), and P convolutions
// Y(i) = sum_{j=0}^{N-1} W(j) X(i-j) leave together, so the sample rate is P
// times that of a standard convolver clocked at the same speed, for about P
// times its area.  The unit is P phase convolvers side by side, all fed by
// the same tuple; phase q delivers Y(P*t+q) (see phase_convolver).  The
// phases that need samples of the previous tuple read them from x_prev,
// made by one delay_unit per lane 1..P-1 (lane 0 is never needed delayed)
// and shared by all phases, as in the published circuits.
//
// Output grouping: with OUT_ALIGN = 1 the last phase passes through one more
// one-step delay, as the optional delay at the output of the published
// schemes, so the group shown at one step is
//     y[P-1] = Y(P*t-1), y[0] = Y(P*t), ..., y[P-2] = Y(P*t+P-2)
// that is, the first convolution of the group sits in y[P-1].  With
// OUT_ALIGN = 0, y[q] = Y(P*t+q).
//
// Timing: a tuple is taken on a clock edge with ce high; y_valid is high two
// cycles later for one cycle and y holds the group for that tuple (and keeps
// it until the next group).  Any gap between tuples is allowed.  Reset makes
// all samples before the first tuple read as zero, so the first N-1 outputs
// are the partial sums of a convolution starting from silence.  Sample and
// weight widths, ce/y_valid and reset are this design's choices; results
// are full precision, YW = SW + WW + clog2(N) bits.
module mp_convolver
  import conv_pkg::*;
#(
  parameter int P         = 3,
  parameter int N         = 9,
  parameter int SW        = 8,
  parameter int WW        = 8,
  parameter bit OUT_ALIGN = 1'b1,
  localparam int YW = result_width(SW, WW, N)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 ce,
  input  logic signed [SW-1:0] x [P],
  input  logic signed [WW-1:0] w [N],
  output logic                 y_valid,
  output logic signed [YW-1:0] y [P]
);

  logic signed [SW-1:0] x_prev [P];
  logic signed [YW-1:0] ph_y  [P];
  logic                 ph_vld [P];
  logic                 ph_v1  [P];

  assign x_prev[0] = '0;
  for (genvar l = 1; l < P; l++) begin : g_lane_d
    delay_unit #(.W(SW)) u_d (.clk(clk), .rst(rst), .ce(ce), .d(x[l]), .q(x_prev[l]));
  end

  for (genvar q = 0; q < P; q++) begin : g_phase
    phase_convolver #(.P(P), .N(N), .Q(q), .SW(SW), .WW(WW)) u_phase (
      .clk(clk), .rst(rst), .ce(ce), .x(x), .x_prev(x_prev), .w(w),
      .y_valid(ph_vld[q]), .v1(ph_v1[q]), .y(ph_y[q])
    );

    if (OUT_ALIGN && q == P-1) begin : g_align
      // Loads on the same edge as the phase adder, so it keeps the previous
      // group's last convolution.
      delay_unit #(.W(YW)) u_align (
        .clk(clk), .rst(rst), .ce(ph_v1[q]), .d(ph_y[q]), .q(y[q])
      );
    end else begin : g_direct
      assign y[q] = ph_y[q];
    end
  end

  assign y_valid = ph_vld[0];

endmodule
