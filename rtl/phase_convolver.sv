// phase_convolver: phase Q of a P-phase, P-input convolver.
//
// Every time step it receives the tuple x[q] = X(P*t+q) and produces one
// convolution of the full N-term sequence, y = Y(P*t+Q).  It holds P
// standard sub-convolvers of ceil(N/P) cells.  Sub-convolver r carries the
// weights W(r), W(P+r), W(2P+r), ... (zero beyond W(N-1)) and is fed by lane
// (Q-r) mod P; for r > Q that lane must come from the previous tuple, so it
// is taken from x_prev, the tuple of the previous time step, which the
// enclosing convolver produces with one delay_unit per lane and shares
// among all phases.  The P sub-convolutions are then aligned in time and
// are summed by the phase_adder.  The last phase (Q = P-1) reads nothing
// of x_prev and no phase reads x_prev[0]; the port stays so that all phases
// share one interface, which is why a lint tool may call it unused.  This partition
// and the delay rule are the published scheme; the zero-weight filling for N
// not a multiple of P is one of its two stated options.
//
// Timing: a tuple is taken on a clock edge with ce high; the sub-convolvers
// register their sums at that edge and the adder registers the phase output
// one clock later (on v1, ce delayed by one cycle), so y_valid goes high two
// cycles after ce and y then holds Y(P*t+Q) for that tuple.  ce may be held
// low for any number of cycles between tuples.
module phase_convolver
  import conv_pkg::*;
#(
  parameter int P  = 3,
  parameter int N  = 9,
  parameter int Q  = 0,
  parameter int SW = 8,
  parameter int WW = 8,
  localparam int TAPS = taps_of(N, P),
  localparam int YW   = result_width(SW, WW, N)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 ce,
  input  logic signed [SW-1:0] x [P],
  input  logic signed [SW-1:0] x_prev [P],
  input  logic signed [WW-1:0] w [N],
  output logic                 y_valid,
  output logic                 v1,
  output logic signed [YW-1:0] y
);

  logic signed [YW-1:0] sub_y [P];
  logic                 v2;

  for (genvar r = 0; r < P; r++) begin : g_sub
    localparam int LANE = lane_of(P, Q, r);
    logic signed [SW-1:0] xin;
    logic signed [WW-1:0] wsub [TAPS];

    for (genvar s = 0; s < TAPS; s++) begin : g_w
      if (P*s + r < N) begin : g_real
        assign wsub[s] = w[P*s + r];
      end else begin : g_zero
        assign wsub[s] = '0;
      end
    end

    if (delayed_of(Q, r)) begin : g_del
      assign xin = x_prev[LANE];
    end else begin : g_dir
      assign xin = x[LANE];
    end

    sub_convolver #(.SW(SW), .WW(WW), .TAPS(TAPS), .AW(YW)) u_sub (
      .clk(clk), .rst(rst), .ce(ce), .x(xin), .w(wsub), .y(sub_y[r])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
    end else begin
      v1 <= ce;
      v2 <= v1;
    end
  end

  phase_adder #(.P(P), .AW(YW), .YW(YW)) u_add (
    .clk(clk), .rst(rst), .ce(v1), .a(sub_y), .s(y)
  );

  assign y_valid = v2;

endmodule
