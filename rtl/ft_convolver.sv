// ft_convolver: p-parallel convolver that tolerates one faulty
// sub-convolver by means of a spare.
//
// The P*P sub-convolvers of a P-parallel convolver (P phases times P
// residues, see phase_convolver) form a chain of "slots": slot 0 is phase
// P-1 residue 0, slot 1 phase P-1 residue 1, ..., slot P*P-1 phase 0
// residue P-1.  For P = 2 the chain is [W4 W2 W0 on X(2t+1)],
// [W5 W3 W1 on X(2t)], [W4 W2 W0 on X(2t)], [W5 W3 W1 on X(2t+1) delayed].
// There are P*P+1 physical sub-convolvers; the last one is the spare.
// Each slot has a two-position input switch and a two-position output
// switch: position 0 connects the slot to the physical unit of the same
// number, position 1 to the next one down.  'faulty' names the physical
// unit to leave out; every slot at or below it is switched to position 1,
// the weights following it (weight redistribution), so the faulty unit is
// isolated and the spare takes over the last slot.  faulty = P*P (the spare)
// means no fault: all switches at 0.  Switches, output adders and delays
// are the unprotected part.
//
// The chain, the two-position switches and the spare follow the published
// fault-tolerant scheme, drawn there for P = 2; one index input driving all
// switches, the generalisation to any P and the idle (zero) inputs of the
// excluded unit are this design's choices.  'faulty' should change only
// between operations: the sub-convolvers keep the samples of their old
// slots for N/P steps.
//
// Timing, output grouping (OUT_ALIGN) and widths as in mp_convolver: y_valid
// is high two cycles after a ce.
module ft_convolver
  import conv_pkg::*;
#(
  parameter int P         = 2,
  parameter int N         = 6,
  parameter int SW        = 8,
  parameter int WW        = 8,
  parameter bit OUT_ALIGN = 1'b1,
  localparam int TAPS  = taps_of(N, P),
  localparam int YW    = result_width(SW, WW, N),
  localparam int SLOTS = P * P,
  localparam int UNITS = SLOTS + 1,
  localparam int FW    = $clog2(UNITS)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 ce,
  input  logic [FW-1:0]        faulty,
  input  logic signed [SW-1:0] x [P],
  input  logic signed [WW-1:0] w [N],
  output logic                 y_valid,
  output logic signed [YW-1:0] y [P]
);

  // ---------------- slot-side signals (before the switches)
  logic signed [SW-1:0] xd      [P];        // lanes delayed by one step
  logic signed [SW-1:0] slot_x  [SLOTS];
  logic signed [WW-1:0] slot_w  [SLOTS][TAPS];
  logic signed [YW-1:0] slot_y  [SLOTS];

  assign xd[0] = '0;                         // lane 0 is never delayed
  for (genvar l = 1; l < P; l++) begin : g_lane_d
    delay_unit #(.W(SW)) u_d (.clk(clk), .rst(rst), .ce(ce), .d(x[l]), .q(xd[l]));
  end

  for (genvar sl = 0; sl < SLOTS; sl++) begin : g_slot
    localparam int Q    = slot_phase(P, sl);
    localparam int R    = slot_residue(P, sl);
    localparam int LANE = lane_of(P, Q, R);
    if (delayed_of(Q, R)) begin : g_del
      assign slot_x[sl] = xd[LANE];
    end else begin : g_dir
      assign slot_x[sl] = x[LANE];
    end
    for (genvar s = 0; s < TAPS; s++) begin : g_w
      if (P*s + R < N) begin : g_real
        assign slot_w[sl][s] = w[P*s + R];
      end else begin : g_zero
        assign slot_w[sl][s] = '0;
      end
    end
  end

  // ---------------- physical units behind the switches
  logic [FW-1:0]        fsel;
  logic signed [SW-1:0] unit_x [UNITS];
  logic signed [WW-1:0] unit_w [UNITS][TAPS];
  logic signed [YW-1:0] unit_y [UNITS];

  assign fsel = (faulty > FW'(SLOTS)) ? FW'(SLOTS) : faulty;

  // Input switches: unit k serves slot k (position 0) when above the faulty
  // unit and slot k-1 (position 1) when below it.
  always_comb begin
    for (int k = 0; k < UNITS; k++) begin
      unit_x[k] = '0;
      for (int s = 0; s < TAPS; s++) unit_w[k][s] = '0;
      if (k < SLOTS && FW'(k) < fsel) begin
        unit_x[k] = slot_x[k];
        for (int s = 0; s < TAPS; s++) unit_w[k][s] = slot_w[k][s];
      end else if (k > 0 && FW'(k) > fsel) begin
        unit_x[k] = slot_x[k-1];
        for (int s = 0; s < TAPS; s++) unit_w[k][s] = slot_w[k-1][s];
      end
    end
  end

  for (genvar k = 0; k < UNITS; k++) begin : g_unit
    sub_convolver #(.SW(SW), .WW(WW), .TAPS(TAPS), .AW(YW)) u_sub (
      .clk(clk), .rst(rst), .ce(ce), .x(unit_x[k]), .w(unit_w[k]), .y(unit_y[k])
    );
  end

  // Output switches: slot l reads unit l (position 0) or unit l+1 (1).
  always_comb begin
    for (int l = 0; l < SLOTS; l++)
      slot_y[l] = (FW'(l) < fsel) ? unit_y[l] : unit_y[l+1];
  end

  // ---------------- output adders and grouping delay
  logic v1, v2;
  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
    end else begin
      v1 <= ce;
      v2 <= v1;
    end
  end
  assign y_valid = v2;

  for (genvar q = 0; q < P; q++) begin : g_phase
    logic signed [YW-1:0] a [P];
    logic signed [YW-1:0] sum;
    for (genvar r = 0; r < P; r++) begin : g_a
      assign a[r] = slot_y[(P-1-q)*P + r];
    end
    phase_adder #(.P(P), .AW(YW), .YW(YW)) u_add (
      .clk(clk), .rst(rst), .ce(v1), .a(a), .s(sum)
    );
    if (OUT_ALIGN && q == P-1) begin : g_align
      delay_unit #(.W(YW)) u_align (.clk(clk), .rst(rst), .ce(v1), .d(sum), .q(y[q]));
    end else begin : g_direct
      assign y[q] = sum;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst)
      assert (faulty <= FW'(SLOTS))
        else $error("ft_convolver: faulty index %0d out of range", faulty);
  end

endmodule
