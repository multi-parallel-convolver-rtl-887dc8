// bus_convolver: reconfigurable p-parallel convolver with a switched-bus
// interconnect, tolerating up to SPARES faulty sub-convolvers.
//
// The P*P logical sub-convolvers ("slots", numbered as in ft_convolver:
// slot (P-1-q)*P + r is phase q, residue r) are mapped onto
// P*P + SPARES physical sub-convolvers.  The P input lanes are the input
// buses; the P phase adders are the ends of the output buses.  For each
// physical unit k, slot_map[k] sets its switches: the input switch picks the
// slot's lane, the unit's own one-step delay is used when the slot needs the
// previous tuple, the weight switch loads the slot's weights, and the output
// switch connects the unit to its phase adder in the slot's residue
// position.  slot_map[k] = P*P excludes the unit completely (zero input and
// weights, connected to no adder).  Every slot must be mapped to exactly
// one unit for a correct result; mapping a slot twice is flagged by an
// assertion.
//
// Only the idea of input and output buses with switches is published; the
// per-unit slot number as configuration, the private delay of each unit and
// the adder-side selection are this design's choices.  slot_map should
// change only between operations.  Timing, grouping (OUT_ALIGN) and widths
// as in mp_convolver: y_valid is high two cycles after a ce.
module bus_convolver
  import conv_pkg::*;
#(
  parameter int P         = 2,
  parameter int N         = 6,
  parameter int SPARES    = 2,
  parameter int SW        = 8,
  parameter int WW        = 8,
  parameter bit OUT_ALIGN = 1'b1,
  localparam int TAPS  = taps_of(N, P),
  localparam int YW    = result_width(SW, WW, N),
  localparam int SLOTS = P * P,
  localparam int UNITS = SLOTS + SPARES,
  localparam int SLW   = $clog2(SLOTS + 1),
  localparam int LW    = (P > 1) ? $clog2(P) : 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 ce,
  input  logic [SLW-1:0]       slot_map [UNITS],
  input  logic signed [SW-1:0] x [P],
  input  logic signed [WW-1:0] w [N],
  output logic                 y_valid,
  output logic signed [YW-1:0] y [P]
);

  // ---------------- constant description of every slot
  // Indexed by any slot_map value; the codes from SLOTS up (excluded unit)
  // read lane 0, no delay and zero weights.
  localparam int CODES = 1 << SLW;
  logic [LW-1:0]        slot_lane [CODES];
  logic                 slot_del  [CODES];
  logic signed [WW-1:0] slot_w    [CODES][TAPS];

  for (genvar sl = 0; sl < CODES; sl++) begin : g_slot
    if (sl < SLOTS) begin : g_used
      localparam int Q = slot_phase(P, sl);
      localparam int R = slot_residue(P, sl);
      assign slot_lane[sl] = LW'(lane_of(P, Q, R));
      assign slot_del[sl]  = delayed_of(Q, R);
      for (genvar s = 0; s < TAPS; s++) begin : g_w
        if (P*s + R < N) begin : g_real
          assign slot_w[sl][s] = w[P*s + R];
        end else begin : g_zero
          assign slot_w[sl][s] = '0;
        end
      end
    end else begin : g_excl
      assign slot_lane[sl] = '0;
      assign slot_del[sl]  = 1'b0;
      for (genvar s = 0; s < TAPS; s++) begin : g_w
        assign slot_w[sl][s] = '0;
      end
    end
  end

  // ---------------- physical units with their input and weight switches
  logic signed [YW-1:0] unit_y [UNITS];

  for (genvar k = 0; k < UNITS; k++) begin : g_unit
    logic                 used;
    logic signed [SW-1:0] xsel, xdel, xin;
    logic signed [WW-1:0] wsel [TAPS];

    assign used = slot_map[k] < SLW'(SLOTS);

    always_comb begin
      xsel = used ? x[slot_lane[slot_map[k]]] : '0;
      for (int s = 0; s < TAPS; s++) wsel[s] = slot_w[slot_map[k]][s];
    end

    delay_unit #(.W(SW)) u_d (.clk(clk), .rst(rst), .ce(ce), .d(xsel), .q(xdel));

    assign xin = slot_del[slot_map[k]] ? xdel : xsel;

    sub_convolver #(.SW(SW), .WW(WW), .TAPS(TAPS), .AW(YW)) u_sub (
      .clk(clk), .rst(rst), .ce(ce), .x(xin), .w(wsel), .y(unit_y[k])
    );
  end

  // ---------------- output switches: collect each slot from its unit
  logic signed [YW-1:0] slot_y [SLOTS];

  always_comb begin
    for (int sl = 0; sl < SLOTS; sl++) begin
      slot_y[sl] = '0;
      for (int k = 0; k < UNITS; k++)
        if (slot_map[k] == SLW'(sl)) slot_y[sl] = slot_y[sl] | unit_y[k];
    end
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

  // ---------------- configuration rule: no slot served twice
  always_ff @(posedge clk) begin
    if (!rst && ce) begin
      for (int a = 0; a < UNITS; a++)
        for (int b = a + 1; b < UNITS; b++)
          assert (slot_map[a] == SLW'(SLOTS) || slot_map[a] != slot_map[b])
            else $error("bus_convolver: slot %0d mapped to units %0d and %0d", slot_map[a], a, b);
    end
  end

endmodule
