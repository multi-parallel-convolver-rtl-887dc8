// mp_convolver_top: the multi-parallel convolver system.
//
// Stream path: bit-parallel samples arriving one per s_valid are grouped by
// input_bank into P-tuples, each tuple is processed in one time step by the
// P-parallel convolver mp_convolver, and output_serializer hands the P
// convolutions of every group back one per cycle in time order on o_data.
// The group itself is also brought out on g_y / g_y_valid.  With the output
// grouping delay in place, g_y[P-1] = Y(P*t-1) and g_y[q] = Y(P*t+q)
// otherwise, so the serialiser reads g_y[P-1] first.
//
// Side by side, with their own ports:
//  * bs_*  : serial_sample_bank, the input conversion for bit-serial
//            samples (P shift registers loaded as one cascade, emptied in
//            parallel), shown with the stream convolver's P and SW;
//  * ft_*  : ft_convolver, the FT_P-parallel convolver with one spare
//            sub-convolver and two-position switches;
//  * bus_* : bus_convolver, the FT_P-parallel convolver with BUS_SPARES
//            spares on a switched-bus interconnect.
// These variants are not joined to the stream path because they are
// alternative cores, not stages of it.
//
// Timing (stream path): the P-th sample of a tuple is taken at clock edge
// e; the tuple goes into the convolver at edge e+1, g_y_valid is high in
// the cycle after edge e+2 and o_valid in the P cycles after edge e+3.  Sample rate
// at most one per clock here, since this single clock domain stands for
// both the fast serial side and the P-times-slower parallel core.
module mp_convolver_top
  import conv_pkg::*;
#(
  parameter int P          = 3,
  parameter int N          = 9,
  parameter int FT_P       = 2,
  parameter int FT_N       = 6,
  parameter int BUS_SPARES = 2,
  parameter int SW         = 8,
  parameter int WW         = 8,
  localparam int YW     = result_width(SW, WW, N),
  localparam int FT_YW  = result_width(SW, WW, FT_N),
  localparam int FT_FW  = $clog2(FT_P*FT_P + 1),
  localparam int BUS_U  = FT_P*FT_P + BUS_SPARES
) (
  input  logic                    clk,
  input  logic                    rst,
  // stream path
  input  logic signed [WW-1:0]    w [N],
  input  logic                    s_valid,
  input  logic signed [SW-1:0]    s_data,
  output logic                    g_y_valid,
  output logic signed [YW-1:0]    g_y [P],
  output logic                    o_valid,
  output logic signed [YW-1:0]    o_data,
  // bit-serial input conversion
  input  logic                    bs_bit_valid,
  input  logic                    bs_bit_in,
  output logic                    bs_par_valid,
  output logic                    bs_par_first,
  output logic [P-1:0]            bs_par_bits,
  // fault-tolerant convolver with one spare
  input  logic                    ft_ce,
  input  logic [FT_FW-1:0]        ft_faulty,
  input  logic signed [SW-1:0]    ft_x [FT_P],
  input  logic signed [WW-1:0]    ft_w [FT_N],
  output logic                    ft_y_valid,
  output logic signed [FT_YW-1:0] ft_y [FT_P],
  // switched-bus convolver
  input  logic                    bus_ce,
  input  logic [FT_FW-1:0]        bus_slot_map [BUS_U],
  input  logic signed [SW-1:0]    bus_x [FT_P],
  input  logic signed [WW-1:0]    bus_w [FT_N],
  output logic                    bus_y_valid,
  output logic signed [FT_YW-1:0] bus_y [FT_P]
);

  // ---------------- stream path
  logic                 tuple_valid;
  logic signed [SW-1:0] tuple [P];
  logic signed [YW-1:0] ordered [P];

  input_bank #(.P(P), .SW(SW)) u_bank (
    .clk(clk), .rst(rst), .s_valid(s_valid), .s_data(s_data),
    .g_valid(tuple_valid), .g_data(tuple)
  );

  mp_convolver #(.P(P), .N(N), .SW(SW), .WW(WW), .OUT_ALIGN(1'b1)) u_conv (
    .clk(clk), .rst(rst), .ce(tuple_valid), .x(tuple), .w(w),
    .y_valid(g_y_valid), .y(g_y)
  );

  // Time order of a group: Y(P*t-1) (last phase, delayed) first.
  always_comb begin
    ordered[0] = g_y[P-1];
    for (int q = 1; q < P; q++) ordered[q] = g_y[q-1];
  end

  output_serializer #(.P(P), .YW(YW)) u_ser (
    .clk(clk), .rst(rst), .g_valid(g_y_valid), .g_data(ordered),
    .o_valid(o_valid), .o_data(o_data)
  );

  // ---------------- bit-serial input conversion
  serial_sample_bank #(.P(P), .SW(SW)) u_bs (
    .clk(clk), .rst(rst), .bit_valid(bs_bit_valid), .bit_in(bs_bit_in),
    .par_valid(bs_par_valid), .par_first(bs_par_first), .par_bits(bs_par_bits)
  );

  // ---------------- fault-tolerant variants
  ft_convolver #(.P(FT_P), .N(FT_N), .SW(SW), .WW(WW), .OUT_ALIGN(1'b1)) u_ft (
    .clk(clk), .rst(rst), .ce(ft_ce), .faulty(ft_faulty), .x(ft_x), .w(ft_w),
    .y_valid(ft_y_valid), .y(ft_y)
  );

  bus_convolver #(.P(FT_P), .N(FT_N), .SPARES(BUS_SPARES), .SW(SW), .WW(WW),
                  .OUT_ALIGN(1'b1)) u_bus (
    .clk(clk), .rst(rst), .ce(bus_ce), .slot_map(bus_slot_map), .x(bus_x), .w(bus_w),
    .y_valid(bus_y_valid), .y(bus_y)
  );

endmodule
