// output_serializer: restores the time sequence of the convolutions that a
// P-parallel convolver delivers as a group.
//
// On g_valid the group g_data[0..P-1] (already in time order, element 0
// first) is captured; in the P following cycles o_valid is high and o_data
// carries one element per cycle, element 0 first.  Output is registered:
// the first element appears the cycle after g_valid.  A new group may arrive
// at the earliest in the cycle the last element of the previous one is sent
// (P cycles apart); the assertion flags a group that comes sooner.  The
// conversion is only asked for in general terms; this shift-out scheme is
// this design's choice.
module output_serializer #(
  parameter int P  = 3,
  parameter int YW = 20
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 g_valid,
  input  logic signed [YW-1:0] g_data [P],
  output logic                 o_valid,
  output logic signed [YW-1:0] o_data
);

  localparam int CW = $clog2(P + 1);

  logic signed [YW-1:0] buffer [P];
  logic [CW-1:0]        left;   // elements still to send
  logic [CW-1:0]        idx;    // next element to send

  always_ff @(posedge clk) begin
    if (rst) begin
      left    <= '0;
      idx     <= '0;
      o_valid <= 1'b0;
      o_data  <= '0;
      for (int i = 0; i < P; i++) buffer[i] <= '0;
    end else begin
      o_valid <= 1'b0;
      if (g_valid) begin
        // The first element goes out at once, the rest from the buffer.
        for (int i = 0; i < P; i++) buffer[i] <= g_data[i];
        o_valid <= 1'b1;
        o_data  <= g_data[0];
        idx     <= CW'(1);
        left    <= CW'(P-1);
      end else if (left != '0) begin
        o_valid <= 1'b1;
        o_data  <= buffer[idx];
        idx     <= idx + 1'b1;
        left    <= left - 1'b1;
      end
    end
  end

  // A group must not interrupt the previous one.
  always_ff @(posedge clk) begin
    if (!rst && g_valid)
      assert (left == '0)
        else $error("output_serializer: group arrived before the previous one was sent");
  end

endmodule
