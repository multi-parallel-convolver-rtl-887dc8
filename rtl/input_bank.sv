// input_bank: bank of P registers that turns a stream of bit-parallel
// samples into the P-tuples a P-parallel convolver takes.
//
// Samples arrive one at a time with s_valid.  The first P-1 of a tuple are
// kept in the bank; when the P-th arrives the whole tuple is copied to g_data
// (g_data[q] = the q-th sample of the tuple) and g_valid pulses for one
// cycle, the clock edge after that sample.  g_data holds until the next tuple
// is complete, so the convolver may read it at any time before then.  There
// is no backpressure.  The valid strobe and reset are this design's choices.
module input_bank #(
  parameter int P  = 3,
  parameter int SW = 8
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 s_valid,
  input  logic signed [SW-1:0] s_data,
  output logic                 g_valid,
  output logic signed [SW-1:0] g_data [P]
);

  localparam int CW = (P > 1) ? $clog2(P) : 1;

  logic signed [SW-1:0] bank [P];
  logic [CW-1:0]        cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '0;
      g_valid <= 1'b0;
      for (int i = 0; i < P; i++) begin
        bank[i]   <= '0;
        g_data[i] <= '0;
      end
    end else begin
      g_valid <= 1'b0;
      if (s_valid) begin
        bank[cnt] <= s_data;
        if (cnt == CW'(P-1)) begin
          cnt     <= '0;
          g_valid <= 1'b1;
          for (int i = 0; i < P-1; i++) g_data[i] <= bank[i];
          g_data[P-1] <= s_data;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
