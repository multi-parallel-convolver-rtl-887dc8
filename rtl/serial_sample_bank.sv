// serial_sample_bank: bank of P shift registers that turns a stream of
// bit-serial samples into P synchronous bit-serial samples.
//
// Loading: bits arrive one per bit_valid, each sample LSB first, the samples
// one after another.  The P shift registers are loaded as one cascaded
// register of P*SW bits.  When the last bit of the P-th sample arrives the
// bank holds the whole tuple, with sample q in register q, and it is copied
// in one clock to a second bank of P shift registers.  Retrieval: from the
// next cycle, for SW cycles, each of those registers shifts one bit out
// together with the others: par_bits[q] is the current bit of sample q,
// par_valid is high and par_first marks the LSB.  The copy lets the next
// tuple load while this one is retrieved; retrieval takes SW cycles and
// loading at least P*SW, so they never collide.  The LSB-first order, the
// copy bank and the strobes are this design's choices.
module serial_sample_bank #(
  parameter int P  = 3,
  parameter int SW = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         bit_valid,
  input  logic         bit_in,
  output logic         par_valid,
  output logic         par_first,
  output logic [P-1:0] par_bits
);

  localparam int LW = P * SW;
  localparam int LC = $clog2(LW);
  localparam int UC = $clog2(SW + 1);

  logic [LW-2:0]  load_sr;   // the tuple's bits so far, bit_in completes it
  logic [LW-1:0]  load_next;
  logic [LC-1:0]  lcnt;
  logic [SW-1:0]  unload_sr [P];
  logic [UC-1:0]  ucnt;    // bits still to retrieve
  logic           first;

  // New bits enter at the top and move down the cascade, so the first
  // sample ends in the lowest SW bits.
  assign load_next = {bit_in, load_sr};

  always_ff @(posedge clk) begin
    if (rst) begin
      load_sr <= '0;
      lcnt    <= '0;
      ucnt    <= '0;
      first   <= 1'b0;
      for (int q = 0; q < P; q++) unload_sr[q] <= '0;
    end else begin
      if (bit_valid) begin
        load_sr <= load_next[LW-1:1];
        lcnt    <= (lcnt == LC'(LW-1)) ? '0 : lcnt + 1'b1;
      end

      if (bit_valid && lcnt == LC'(LW-1)) begin
        for (int q = 0; q < P; q++) unload_sr[q] <= load_next[q*SW +: SW];
        ucnt  <= UC'(SW);
        first <= 1'b1;
      end else if (ucnt != '0) begin
        for (int q = 0; q < P; q++) unload_sr[q] <= unload_sr[q] >> 1;
        ucnt  <= ucnt - 1'b1;
        first <= 1'b0;
      end
    end
  end

  always_comb begin
    for (int q = 0; q < P; q++) par_bits[q] = unload_sr[q][0];
  end
  assign par_valid = (ucnt != '0);
  assign par_first = first;

endmodule
