// tb_serial_sample_bank: streams random samples bit-serially (LSB first,
// with random gaps between bits) and rebuilds each tuple from the parallel
// bit streams: for SW consecutive cycles after the tuple's last bit,
// par_bits[q] must give the bits of sample q, par_first marking the LSB.
module tb_serial_sample_bank;
  localparam int P = 3, SW = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst, bit_valid, bit_in;
  logic         par_valid, par_first;
  logic [P-1:0] par_bits;

  serial_sample_bank #(.P(P), .SW(SW)) dut (.*);

  int samples[$];
  int tuples_out = 0;
  int checks = 0, failures = 0;
  int bitpos = 0;
  logic [SW-1:0] rebuilt [P];
  int last_bit_cycle = -100, cyc = 0, first_cycle = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && par_valid) begin
      if (par_first) begin
        bitpos = 0;
        first_cycle = cyc;
        checks++;
        if (cyc != last_bit_cycle + 1) begin
          failures++;
          $display("tuple %0d started %0d cycles after its last bit", tuples_out, cyc - last_bit_cycle);
        end
      end
      for (int q = 0; q < P; q++) rebuilt[q][bitpos] = par_bits[q];
      bitpos++;
      if (bitpos == SW) begin
        for (int q = 0; q < P; q++) begin
          checks++;
          if (int'(rebuilt[q]) != samples[tuples_out*P + q]) begin
            failures++;
            $display("tuple %0d sample %0d: %h expected %h", tuples_out, q, rebuilt[q], samples[tuples_out*P + q]);
          end
        end
        tuples_out++;
      end
    end
  end

  initial begin
    rst = 1'b1; bit_valid = 1'b0; bit_in = 1'b0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < 30 * P; n++) begin
      automatic logic [SW-1:0] v = SW'($urandom);
      samples.push_back(int'(v));
      for (int b = 0; b < SW; b++) begin
        if ($urandom % 4 == 0) begin
          bit_valid <= 1'b0;
          @(posedge clk);
        end
        bit_valid <= 1'b1;
        bit_in    <= v[b];
        @(posedge clk);
        if (n % P == P - 1 && b == SW - 1) last_bit_cycle = cyc;
      end
    end
    bit_valid <= 1'b0;
    repeat (SW + 3) @(posedge clk);
    checks++;
    if (tuples_out != 30) begin failures++; $display("%0d tuples out", tuples_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
