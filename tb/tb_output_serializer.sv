// tb_output_serializer: sends groups of P words at random intervals of at
// least P cycles and checks that the words come out one per cycle, element 0
// first, starting the cycle after the group, with no extra o_valid.
module tb_output_serializer;
  localparam int P = 3;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic               rst, g_valid, o_valid;
  logic signed [19:0] g_data [P];
  logic signed [19:0] o_data;

  output_serializer #(.P(P), .YW(20)) dut (.*);

  int expq[$];
  int expc[$];   // cycle count at which each word must be seen
  int cyc = 0;
  int checks = 0, failures = 0;
  int outs = 0, ins = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && o_valid) begin
      checks++;
      outs++;
      if (expq.size() == 0) begin
        failures++;
        $display("unexpected o_valid");
      end else begin
        automatic int e  = expq.pop_front();
        automatic int ec = expc.pop_front();
        if (int'(o_data) != e) begin failures++; $display("o_data=%0d expected %0d", o_data, e); end
        checks++;
        if (cyc != ec) begin failures++; $display("word seen at %0d expected at %0d", cyc, ec); end
      end
    end
  end

  initial begin
    rst = 1'b1; g_valid = 1'b0;
    for (int q = 0; q < P; q++) g_data[q] = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < 60; n++) begin
      g_valid <= 1'b1;
      for (int q = 0; q < P; q++) begin
        automatic int v = int'($signed(20'($urandom)));
        g_data[q] <= 20'(v);
        expq.push_back(v);
        // given now, taken at the next edge, shown from the edge after
        expc.push_back(cyc + 2 + q);
        ins++;
      end
      @(posedge clk);
      g_valid <= 1'b0;
      // the next group comes P cycles after this one at the earliest
      repeat (P - 1 + ($urandom % 3)) @(posedge clk);
    end
    repeat (P + 2) @(posedge clk);
    checks++;
    if (outs != ins) begin failures++; $display("%0d words out of %0d", outs, ins); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
