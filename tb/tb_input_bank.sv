// tb_input_bank: feeds a stream of samples with random gaps and checks that
// every P-th sample produces exactly one g_valid pulse, the clock after
// that sample, carrying the last P samples in arrival order.
module tb_input_bank;
  localparam int P = 3;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              rst, s_valid, g_valid;
  logic signed [7:0] s_data;
  logic signed [7:0] g_data [P];

  input_bank #(.P(P), .SW(8)) dut (.*);

  int sent[$];
  int expect_pulse = 0;
  int groups = 0;
  int checks = 0, failures = 0;

  always @(posedge clk) begin
    if (!rst) begin
      checks++;
      if (g_valid != (expect_pulse != 0)) begin
        failures++;
        $display("g_valid=%b expected %b", g_valid, expect_pulse != 0);
      end
      if (g_valid) begin
        for (int q = 0; q < P; q++) begin
          checks++;
          if (int'(g_data[q]) != sent[groups*P + q]) begin
            failures++;
            $display("group %0d lane %0d: %0d expected %0d", groups, q, g_data[q], sent[groups*P + q]);
          end
        end
        groups++;
      end
      expect_pulse = 0;
      if (s_valid) begin
        sent.push_back(int'(s_data));
        if (sent.size() % P == 0) expect_pulse = 1;
      end
    end
  end

  initial begin
    rst = 1'b1; s_valid = 1'b0; s_data = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < 300; i++) begin
      s_valid <= ($urandom % 3) != 0;
      s_data  <= 8'($urandom);
      @(posedge clk);
    end
    s_valid <= 1'b0;
    repeat (3) @(posedge clk);
    checks++;
    if (groups != sent.size() / P) begin failures++; $display("groups %0d", groups); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
