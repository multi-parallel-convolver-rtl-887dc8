// tb_mp_convolver: self-checking test of the p-parallel convolver.
// Four configurations run at once: the default (P=3, N=9, grouped output),
// P=2 N=6 without the grouping delay, P=3 N=8 (N not a multiple of P, zero
// weight filling) and P=3 N=9 with all samples and weights at -128 (largest
// result magnitude).  Every output group is compared with a direct
// convolution, and the latency from ce to y_valid must be two cycles.
module tb_mp_convolver;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int c[4], f[4], s[4];
  logic d[4];

  mpc_harness #(.P(3), .N(9), .OUT_ALIGN(1'b1), .SEED(1)) h0 (.clk(clk), .checks(c[0]), .failures(f[0]), .stalls(s[0]), .done(d[0]));
  mpc_harness #(.P(2), .N(6), .OUT_ALIGN(1'b0), .SEED(3)) h1 (.clk(clk), .checks(c[1]), .failures(f[1]), .stalls(s[1]), .done(d[1]));
  mpc_harness #(.P(3), .N(8), .OUT_ALIGN(1'b1), .SEED(5)) h2 (.clk(clk), .checks(c[2]), .failures(f[2]), .stalls(s[2]), .done(d[2]));
  mpc_harness #(.P(3), .N(9), .OUT_ALIGN(1'b1), .SEED(2)) h3 (.clk(clk), .checks(c[3]), .failures(f[3]), .stalls(s[3]), .done(d[3]));

  int checks, failures;

  initial begin
    repeat (2) @(posedge clk);
    wait (d[0] && d[1] && d[2] && d[3]);
    checks = 0; failures = 0;
    for (int i = 0; i < 4; i++) begin
      checks += c[i];
      failures += f[i];
      checks++;
      if (s[i] == 0) begin
        failures++;
        $display("harness %0d never stalled", i);
      end
    end
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
