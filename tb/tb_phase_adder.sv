// tb_phase_adder: checks that the phase adder registers the signed sum of
// its P inputs one enabled edge later, and holds it while ce is low.
module tb_phase_adder;
  localparam int P = 3;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic               rst, ce;
  logic signed [19:0] a [P];
  logic signed [19:0] s;
  longint model;
  int checks = 0, failures = 0;

  phase_adder #(.P(P), .AW(20), .YW(20)) dut (.*);

  initial begin
    rst = 1'b1; ce = 1'b0;
    for (int i = 0; i < P; i++) a[i] = 20'sd1;
    @(posedge clk); #1;
    checks++;
    if (s !== '0) begin failures++; $display("reset: %0d", s); end
    rst = 1'b0;
    model = 0;
    for (int n = 0; n < 300; n++) begin
      automatic longint sum = 0;
      ce = ($urandom % 4) != 0;
      for (int i = 0; i < P; i++) begin
        a[i] = 20'($signed(20'($urandom)) >>> 2);
        sum += longint'(a[i]);
      end
      @(posedge clk);
      if (ce) model = sum;
      #1;
      checks++;
      if (longint'(s) != model) begin
        failures++;
        $display("step %0d: s=%0d expected %0d", n, s, model);
      end
    end
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
