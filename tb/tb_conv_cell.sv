// tb_conv_cell: checks that a convolver cell registers acc_in + x*w (signed)
// on every enabled edge, holds when ce is low and clears on reset.
module tb_conv_cell;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic               rst, ce;
  logic signed [7:0]  x, w;
  logic signed [19:0] acc_in, acc_out;
  longint model;
  int checks = 0, failures = 0;

  conv_cell #(.SW(8), .WW(8), .AW(20)) dut (.*);

  initial begin
    rst = 1'b1; ce = 1'b1; x = 8'sd3; w = 8'sd4; acc_in = 20'sd7;
    @(posedge clk); #1;
    checks++;
    if (acc_out !== '0) begin failures++; $display("reset: %0d", acc_out); end
    rst = 1'b0;
    model = 0;
    for (int i = 0; i < 300; i++) begin
      ce     = ($urandom % 5) != 0;
      x      = 8'($urandom);
      w      = (i < 4) ? -8'sd128 : 8'($urandom);
      if (i < 4) x = -8'sd128;
      acc_in = 20'($signed(20'($urandom)) >>> 2);
      @(posedge clk);
      if (ce) model = longint'(acc_in) + longint'(x) * longint'(w);
      #1;
      checks++;
      if (longint'(acc_out) != model) begin
        failures++;
        $display("step %0d: acc_out=%0d expected %0d", i, acc_out, model);
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
