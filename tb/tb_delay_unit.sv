// tb_delay_unit: checks that the one-step delay returns, after each enabled
// clock edge, the word it was given at the previous enabled edge, that it
// holds while ce is low and that reset clears it.
module tb_delay_unit;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       rst, ce;
  logic [7:0] d, q;
  logic [7:0] model;
  int checks = 0, failures = 0;

  delay_unit #(.W(8)) dut (.*);

  initial begin
    rst = 1'b1; ce = 1'b0; d = 8'h5a;
    @(posedge clk); #1;
    checks++;
    if (q !== 8'h00) begin failures++; $display("reset: q=%h", q); end
    rst = 1'b0;
    model = 8'h00;
    for (int i = 0; i < 200; i++) begin
      ce = ($urandom % 4) != 0;
      d  = 8'($urandom);
      @(posedge clk);
      if (ce) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("step %0d: q=%h expected %h", i, q, model);
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
