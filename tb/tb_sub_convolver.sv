// tb_sub_convolver: checks the standard single-input convolver: after the
// enabled edge that takes sample x(m), y must equal sum_r w[r] x(m-r),
// samples before the first one (after reset) counting as zero.  Random
// stalls (ce low) must not disturb the sequence.
module tb_sub_convolver;
  localparam int TAPS = 3;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic               rst, ce;
  logic signed [7:0]  x;
  logic signed [7:0]  w [TAPS];
  logic signed [19:0] y;
  int xs[$];
  int checks = 0, failures = 0;

  sub_convolver #(.SW(8), .WW(8), .TAPS(TAPS), .AW(20)) dut (.*);

  function automatic longint yref(int m);
    longint s = 0;
    for (int r = 0; r < TAPS; r++)
      if (m - r >= 0) s += longint'(w[r]) * longint'(xs[m-r]);
    return s;
  endfunction

  initial begin
    rst = 1'b1; ce = 1'b0; x = '0;
    for (int r = 0; r < TAPS; r++) w[r] = 8'($urandom);
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      ce = ($urandom % 4) != 0;
      x  = 8'($urandom);
      @(posedge clk);
      if (ce) xs.push_back(int'(x));
      #1;
      checks++;
      if (xs.size() == 0) begin
        if (y !== '0) begin failures++; $display("y=%0d before any sample", y); end
      end else if (longint'(y) != yref(xs.size() - 1)) begin
        failures++;
        $display("m=%0d: y=%0d expected %0d", xs.size() - 1, y, yref(xs.size() - 1));
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
