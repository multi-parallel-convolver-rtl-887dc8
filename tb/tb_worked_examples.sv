// tb_worked_examples: the three small configurations used to explain the
// scheme, run with readable numbers (X(i) = i+1, W(j) = j+1) so the output
// groups can be compared with hand-computed sums.
//   * p = 2, N = 6 without the output delay: the tuple of step t = 3
//     (X6, X7) yields Y(6) and Y(7) together;
//   * p = 2, N = 6 with the output delay: the same step yields Y(5), the
//     first complete convolution, together with Y(6);
//   * p = 3, N = 9 with the output delay: step t = 3 yields Y(8), Y(9),
//     Y(10), Y(8) being the first complete convolution;
//   * p = 3, N = 8 (N not a multiple of p): step t = 3 yields Y(8), Y(9),
//     Y(10) of the 8-term convolution.
// Every group of the first 8 steps is also checked against the formula.
module tb_worked_examples;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst = 1'b1;
  logic ce  = 1'b0;
  int   checks = 0, failures = 0;

  // closed-form check value: sum_{j<n, i-j>=0} (j+1)*(i-j+1)
  function automatic longint yref(int n, int i);
    longint s = 0;
    for (int j = 0; j < n; j++) if (i - j >= 0) s += longint'(j + 1) * longint'(i - j + 1);
    return s;
  endfunction

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---- p = 2, N = 6
  logic signed [7:0]  x2 [2];
  logic signed [7:0]  w6 [6];
  logic signed [18:0] ya [2], yb [2];
  logic               va, vb;
  mp_convolver #(.P(2), .N(6), .OUT_ALIGN(1'b0)) u_a (.clk(clk), .rst(rst), .ce(ce), .x(x2), .w(w6), .y_valid(va), .y(ya));
  mp_convolver #(.P(2), .N(6), .OUT_ALIGN(1'b1)) u_b (.clk(clk), .rst(rst), .ce(ce), .x(x2), .w(w6), .y_valid(vb), .y(yb));

  // ---- p = 3, N = 9 and N = 8
  logic signed [7:0]  x3 [3];
  logic signed [7:0]  w9 [9];
  logic signed [7:0]  w8 [8];
  logic signed [19:0] yc [3];
  logic signed [18:0] yd [3];
  logic               vc, vd;
  mp_convolver #(.P(3), .N(9), .OUT_ALIGN(1'b1)) u_c (.clk(clk), .rst(rst), .ce(ce), .x(x3), .w(w9), .y_valid(vc), .y(yc));
  mp_convolver #(.P(3), .N(8), .OUT_ALIGN(1'b1)) u_d (.clk(clk), .rst(rst), .ce(ce), .x(x3), .w(w8), .y_valid(vd), .y(yd));

  int out_t = 0;   // step whose group is now on the outputs
  int hits  = 0;   // highlighted groups seen

  always @(posedge clk) begin
    if (!rst && va) begin
      automatic int t = out_t;
      out_t++;
      // general check of every group
      expect_eq("p2 no-delay y0", ya[0], yref(6, 2*t));
      expect_eq("p2 no-delay y1", ya[1], yref(6, 2*t + 1));
      expect_eq("p2 delay y0",    yb[0], yref(6, 2*t));
      expect_eq("p2 delay y1",    yb[1], yref(6, 2*t - 1));
      expect_eq("p3 N9 y0", yc[0], yref(9, 3*t));
      expect_eq("p3 N9 y1", yc[1], yref(9, 3*t + 1));
      expect_eq("p3 N9 y2", yc[2], yref(9, 3*t - 1));
      expect_eq("p3 N8 y0", yd[0], yref(8, 3*t));
      expect_eq("p3 N8 y1", yd[1], yref(8, 3*t + 1));
      expect_eq("p3 N8 y2", yd[2], yref(8, 3*t - 1));
      if (t == 3) begin
        // hand-computed values, e.g. for N = 6: Y5 = 56, Y6 = 77, Y7 = 98
        expect_eq("Table A Y6 with Y7 (no delay)", ya[0], 1*7 + 2*6 + 3*5 + 4*4 + 5*3 + 6*2);
        expect_eq("Table A Y7 with Y6 (no delay)", ya[1], 1*8 + 2*7 + 3*6 + 4*5 + 5*4 + 6*3);
        expect_eq("Table A Y5 with Y6 (delay)",    yb[1], 1*6 + 2*5 + 3*4 + 4*3 + 5*2 + 6*1);
        expect_eq("Table B Y8 first complete",     yc[2], 1*9 + 2*8 + 3*7 + 4*6 + 5*5 + 6*4 + 7*3 + 8*2 + 9*1);
        expect_eq("Table B Y9",                    yc[0], 1*10 + 2*9 + 3*8 + 4*7 + 5*6 + 6*5 + 7*4 + 8*3 + 9*2);
        expect_eq("N=8 Y8",                        yd[2], 1*9 + 2*8 + 3*7 + 4*6 + 5*5 + 6*4 + 7*3 + 8*2);
        hits++;
      end
    end
  end

  initial begin
    for (int j = 0; j < 9; j++) w9[j] = 8'(j + 1);
    for (int j = 0; j < 8; j++) w8[j] = 8'(j + 1);
    for (int j = 0; j < 6; j++) w6[j] = 8'(j + 1);
    for (int q = 0; q < 2; q++) x2[q] = '0;
    for (int q = 0; q < 3; q++) x3[q] = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < 8; t++) begin
      for (int q = 0; q < 2; q++) x2[q] <= 8'(2*t + q + 1);
      for (int q = 0; q < 3; q++) x3[q] <= 8'(3*t + q + 1);
      ce <= 1'b1;
      @(posedge clk);
    end
    ce <= 1'b0;
    repeat (5) @(posedge clk);
    expect_eq("groups seen", out_t, 8);
    expect_eq("highlighted step reached", hits, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
