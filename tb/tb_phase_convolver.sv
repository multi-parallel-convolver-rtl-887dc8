// tb_phase_convolver: runs the three phases Q = 0, 1, 2 of a 3-phase,
// 3-input convolver with N = 9 on the same random tuples (with random
// gaps) and checks that phase Q delivers Y(3t+Q), two cycles after the ce
// that took tuple t.  Phase 0 uses two delayed lanes, phase 1 one and
// phase 2 none, so all three delay patterns are covered.  The previous
// tuple (x_prev), which the enclosing convolver makes, is kept here.
module tb_phase_convolver;
  localparam int P = 3, N = 9, YW = 8 + 8 + $clog2(N);
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                 rst, ce;
  logic signed [7:0]    x [P];
  logic signed [7:0]    x_prev [P];   // previous tuple, kept here
  logic signed [7:0]    w [N];
  logic                 vld [P];
  logic                 v1 [P];
  logic signed [YW-1:0] y [P];

  for (genvar q = 0; q < P; q++) begin : g_dut
    phase_convolver #(.P(P), .N(N), .Q(q), .SW(8), .WW(8)) dut (
      .clk(clk), .rst(rst), .ce(ce), .x(x), .x_prev(x_prev), .w(w),
      .y_valid(vld[q]), .v1(v1[q]), .y(y[q])
    );
  end

  int xs[$];
  int pend[$];
  int checks = 0, failures = 0;
  logic ce_d1 = 1'b0, ce_d2 = 1'b0;

  function automatic longint yref(int i);
    longint s = 0;
    for (int j = 0; j < N; j++)
      if (i - j >= 0) s += longint'(w[j]) * longint'(xs[i-j]);
    return s;
  endfunction

  always @(posedge clk) begin
    if (rst) for (int q = 0; q < P; q++) x_prev[q] <= '0;
    else if (ce) x_prev <= x;
  end

  always @(posedge clk) begin
    ce_d1 <= ce;
    ce_d2 <= ce_d1;
    if (!rst) begin
      for (int q = 0; q < P; q++) begin
        checks++;
        if (vld[q] != ce_d2) begin
          failures++;
          $display("phase %0d: y_valid=%b, ce two cycles earlier=%b", q, vld[q], ce_d2);
        end
      end
      if (vld[0]) begin
        automatic int t = pend.pop_front();
        for (int q = 0; q < P; q++) begin
          checks++;
          if (longint'(y[q]) != yref(P*t + q)) begin
            failures++;
            $display("t=%0d phase %0d: y=%0d expected %0d", t, q, y[q], yref(P*t + q));
          end
        end
      end
    end
  end

  initial begin
    rst = 1'b1; ce = 1'b0;
    for (int q = 0; q < P; q++) x[q] = '0;
    for (int j = 0; j < N; j++) w[j] = 8'($urandom);
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < 80; t++) begin
      if ($urandom % 3 == 0) begin
        ce <= 1'b0;
        repeat (1 + $urandom % 3) @(posedge clk);
      end
      for (int q = 0; q < P; q++) begin
        automatic int v = int'($signed(8'($urandom)));
        xs.push_back(v);
        x[q] <= 8'(v);
      end
      pend.push_back(t);
      ce <= 1'b1;
      @(posedge clk);
    end
    ce <= 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (pend.size() != 0) begin failures++; $display("%0d outputs missing", pend.size()); end
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
