// tb_ft_convolver: fault-tolerant 2-parallel convolver with one spare,
// N = 6.  For every physical sub-convolver k = 0..4 the test breaks that
// unit (its output is forced to a wrong constant) and runs two passes:
//   1. switches left at 0 (faulty = 4, the spare): the outputs must now be
//      wrong somewhere, which shows the broken unit is really in use;
//   2. faulty = k: the spare takes over and every output group must again
//      equal the direct convolution Y(i) = sum_j W(j) X(i-j), grouped as
//      y[1] = Y(2t-1), y[0] = Y(2t), two cycles after the ce of tuple t.
// Unit 4 is the spare itself: breaking it must change nothing in pass 1.
module tb_ft_convolver;
  localparam int P = 2, N = 6, YW = 8 + 8 + $clog2(N), SLOTS = P * P;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                 rst, ce;
  logic [2:0]           faulty;
  logic signed [7:0]    x [P];
  logic signed [7:0]    w [N];
  logic                 y_valid;
  logic signed [YW-1:0] y [P];

  ft_convolver #(.P(P), .N(N), .SW(8), .WW(8), .OUT_ALIGN(1'b1)) dut (.*);

  int xs[$];
  int pend[$];
  int mism;
  int groups;
  int checks = 0, failures = 0;
  int reconfigs = 0, detected = 0;

  function automatic longint yref(int i);
    longint s = 0;
    for (int j = 0; j < N; j++)
      if (i - j >= 0 && i - j < xs.size()) s += longint'(w[j]) * longint'(xs[i-j]);
    return s;
  endfunction

  always @(posedge clk) begin
    if (!rst && y_valid) begin
      automatic int t = pend.pop_front();
      groups++;
      if (longint'(y[0]) != yref(P*t))     mism++;
      if (longint'(y[1]) != yref(P*t - 1)) mism++;
    end
  end

  task automatic run(input int tuples);
    xs.delete();
    pend.delete();
    mism = 0;
    groups = 0;
    rst <= 1'b1;
    ce  <= 1'b0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < tuples; t++) begin
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
    repeat (4) @(posedge clk);
  endtask

  task automatic break_unit(input int k);
    case (k)
      0: force dut.g_unit[0].u_sub.y = 20'sh2A5A5;
      1: force dut.g_unit[1].u_sub.y = 20'sh2A5A5;
      2: force dut.g_unit[2].u_sub.y = 20'sh2A5A5;
      3: force dut.g_unit[3].u_sub.y = 20'sh2A5A5;
      default: force dut.g_unit[4].u_sub.y = 20'sh2A5A5;
    endcase
  endtask

  task automatic repair_unit(input int k);
    case (k)
      0: release dut.g_unit[0].u_sub.y;
      1: release dut.g_unit[1].u_sub.y;
      2: release dut.g_unit[2].u_sub.y;
      3: release dut.g_unit[3].u_sub.y;
      default: release dut.g_unit[4].u_sub.y;
    endcase
  endtask

  initial begin
    rst = 1'b1; ce = 1'b0; faulty = 3'(SLOTS);
    for (int q = 0; q < P; q++) x[q] = '0;
    for (int j = 0; j < N; j++) w[j] = 8'($urandom);

    // fault-free reference run
    run(20);
    checks += 2;
    if (mism != 0)   begin failures++; $display("fault-free run: %0d mismatches", mism); end
    if (groups != 20) begin failures++; $display("fault-free run: %0d groups", groups); end

    for (int k = 0; k <= SLOTS; k++) begin
      break_unit(k);
      faulty = 3'(SLOTS);
      run(20);
      checks++;
      if (k < SLOTS) begin
        if (mism == 0) begin failures++; $display("unit %0d broken but outputs still right", k); end
        else detected++;
      end else if (mism != 0) begin
        failures++;
        $display("idle spare broken and outputs changed");
      end
      faulty = 3'(k);
      reconfigs++;
      run(20);
      checks += 2;
      checks += 2 * groups;
      if (mism != 0)    begin failures++; $display("unit %0d replaced: %0d mismatches", k, mism); end
      if (groups != 20) begin failures++; $display("unit %0d replaced: %0d groups", k, groups); end
      repair_unit(k);
    end

    checks++;
    if (detected != SLOTS || reconfigs != SLOTS + 1) begin
      failures++;
      $display("detected %0d reconfigs %0d", detected, reconfigs);
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
