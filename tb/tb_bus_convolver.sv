// tb_bus_convolver: switched-bus 2-parallel convolver, N = 6, with 2
// spares (6 physical sub-convolvers for 4 slots).  Each round picks two
// distinct physical units, breaks both (outputs forced to a wrong
// constant) and first runs with a mapping that still uses them: the
// outputs must go wrong.  It then maps the 4 slots onto the 4 healthy
// units in a random order, excludes the broken ones, and checks every
// output group against the direct convolution, grouped as
// y[1] = Y(2t-1), y[0] = Y(2t), two cycles after the ce of tuple t.
module tb_bus_convolver;
  localparam int P = 2, N = 6, SPARES = 2, YW = 8 + 8 + $clog2(N);
  localparam int SLOTS = P * P, UNITS = SLOTS + SPARES;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                 rst, ce;
  logic [2:0]           slot_map [UNITS];
  logic signed [7:0]    x [P];
  logic signed [7:0]    w [N];
  logic                 y_valid;
  logic signed [YW-1:0] y [P];

  bus_convolver #(.P(P), .N(N), .SPARES(SPARES), .SW(8), .WW(8), .OUT_ALIGN(1'b1)) dut (.*);

  int xs[$];
  int pend[$];
  int mism, groups;
  int checks = 0, failures = 0;
  int detected = 0, double_faults = 0;

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

  task automatic set_broken(input int k, input bit on);
    if (on) begin
      case (k)
        0: force dut.g_unit[0].u_sub.y = 20'sh1BEEF;
        1: force dut.g_unit[1].u_sub.y = 20'sh1BEEF;
        2: force dut.g_unit[2].u_sub.y = 20'sh1BEEF;
        3: force dut.g_unit[3].u_sub.y = 20'sh1BEEF;
        4: force dut.g_unit[4].u_sub.y = 20'sh1BEEF;
        default: force dut.g_unit[5].u_sub.y = 20'sh1BEEF;
      endcase
    end else begin
      case (k)
        0: release dut.g_unit[0].u_sub.y;
        1: release dut.g_unit[1].u_sub.y;
        2: release dut.g_unit[2].u_sub.y;
        3: release dut.g_unit[3].u_sub.y;
        4: release dut.g_unit[4].u_sub.y;
        default: release dut.g_unit[5].u_sub.y;
      endcase
    end
  endtask

  initial begin
    rst = 1'b1; ce = 1'b0;
    for (int q = 0; q < P; q++) x[q] = '0;
    for (int j = 0; j < N; j++) w[j] = 8'($urandom);

    for (int round = 0; round < 10; round++) begin
      automatic int a = $urandom % UNITS;
      automatic int b = (a + 1 + $urandom % (UNITS - 1)) % UNITS;
      automatic int healthy[$];
      automatic int order[$];

      // pass 1: identity-like mapping that uses unit a (slot a or 0)
      for (int k = 0; k < UNITS; k++) slot_map[k] = 3'(SLOTS);
      slot_map[a] = 3'(0);
      begin
        automatic int s = 1;
        for (int k = 0; k < UNITS; k++)
          if (k != a && s < SLOTS) begin slot_map[k] = 3'(s); s++; end
      end
      set_broken(a, 1'b1);
      set_broken(b, 1'b1);
      run(12);
      checks++;
      if (mism == 0) begin failures++; $display("round %0d: broken unit %0d in use, outputs right", round, a); end
      else detected++;

      // pass 2: random mapping onto the healthy units
      for (int k = 0; k < UNITS; k++) if (k != a && k != b) healthy.push_back(k);
      healthy.shuffle();
      for (int k = 0; k < UNITS; k++) slot_map[k] = 3'(SLOTS);
      for (int s = 0; s < SLOTS; s++) slot_map[healthy[s]] = 3'(s);
      double_faults++;
      run(20);
      checks += 2 * groups + 1;
      if (mism != 0 || groups != 20) begin
        failures++;
        $display("round %0d: units %0d,%0d excluded: %0d mismatches, %0d groups", round, a, b, mism, groups);
      end
      set_broken(a, 1'b0);
      set_broken(b, 1'b0);
    end

    checks++;
    if (detected != 10 || double_faults != 10) begin
      failures++;
      $display("detected %0d, double faults %0d", detected, double_faults);
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
