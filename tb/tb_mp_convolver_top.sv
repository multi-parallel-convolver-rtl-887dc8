// tb_mp_convolver_top: end-to-end test of the whole system at its default
// parameters (stream convolver P = 3, N = 9; fault-tolerant parts P = 2,
// N = 6, two bus spares).
//  * Stream path: 600 random samples go in one per cycle with random gaps
//    (stalls).  Every group on g_y must be [Y(3t-1), Y(3t), Y(3t+1)] in
//    lanes 2, 0, 1, two cycles after the tuple enters the convolver, and
//    the serial output o_data must be the sequence Y(-1), Y(0), Y(1), ...
//    one word per cycle, with Y(i) = sum_j W(j) X(i-j).
//  * Bit-serial bank: random tuples sent bit by bit must come out as
//    three synchronous bit streams.
//  * Fault-tolerant convolver: unit 1 is broken (forced output); without
//    reconfiguration the results must be wrong, with faulty = 1 right.
//  * Bus convolver: units 0 and 3 are broken; with them excluded and the
//    slots remapped the results must be right.
// Each mechanism is counted; one that never happens is a failure.
module tb_mp_convolver_top;
  localparam int P = 3, N = 9, YW = 8 + 8 + $clog2(N);
  localparam int FP = 2, FN = 6, FYW = 8 + 8 + $clog2(FN), FU = FP*FP + 2;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                  rst;
  logic signed [7:0]     w [N];
  logic                  s_valid;
  logic signed [7:0]     s_data;
  logic                  g_y_valid;
  logic signed [YW-1:0]  g_y [P];
  logic                  o_valid;
  logic signed [YW-1:0]  o_data;
  logic                  bs_bit_valid, bs_bit_in, bs_par_valid, bs_par_first;
  logic [P-1:0]          bs_par_bits;
  logic                  ft_ce;
  logic [2:0]            ft_faulty;
  logic signed [7:0]     ft_x [FP];
  logic signed [7:0]     ft_w [FN];
  logic                  ft_y_valid;
  logic signed [FYW-1:0] ft_y [FP];
  logic                  bus_ce;
  logic [2:0]            bus_slot_map [FU];
  logic signed [7:0]     bus_x [FP];
  logic signed [7:0]     bus_w [FN];
  logic                  bus_y_valid;
  logic signed [FYW-1:0] bus_y [FP];

  mp_convolver_top dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;

  // mechanism counters
  int n_stall = 0, n_group = 0, n_serial = 0, n_bs_tuple = 0;
  int n_ft_detect = 0, n_ft_reconf = 0, n_bus_reconf = 0;

  // ---------------------------------------------------------------- stream
  int xs[$];
  int tuple_cycle[$];   // cycle at which each tuple entered the convolver
  int n_out = 0;        // serial words checked

  function automatic longint yref(int i);
    longint s = 0;
    for (int j = 0; j < N; j++)
      if (i - j >= 0 && i - j < xs.size()) s += longint'(w[j]) * longint'(xs[i-j]);
    return s;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      if (dut.tuple_valid) tuple_cycle.push_back(cyc);
      if (g_y_valid) begin
        automatic int t  = n_group;
        automatic int tc = tuple_cycle.pop_front();
        checks += 4;
        if (cyc != tc + 2) begin failures++; $display("group %0d: latency %0d", t, cyc - tc); end
        if (longint'(g_y[2]) != yref(P*t - 1)) begin failures++; $display("group %0d lane 2 wrong", t); end
        if (longint'(g_y[0]) != yref(P*t))     begin failures++; $display("group %0d lane 0 wrong", t); end
        if (longint'(g_y[1]) != yref(P*t + 1)) begin failures++; $display("group %0d lane 1 wrong", t); end
        n_group++;
      end
      if (o_valid) begin
        checks++;
        if (longint'(o_data) != yref(n_out - 1)) begin
          failures++;
          $display("serial word %0d: %0d expected %0d", n_out, o_data, yref(n_out - 1));
        end
        n_out++;
        n_serial++;
      end
    end
  end

  // ------------------------------------------------------- bit-serial bank
  int bs_samples[$];
  int bs_bitpos = 0;
  logic [7:0] bs_rebuilt [P];

  always @(posedge clk) begin
    if (!rst && bs_par_valid) begin
      if (bs_par_first) bs_bitpos = 0;
      for (int q = 0; q < P; q++) bs_rebuilt[q][bs_bitpos] = bs_par_bits[q];
      bs_bitpos++;
      if (bs_bitpos == 8) begin
        for (int q = 0; q < P; q++) begin
          checks++;
          if (int'(bs_rebuilt[q]) != bs_samples[n_bs_tuple*P + q]) begin
            failures++;
            $display("bit-serial tuple %0d sample %0d wrong", n_bs_tuple, q);
          end
        end
        n_bs_tuple++;
      end
    end
  end

  // --------------------------------------- fault-tolerant convolvers (model)
  int fxs[$];
  int ft_pend[$], bus_pend[$];
  int ft_mism = 0, bus_mism = 0, ft_groups = 0, bus_groups = 0;

  function automatic longint fref(int i);
    longint s = 0;
    for (int j = 0; j < FN; j++)
      if (i - j >= 0 && i - j < fxs.size()) s += longint'(ft_w[j]) * longint'(fxs[i-j]);
    return s;
  endfunction

  always @(posedge clk) begin
    if (!rst && ft_y_valid) begin
      automatic int t = ft_pend.pop_front();
      ft_groups++;
      if (longint'(ft_y[0]) != fref(FP*t))     ft_mism++;
      if (longint'(ft_y[1]) != fref(FP*t - 1)) ft_mism++;
    end
    if (!rst && bus_y_valid) begin
      automatic int t = bus_pend.pop_front();
      bus_groups++;
      if (longint'(bus_y[0]) != fref(FP*t))     bus_mism++;
      if (longint'(bus_y[1]) != fref(FP*t - 1)) bus_mism++;
    end
  end

  task automatic ft_run(input int tuples);
    fxs.delete(); ft_pend.delete(); bus_pend.delete();
    ft_mism = 0; bus_mism = 0; ft_groups = 0; bus_groups = 0;
    rst <= 1'b1;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < tuples; t++) begin
      for (int q = 0; q < FP; q++) begin
        automatic int v = int'($signed(8'($urandom)));
        fxs.push_back(v);
        ft_x[q]  <= 8'(v);
        bus_x[q] <= 8'(v);
      end
      ft_pend.push_back(t);
      bus_pend.push_back(t);
      ft_ce  <= 1'b1;
      bus_ce <= 1'b1;
      @(posedge clk);
    end
    ft_ce  <= 1'b0;
    bus_ce <= 1'b0;
    repeat (4) @(posedge clk);
  endtask

  // ------------------------------------------------------------- stimulus
  initial begin
    rst = 1'b1;
    s_valid = 1'b0; s_data = '0;
    bs_bit_valid = 1'b0; bs_bit_in = 1'b0;
    ft_ce = 1'b0; bus_ce = 1'b0; ft_faulty = 3'd4;
    for (int j = 0; j < N; j++) w[j] = 8'($urandom);
    for (int j = 0; j < FN; j++) begin
      ft_w[j]  = 8'($urandom);
      bus_w[j] = ft_w[j];
    end
    for (int q = 0; q < FP; q++) begin ft_x[q] = '0; bus_x[q] = '0; end
    for (int k = 0; k < FU; k++) bus_slot_map[k] = 3'(k < FP*FP ? k : FP*FP);
    repeat (3) @(posedge clk);
    rst <= 1'b0;

    // stream path and bit-serial bank run together
    fork
      begin
        for (int i = 0; i < 600; i++) begin
          if ($urandom % 5 == 0) begin
            s_valid <= 1'b0;
            n_stall++;
            repeat (1 + $urandom % 3) @(posedge clk);
          end
          begin
            automatic int v = int'($signed(8'($urandom)));
            xs.push_back(v);
            s_valid <= 1'b1;
            s_data  <= 8'(v);
          end
          @(posedge clk);
        end
        s_valid <= 1'b0;
      end
      begin
        for (int n = 0; n < 20 * P; n++) begin
          automatic logic [7:0] v = 8'($urandom);
          bs_samples.push_back(int'(v));
          for (int b = 0; b < 8; b++) begin
            bs_bit_valid <= 1'b1;
            bs_bit_in    <= v[b];
            @(posedge clk);
          end
        end
        bs_bit_valid <= 1'b0;
      end
    join
    repeat (10) @(posedge clk);
    checks += 3;
    if (n_group != 200) begin failures++; $display("%0d groups, expected 200", n_group); end
    if (n_out != 600)   begin failures++; $display("%0d serial words, expected 600", n_out); end
    if (n_bs_tuple != 20) begin failures++; $display("%0d bit-serial tuples", n_bs_tuple); end

    // fault-tolerant convolver: unit 1 broken; bus: units 0 and 3 broken
    force dut.u_ft.g_unit[1].u_sub.y  = 19'sh2A5A5;
    force dut.u_bus.g_unit[0].u_sub.y = 19'sh15A5A;
    force dut.u_bus.g_unit[3].u_sub.y = 19'sh15A5A;
    ft_faulty = 3'd4;
    ft_run(20);
    checks++;
    if (ft_mism == 0) begin failures++; $display("broken unit not visible"); end
    else n_ft_detect++;

    ft_faulty = 3'd1;
    bus_slot_map[0] = 3'd4;   // excluded
    bus_slot_map[1] = 3'd2;
    bus_slot_map[2] = 3'd0;
    bus_slot_map[3] = 3'd4;   // excluded
    bus_slot_map[4] = 3'd3;
    bus_slot_map[5] = 3'd1;
    ft_run(30);
    checks += 2 * ft_groups + 2 * bus_groups;
    if (ft_mism != 0 || ft_groups != 30) begin
      failures++; $display("ft: %0d mismatches %0d groups", ft_mism, ft_groups);
    end else n_ft_reconf++;
    if (bus_mism != 0 || bus_groups != 30) begin
      failures++; $display("bus: %0d mismatches %0d groups", bus_mism, bus_groups);
    end else n_bus_reconf++;

    $display("mechanisms: stalls=%0d groups=%0d serial=%0d bit-serial tuples=%0d ft detect=%0d ft reconfig=%0d bus reconfig=%0d",
             n_stall, n_group, n_serial, n_bs_tuple, n_ft_detect, n_ft_reconf, n_bus_reconf);
    checks += 7;
    if (n_stall == 0)      begin failures++; $display("no stall"); end
    if (n_group == 0)      begin failures++; $display("no group"); end
    if (n_serial == 0)     begin failures++; $display("no serial output"); end
    if (n_bs_tuple == 0)   begin failures++; $display("no bit-serial tuple"); end
    if (n_ft_detect == 0)  begin failures++; $display("no fault seen"); end
    if (n_ft_reconf == 0)  begin failures++; $display("no spare substitution"); end
    if (n_bus_reconf == 0) begin failures++; $display("no bus reconfiguration"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
