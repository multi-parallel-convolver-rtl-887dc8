// mpc_harness: drives one mp_convolver with random tuples, random weights
// and random gaps between time steps, and checks every output group
// against a direct evaluation of Y(i) = sum_j W(j) X(i-j) (samples before
// X(0) are zero).  It also checks the two-cycle latency from ce to
// y_valid.  'done' rises after TUPLES tuples have been checked.
module mpc_harness #(
  parameter int P         = 3,
  parameter int N         = 9,
  parameter bit OUT_ALIGN = 1'b1,
  parameter int TUPLES    = 60,
  parameter int SEED      = 1
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   stalls,
  output logic done
);
  localparam int SW = 8, WW = 8;
  localparam int YW = SW + WW + $clog2(N);

  logic                 rst = 1'b1;
  logic                 ce  = 1'b0;
  logic signed [SW-1:0] x [P];
  logic signed [WW-1:0] w [N];
  logic                 y_valid;
  logic signed [YW-1:0] y [P];

  mp_convolver #(.P(P), .N(N), .SW(SW), .WW(WW), .OUT_ALIGN(OUT_ALIGN)) dut (.*);

  int     xs[$];          // every sample fed so far
  int     wv[N];
  int     pend_t[$];      // tuple index of each ce, in order
  longint pend_c[$];      // cycle before that ce was high
  longint cyc = 0;

  function automatic longint yref(int i);
    longint s = 0;
    for (int j = 0; j < N; j++)
      if (i - j >= 0 && i - j < xs.size()) s += longint'(wv[j]) * longint'(xs[i-j]);
    return s;
  endfunction

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

  initial begin
    void'($urandom(SEED));
    checks = 0; failures = 0; stalls = 0; done = 1'b0;
    for (int i = 0; i < P; i++) x[i] = '0;
    for (int j = 0; j < N; j++) begin
      // extreme weights in the first run of each harness, random otherwise
      wv[j] = (SEED % 2 == 0) ? -128 : rnd(-128, 127);
      w[j]  = WW'(wv[j]);
    end
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < TUPLES; t++) begin
      // random stall of 0..3 cycles before a tuple
      automatic int gap = ($urandom % 3 == 0) ? rnd(1, 3) : 0;
      if (gap > 0) begin
        stalls++;
        ce <= 1'b0;
        repeat (gap) @(posedge clk);
      end
      for (int q = 0; q < P; q++) begin
        automatic int v = (SEED % 2 == 0) ? -128 : rnd(-128, 127);
        xs.push_back(v);
        x[q] <= SW'(v);
      end
      ce <= 1'b1;
      pend_t.push_back(t);
      pend_c.push_back(cyc);
      @(posedge clk);
    end
    ce <= 1'b0;
    repeat (6) @(posedge clk);
    if (pend_t.size() != 0) begin
      failures++;
      $display("harness P=%0d N=%0d: %0d groups never came out", P, N, pend_t.size());
    end
    done = 1'b1;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && y_valid) begin
      if (pend_t.size() == 0) begin
        failures++;
        $display("harness P=%0d N=%0d: y_valid with no tuple pending", P, N);
      end else begin
        automatic int     t = pend_t.pop_front();
        automatic longint c = pend_c.pop_front();
        checks++;
        if (cyc != c + 3) begin
          failures++;
          $display("harness P=%0d N=%0d: latency %0d cycles after ce, expected 2", P, N, cyc - c - 1);
        end
        for (int q = 0; q < P; q++) begin
          automatic int     idx = (OUT_ALIGN && q == P-1) ? P*t - 1 : P*t + q;
          automatic longint e   = yref(idx);
          checks++;
          if (longint'(y[q]) != e) begin
            failures++;
            if (failures < 10)
              $display("harness P=%0d N=%0d: t=%0d y[%0d]=%0d expected Y(%0d)=%0d",
                       P, N, t, q, longint'(y[q]), idx, e);
          end
        end
      end
    end
  end
endmodule
