// tb_fir_opt_top_alt: the end-to-end test of tb_fir_opt_top, run on the
// filter built for a different 18-tap coefficient set: an equiripple
// low-pass with passband edge 0.11 and stopband edge 0.27 of the sampling
// rate, x1000, rounded, absolute values. It has seven distinct values
// (3, 15, 9, 32, 59, 196, 358) whose octal digits need all of the shared
// fundamentals 3x, 5x and 7x, and no zero taps, so it checks that the
// distinct-value table, the multiplier structure and the register widths
// follow the coefficient parameter.
//
// A behavioural reference keeps the history of accepted samples and computes
// y[n] = sum h[i] x[n-i] with the coefficient list written out here, apart
// from the design's package. The stimulus runs, in order: an impulse (the
// output must reproduce the coefficients, so taps sharing a value give equal
// outputs), a full-scale negative step (the largest output magnitude, to
// check that the growing register widths never overflow), a full-scale
// positive step, and random samples with random idle cycles between them.
// Every output is compared with the reference, the latency from in_valid to
// out_valid is checked to be 2 cycles, and the test counts how often each
// mechanism happened: idle cycles (the filter holding its state), outputs of
// taps that reuse a shared product, and outputs at full-scale magnitude. A
// mechanism that never happened counts as a failure.
module tb_fir_opt_top_alt;
  import fir_pkg::*;

  localparam int DATA_W = 8;
  localparam int N      = 18;
  localparam int H [N]  = '{3, 3, 15, 9, 32, 59, 15, 196, 358,
                            358, 196, 15, 59, 32, 9, 15, 3, 3};
  localparam int Y_W    = 19;   // 8 + ceil(log2(sum of coefficients = 1380))

  logic                     clk = 1'b0;
  logic                     rst_n;
  logic                     in_valid;
  logic signed [DATA_W-1:0] x_in;
  logic                     out_valid;
  logic signed [Y_W-1:0]    y_out;

  function automatic cvec_t make_coef();
    cvec_t c;
    c = '0;
    for (int i = 0; i < N; i++) c[i] = coef_t'(H[i]);
    return c;
  endfunction

  fir_opt_top #(
    .DATA_W (DATA_W),
    .N_TAPS (N),
    .COEF   (make_coef())
  ) dut (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .x_in      (x_in),
    .out_valid (out_valid),
    .y_out     (y_out)
  );

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // Reference model state.
  int hist [N];
  int exp_q [$];
  int sent_cycle [$];
  int cycle = 0;
  int n_out = 0;

  // Mechanism counters.
  int idle_cycles = 0;
  int reuse_outputs = 0;
  int full_scale_outputs = 0;

  function automatic bit shares_value(int k);
    for (int j = 0; j < N; j++)
      if (j != k && H[j] == H[k]) return 1'b1;
    return 1'b0;
  endfunction

  always @(posedge clk) cycle <= cycle + 1;

  // Input monitor and output checker, both sampling at the clock edge.
  always @(posedge clk) begin
    if (rst_n && in_valid) sent_cycle.push_back(cycle);
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int exp;
      int lat;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL output with no sample pending");
      end else begin
        exp = exp_q.pop_front();
        lat = cycle - sent_cycle.pop_front();
        if (int'(y_out) != exp) begin
          failures++;
          if (failures < 10) $display("FAIL output %0d: got %0d expected %0d", n_out, y_out, exp);
        end
        checks++;
        if (lat != 2) begin
          failures++;
          if (failures < 10) $display("FAIL output %0d: latency %0d cycles, expected 2", n_out, lat);
        end
        if (exp == -128 * 1380 || exp == 127 * 1380) full_scale_outputs++;
      end
      n_out++;
    end
  end

  task automatic send(int v);
    int acc;
    for (int i = N - 1; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = v;
    acc = 0;
    for (int i = 0; i < N; i++) acc += H[i] * hist[i];
    exp_q.push_back(acc);
    in_valid <= 1'b1;
    x_in     <= DATA_W'(v);
    @(posedge clk);
  endtask

  task automatic idle(int n);
    in_valid <= 1'b0;
    repeat (n) begin
      @(posedge clk);
      idle_cycles++;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (hist[i]) hist[i] = 0;
    rst_n    = 1'b0;
    in_valid = 1'b0;
    x_in     = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // Impulse: the outputs are the coefficients themselves.
    send(1);
    for (int i = 1; i < N + 2; i++) begin
      if (i < N && H[i] != 0 && shares_value(i)) reuse_outputs++;
      send(0);
    end

    // Full-scale steps, long enough to fill the whole chain.
    for (int i = 0; i < N + 4; i++) send(-128);
    for (int i = 0; i < N + 4; i++) send(127);
    for (int i = 0; i < N + 4; i++) send(-128);

    // Random samples with random gaps.
    for (int i = 0; i < 3000; i++) begin
      if ($urandom_range(0, 3) == 0) idle($urandom_range(1, 3));
      send(int'($signed(DATA_W'($urandom))));
    end

    idle(4);
    in_valid <= 1'b0;

    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs missing", exp_q.size());
    end
    checks++;
    if (idle_cycles == 0) begin failures++; $display("FAIL no idle cycles"); end
    checks++;
    if (reuse_outputs == 0) begin failures++; $display("FAIL no reused-product taps"); end
    checks++;
    if (full_scale_outputs == 0) begin failures++; $display("FAIL never reached full scale"); end
    $display("outputs=%0d idle_cycles=%0d reuse_outputs=%0d full_scale_outputs=%0d",
             n_out, idle_cycles, reuse_outputs, full_scale_outputs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
