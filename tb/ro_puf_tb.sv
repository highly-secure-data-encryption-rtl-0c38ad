// ro_puf_tb: runs the RO-PUF (32 rings) with a 1 us counting window
// (GATE_CYCLES = 100 at 100 MHz), M = 2 and a large window-to-window drift
// in the ring model (50 ps on a ~4.9 ns half period) so that single
// measurements are noisy. Checks: 2^M samples and one result per run; every
// raw difference within 3 counts of the value predicted from the model's
// ring periods; every average equal to the floor of the mean of the raw
// samples recorded by the testbench; two runs on the same die agreeing
// within 2 counts; and a second die (other DIE_SEED) giving a clearly
// different vector.
module ro_puf_tb;

  localparam int N = 32, W = 24, GATE = 100, M = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic start = 1'b0;
  logic busy, sv, dv, busy2, sv2, dv2;
  logic signed [W-1:0] dfs [N-1];
  logic signed [W-1:0] dfa [N-1];
  logic signed [W-1:0] dfs2 [N-1];
  logic signed [W-1:0] dfa2 [N-1];
  int checks = 0, failures = 0;

  ro_puf #(.N_RO(N), .CNT_W(W), .GATE_CYCLES(GATE), .M(M), .DIE_SEED(1), .RO_OP_VAR_PS(50)) dut (
    .clk, .rst_n, .start, .busy, .sample_valid(sv), .df_sample(dfs), .df_valid(dv), .df_avg(dfa));
  ro_puf #(.N_RO(N), .CNT_W(W), .GATE_CYCLES(GATE), .M(M), .DIE_SEED(2), .RO_OP_VAR_PS(50)) dut2 (
    .clk, .rst_n, .start, .busy(busy2), .sample_valid(sv2), .df_sample(dfs2), .df_valid(dv2), .df_avg(dfa2));

  always #5ns clk = ~clk;

  // ring periods of the model, for the expected counts
  int half_ps [N];
  for (genvar g = 0; g < N; g++) begin : g_half
    assign half_ps[g] = dut.g_ro[g].u_ro.HALF_PS;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  longint sum [N-1];
  int     n_samples = 0, n_results = 0, n_noisy = 0;
  int     prev_dfs [N-1];
  always @(posedge clk) begin
    if (sv) begin
      for (int i = 0; i < N - 1; i++) begin
        int e;
        e = GATE * 10_000 / (2 * half_ps[i]) - GATE * 10_000 / (2 * half_ps[i + 1]);
        sum[i] += longint'(dfs[i]);
        checks++;
        if (int'(dfs[i]) < e - 3 || int'(dfs[i]) > e + 3) begin
          failures++;
          $display("FAIL: df[%0d] = %0d, model predicts %0d", i, dfs[i], e);
        end
        if (n_samples > 0 && int'(dfs[i]) != prev_dfs[i]) n_noisy++;
        prev_dfs[i] = int'(dfs[i]);
      end
      n_samples++;
    end
    if (dv) n_results++;
  end

  int first_avg [N-1];

  task automatic run(input int r);
    foreach (sum[i]) sum[i] = 0;
    n_samples = 0;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!dv) @(negedge clk);
    check(n_samples == (1 << M), $sformatf("run %0d: %0d samples", r, n_samples));
    for (int i = 0; i < N - 1; i++) begin
      longint q;
      q = (sum[i] >= 0) ? sum[i] / (1 << M) : -((-sum[i] + (1 << M) - 1) / (1 << M));
      check(longint'(dfa[i]) == q, $sformatf("run %0d: avg[%0d] %0d, mean of samples %0d", r, i, dfa[i], q));
      if (r == 0) first_avg[i] = int'(dfa[i]);
      else check(int'(dfa[i]) >= first_avg[i] - 2 && int'(dfa[i]) <= first_avg[i] + 2,
                 $sformatf("avg[%0d] moved from %0d to %0d", i, first_avg[i], dfa[i]));
    end
  endtask

  initial begin
    int n_diff;
    #1ps rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(0);
    run(1);
    repeat (3) @(negedge clk);
    check(n_results == 2, $sformatf("%0d results for 2 runs", n_results));
    check(!busy, "idle after the runs");
    n_diff = 0;
    for (int i = 0; i < N - 1; i++)
      if (int'(dfa[i]) > int'(dfa2[i]) + 2 || int'(dfa[i]) < int'(dfa2[i]) - 2) n_diff++;
    check(n_diff >= 15, $sformatf("only %0d of 31 averages differ between two dies", n_diff));
    check(n_noisy > 0, "the model's drift produced no sample-to-sample noise");
    $display("noisy differences: %0d, lanes differing between dies: %0d", n_noisy, n_diff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
