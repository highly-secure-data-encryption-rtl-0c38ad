// df_averager_tb: feeds 2^M random signed vectors (N_DF = 5, DF_W = 24,
// M = 3, with gaps between samples) and checks that the result is the
// floor of the mean of each lane, that out_valid pulses exactly once per
// 2^M samples, one cycle after the last one, and that clear restarts the
// sample count. Then repeats with the defaults' lane count (31) and M = 10.
module df_averager_tb;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic clear = 1'b0;
  logic in_valid = 1'b0;
  int   checks = 0, failures = 0;

  localparam int W = 24;

  logic signed [W-1:0] df_a [5];
  logic signed [W-1:0] avg_a [5];
  logic                ov_a;
  logic signed [W-1:0] df_b [31];
  logic signed [W-1:0] avg_b [31];
  logic                ov_b;
  logic                v_a = 1'b0, v_b = 1'b0;

  df_averager #(.N_DF(5),  .DF_W(W), .M(3))  dut_a (.clk, .rst_n, .clear, .in_valid(v_a), .df_in(df_a), .out_valid(ov_a), .df_avg(avg_a));
  df_averager #(.N_DF(31), .DF_W(W), .M(10)) dut_b (.clk, .rst_n, .clear, .in_valid(v_b), .df_in(df_b), .out_valid(ov_b), .df_avg(avg_b));

  always #5ns clk = ~clk;

  int n_ov_a = 0, n_ov_b = 0;
  always @(posedge clk) begin
    if (ov_a) n_ov_a++;
    if (ov_b) n_ov_b++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic longint floor_div(input longint s, input int m);
    longint d;
    d = longint'(1) << m;
    return (s >= 0) ? s / d : -((-s + d - 1) / d);
  endfunction

  task automatic run_a(input int spread);
    longint sum [5];
    foreach (sum[i]) sum[i] = 0;
    for (int t = 0; t < 8; t++) begin
      @(negedge clk);
      for (int i = 0; i < 5; i++) begin
        df_a[i] = W'(int'($urandom_range(2 * spread)) - spread);
        sum[i] += longint'(df_a[i]);
      end
      v_a = 1'b1;
      @(negedge clk);
      v_a = 1'b0;
      check(ov_a == (t == 7), $sformatf("out_valid after sample %0d", t));
      repeat (t % 3) @(negedge clk);
    end
    for (int i = 0; i < 5; i++)
      check(longint'(avg_a[i]) == floor_div(sum[i], 3),
            $sformatf("lane %0d: avg %0d, expected %0d", i, avg_a[i], floor_div(sum[i], 3)));
  endtask

  initial begin
    longint sum [31];
    #1ps rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_a(1000);
    run_a(8_000_000);
    // clear in the middle of a run restarts the count
    for (int t = 0; t < 3; t++) begin
      @(negedge clk);
      v_a = 1'b1;
      @(negedge clk);
      v_a = 1'b0;
    end
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    run_a(50);
    check(n_ov_a == 3, $sformatf("%0d results for 3 runs", n_ov_a));
    // 31 lanes, 1024 samples, values like 20 ms differential counts
    foreach (sum[i]) sum[i] = 0;
    for (int t = 0; t < 1024; t++) begin
      @(negedge clk);
      for (int i = 0; i < 31; i++) begin
        df_b[i] = W'(int'($urandom_range(400_000)) - 200_000 + (i - 15) * 20_000);
        sum[i] += longint'(df_b[i]);
      end
      v_b = 1'b1;
    end
    @(negedge clk);
    v_b = 1'b0;
    check(ov_b, "31-lane result valid");
    for (int i = 0; i < 31; i++)
      check(longint'(avg_b[i]) == floor_div(sum[i], 10),
            $sformatf("31-lane %0d: avg %0d expected %0d", i, avg_b[i], floor_div(sum[i], 10)));
    @(negedge clk);
    check(n_ov_b == 1, "one 31-lane result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
