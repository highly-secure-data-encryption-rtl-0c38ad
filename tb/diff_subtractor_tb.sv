// diff_subtractor_tb: applies random and corner-case counter values to the
// 32-input subtractor array and checks all 31 differences
// df[i] = count[i] - count[i+1] as signed 24-bit numbers.
module diff_subtractor_tb;

  localparam int N = 32, W = 24;

  logic        [W-1:0] count [N];
  logic signed [W-1:0] df    [N-1];
  int checks = 0, failures = 0;

  diff_subtractor #(.N_RO(N), .CNT_W(W)) dut (.count, .df);

  initial begin
    int exp_i;
    for (int t = 0; t < 50; t++) begin
      for (int i = 0; i < N; i++) begin
        if (t == 0)      count[i] = W'(i * 1000);              // all differences -1000
        else if (t == 1) count[i] = (i % 2) ? '1 : '0;         // extremes
        else             count[i] = W'(2_000_000 + $urandom_range(200_000));
      end
      #1ns;
      for (int i = 0; i < N - 1; i++) begin
        exp_i = int'(count[i]) - int'(count[i + 1]);
        checks++;
        if (int'(df[i]) != ((exp_i << 8) >>> 8)) begin
          failures++;
          $display("FAIL: t=%0d df[%0d]=%0d expected %0d", t, i, df[i], (exp_i << 8) >>> 8);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
