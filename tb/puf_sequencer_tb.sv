// puf_sequencer_tb: runs the measurement controller with a 40-cycle window,
// 3 settle cycles and M = 2, and checks per run: exactly 2^M windows, each
// with ro_en high for exactly GATE_CYCLES cycles, the counters cleared
// before every window and never while the rings run, one sample per window
// exactly SETTLE_CYCLES + 1 cycles after the window closes, last only on the
// final sample, and busy through the run.
module puf_sequencer_tb;

  localparam int GATE = 40, SETTLE = 3, M = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic start = 1'b0;
  logic busy, ro_en, cnt_clr, sample, last;
  int   checks = 0, failures = 0;

  puf_sequencer #(.GATE_CYCLES(GATE), .SETTLE_CYCLES(SETTLE), .M(M)) dut (.*);

  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // monitor
  int   en_len = 0, windows = 0, samples = 0, lasts = 0, since_en = 0, clr_seen = 0;
  logic en_d = 1'b0;
  always @(posedge clk) begin
    en_d <= ro_en;
    if (ro_en) en_len++;
    if (ro_en && cnt_clr) begin
      failures++;
      $display("FAIL: clear while rings run");
    end
    if (cnt_clr) clr_seen = 1;
    if (ro_en && !en_d) begin
      checks++;
      if (!clr_seen) begin
        failures++;
        $display("FAIL: window without a clear before it");
      end
      clr_seen = 0;
    end
    if (!ro_en && en_d) begin
      windows++;
      checks++;
      if (en_len != GATE) begin
        failures++;
        $display("FAIL: window of %0d cycles, expected %0d", en_len, GATE);
      end
      en_len   = 0;
      since_en = 0;
    end else if (!ro_en) since_en++;
    if (sample) begin
      samples++;
      checks++;
      if (since_en != SETTLE) begin
        failures++;
        $display("FAIL: sample %0d cycles after the window, expected %0d", since_en + 1, SETTLE + 1);
      end
    end
    if (last) begin
      lasts++;
      checks++;
      if (!sample || samples != (1 << M) * lasts) begin
        failures++;
        $display("FAIL: last on sample %0d", samples);
      end
    end
  end

  initial begin
    #1ps rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 1; run <= 2; run++) begin
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      check(busy, "busy after start");
      while (busy) @(negedge clk);
      check(windows == run * (1 << M), $sformatf("%0d windows after run %0d", windows, run));
      check(samples == run * (1 << M), $sformatf("%0d samples after run %0d", samples, run));
      check(lasts == run, "one last per run");
      repeat (10) @(negedge clk);
      check(!ro_en && windows == run * (1 << M), "idle after the run");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
