// ro_counter_tb: clocks the edge counter with bursts of a known number of
// pulses and checks the count, the asynchronous clear (without any clock
// edge) and wrap-around at 2^CNT_W with a narrow 4-bit instance.
module ro_counter_tb;

  logic        ro_clk = 1'b0;
  logic        clr = 1'b0;
  logic [23:0] count;
  logic [3:0]  count4;
  int          checks = 0, failures = 0;

  ro_counter #(.CNT_W(24)) dut (.ro_clk, .clr, .count);
  ro_counter #(.CNT_W(4))  dut4 (.ro_clk, .clr, .count(count4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic pulses(input int n);
    for (int i = 0; i < n; i++) begin
      #3ns ro_clk = 1'b1;
      #2ns ro_clk = 1'b0;
    end
    #5ns;
  endtask

  initial begin
    int n;
    #1ns clr = 1'b1;
    #10ns;
    check(count == 0 && count4 == 0, "cleared");
    clr = 1'b0;
    #5ns;
    for (int r = 0; r < 6; r++) begin
      n = 1 + int'($urandom_range(300));
      pulses(n);
      check(count == 24'(n), $sformatf("burst %0d: count %0d, expected %0d", r, count, n));
      check(count4 == 4'(n), $sformatf("burst %0d: 4-bit count %0d, expected %0d", r, count4, n % 16));
      clr = 1'b1;
      #2ns;
      check(count == 0, "asynchronous clear");
      clr = 1'b0;
      #2ns;
    end
    pulses(1000);
    check(count == 1000, "long burst");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
