// ring_oscillator_tb: checks the behavioural ring model. With en low the
// output must rest at 1; with en high it must toggle with the period set by
// its parameters, about 9.76 ns (102 MHz) nominally, within the process
// spread; rings with another index or die must run at another frequency;
// the period must stay within the operating-condition drift over many
// enables; and the ring must stop again when en falls.
module ring_oscillator_tb;

  logic en = 1'b0;
  logic [2:0] ro;
  int   checks = 0, failures = 0;

  ring_oscillator #(.DIE_SEED(1), .PLACE_SEED(1), .RO_INDEX(0)) dut0 (.en, .ro_out(ro[0]));
  ring_oscillator #(.DIE_SEED(1), .PLACE_SEED(1), .RO_INDEX(1)) dut1 (.en, .ro_out(ro[1]));
  ring_oscillator #(.DIE_SEED(2), .PLACE_SEED(1), .RO_INDEX(0)) dut2 (.en, .ro_out(ro[2]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // rising edges of ring k within a window of w
  task automatic count_edges(input int k, input realtime w, output int n);
    realtime t_end;
    n = 0;
    t_end = $realtime + w;
    while ($realtime < t_end) begin
      #1ps;
      if (ro[k] && !prev[k]) n++;
      prev[k] = ro[k];
    end
  endtask
  logic [2:0] prev;

  initial begin
    int n0, n1, n2, first;
    #20ns;
    check(ro == 3'b111, "rings rest at 1 while disabled");
    en = 1'b1;
    prev = ro;
    fork
      count_edges(0, 1us, n0);
      count_edges(1, 1us, n1);
      count_edges(2, 1us, n2);
    join
    // nominal 287 ps x 17 stages x 2 = 9.758 ns; spread up to +/-39 ps per
    // stage gives 88.5 .. 119.5 MHz
    check(n0 >= 88 && n0 <= 120, $sformatf("ring 0: %0d edges in 1 us", n0));
    check(n1 >= 88 && n1 <= 120, $sformatf("ring 1: %0d edges in 1 us", n1));
    check(n2 >= 88 && n2 <= 120, $sformatf("ring 2: %0d edges in 1 us", n2));
    check(n0 != n1 || n0 != n2, "rings differ by index or die");
    $display("edges in 1 us: %0d %0d %0d", n0, n1, n2);
    first = n0;
    for (int r = 0; r < 5; r++) begin
      en = 1'b0;
      #30ns;
      check(ro[0] == 1'b1, "ring stops at 1");
      en = 1'b1;
      prev = ro;
      count_edges(0, 1us, n0);
      check(n0 >= first - 1 && n0 <= first + 1, $sformatf("repeat %0d: %0d edges, first run %0d", r, n0, first));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
