// uart_rx_tb: drives 8N1 frames onto rxd (CLKS_PER_BIT = 16) and checks the
// received bytes, back-to-back frames, a frame with a broken stop bit
// (frame_err, no valid) and a short glitch that must not start a frame.
module uart_rx_tb;

  localparam int CPB = 16;

  logic       clk = 1'b0;
  logic       rst_n = 1'b1;
  logic       rxd = 1'b1;
  logic       valid, frame_err;
  logic [7:0] data;
  int         checks = 0, failures = 0;
  int         n_valid = 0, n_err = 0;
  logic [7:0] last_byte;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5ns clk = ~clk;

  always @(posedge clk) begin
    if (valid) begin
      n_valid++;
      last_byte = data;
    end
    if (frame_err) n_err++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic drive(input logic [7:0] b, input logic stop);
    @(negedge clk);
    rxd = 1'b0;
    repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      rxd = b[i];
      repeat (CPB) @(negedge clk);
    end
    rxd = stop;
    repeat (CPB) @(negedge clk);
    rxd = 1'b1;
  endtask

  task automatic rx_byte(input logic [7:0] b);
    int nv;
    nv = n_valid;
    drive(b, 1'b1);
    repeat (4) @(negedge clk);
    check(n_valid == nv + 1, $sformatf("one byte received for %h", b));
    check(last_byte == b, $sformatf("received %h expected %h", last_byte, b));
  endtask

  initial begin
    int nv, ne;
    #1ps rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    rx_byte(8'h4D);
    rx_byte(8'h01);
    rx_byte(8'hFE);
    for (int i = 0; i < 5; i++) rx_byte(8'($urandom));
    // broken stop bit
    nv = n_valid;
    ne = n_err;
    drive(8'h3C, 1'b0);
    repeat (2 * CPB) @(negedge clk);
    check(n_valid == nv && n_err == ne + 1, "bad stop bit flagged, byte dropped");
    // glitch shorter than half a bit
    @(negedge clk);
    rxd = 1'b0;
    repeat (2) @(negedge clk);
    rxd = 1'b1;
    repeat (12 * CPB) @(negedge clk);
    check(n_valid == nv && n_err == ne + 1, "glitch ignored");
    rx_byte(8'hC3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
