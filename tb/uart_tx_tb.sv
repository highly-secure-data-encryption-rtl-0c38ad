// uart_tx_tb: sends bytes through uart_tx (CLKS_PER_BIT = 16) and decodes
// the txd line independently by sampling the middle of each bit. Checks the
// start bit, data bits LSB first, the stop bit, the 10-bit frame time
// (ready returns 160 cycles after the byte is taken) and that ready is low
// during the frame.
module uart_tx_tb;

  localparam int CPB = 16;

  logic       clk = 1'b0;
  logic       rst_n = 1'b1;
  logic       valid = 1'b0;
  logic [7:0] data = '0;
  logic       ready, txd;
  int         checks = 0, failures = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic send_and_decode(input logic [7:0] b);
    logic [7:0] got;
    int cyc;
    @(negedge clk);
    check(ready, "ready while idle");
    check(txd, "line idles high");
    valid = 1'b1;
    data  = b;
    @(negedge clk);                  // byte taken at this edge
    valid = 1'b0;
    data  = 8'hxx;
    // the start bit began at the taking edge; sample mid-bit
    repeat (CPB / 2 - 1) @(negedge clk);
    check(!txd, "start bit low");
    check(!ready, "ready low during frame");
    for (int i = 0; i < 8; i++) begin
      repeat (CPB) @(negedge clk);
      got[i] = txd;
    end
    repeat (CPB) @(negedge clk);
    check(txd, "stop bit high");
    check(got == b, $sformatf("sent %h, line carried %h", b, got));
    // edges seen since the taking edge: (CPB/2-1) + 8*CPB + CPB
    cyc = CPB / 2 - 1 + 9 * CPB;
    while (!ready) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == 10 * CPB, $sformatf("ready back %0d cycles after the byte was taken, expected %0d", cyc, 10 * CPB));
  endtask

  initial begin
    #1ps rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    send_and_decode(8'h55);
    send_and_decode(8'hA3);
    send_and_decode(8'h00);
    send_and_decode(8'hFF);
    for (int i = 0; i < 4; i++) send_and_decode(8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
