// sha256_hash_tb: known-answer tests of the SHA-256 core at three message
// lengths: "abc" (24 bits, FIPS 180-4 example), the design's 279-bit
// bit-string length and the single-block limit of 447 bits. The long
// messages are the pattern bit[i] = ((7i+3) mod 5) < 2, counting i from the
// first (most significant) bit; their digests come from an independent
// software model. Also checks the 64-cycle latency and a back-to-back rerun.
module sha256_hash_tb;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic start = 1'b0;
  int   checks = 0, failures = 0;

  localparam logic [255:0] D24  = 256'hba7816bf8f01cfea414140de5dae2223b00361a396177a9cb410ff61f20015ad;
  localparam logic [255:0] D279 = 256'hc512e73ae50b0bbf6429069a99ca5dfb391ce35305cbfb0641442687a26d45a8;
  localparam logic [255:0] D447 = 256'h0ced296689e8924a879ecedd7660066663621cfd7aacbea073b3df83fe7f57e4;

  function automatic logic [446:0] pattern(input int n);
    logic [446:0] p;
    p = '0;
    for (int i = 0; i < n; i++) p[n - 1 - i] = (((7 * i + 3) % 5) < 2);
    return p;
  endfunction

  logic [23:0]  m24;
  logic [278:0] m279;
  logic [446:0] m447;
  logic [2:0]   busy, done;
  logic [255:0] d24, d279, d447;

  sha256_hash #(.MSG_W(24))  dut24  (.clk, .rst_n, .start, .msg(m24),  .busy(busy[0]), .done(done[0]), .digest(d24));
  sha256_hash #(.MSG_W(279)) dut279 (.clk, .rst_n, .start, .msg(m279), .busy(busy[1]), .done(done[1]), .digest(d279));
  sha256_hash #(.MSG_W(447)) dut447 (.clk, .rst_n, .start, .msg(m447), .busy(busy[2]), .done(done[2]), .digest(d447));

  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int cyc;
    m24  = 24'h616263;
    m279 = 279'(pattern(279));
    m447 = pattern(447);
    #1ps rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 0;
      while (done == 3'b000) begin
        @(negedge clk);
        cyc++;
      end
      check(done == 3'b111, "all three finish together");
      check(cyc == 64, $sformatf("done after %0d cycles, expected 64", cyc));
      check(d24 == D24, $sformatf("abc digest %h", d24));
      check(d279 == D279, $sformatf("279-bit digest %h", d279));
      check(d447 == D447, $sformatf("447-bit digest %h", d447));
      check(busy == 3'b000, "busy low after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
