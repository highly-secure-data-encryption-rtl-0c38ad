// stabilizer_tb: checks the bit-string built by the stabilizer at the
// default size (31 values, 24 bits, N_EX = 15: 279 bits) and at N_EX = 11.
// The expected string is built bit by bit from the values' upper bits,
// first value in the most significant position; it must appear one cycle
// after in_valid, with a single out_valid pulse, and hold afterwards.
// Values that differ only in their N_EX low bits must give the same string.
module stabilizer_tb;

  localparam int N = 31, W = 24;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic in_valid = 1'b0;
  logic signed [W-1:0] df [N];
  logic        ov15, ov11;
  logic [N*9-1:0]  bs15;
  logic [N*13-1:0] bs11;
  int checks = 0, failures = 0;

  stabilizer #(.N_DF(N), .DF_W(W), .N_EX(15)) dut15 (.clk, .rst_n, .in_valid, .df_avg(df), .out_valid(ov15), .bitstring(bs15));
  stabilizer #(.N_DF(N), .DF_W(W), .N_EX(11)) dut11 (.clk, .rst_n, .in_valid, .df_avg(df), .out_valid(ov11), .bitstring(bs11));

  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [N*13-1:0] expect_bits(input int nex);
    logic [N*13-1:0] e;
    int pos;
    e   = '0;
    pos = N * (W - nex) - 1;
    for (int i = 0; i < N; i++)
      for (int b = W - 1; b >= nex; b--) begin
        e[pos] = df[i][b];
        pos--;
      end
    return e;
  endfunction

  initial begin
    logic [N*9-1:0] first;
    #1ps rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 6; t++) begin
      @(negedge clk);
      foreach (df[i]) df[i] = W'(int'($urandom_range(800_000)) - 400_000);
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      check(ov15 && ov11, "out_valid one cycle after in_valid");
      check(bs15 == expect_bits(15)[N*9-1:0], $sformatf("run %0d: N_EX=15 bit-string", t));
      check(bs11 == expect_bits(11), $sformatf("run %0d: N_EX=11 bit-string", t));
      first = bs15;
      // disturb only the low 15 bits: the N_EX=15 string must not change
      foreach (df[i]) df[i] = {df[i][W-1:15], 15'($urandom)};
      @(negedge clk);
      check(!ov15, "single out_valid pulse");
      check(bs15 == first, "bit-string held without in_valid");
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      check(bs15 == first, $sformatf("run %0d: low-bit noise changed the bit-string", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
