// puf_key_gen_tb: key generation end to end at reduced size: 2 us counting
// windows (GATE_CYCLES = 200), M = 2, 12-bit counters and N_EX = 2, giving a
// 310-bit bit-string. Three generators stand for die 1 / placement 1,
// die 2 / placement 1 and die 1 / placement 2. The model's window-to-window
// drift is switched off here, so repeated runs must agree exactly (the
// handling of noisy low bits is checked in stabilizer_tb and ro_puf_tb).
// Checks: the bit-string is the upper bits of the averaged differences, and
// for die 1 equals a reference computed from the ring model, with the key
// equal to the first 128 bits of its SHA-256 (computed independently); the
// key appears exactly 2^M x (GATE+SETTLE+2) + 67 cycles after start, with
// key_valid low meanwhile and one key_done pulse; a second run on the same
// generator gives the same key; the other die and the other placement give
// keys that differ from it in 30 to 98 of 128 bits.
module puf_key_gen_tb;

  localparam int N = 32, W = 12, GATE = 200, SETTLE = 4, M = 2, NEX = 2;
  localparam int BW = (N - 1) * (W - NEX);

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic start = 1'b0;
  logic [2:0] busy, kv, kd;
  logic [127:0] key [3];
  logic [BW-1:0] bits [3];
  int checks = 0, failures = 0;

  localparam logic [BW-1:0] BITS_REF =
    310'h003fec08ff7f801802ff7f9027f600bfd02000ffbfb01bfcff80400400fec03007f701404fdc05;
  localparam logic [127:0]  KEY_REF  = 128'h31a14157014079c62507b63a1e7a901b;

  puf_key_gen #(.N_RO(N), .CNT_W(W), .GATE_CYCLES(GATE), .SETTLE_CYCLES(SETTLE), .M(M), .N_EX(NEX),
                .DIE_SEED(1), .PLACE_SEED(1), .RO_OP_VAR_PS(0)) dut0 (
    .clk, .rst_n, .start, .busy(busy[0]), .key_valid(kv[0]), .key_done(kd[0]), .key(key[0]), .bitstring(bits[0]));
  puf_key_gen #(.N_RO(N), .CNT_W(W), .GATE_CYCLES(GATE), .SETTLE_CYCLES(SETTLE), .M(M), .N_EX(NEX),
                .DIE_SEED(2), .PLACE_SEED(1), .RO_OP_VAR_PS(0)) dut1 (
    .clk, .rst_n, .start, .busy(busy[1]), .key_valid(kv[1]), .key_done(kd[1]), .key(key[1]), .bitstring(bits[1]));
  puf_key_gen #(.N_RO(N), .CNT_W(W), .GATE_CYCLES(GATE), .SETTLE_CYCLES(SETTLE), .M(M), .N_EX(NEX),
                .DIE_SEED(1), .PLACE_SEED(2), .RO_OP_VAR_PS(0)) dut2 (
    .clk, .rst_n, .start, .busy(busy[2]), .key_valid(kv[2]), .key_done(kd[2]), .key(key[2]), .bitstring(bits[2]));

  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int n_done = 0;
  always @(posedge clk) if (kd[0]) n_done++;

  function automatic logic [BW-1:0] cut_dut0();
    logic [BW-1:0] e;
    int pos;
    pos = BW - 1;
    for (int i = 0; i < N - 1; i++)
      for (int b = W - 1; b >= NEX; b--) begin
        e[pos] = dut0.u_puf.df_avg[i][b];
        pos--;
      end
    return e;
  endfunction

  function automatic int hamming(input logic [127:0] a, input logic [127:0] b);
    return $countones(a ^ b);
  endfunction

  initial begin
    int cyc;
    logic [127:0] k_first;
    #1ps rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 2; r++) begin
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 0;
      check(!kv[0] && busy[0], "key_valid low and busy while generating");
      while (!kd[0]) begin
        @(negedge clk);
        cyc++;
        if (!kd[0] && kv[0]) begin
          failures++;
          $display("FAIL: key_valid before key_done");
        end
      end
      check(cyc == (1 << M) * (GATE + SETTLE + 2) + 67,
            $sformatf("run %0d: key after %0d cycles, expected %0d", r, cyc, (1 << M) * (GATE + SETTLE + 2) + 67));
      check(kv == 3'b111, "all keys valid");
      check(bits[0] == cut_dut0(), "bit-string = upper bits of the averages");
      if (r == 0) k_first = key[0];
      else check(key[0] == k_first, "same die and placement: same key");
      // reference: this die's bit-string and the first 128 bits of its
      // SHA-256, both computed outside the design from the ring model
      check(bits[0] == BITS_REF, $sformatf("bit-string %h", bits[0]));
      check(key[0] == KEY_REF, $sformatf("key %h is not SHA-256 of the bit-string", key[0]));
    end
    repeat (3) @(negedge clk);
    check(n_done == 2, "one key_done per run");
    check(kv[0] && key[0] == k_first, "key held");
    check(hamming(key[0], key[1]) inside {[30:98]},
          $sformatf("other die: %0d key bits differ", hamming(key[0], key[1])));
    check(hamming(key[0], key[2]) inside {[30:98]},
          $sformatf("other placement: %0d key bits differ", hamming(key[0], key[2])));
    check(bits[0] != bits[1] && bits[0] != bits[2], "bit-strings differ between dies and placements");
    $display("bits die1/pos1 %h", bits[0]);
    $display("key die1/pos1 %h", key[0]);
    $display("key die2/pos1 %h", key[1]);
    $display("key die1/pos2 %h", key[2]);
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
