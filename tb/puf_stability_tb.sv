// puf_stability_tb: repeated key extraction on one device with the ring
// drift switched on, the way the device is meant to be used: the same chip
// must derive the same key every time, so data encrypted after one
// extraction decrypts after any other.
//
// One puf_aes_top is simulated at reduced size (20 us counting windows,
// 16-bit counters, M = 4, so 16 samples per average, N_EX = 8, 4 clocks per
// UART bit) with the default ring drift of +/-3 ps per half period, drawn
// anew at every enable. Relative to the cut of 2^N_EX counts, the averaged
// noise is about as small as at the full size (20 ms, M = 10, N_EX = 15).
// A host model on the UART pins runs 16 trials. Each trial asks for a new
// key with 'K', then encrypts the same two-block image and decrypts the
// first trial's ciphertext. Checks:
//   - every trial derives the same key and ciphertext as the first;
//   - the decryption returns the image in every trial;
//   - the raw difference vectors really vary from window to window, so the
//     stability comes from averaging and cutting, not from a noiseless model.
// The method has no error correction: a ring pair whose averaged difference
// lies within the noise of a multiple of 2^N_EX (zero included) flips
// between extractions, and the key with it. The die simulated here
// (DIE_SEED 4) has every expected difference at least 10 counts away from
// such a boundary, against about 1 count of averaged noise, as on the
// characterised silicon; a die without that margin gives an unstable key.
// Cycle count: each extraction takes 2^M windows of GATE+SETTLE+2 cycles
// plus the stabiliser, the hash and the key schedule; the time from 'K' to
// its ACK is checked against that bound.
module puf_stability_tb;
  import aes_pkg::block_t;
  import host_cmd_pkg::*;

  localparam int CPB    = 4;
  localparam int GATE   = 2000;
  localparam int SETTLE = 4;
  localparam int M      = 4;
  localparam int TRIALS = 16;
  // cycles from the key request to the new round keys: 2^M windows, the
  // averager and stabiliser (2), SHA-256 (64 + 2) and the key schedule (10)
  localparam int KEY_CYCLES = (1 << M) * (GATE + SETTLE + 2) + 78;
  localparam block_t IMG [2] = '{128'h00ff00ff00ff00ff00ff00ff00ff00ff,
                                 128'h0f0f0f0ff0f0f0f00f0f0f0ff0f0f0f0};

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic rxd = 1'b1;
  logic txd, key_ready, kg_busy;
  int   checks = 0, failures = 0;

  puf_aes_top #(.CNT_W(16), .GATE_CYCLES(GATE), .SETTLE_CYCLES(SETTLE), .M(M), .N_EX(8),
                .CLKS_PER_BIT(CPB), .DIE_SEED(4), .PLACE_SEED(1)) dut (
    .clk, .rst_n, .uart_rxd(rxd), .uart_txd(txd), .key_ready, .keygen_busy(kg_busy));

  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- raw sample variation: count windows whose differences changed ----
  logic signed [15:0] prev_df [31];
  int n_samples = 0, n_changed = 0;
  always @(posedge clk) begin
    if (dut.u_keygen.u_puf.sample_valid) begin
      if (n_samples > 0 && dut.u_keygen.u_puf.df_sample != prev_df) n_changed++;
      prev_df <= dut.u_keygen.u_puf.df_sample;
      n_samples++;
    end
  end


  // ---- host side of the UART ----
  logic [7:0] rq [$];
  initial forever begin
    logic [7:0] b;
    @(negedge txd);
    repeat (CPB / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      repeat (CPB) @(posedge clk);
      b[i] = txd;
    end
    repeat (CPB) @(posedge clk);
    if (!txd) begin
      failures++;
      $display("FAIL: bad stop bit");
    end
    rq.push_back(b);
  end

  task automatic send(input logic [7:0] b);
    @(posedge clk);
    rxd = 1'b0;
    repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      rxd = b[i];
      repeat (CPB) @(posedge clk);
    end
    rxd = 1'b1;
    repeat (CPB + 2) @(posedge clk);
  endtask

  task automatic recv(input int n, input int limit, output logic [7:0] got [16], output int waited);
    waited = 0;
    while (rq.size() < n && waited < limit) begin
      @(posedge clk);
      waited++;
    end
    check(rq.size() == n, $sformatf("%0d reply bytes, expected %0d", rq.size(), n));
    for (int i = 0; i < n && rq.size() > 0; i++) got[i] = rq.pop_front();
  endtask

  task automatic set_mode(input logic [7:0] m);
    logic [7:0] got [16];
    int w;
    send(CMD_MODE);
    send(m);
    recv(1, 2000, got, w);
    check(got[0] == ACK, $sformatf("mode %0d acknowledged", m));
  endtask

  task automatic xfer(input block_t blk, output block_t r);
    logic [7:0] got [16];
    int w;
    send(CMD_BLOCK);
    for (int i = 15; i >= 0; i--) send(blk[8*i +: 8]);
    recv(16, 2000, got, w);
    for (int i = 0; i < 16; i++) r[127 - 8*i -: 8] = got[i];
  endtask

  initial begin
    block_t key0, ct0 [2], ct, pt;
    logic [7:0] got [16];
    int waited;
    #1ps rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (key_ready);
    key0 = dut.u_keygen.key;
    for (int t = 0; t < TRIALS; t++) begin
      send(CMD_KEY);
      // the ACK comes once the new key is in use; allow the extraction time
      // plus the command and reply bytes
      recv(1, KEY_CYCLES + 40 * CPB + 50, got, waited);
      check(got[0] == ACK, $sformatf("trial %0d: key request acknowledged", t));
      check(waited >= KEY_CYCLES - 20 * CPB && waited <= KEY_CYCLES + 40 * CPB,
            $sformatf("trial %0d: key took %0d cycles to the ACK, extraction needs %0d",
                      t, waited, KEY_CYCLES));
      check(dut.u_keygen.key == key0, $sformatf("trial %0d: key %h, first %h", t, dut.u_keygen.key, key0));
      set_mode(MODE_ENC);
      for (int b = 0; b < 2; b++) begin
        xfer(IMG[b], ct);
        if (t == 0) ct0[b] = ct;
        else check(ct == ct0[b], $sformatf("trial %0d block %0d: ciphertext %h, first %h", t, b, ct, ct0[b]));
        check(ct != IMG[b], $sformatf("trial %0d block %0d: ciphertext differs from image", t, b));
      end
      set_mode(MODE_DEC);
      for (int b = 0; b < 2; b++) begin
        xfer(ct0[b], pt);
        check(pt == IMG[b], $sformatf("trial %0d block %0d: decrypted %h", t, b, pt));
      end
    end
    $display("samples=%0d windows_with_new_differences=%0d", n_samples, n_changed);
    check(n_samples == (TRIALS + 1) * (1 << M), $sformatf("%0d samples taken", n_samples));
    check(n_changed > n_samples / 4, "raw differences vary between windows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (700_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
