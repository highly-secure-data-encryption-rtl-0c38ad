// puf_aes_top_tb: end-to-end test of the PUF-keyed AES device over its UART
// pins, at reduced size (2 us counting windows, M = 2, 12-bit counters,
// N_EX = 2, 4 clocks per UART bit). Three devices are simulated: A (die 1,
// placement 1), B (die 2, same placement) and C (die 1, placement 2); the
// ring model's drift is off so repeated extractions agree exactly.
// A host model sends commands bit by bit and decodes the replies.
//   - A block sent while A is still deriving its boot key must wait for it.
//   - Stability: A encrypts a 3-block "image"; after a key regeneration it
//     encrypts it again to the same ciphertext, which also matches AES-128
//     under A's expected key (computed outside the design from the ring
//     model, bit-string and SHA-256); A decrypts the ciphertext back, and
//     loop mode returns the plaintext.
//   - Inter-die: B decrypts A's ciphertext to something else, and its own
//     ciphertext differs from A's.
//   - Intra-die: C (same die as A, rings elsewhere) also fails to decrypt.
//   - A bad mode byte gets NAK.
// Each mechanism (key extraction, PUF sample, averaging, key wait, the
// three modes, NAK, key regeneration) is counted and must occur.
module puf_aes_top_tb;
  import aes_pkg::block_t;
  import host_cmd_pkg::*;

  localparam int CPB = 4;
  localparam block_t KEY_A_REF = 128'h31a14157014079c62507b63a1e7a901b;
  // AES-128 under KEY_A_REF of the three image blocks below
  localparam block_t IMG [3] = '{128'hffffffffffff00000000ffffffffffff,
                                 128'hfff81ff00ff00ff00ff00ff00ff81fff,
                                 128'h0123456789abcdeffedcba9876543210};
  localparam block_t CT_REF [3] = '{128'h3fbde4cf0e79c4d6aa66ed40c4a98a3c,
                                    128'h606c670142c8e781a5f5d7af8d21d822,
                                    128'h6533fe0f683d9737973c885c866e7b25};

  logic       clk = 1'b0;
  logic       rst_n = 1'b1;
  logic [2:0] rxd = 3'b111;
  logic [2:0] txd, key_ready, kg_busy;
  int         checks = 0, failures = 0;

  puf_aes_top #(.CNT_W(12), .GATE_CYCLES(200), .M(2), .N_EX(2), .CLKS_PER_BIT(CPB),
                .DIE_SEED(1), .PLACE_SEED(1), .RO_OP_VAR_PS(0)) dev_a (
    .clk, .rst_n, .uart_rxd(rxd[0]), .uart_txd(txd[0]), .key_ready(key_ready[0]), .keygen_busy(kg_busy[0]));
  puf_aes_top #(.CNT_W(12), .GATE_CYCLES(200), .M(2), .N_EX(2), .CLKS_PER_BIT(CPB),
                .DIE_SEED(2), .PLACE_SEED(1), .RO_OP_VAR_PS(0)) dev_b (
    .clk, .rst_n, .uart_rxd(rxd[1]), .uart_txd(txd[1]), .key_ready(key_ready[1]), .keygen_busy(kg_busy[1]));
  puf_aes_top #(.CNT_W(12), .GATE_CYCLES(200), .M(2), .N_EX(2), .CLKS_PER_BIT(CPB),
                .DIE_SEED(1), .PLACE_SEED(2), .RO_OP_VAR_PS(0)) dev_c (
    .clk, .rst_n, .uart_rxd(rxd[2]), .uart_txd(txd[2]), .key_ready(key_ready[2]), .keygen_busy(kg_busy[2]));

  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- mechanism counters (device A) ----
  int n_keys = 0, n_samples = 0, n_avgs = 0, n_key_wait = 0, n_nak = 0, n_regen = 0;
  int n_mode [3] = '{0, 0, 0};
  always @(posedge clk) begin
    if (dev_a.u_keygen.key_done) n_keys++;
    if (dev_a.u_keygen.u_puf.sample_valid) n_samples++;
    if (dev_a.u_keygen.u_puf.df_valid) n_avgs++;
    if (dev_a.u_host.state == dev_a.u_host.H_WAIT_KEY && !key_ready[0]) n_key_wait++;
    if (dev_a.u_host.key_regen) n_regen++;
    if (dev_a.enc_start || dev_a.dec_start) n_mode[dev_a.mode]++;
  end

  // ---- host side of the UART ----
  logic [7:0] rq [3][$];
  for (genvar d = 0; d < 3; d++) begin : g_rx
    initial forever begin
      logic [7:0] b;
      @(negedge txd[d]);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = txd[d];
      end
      repeat (CPB) @(posedge clk);
      if (!txd[d]) begin
        failures++;
        $display("FAIL: device %0d sent a bad stop bit", d);
      end
      rq[d].push_back(b);
    end
  end

  task automatic send(input int d, input logic [7:0] b);
    @(posedge clk);
    rxd[d] = 1'b0;
    repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      rxd[d] = b[i];
      repeat (CPB) @(posedge clk);
    end
    rxd[d] = 1'b1;
    repeat (CPB + 2) @(posedge clk);
  endtask

  task automatic recv(input int d, input int n, output logic [7:0] got [16]);
    int guard = 0;
    while (rq[d].size() < n && guard < 20000) begin
      @(posedge clk);
      guard++;
    end
    check(rq[d].size() == n, $sformatf("device %0d: %0d reply bytes, expected %0d", d, rq[d].size(), n));
    for (int i = 0; i < n && rq[d].size() > 0; i++) got[i] = rq[d].pop_front();
  endtask

  task automatic set_mode(input int d, input logic [7:0] m, input logic [7:0] expect_reply);
    logic [7:0] got [16];
    send(d, CMD_MODE);
    send(d, m);
    recv(d, 1, got);
    check(got[0] == expect_reply, $sformatf("device %0d: mode %0d reply %h", d, m, got[0]));
    if (got[0] == NAK) n_nak++;
  endtask

  task automatic xfer(input int d, input block_t blk, output block_t r);
    logic [7:0] got [16];
    send(d, CMD_BLOCK);
    for (int i = 15; i >= 0; i--) send(d, blk[8*i +: 8]);
    recv(d, 16, got);
    for (int i = 0; i < 16; i++) r[127 - 8*i -: 8] = got[i];
  endtask

  initial begin
    block_t ct [3], ct2 [3], r;
    logic [7:0] got [16];
    #1ps rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    // block sent during the boot-time key extraction: waits for the key
    check(kg_busy[0] && !key_ready[0], "device A derives its key after reset");
    for (int k = 0; k < 3; k++) begin
      xfer(0, IMG[k], ct[k]);
    end
    check(dev_a.u_keygen.key == KEY_A_REF, $sformatf("device A key %h", dev_a.u_keygen.key));
    for (int k = 0; k < 3; k++)
      check(ct[k] == CT_REF[k], $sformatf("block %0d ciphertext %h, AES reference %h", k, ct[k], CT_REF[k]));
    // regenerate the key and encrypt again: same ciphertext
    send(0, CMD_KEY);
    begin
      int w = 0;
      while (!kg_busy[0] && w < 50) begin
        @(negedge clk);
        w++;
      end
      check(kg_busy[0] && !key_ready[0], $sformatf("key regeneration started (%0d)", w));
    end
    recv(0, 1, got);
    check(got[0] == ACK, "ACK after key regeneration");
    for (int k = 0; k < 3; k++) begin
      xfer(0, IMG[k], ct2[k]);
      check(ct2[k] == ct[k], $sformatf("block %0d: ciphertext changed after key regeneration", k));
      check(ct[k] != IMG[k], "ciphertext differs from plaintext");
    end
    // decrypt on A
    set_mode(0, 8'(MODE_DEC), ACK);
    for (int k = 0; k < 3; k++) begin
      xfer(0, ct[k], r);
      check(r == IMG[k], $sformatf("device A decrypts block %0d", k));
    end
    // loop mode on A
    set_mode(0, 8'(MODE_LOOP), ACK);
    xfer(0, IMG[2], r);
    check(r == IMG[2], "loop mode returns the plaintext");
    set_mode(0, 8'h09, NAK);
    // inter-die: device B
    set_mode(1, 8'(MODE_DEC), ACK);
    for (int k = 0; k < 3; k++) begin
      xfer(1, ct[k], r);
      check(r != IMG[k], $sformatf("device B must not decrypt block %0d", k));
    end
    set_mode(1, 8'(MODE_ENC), ACK);
    xfer(1, IMG[0], r);
    check(r != ct[0], "device B's ciphertext differs from A's");
    // intra-die: device C
    set_mode(2, 8'(MODE_DEC), ACK);
    for (int k = 0; k < 3; k++) begin
      xfer(2, ct[k], r);
      check(r != IMG[k], $sformatf("device C must not decrypt block %0d", k));
    end
    check(dev_a.u_keygen.key != dev_b.u_keygen.key && dev_a.u_keygen.key != dev_c.u_keygen.key,
          "three devices, three keys");
    // mechanisms
    check(n_keys == 2, $sformatf("device A key extractions: %0d", n_keys));
    check(n_samples == 8, $sformatf("device A PUF samples: %0d", n_samples));
    check(n_avgs == 2, $sformatf("device A averaging results: %0d", n_avgs));
    check(n_key_wait > 0, "a block waited for the key");
    check(n_regen == 1, "key regeneration requested once");
    check(n_mode[MODE_ENC] > 0 && n_mode[MODE_DEC] > 0 && n_mode[MODE_LOOP] > 0, "all three modes used");
    check(n_nak == 1, "bad mode rejected");
    $display("mechanisms: keys=%0d samples=%0d averages=%0d key_wait_cycles=%0d regen=%0d enc=%0d dec=%0d loop=%0d nak=%0d",
             n_keys, n_samples, n_avgs, n_key_wait, n_regen, n_mode[0], n_mode[1], n_mode[2], n_nak);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
