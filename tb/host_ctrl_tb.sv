// host_ctrl_tb: drives the command controller at byte level, with simple
// stand-ins for the AES engines (encryption returns din ^ PE after 10
// cycles, decryption din ^ PD after 10 cycles) and a transmitter whose
// ready line is randomly throttled. Checks the replies to every command:
// mode set (ACK) and bad mode (NAK); a block in each of the three modes,
// including that in loop mode the decryption engine receives the
// encryption result; that no block starts while no key is in use; that a
// key command pulses key_regen and answers only after key_ready has gone
// low and high again; and that unknown bytes are ignored.
module host_ctrl_tb;
  import aes_pkg::block_t;
  import host_cmd_pkg::*;

  localparam block_t PE = 128'h0f1e2d3c4b5a69788796a5b4c3d2e1f0;
  localparam block_t PD = 128'h1122334455667788990011223344aabb;

  logic       clk = 1'b0;
  logic       rst_n = 1'b1;
  logic       rx_valid = 1'b0;
  logic [7:0] rx_data = '0;
  logic       tx_valid, tx_ready = 1'b0;
  logic [7:0] tx_data;
  logic       key_ready = 1'b1, key_regen;
  logic       enc_start, enc_done = 1'b0, dec_start, dec_done = 1'b0;
  block_t     enc_din, enc_dout = '0, dec_din, dec_dout = '0;
  mode_t      mode;
  int         checks = 0, failures = 0;

  host_ctrl dut (.*);

  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // engine stand-ins
  int n_enc = 0, n_dec = 0, n_regen = 0, n_start_nokey = 0;
  block_t dec_seen;
  initial forever begin
    @(posedge clk);
    if (enc_start) begin
      block_t d;
      d = enc_din;
      n_enc++;
      if (!key_ready) n_start_nokey++;
      repeat (10) @(posedge clk);
      enc_dout <= d ^ PE;
      enc_done <= 1'b1;
      @(posedge clk);
      enc_done <= 1'b0;
    end
  end
  initial forever begin
    @(posedge clk);
    if (dec_start) begin
      block_t d;
      d = dec_din;
      dec_seen = d;
      n_dec++;
      if (!key_ready) n_start_nokey++;
      repeat (10) @(posedge clk);
      dec_dout <= d ^ PD;
      dec_done <= 1'b1;
      @(posedge clk);
      dec_done <= 1'b0;
    end
  end
  always @(posedge clk) if (key_regen) n_regen++;

  // throttled transmitter: collects the bytes taken
  logic [7:0] txq [$];
  always @(posedge clk) begin
    if (tx_valid && tx_ready) txq.push_back(tx_data);
    tx_ready <= ($urandom_range(3) == 0);
  end

  task automatic send(input logic [7:0] b);
    @(negedge clk);
    rx_valid = 1'b1;
    rx_data  = b;
    @(negedge clk);
    rx_valid = 1'b0;
    repeat (2) @(negedge clk);
  endtask

  task automatic get(input int n, output logic [7:0] got [16]);
    int guard = 0;
    while (txq.size() < n && guard < 2000) begin
      @(negedge clk);
      guard++;
    end
    check(txq.size() == n, $sformatf("%0d reply bytes, expected %0d", txq.size(), n));
    for (int i = 0; i < n && txq.size() > 0; i++) got[i] = txq.pop_front();
  endtask

  task automatic block(input block_t d, output block_t r);
    logic [7:0] got [16];
    send(CMD_BLOCK);
    for (int i = 15; i >= 0; i--) send(d[8*i +: 8]);
    get(16, got);
    for (int i = 0; i < 16; i++) r[127 - 8*i -: 8] = got[i];
  endtask

  initial begin
    logic [7:0] got [16];
    block_t d, r;
    #1ps rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(mode == MODE_ENC, "encrypt mode after reset");
    send(8'h00);                       // unknown byte
    send(8'h7f);
    repeat (20) @(negedge clk);
    check(txq.size() == 0 && n_enc == 0 && n_dec == 0 && n_regen == 0, "unknown bytes ignored");
    // bad mode
    send(CMD_MODE);
    send(8'h05);
    get(1, got);
    check(got[0] == NAK, "bad mode answered with NAK");
    check(mode == MODE_ENC, "bad mode leaves mode unchanged");
    // encrypt
    d = {4{$urandom}};
    block(d, r);
    check(r == (d ^ PE), $sformatf("encrypt: got %h", r));
    check(n_enc == 1 && n_dec == 0, "encrypt mode uses only the encryption engine");
    // decrypt
    send(CMD_MODE);
    send(8'(MODE_DEC));
    get(1, got);
    check(got[0] == ACK && mode == MODE_DEC, "decrypt mode set");
    d = {4{$urandom}};
    block(d, r);
    check(r == (d ^ PD), $sformatf("decrypt: got %h", r));
    check(n_enc == 1 && n_dec == 1, "decrypt mode uses only the decryption engine");
    // loop
    send(CMD_MODE);
    send(8'(MODE_LOOP));
    get(1, got);
    check(got[0] == ACK && mode == MODE_LOOP, "loop mode set");
    d = {4{$urandom}};
    block(d, r);
    check(dec_seen == (d ^ PE), "loop mode feeds the ciphertext to the decryption engine");
    check(r == (d ^ PE ^ PD), $sformatf("loop: got %h", r));
    check(n_enc == 2 && n_dec == 2, "loop mode uses both engines");
    // no key: the block waits
    key_ready = 1'b0;
    send(CMD_BLOCK);
    for (int i = 0; i < 16; i++) send(8'(i));
    repeat (50) @(negedge clk);
    check(n_enc == 2 && txq.size() == 0, "no block processed without a key");
    key_ready = 1'b1;
    get(16, got);
    check(n_start_nokey == 0, "engines never started without a key");
    // key regeneration
    send(CMD_KEY);
    check(n_regen == 1, "key command pulses key_regen once");
    repeat (5) @(negedge clk);
    check(txq.size() == 0, "no ACK while the key is still the old one");
    key_ready = 1'b0;
    repeat (30) @(negedge clk);
    check(txq.size() == 0, "no ACK while the key is being generated");
    key_ready = 1'b1;
    get(1, got);
    check(got[0] == ACK, "ACK once the new key is in use");
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
