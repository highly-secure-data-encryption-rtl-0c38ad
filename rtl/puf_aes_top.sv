// puf_aes_top: AES encryption device whose key comes from its own
// ring-oscillator PUF.
//
// After reset the key generator measures the PUF (2^M counting windows of
// the 32 rings), stabilises the averaged differences into a bit-string,
// hashes it into a 128-bit key and hands that key to the AES key schedule.
// The key never leaves the chip: a host on the UART link can only choose a
// mode, ask for the key to be re-derived, and send 128-bit blocks to be
// encrypted, decrypted, or encrypted and then decrypted again by the two AES
// engines, which share the PUF-derived round keys. The same device (and ring
// placement) always derives the same key, so data it encrypted can later be
// decrypted by it and by no other device.
// Ports: clk (100 MHz assumed), active-low asynchronous rst_n, the UART pins
// uart_rxd/uart_txd (8N1, 115200 baud by default), and two status outputs:
// key_ready (a key is in use) and keygen_busy (the PUF is being measured).
// DIE_SEED, PLACE_SEED and RO_OP_VAR_PS drive only the behavioural
// ring-oscillator model (which chip, which placement, how much the ring
// frequency drifts between measurements) and stand for physical variation.
// The block structure (PUF key generation feeding AES encryption and
// decryption, UART link to a PC) follows the source; the protocol, SHA-256
// as the hash, AES-128 and the clock and baud rates are this design's
// choices.
// Lint reports rst_n as used both synchronously and asynchronously: the
// synchronous use is only the assertions' disable condition.
module puf_aes_top
  import aes_pkg::*;
  import host_cmd_pkg::*;
#(
  parameter int          N_RO          = 32,
  parameter int          N_INV         = 16,
  parameter int          CNT_W         = 24,
  parameter int          GATE_CYCLES   = 2_000_000,
  parameter int          SETTLE_CYCLES = 4,
  parameter int          M             = 10,
  parameter int          N_EX          = 15,
  parameter int          CLKS_PER_BIT  = 868,
  parameter int unsigned DIE_SEED      = 1,
  parameter int unsigned PLACE_SEED    = 1,
  parameter int          RO_OP_VAR_PS  = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic uart_rxd,
  output logic uart_txd,
  output logic key_ready,
  output logic keygen_busy
);

  localparam int BITS_W = (N_RO - 1) * (CNT_W - N_EX);

  // key generation -----------------------------------------------------------
  logic              boot_done, key_regen, keygen_start;
  logic              key_valid, key_done, rk_ready;
  block_t            key;
  logic [BITS_W-1:0] bitstring;
  block_t            rk [0:NR];

  // one extraction right after reset, then whenever the host asks
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) boot_done <= 1'b0;
    else        boot_done <= 1'b1;
  end
  assign keygen_start = !boot_done || key_regen;

  puf_key_gen #(
    .N_RO         (N_RO),
    .N_INV        (N_INV),
    .CNT_W        (CNT_W),
    .GATE_CYCLES  (GATE_CYCLES),
    .SETTLE_CYCLES(SETTLE_CYCLES),
    .M            (M),
    .N_EX         (N_EX),
    .KEY_W        (128),
    .DIE_SEED     (DIE_SEED),
    .PLACE_SEED   (PLACE_SEED),
    .RO_OP_VAR_PS (RO_OP_VAR_PS)
  ) u_keygen (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (keygen_start),
    .busy     (keygen_busy),
    .key_valid(key_valid),
    .key_done (key_done),
    .key      (key),
    .bitstring(bitstring)
  );

  aes_key_expand u_kexp (
    .clk  (clk),
    .rst_n(rst_n),
    .start(key_done),
    .key  (key),
    .ready(rk_ready),
    .rk   (rk)
  );

  assign key_ready = key_valid && rk_ready;

  // AES engines --------------------------------------------------------------
  logic   enc_start, enc_busy, enc_done, dec_start, dec_busy, dec_done;
  block_t enc_din, enc_dout, dec_din, dec_dout;

  aes_encrypt u_enc (
    .clk  (clk),
    .rst_n(rst_n),
    .start(enc_start),
    .din  (enc_din),
    .rk   (rk),
    .busy (enc_busy),
    .done (enc_done),
    .dout (enc_dout)
  );

  aes_decrypt u_dec (
    .clk  (clk),
    .rst_n(rst_n),
    .start(dec_start),
    .din  (dec_din),
    .rk   (rk),
    .busy (dec_busy),
    .done (dec_done),
    .dout (dec_dout)
  );

  // host link ----------------------------------------------------------------
  logic       rx_valid, rx_err, tx_valid, tx_ready;
  logic [7:0] rx_data, tx_data;
  mode_t      mode;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk      (clk),
    .rst_n    (rst_n),
    .rxd      (uart_rxd),
    .valid    (rx_valid),
    .data     (rx_data),
    .frame_err(rx_err)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk  (clk),
    .rst_n(rst_n),
    .valid(tx_valid),
    .data (tx_data),
    .ready(tx_ready),
    .txd  (uart_txd)
  );

  host_ctrl u_host (
    .clk      (clk),
    .rst_n    (rst_n),
    .rx_valid (rx_valid),
    .rx_data  (rx_data),
    .tx_valid (tx_valid),
    .tx_data  (tx_data),
    .tx_ready (tx_ready),
    .key_ready(key_ready),
    .key_regen(key_regen),
    .enc_start(enc_start),
    .enc_din  (enc_din),
    .enc_done (enc_done),
    .enc_dout (enc_dout),
    .dec_start(dec_start),
    .dec_din  (dec_din),
    .dec_done (dec_done),
    .dec_dout (dec_dout),
    .mode     (mode)
  );

  // The bit-string, the framing-error flag, the engines' busy flags and the
  // mode are internal status with no pin of their own: the bit-string must
  // stay inside the chip.
  logic unused_ok;
  assign unused_ok = ^bitstring ^ rx_err ^ enc_busy ^ dec_busy ^ (^mode);

  a_key_stable_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                            (enc_busy || dec_busy) |-> rk_ready)
    else $error("puf_aes_top: round keys changed during an AES operation");

endmodule
