// sha256_hash: hashes the stable PUF bit-string into the secret key.
//
// The message has a fixed length of MSG_W bits (the stabilizer's output), so
// padding is wired: msg, a single 1 bit, zeros and the 64-bit length fill one
// 512-bit block, which limits MSG_W to 447. A pulse on start loads the block
// and the initial hash value; the 64 compression rounds run one per clock,
// the message schedule kept as a sliding window of 16 words. done pulses 64
// cycles after start, with the 256-bit digest on digest (held until the next
// start). The source names only "a Hash function" whose output is the AES
// key; SHA-256, and taking its first 128 bits as the key, are this design's
// choices.
// Lint reports rst_n as used both synchronously and asynchronously: the
// synchronous use is only the assertions' disable condition.
module sha256_hash
  import sha256_pkg::*;
#(
  parameter int MSG_W = 279   // 31 differential values x (24 - 15) stable bits
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [MSG_W-1:0] msg,
  output logic             busy,
  output logic             done,
  output logic [255:0]     digest
);

  if (MSG_W < 1 || MSG_W > 447) begin : g_bad_len
    $error("sha256_hash: MSG_W must be 1..447 for a single block");
  end

  // msg || 1 || 0...0, left-aligned in 448 bits, then the 64-bit length
  localparam logic [447:0] ONE_BIT = 448'(1) << (447 - MSG_W);
  logic [511:0] block;
  assign block = {(448'(msg) << (448 - MSG_W)) | ONE_BIT, 64'(MSG_W)};

  word_t      w [0:15];
  word_t      a, b, c, d, e, f, g, h;
  logic [5:0] t;
  word_t      t1, t2, w_next;

  always_comb begin
    t1     = h + big_sigma1(e) + ch(e, f, g) + K[t] + w[0];
    t2     = big_sigma0(a) + maj(a, b, c);
    w_next = small_sigma1(w[14]) + w[9] + small_sigma0(w[1]) + w[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      t      <= '0;
      digest <= '0;
      {a, b, c, d, e, f, g, h} <= '0;
      for (int i = 0; i < 16; i++) w[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        t    <= '0;
        {a, b, c, d, e, f, g, h} <= {H0[0], H0[1], H0[2], H0[3], H0[4], H0[5], H0[6], H0[7]};
        for (int i = 0; i < 16; i++) w[i] <= block[511 - 32*i -: 32];
      end else if (busy) begin
        for (int i = 0; i < 15; i++) w[i] <= w[i + 1];
        w[15] <= w_next;
        {a, b, c, d, e, f, g, h} <= {t1 + t2, a, b, c, d + t1, e, f, g};
        t <= t + 6'd1;
        if (t == 6'd63) begin
          busy   <= 1'b0;
          done   <= 1'b1;
          digest <= {H0[0] + t1 + t2, H0[1] + a, H0[2] + b, H0[3] + c,
                     H0[4] + d + t1, H0[5] + e, H0[6] + f, H0[7] + g};
        end
      end
    end
  end

  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("sha256_hash: start while busy");

endmodule
