// puf_key_gen: on-chip secret key generation from the RO-PUF.
//
// Chains the three stages of the key extraction: ro_puf measures and
// averages the differential ring frequencies, stabilizer cuts the N_EX
// unstable low bits off each average and concatenates the rest, and
// sha256_hash condenses the bit-string into a digest whose first KEY_W bits
// are the key. Because only stable bits enter the hash, the same chip with
// the same ring placement yields the same key every time, while another
// chip or placement yields an unrelated one.
// Interface: start (one cycle, ignored while busy) runs a full extraction;
// key_valid drops in the cycle after start and rises again, with key_done
// pulsing, when the new key is on key. bitstring is the stabilised PUF
// response, for test only: it must not leave the chip in a product.
// Timing: the PUF run (see ro_puf) plus 2 cycles in the stabilizer and 64
// in the hash, plus 2 cycles of hand-over. The chain PUF -> stabilizer ->
// hash -> AES key follows the source; SHA-256 and the 128-bit key are this
// design's choices.
module puf_key_gen #(
  parameter int          N_RO          = 32,
  parameter int          N_INV         = 16,
  parameter int          CNT_W         = 24,
  parameter int          GATE_CYCLES   = 2_000_000,
  parameter int          SETTLE_CYCLES = 4,
  parameter int          M             = 10,
  parameter int          N_EX          = 15,
  parameter int          KEY_W         = 128,
  parameter int unsigned DIE_SEED      = 1,
  parameter int unsigned PLACE_SEED    = 1,
  parameter int          RO_OP_VAR_PS  = 3,
  localparam int         BITS_W        = (N_RO - 1) * (CNT_W - N_EX)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              key_valid,
  output logic              key_done,
  output logic [KEY_W-1:0]  key,
  output logic [BITS_W-1:0] bitstring
);

  logic                    puf_busy, sample_valid, df_valid, bits_valid;
  logic                    hash_busy, hash_done;
  logic signed [CNT_W-1:0] df_sample [N_RO-1];
  logic signed [CNT_W-1:0] df_avg    [N_RO-1];
  logic [255:0]            digest;
  logic                    puf_start;

  assign puf_start = start && !busy;

  ro_puf #(
    .N_RO         (N_RO),
    .N_INV        (N_INV),
    .CNT_W        (CNT_W),
    .GATE_CYCLES  (GATE_CYCLES),
    .SETTLE_CYCLES(SETTLE_CYCLES),
    .M            (M),
    .DIE_SEED     (DIE_SEED),
    .PLACE_SEED   (PLACE_SEED),
    .RO_OP_VAR_PS (RO_OP_VAR_PS)
  ) u_puf (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (puf_start),
    .busy        (puf_busy),
    .sample_valid(sample_valid),
    .df_sample   (df_sample),
    .df_valid    (df_valid),
    .df_avg      (df_avg)
  );

  stabilizer #(.N_DF(N_RO - 1), .DF_W(CNT_W), .N_EX(N_EX)) u_stab (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (df_valid),
    .df_avg   (df_avg),
    .out_valid(bits_valid),
    .bitstring(bitstring)
  );

  sha256_hash #(.MSG_W(BITS_W)) u_hash (
    .clk   (clk),
    .rst_n (rst_n),
    .start (bits_valid),
    .msg   (bitstring),
    .busy  (hash_busy),
    .done  (hash_done),
    .digest(digest)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      key_valid <= 1'b0;
      key_done  <= 1'b0;
      key       <= '0;
    end else begin
      key_done <= 1'b0;
      if (puf_start) begin
        busy      <= 1'b1;
        key_valid <= 1'b0;
      end else if (hash_done) begin
        busy      <= 1'b0;
        key_valid <= 1'b1;
        key_done  <= 1'b1;
        key       <= digest[255 -: KEY_W];
      end
    end
  end

  // sample_valid and df_sample are per-measurement observation points of the
  // PUF; the key path uses only the averages, and the key only the first
  // KEY_W digest bits.
  logic unused_ok;
  assign unused_ok = sample_valid ^ puf_busy ^ hash_busy ^ df_sample[0][0] ^ (^digest[255-KEY_W:0]);

endmodule
