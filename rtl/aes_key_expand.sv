// aes_key_expand: AES-128 key schedule that turns the 128-bit PUF key into
// the eleven round keys used by both AES engines.
//
// A pulse on start loads key as round key 0 and then derives one further
// round key per clock (FIPS-197 key expansion, computed S-box from aes_pkg),
// so all eleven are in rk[0..10] and ready rises 10 cycles after start.
// The round keys are held in registers until the next start; ready is low
// while the schedule is being recomputed. Sharing one schedule between the
// encryption and the decryption engine, and computing it once per key rather
// than on the fly, is this design's choice; the source only shows the key
// going to both engines.
module aes_key_expand
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,       // load key and expand it
  input  block_t key,
  output logic   ready,       // rk[] valid
  output block_t rk [0:NR]
);

  logic [3:0] idx;    // round key being produced
  byte_t      rcon;
  logic       run;
  block_t     prev;
  logic [31:0] sub_w3;

  assign prev = rk[idx - 1];

  for (genvar j = 0; j < 4; j++) begin : g_sbox
    aes_sbox #(.INVERSE(1'b0)) u_sbox (.a(prev[8*j +: 8]), .s(sub_w3[8*j +: 8]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx   <= '0;
      rcon  <= 8'h01;
      run   <= 1'b0;
      ready <= 1'b0;
      for (int i = 0; i <= NR; i++) rk[i] <= '0;
    end else if (start) begin
      rk[0] <= key;
      idx   <= 4'd1;
      rcon  <= 8'h01;
      run   <= 1'b1;
      ready <= 1'b0;
    end else if (run) begin
      rk[idx] <= next_round_key(prev, sub_w3, rcon);
      rcon    <= xtime(rcon);
      idx     <= idx + 4'd1;
      if (idx == 4'(NR)) begin
        run   <= 1'b0;
        ready <= 1'b1;
      end
    end
  end

endmodule
