// aes_encrypt: iterative AES-128 encryption engine, one round per clock.
//
// A pulse on start (accepted when busy is low) captures din XOR rk[0]; the
// nine full rounds (SubBytes, ShiftRows, MixColumns, AddRoundKey) and the
// final round without MixColumns follow on the next ten clocks. done pulses
// for one cycle with the ciphertext on dout, 10 cycles after start; dout
// holds its value until the next start. The round keys come from
// aes_key_expand and must stay constant while busy. AES-128 and the
// 128-bit block follow the source; the round-per-cycle structure is this
// design's choice.
// Lint reports rst_n as used both synchronously and asynchronously: the
// synchronous use is only the assertions' disable condition.
module aes_encrypt
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t din,
  input  block_t rk [0:NR],
  output logic   busy,
  output logic   done,
  output block_t dout
);

  block_t     state;
  logic [3:0] round;
  block_t     round_out;
  block_t     subbed;

  for (genvar j = 0; j < 16; j++) begin : g_sbox
    aes_sbox #(.INVERSE(1'b0)) u_sbox (.a(state[8*j +: 8]), .s(subbed[8*j +: 8]));
  end

  always_comb begin
    if (round == 4'(NR)) round_out = shift_rows(subbed) ^ rk[NR];
    else                 round_out = mix_columns(shift_rows(subbed)) ^ rk[round];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= '0;
      round <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      dout  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        state <= din ^ rk[0];
        round <= 4'd1;
        busy  <= 1'b1;
      end else if (busy) begin
        state <= round_out;
        round <= round + 4'd1;
        if (round == 4'(NR)) begin
          round <= '0;
          busy <= 1'b0;
          done <= 1'b1;
          dout <= round_out;
        end
      end
    end
  end

  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("aes_encrypt: start while busy");

endmodule
