// aes_decrypt: iterative AES-128 decryption engine (FIPS-197 inverse
// cipher), one round per clock.
//
// A pulse on start (accepted when busy is low) captures din XOR rk[10]; the
// nine inverse rounds (InvShiftRows, InvSubBytes, AddRoundKey, InvMixColumns)
// use rk[9] down to rk[1] and the last one, without InvMixColumns, uses
// rk[0]. done pulses for one cycle with the plaintext on dout, 10 cycles
// after start; dout holds until the next start. Round keys come from the same
// aes_key_expand as the encryption engine, so both engines always use the
// same PUF-derived key, as the source's device does. The round-per-cycle
// structure is this design's choice.
// Lint reports rst_n as used both synchronously and asynchronously: the
// synchronous use is only the assertions' disable condition.
module aes_decrypt
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
  block_t     after_key;
  block_t     shifted, subbed;

  assign shifted = inv_shift_rows(state);

  for (genvar j = 0; j < 16; j++) begin : g_sbox
    aes_sbox #(.INVERSE(1'b1)) u_sbox (.a(shifted[8*j +: 8]), .s(subbed[8*j +: 8]));
  end

  always_comb begin
    after_key = subbed ^ rk[4'(NR) - round];
    if (round == 4'(NR)) round_out = after_key;
    else                 round_out = inv_mix_columns(after_key);
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
        state <= din ^ rk[NR];
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
    else $error("aes_decrypt: start while busy");

endmodule
