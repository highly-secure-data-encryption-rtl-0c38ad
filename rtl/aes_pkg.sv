// aes_pkg: types and round functions shared by the AES-128 key schedule,
// encryption engine and decryption engine.
//
// A 128-bit block is held as in FIPS-197: byte 0 is bits [127:120] and the
// state is filled column by column, so byte k sits at row k%4, column k/4.
// The S-box is not stored as a table; it is computed as the multiplicative
// inverse in GF(2^8) (modulo x^8+x^4+x^3+x+1, found as a^254) followed by the
// FIPS-197 affine map s = b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 8'h63.
// The inverse S-box applies the inverse affine map
// b = rotl(s,1) ^ rotl(s,3) ^ rotl(s,6) ^ 8'h05 and then the same inversion.
// SubBytes is done by aes_sbox instances, one per byte lane, built on the
// sbox and inv_sbox functions here. All functions are combinational and
// synthesizable.
package aes_pkg;

  typedef logic [127:0] block_t;
  typedef logic [7:0]   byte_t;

  localparam int NR = 10;  // rounds of AES-128

  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gf_mul(input byte_t a, input byte_t b);
    byte_t p;
    byte_t aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  // a^254 = a^-1 for a != 0, and 0 for a == 0
  function automatic byte_t gf_inv(input byte_t a);
    byte_t a2, a3, a12, a15, a240, a252;
    a2   = gf_mul(a, a);
    a3   = gf_mul(a2, a);
    a12  = gf_mul(gf_mul(a3, a3), gf_mul(a3, a3));
    a15  = gf_mul(a12, a3);
    a240 = a15;
    for (int i = 0; i < 4; i++) a240 = gf_mul(a240, a240);
    a252 = gf_mul(a240, a12);
    return gf_mul(a252, a2);
  endfunction

  function automatic byte_t rotl8(input byte_t a, input int n);
    return byte_t'((a << n) | (a >> (8 - n)));
  endfunction

  function automatic byte_t sbox(input byte_t a);
    byte_t b;
    b = gf_inv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic byte_t inv_sbox(input byte_t s);
    return gf_inv(rotl8(s, 1) ^ rotl8(s, 3) ^ rotl8(s, 6) ^ 8'h05);
  endfunction

  function automatic byte_t get_byte(input block_t s, input int k);
    return s[127 - 8*k -: 8];
  endfunction

  // row r is rotated left by r columns
  function automatic block_t shift_rows(input block_t s);
    block_t r;
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++)
        r[127 - 8*(row + 4*c) -: 8] = get_byte(s, row + 4*((c + row) % 4));
    return r;
  endfunction

  function automatic block_t inv_shift_rows(input block_t s);
    block_t r;
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++)
        r[127 - 8*(row + 4*((c + row) % 4)) -: 8] = get_byte(s, row + 4*c);
    return r;
  endfunction

  function automatic block_t mix_columns(input block_t s);
    block_t r;
    byte_t a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = get_byte(s, 4*c);
      a1 = get_byte(s, 4*c + 1);
      a2 = get_byte(s, 4*c + 2);
      a3 = get_byte(s, 4*c + 3);
      r[127 - 8*(4*c)     -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
      r[127 - 8*(4*c + 1) -: 8] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
      r[127 - 8*(4*c + 2) -: 8] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
      r[127 - 8*(4*c + 3) -: 8] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
    end
    return r;
  endfunction

  // constant multipliers of InvMixColumns built from doublings
  function automatic byte_t mul_9(input byte_t a);
    return xtime(xtime(xtime(a))) ^ a;
  endfunction

  function automatic byte_t mul_b(input byte_t a);
    return xtime(xtime(xtime(a))) ^ xtime(a) ^ a;
  endfunction

  function automatic byte_t mul_d(input byte_t a);
    return xtime(xtime(xtime(a))) ^ xtime(xtime(a)) ^ a;
  endfunction

  function automatic byte_t mul_e(input byte_t a);
    return xtime(xtime(xtime(a))) ^ xtime(xtime(a)) ^ xtime(a);
  endfunction

  function automatic block_t inv_mix_columns(input block_t s);
    block_t r;
    byte_t a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = get_byte(s, 4*c);
      a1 = get_byte(s, 4*c + 1);
      a2 = get_byte(s, 4*c + 2);
      a3 = get_byte(s, 4*c + 3);
      r[127 - 8*(4*c)     -: 8] = mul_e(a0) ^ mul_b(a1) ^ mul_d(a2) ^ mul_9(a3);
      r[127 - 8*(4*c + 1) -: 8] = mul_9(a0) ^ mul_e(a1) ^ mul_b(a2) ^ mul_d(a3);
      r[127 - 8*(4*c + 2) -: 8] = mul_d(a0) ^ mul_9(a1) ^ mul_e(a2) ^ mul_b(a3);
      r[127 - 8*(4*c + 3) -: 8] = mul_b(a0) ^ mul_d(a1) ^ mul_9(a2) ^ mul_e(a3);
    end
    return r;
  endfunction

  // One step of the AES-128 key schedule: round key i -> round key i+1.
  // sub_w3 is SubWord applied to the last word of k (four S-box lanes).
  function automatic block_t next_round_key(input block_t k, input logic [31:0] sub_w3,
                                            input byte_t rcon);
    logic [31:0] w0, w1, w2, w3, t;
    w0 = k[127:96];
    w1 = k[95:64];
    w2 = k[63:32];
    w3 = k[31:0];
    t  = {sub_w3[23:16] ^ rcon, sub_w3[15:8], sub_w3[7:0], sub_w3[31:24]};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    return {w0, w1, w2, w3};
  endfunction

endpackage
