// aes_sbox: one AES S-box (forward or inverse), computed rather than stored.
//
// Forward (INVERSE = 0): multiplicative inverse in GF(2^8) followed by the
// FIPS-197 affine map. Inverse (INVERSE = 1): inverse affine map followed by
// the GF(2^8) inverse. Both come from aes_pkg. Purely combinational; the
// engines and the key schedule use one instance per byte lane.
module aes_sbox
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  byte_t a,
  output byte_t s
);

  always_comb s = INVERSE ? inv_sbox(a) : sbox(a);

endmodule
