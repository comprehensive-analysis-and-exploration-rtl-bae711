// aes_sbox: the AES forward substitution box (SubBytes on one byte).
//
// The value is computed, not looked up: the byte's multiplicative inverse in
// GF(2^8) (as a^254, zero mapping to zero) goes through the FIPS-197 affine
// transform b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63.
// Computing the S-box in logic instead of storing a 256-byte ROM follows the
// source design; the exponentiation chain used for the inverse is this
// design's own choice.
//
// Interface: in_byte -> out_byte, purely combinational, no clock.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t in_byte,
  output byte_t out_byte
);

  byte_t inv;

  always_comb begin
    inv      = gf_inv(in_byte);
    out_byte = inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
  end

endmodule
