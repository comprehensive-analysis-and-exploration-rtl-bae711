// aes_inv_sbox: the AES inverse substitution box (InvSubBytes on one byte).
//
// Undoes aes_sbox: the inverse affine transform
// rotl(b,1) ^ rotl(b,3) ^ rotl(b,6) ^ 0x05 is applied first, then the GF(2^8)
// multiplicative inverse. The result equals the standard 16x16 inverse S-box
// table (row = high nibble, column = low nibble); computing it instead of
// storing the table mirrors the forward S-box and is this design's choice.
//
// Interface: in_byte -> out_byte, purely combinational, no clock.
module aes_inv_sbox
  import aes_pkg::*;
(
  input  byte_t in_byte,
  output byte_t out_byte
);

  byte_t pre;

  always_comb begin
    pre      = rotl8(in_byte, 1) ^ rotl8(in_byte, 3) ^ rotl8(in_byte, 6) ^ 8'h05;
    out_byte = gf_inv(pre);
  end

endmodule
