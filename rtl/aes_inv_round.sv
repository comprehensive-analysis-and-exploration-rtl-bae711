// aes_inv_round: one AES-128 decryption round, combinational.
//
// The order is InvShiftRows, InvSubBytes (sixteen computed inverse S-boxes),
// AddRoundKey, InvMixColumns. In the last round (last=1) InvMixColumns is
// skipped. InvShiftRows rotates row r right by r columns; InvMixColumns
// multiplies each column by the circulant matrix (0E 0B 0D 09). The order and
// the transforms follow the standard inverse cipher.
//
// Interface: in_state, round_key, last -> out_state; no clock.
module aes_inv_round
  import aes_pkg::*;
(
  input  block_t in_state,
  input  block_t round_key,
  input  logic   last,
  output block_t out_state
);

  block_t isr, isb, ark;

  assign isr = inv_shift_rows(in_state);

  for (genvar i = 0; i < 16; i++) begin : g_sbox
    aes_inv_sbox u_inv_sbox (
      .in_byte (isr[127-8*i -: 8]),
      .out_byte(isb[127-8*i -: 8])
    );
  end

  assign ark       = isb ^ round_key;
  assign out_state = last ? ark : inv_mix_columns(ark);

endmodule
