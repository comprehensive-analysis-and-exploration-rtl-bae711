// aes_key_expansion: AES-128 key schedule with one register per round key.
//
// The ten expansion steps form a combinational chain from key_in: each step
// rotates the last word of the previous round key, passes it through four
// S-boxes, XORs the round constant into its first byte and then ripples the
// XOR through the four words. When key_load is high, all eleven round keys
// (round key 0 is the cipher key) are captured at the next rising edge, each
// in its own 128-bit register, as the source architecture describes. They
// are valid from the cycle after key_load and stay until the next load.
// Forty S-boxes are spent so a new key takes effect in one clock; that, and
// the reset value of zero, are this design's choices.
//
// Interface: clk, rst_n (asynchronous, active low), key_load, key_in,
// round_keys[0..10].
module aes_key_expansion
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        key_load,
  input  block_t      key_in,
  output round_keys_t round_keys
);

  round_keys_t rk_d;

  assign rk_d[0] = key_in;

  for (genvar r = 1; r <= 10; r++) begin : g_step
    logic [31:0] w0, w1, w2, w3, rot, sub, t;
    assign w0  = rk_d[r-1][127:96];
    assign w1  = rk_d[r-1][95:64];
    assign w2  = rk_d[r-1][63:32];
    assign w3  = rk_d[r-1][31:0];
    assign rot = {w3[23:0], w3[31:24]};            // RotWord
    for (genvar b = 0; b < 4; b++) begin : g_sb    // SubWord
      aes_sbox u_sbox (
        .in_byte (rot[31-8*b -: 8]),
        .out_byte(sub[31-8*b -: 8])
      );
    end
    assign t = sub ^ {rcon(r), 24'h0};
    assign rk_d[r] = {w0 ^ t, w0 ^ t ^ w1, w0 ^ t ^ w1 ^ w2, w0 ^ t ^ w1 ^ w2 ^ w3};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) round_keys <= '0;
    else if (key_load) round_keys <= rk_d;
  end

endmodule
