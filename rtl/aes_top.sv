// aes_top: AES-128 encryption and decryption sharing one key schedule.
//
// aes_key_expansion turns the cipher key into eleven registered round keys.
// The encryption side is aes_encrypt, whose PR, P and HR parameters select
// one of the 28 points of the design space (default PR=3, P=0, HR=10: three
// registers inside every round, no register between rounds, ten round
// units, the point with the highest throughput and clock rate). The
// decryption side is aes_decrypt, an iterative core that uses the same round
// keys in reverse order.
//
// Interface: load a key with key_load/key_in while both engines are idle;
// the round keys are ready the next cycle, and a block offered in that
// same cycle already uses them. Each engine then has its own valid/ready
// input and valid-only output (see aes_encrypt and aes_decrypt for timing).
module aes_top
  import aes_pkg::*;
#(
  parameter int unsigned PR = 3,
  parameter bit          P  = 0,
  parameter int unsigned HR = 10
) (
  input  logic   clk,
  input  logic   rst_n,
  // key
  input  logic   key_load,
  input  block_t key_in,
  // encryption
  input  logic   enc_in_valid,
  output logic   enc_in_ready,
  input  block_t enc_plaintext,
  output logic   enc_out_valid,
  output block_t enc_ciphertext,
  output logic   enc_busy,
  // decryption
  input  logic   dec_in_valid,
  output logic   dec_in_ready,
  input  block_t dec_ciphertext,
  output logic   dec_out_valid,
  output block_t dec_plaintext,
  output logic   dec_busy
);

  round_keys_t round_keys;

  aes_key_expansion u_key_expansion (
    .clk       (clk),
    .rst_n     (rst_n),
    .key_load  (key_load),
    .key_in    (key_in),
    .round_keys(round_keys)
  );

  aes_encrypt #(.PR(PR), .P(P), .HR(HR)) u_encrypt (
    .clk       (clk),
    .rst_n     (rst_n),
    .round_keys(round_keys),
    .in_valid  (enc_in_valid),
    .in_ready  (enc_in_ready),
    .plaintext (enc_plaintext),
    .out_valid (enc_out_valid),
    .ciphertext(enc_ciphertext),
    .busy      (enc_busy)
  );

  aes_decrypt u_decrypt (
    .clk       (clk),
    .rst_n     (rst_n),
    .round_keys(round_keys),
    .in_valid  (dec_in_valid),
    .in_ready  (dec_in_ready),
    .ciphertext(dec_ciphertext),
    .out_valid (dec_out_valid),
    .plaintext (dec_plaintext),
    .busy      (dec_busy)
  );

  a_key_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                    key_load |-> !enc_busy && !dec_busy)
    else $error("key loaded while blocks are in flight");

endmodule
