// aes_decrypt: iterative AES-128 decryption with one reused inverse round.
//
// An accepted ciphertext is XORed with round key 10 into the state register.
// On each of the next ten clocks the state passes through aes_inv_round with
// round keys 9, 8, ..., 0; the step with round key 0 is the last round and
// skips InvMixColumns. The recovered plaintext then sits in the state
// register with out_valid high for one cycle.
//
// Timing: a ciphertext accepted in cycle t gives out_valid in cycle t + 11.
// in_ready is high whenever no block is being worked on, including the
// cycle in which out_valid is high, so back-to-back blocks take 11 cycles
// each. round_keys must not change while busy is high.
// The decryption sequence is the standard inverse cipher; the single-unit
// iterative arrangement and the handshake are this design's choices.
module aes_decrypt
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  round_keys_t round_keys,
  input  logic        in_valid,
  output logic        in_ready,
  input  block_t      ciphertext,
  output logic        out_valid,
  output block_t      plaintext,
  output logic        busy
);

  typedef enum logic [1:0] {IDLE, RUN, DONE} state_e;

  state_e     fsm_q;
  logic [3:0] rnd_q;     // round key used by the next step
  block_t     state_q;
  block_t     round_out;

  aes_inv_round u_inv_round (
    .in_state (state_q),
    .round_key(round_keys[rnd_q]),
    .last     (rnd_q == 4'd0),
    .out_state(round_out)
  );

  assign in_ready = (fsm_q != RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fsm_q   <= IDLE;
      rnd_q   <= '0;
      state_q <= '0;
    end else if (fsm_q == RUN) begin
      state_q <= round_out;
      if (rnd_q == 4'd0) fsm_q <= DONE;
      else               rnd_q <= rnd_q - 4'd1;
    end else if (in_valid) begin
      state_q <= ciphertext ^ round_keys[NR];
      rnd_q   <= 4'(NR - 1);
      fsm_q   <= RUN;
    end else begin
      fsm_q   <= IDLE;
    end
  end

  assign out_valid = (fsm_q == DONE);
  assign plaintext = state_q;
  assign busy      = (fsm_q == RUN);

endmodule
