// aes_round: one AES-128 encryption round with optional internal pipeline
// registers.
//
// The round applies SubBytes (sixteen computed S-boxes), ShiftRows,
// MixColumns and AddRoundKey, in that order. PR sets how many registers cut
// the round, following the PR(X) convention of the design space:
//   PR=0  no internal register (fully combinational round)
//   PR=1  one register between ShiftRows and MixColumns
//   PR=2  as PR=1, plus one between MixColumns and AddRoundKey
//   PR=3  as PR=2, plus one between SubBytes and ShiftRows
// so the round's latency is PR cycles. A valid bit and a tag travel with the
// state through every register.
//
// The same unit may be reused for several rounds, so the round it performs
// is not fixed: the tag holds the pass number of the block, and the unit at
// position POS of a chain of HR units performs round tag*HR + POS + 1. That
// number picks the round key and, for round 10, skips MixColumns. Carrying
// the pass number as a tag is this design's choice.
//
// Interface: in_valid/in_tag/in_state enter; out_valid/out_tag/out_state
// leave PR cycles later (combinationally when PR=0). round_keys must be
// stable while blocks are in flight. No stall: every stage moves each clock.
module aes_round
  import aes_pkg::*;
#(
  parameter int unsigned PR    = 3,   // internal registers, 0..3
  parameter int unsigned HR    = 10,  // round units in the chain
  parameter int unsigned POS   = 0,   // position of this unit in the chain
  parameter int unsigned TAG_W = 4    // width of the pass-number tag
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [TAG_W-1:0] in_tag,
  input  block_t           in_state,
  input  round_keys_t      round_keys,
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output block_t           out_state
);

  typedef struct packed {
    logic             valid;
    logic [TAG_W-1:0] tag;
    block_t           state;
  } stage_t;

  // Round number performed for a block with pass number tag.
  function automatic int unsigned round_of(input logic [TAG_W-1:0] tag);
    return int'(tag) * HR + POS + 1;
  endfunction

  stage_t s_sb, s_sr_in, s_sr, s_mc_in, s_mc, s_ark_in;
  block_t sb_out;

  // SubBytes
  for (genvar i = 0; i < 16; i++) begin : g_sbox
    aes_sbox u_sbox (
      .in_byte (in_state[127-8*i -: 8]),
      .out_byte(sb_out[127-8*i -: 8])
    );
  end
  assign s_sb = '{valid: in_valid, tag: in_tag, state: sb_out};

  // Register between SubBytes and ShiftRows (PR=3 only)
  if (PR >= 3) begin : g_reg_sb
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) s_sr_in <= '0;
      else        s_sr_in <= s_sb;
  end else begin : g_wire_sb
    assign s_sr_in = s_sb;
  end

  // ShiftRows
  assign s_sr = '{valid: s_sr_in.valid, tag: s_sr_in.tag, state: shift_rows(s_sr_in.state)};

  // Register between ShiftRows and MixColumns (PR>=1)
  if (PR >= 1) begin : g_reg_sr
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) s_mc_in <= '0;
      else        s_mc_in <= s_sr;
  end else begin : g_wire_sr
    assign s_mc_in = s_sr;
  end

  // MixColumns, bypassed in the last round
  always_comb begin
    s_mc = s_mc_in;
    if (round_of(s_mc_in.tag) != NR) s_mc.state = mix_columns(s_mc_in.state);
  end

  // Register between MixColumns and AddRoundKey (PR>=2)
  if (PR >= 2) begin : g_reg_mc
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) s_ark_in <= '0;
      else        s_ark_in <= s_mc;
  end else begin : g_wire_mc
    assign s_ark_in = s_mc;
  end

  // AddRoundKey
  always_comb begin
    int unsigned r;
    r = round_of(s_ark_in.tag);
    out_valid = s_ark_in.valid;
    out_tag   = s_ark_in.tag;
    out_state = s_ark_in.state ^ ((r <= NR) ? round_keys[r] : '0);
  end

endmodule
