// aes_encrypt: AES-128 encryption engine spanning the PR/P/HR design space.
//
// HR round units (aes_round) are chained. Each unit holds PR internal
// registers; with P=1 a register also separates consecutive units. A loop
// register always closes the chain. When HR=10 the chain is the whole cipher
// and the loop register is the output register. When HR is 2 or 5 (or 1),
// a block makes 10/HR passes through the chain: on leaving the loop register
// it is fed back to the first unit with its pass number incremented, until
// the last pass, when it is presented on the output.
//
// Every register stage in the loop can hold a different block, so up to
// S = PR*HR + 1 (P=0) or HR*(PR+1) (P=1) blocks are in flight at once. A
// recirculating block has priority at the chain entry; a new block waits in
// the one-entry input register until the slot at the entry is free, and
// in_ready is low while it waits. The initial AddRoundKey (round key 0) is
// applied as a new block enters the chain.
//
// Timing: a block accepted in cycle t (in_valid && in_ready) appears with
// out_valid in cycle t + 1 + (10/HR)*S, which is 10*PR + 10/HR + 1 cycles
// for P=0 and 10*(PR+1) + 1 for P=1, as in the design-space tables. out_valid
// is a one-cycle pulse; there is no output back-pressure. Blocks leave in the
// order they entered. busy is high while any block is in flight.
// With HR=1, P has no effect (there is only one unit).
// The chain structure, register placement and latency follow the source
// design; the valid/ready handshake and the entry arbitration are this
// design's choices.
module aes_encrypt
  import aes_pkg::*;
#(
  parameter int unsigned PR = 3,   // internal registers per round, 0..3
  parameter bit          P  = 0,   // register between consecutive rounds
  parameter int unsigned HR = 10   // round units: 1, 2, 5 or 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  round_keys_t round_keys,
  input  logic        in_valid,
  output logic        in_ready,
  input  block_t      plaintext,
  output logic        out_valid,
  output block_t      ciphertext,
  output logic        busy
);

  localparam int unsigned NPASS = NR / HR;
  localparam int unsigned TAG_W = 4;
  localparam int unsigned S     = P ? HR * (PR + 1) : PR * HR + 1;

  typedef struct packed {
    logic             valid;
    logic [TAG_W-1:0] tag;
    block_t           state;
  } stage_t;

  // Input register
  logic   inq_valid;
  block_t inq_data;
  logic   take_new;

  // Chain signals: unit i reads chain_in[i] and drives chain_out[i]
  stage_t [HR-1:0] chain_in;
  stage_t [HR-1:0] chain_out;
  stage_t          loop_q;
  logic            recirc;

  // Chain entry: recirculating block first, else a waiting new block
  assign recirc   = loop_q.valid && (int'(loop_q.tag) != NPASS - 1);
  assign take_new = inq_valid && !recirc;

  always_comb begin
    if (recirc)
      chain_in[0] = '{valid: 1'b1, tag: loop_q.tag + 1'b1, state: loop_q.state};
    else if (inq_valid)
      chain_in[0] = '{valid: 1'b1, tag: '0, state: inq_data ^ round_keys[0]};
    else
      chain_in[0] = '0;
  end

  for (genvar i = 0; i < HR; i++) begin : g_unit
    aes_round #(.PR(PR), .HR(HR), .POS(i), .TAG_W(TAG_W)) u_round (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (chain_in[i].valid),
      .in_tag    (chain_in[i].tag),
      .in_state  (chain_in[i].state),
      .round_keys(round_keys),
      .out_valid (chain_out[i].valid),
      .out_tag   (chain_out[i].tag),
      .out_state (chain_out[i].state)
    );
    if (i < HR - 1) begin : g_link
      if (P) begin : g_reg
        always_ff @(posedge clk or negedge rst_n)
          if (!rst_n) chain_in[i+1] <= '0;
          else        chain_in[i+1] <= chain_out[i];
      end else begin : g_wire
        assign chain_in[i+1] = chain_out[i];
      end
    end
  end

  // Loop / output register
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) loop_q <= '0;
    else        loop_q <= chain_out[HR-1];

  // Input register: holds one block until the chain entry is free
  assign in_ready = !inq_valid || take_new;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inq_valid <= 1'b0;
      inq_data  <= '0;
    end else if (in_ready) begin
      inq_valid <= in_valid;
      if (in_valid) inq_data <= plaintext;
    end
  end

  assign out_valid  = loop_q.valid && (int'(loop_q.tag) == NPASS - 1);
  assign ciphertext = loop_q.state;

  // Blocks in flight
  logic [7:0] inflight;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) inflight <= '0;
    else        inflight <= inflight + 8'(in_valid && in_ready) - 8'(out_valid);
  assign busy = (inflight != '0);

  // Checks on the configuration and on the loop
  initial begin
    assert (PR <= 3) else $error("PR must be 0..3");
    assert (HR == 1 || HR == 2 || HR == 5 || HR == 10) else $error("HR must divide 10");
  end
  a_inflight_bound: assert property (@(posedge clk) disable iff (!rst_n) int'(inflight) <= S + 1)
    else $error("more blocks in flight than loop slots");
  a_out_implies_busy: assert property (@(posedge clk) disable iff (!rst_n) out_valid |-> busy);

endmodule
