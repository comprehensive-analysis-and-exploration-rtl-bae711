# AES-128 encryption across a pipelining / resource-sharing design space

This is a synthesizable SystemVerilog AES-128 core. One set of three
parameters picks among 28 hardware organisations of the same cipher. At one
end, a single round unit is reused ten times per block. At the other, ten
round units are unrolled and every round is cut by three pipeline registers.
The point of the design is the trade: area against latency against
throughput. The same RTL reproduces every point, so one point can be swapped
for another without touching the datapath. An iterative AES-128 decryptor
shares the key schedule, so the top both encrypts and decrypts.

The default is `PR=3, P=0, HR=10`, written `3_0_10` below. It is the
unrolled pipeline with 31 register stages, and it has the highest throughput
and clock rate of the 28 points.

## The three knobs

A point is named `PR_P_HR`:

| knob | values | meaning |
|------|--------|---------|
| `PR` | 0..3 | registers *inside* each round. 1: between ShiftRows and MixColumns. 2: also between MixColumns and AddRoundKey. 3: also between SubBytes and ShiftRows. |
| `P`  | 0, 1 | a register *between* consecutive round units of the chain |
| `HR` | 1, 2, 5, 10 | number of round units. 10 means fully unrolled. Otherwise each block makes `10/HR` passes through the chain. |

With `HR=1` there is only one unit, so `P` has no effect. That leaves
4 x 7 = 28 distinct points.

### Latency and blocks in flight

A register always closes the chain. It is the *loop register*; when `HR=10`
it is the output register. Every register stage in the loop can hold a
different block. So the loop holds

    S = PR*HR + 1        (P = 0)
    S = HR*(PR + 1)      (P = 1)

blocks at once. A block spends one cycle in the input register and then
`10/HR` passes of `S` cycles each:

    latency = 1 + (10/HR)*S
            = 10*PR + 10/HR + 1     (P = 0)
            = 10*(PR + 1) + 1       (P = 1)

| point | latency | S | point | latency | S |
|-------|--------:|--:|-------|--------:|--:|
| 0_0_1 | 11 | 1 | 2_0_1 | 31 | 3 |
| 0_0_2 | 6 | 1 | 2_0_2 | 26 | 5 |
| 0_0_5 | 3 | 1 | 2_0_5 | 23 | 11 |
| 0_0_10 | 2 | 1 | 2_0_10 | 22 | 21 |
| 0_1_2 | 11 | 2 | 2_1_2 | 31 | 6 |
| 0_1_5 | 11 | 5 | 2_1_5 | 31 | 15 |
| 0_1_10 | 11 | 10 | 2_1_10 | 31 | 30 |
| 1_0_1 | 21 | 2 | 3_0_1 | 41 | 4 |
| 1_0_2 | 16 | 3 | 3_0_2 | 36 | 7 |
| 1_0_5 | 13 | 6 | 3_0_5 | 33 | 16 |
| 1_0_10 | 12 | 11 | **3_0_10** | **32** | **31** |
| 1_1_2 | 21 | 4 | 3_1_2 | 41 | 8 |
| 1_1_5 | 21 | 10 | 3_1_5 | 41 | 20 |
| 1_1_10 | 21 | 20 | 3_1_10 | 41 | 40 |

Latency is counted from the cycle a plaintext is accepted to the cycle its
ciphertext is valid. `S` is the "parallel work" of the point: how many
blocks the loop interleaves. With a steady input, one block leaves every
`10/HR` cycles on average. This is never less than `S/latency` blocks per
cycle, the usual `f * 128 * S / latency` throughput figure for such a point.
The testbenches check every entry of this table cycle-exactly.

## How a block moves through the chain (`aes_encrypt`)

This is the least obvious part of the design.

* **Input register.** An accepted plaintext waits here, one entry deep.
  `in_ready` is high when the register is empty or is being emptied this
  cycle.
* **Chain entry.** In each cycle the first round unit takes one of two
  inputs. A block in the loop register that still has passes to make has
  priority: it goes back in with its pass number plus one. Otherwise the
  waiting plaintext goes in with pass number 0, XORed with round key 0 (the
  initial AddRoundKey). A new block therefore enters only in a cycle when no
  block is recirculating. This is what throttles the iterative points, and
  it is where `in_ready` goes low.
* **Pass-number tag.** Every pipeline register carries `{valid, tag, state}`.
  The unit at position `POS` of a chain of `HR` units performs round
  `tag*HR + POS + 1`. That number picks the round key at the AddRoundKey
  stage. When it is 10, MixColumns is skipped. Because the tag travels with
  the data, blocks at different passes can sit side by side in the same
  chain.
* **Exit.** A block in the loop register that has finished its last pass is
  the output. `out_valid` is high for one cycle with `ciphertext` in the
  same cycle. Its slot is refilled from the input register in that same
  cycle. Blocks leave in the order they arrived. There is no output
  back-pressure.
* **`busy`** is high while any accepted block has not yet left.

The point `0_0_1`, for example, is a classic iterative core. It takes 11
cycles per block and holds one block. `1_1_2` has two units with a register
inside and one between them. Its loop has four stages, so four blocks
circulate interleaved, each making five passes: a block takes 21 cycles, and
one leaves every 5 cycles.

## Round unit (`aes_round`)

The round performs SubBytes, ShiftRows, MixColumns and AddRoundKey, with
`PR` of the three possible cut points registered (see the table above). It
has no stall input: every stage advances every clock. The parent loop
controls admission, which is why it needs none.

## S-boxes (`aes_sbox`, `aes_inv_sbox`)

Both S-boxes are computed in logic, not stored as 256-byte tables. The
forward box takes the GF(2^8) inverse as `a^254`. That is four general
multiplications and seven squarings, and a squaring is just a fixed XOR
network, because squaring is linear over GF(2). It then applies the affine map
`b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63`. The inverse box
applies `rotl(b,1) ^ rotl(b,3) ^ rotl(b,6) ^ 0x05` and then the inverse.
Each round uses 16 S-boxes and the key schedule uses 40. The default build
has 200 forward S-boxes and the decryptor 16 inverse ones.

## Key schedule (`aes_key_expansion`)

The ten expansion steps are one combinational chain from `key_in`. When
`key_load` is high, all eleven round keys are captured in one clock, each in
its own 128-bit register. The keys are shared by every block in flight, so
**load a new key only while both engines are idle** (`enc_busy` and
`dec_busy` low). An assertion in `aes_top` checks this. A block offered in
the cycle after `key_load` already uses the new key.

## Decryption (`aes_decrypt`, `aes_inv_round`)

The decryptor follows the standard inverse cipher. First it XORs round key
10 into the state. Then it runs ten inverse rounds with keys 9 down to 0. Each
inverse round is InvShiftRows, InvSubBytes, AddRoundKey and InvMixColumns,
with InvMixColumns skipped in the last round. One combinational inverse round
is reused, one round per clock, so the latency is 11 cycles. `in_ready` is
low while a block is being processed. A new ciphertext can be accepted in
the same cycle the previous plaintext is presented. The decryptor always has
this iterative form. The `PR/P/HR` knobs apply only to encryption.

## Top (`aes_top`)

`aes_top #(PR, P, HR)` instantiates the key schedule, `aes_encrypt` and
`aes_decrypt`. Its ports:

| port | dir | width | |
|------|-----|------:|-|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `key_load`, `key_in` | in | 1, 128 | load a cipher key (only while idle) |
| `enc_in_valid`, `enc_in_ready`, `enc_plaintext` | in/out/in | 1, 1, 128 | plaintext input |
| `enc_out_valid`, `enc_ciphertext` | out | 1, 128 | ciphertext, one-cycle valid |
| `enc_busy` | out | 1 | encryption blocks in flight |
| `dec_in_valid`, `dec_in_ready`, `dec_ciphertext` | in/out/in | 1, 1, 128 | ciphertext input |
| `dec_out_valid`, `dec_plaintext` | out | 1, 128 | plaintext, one-cycle valid |
| `dec_busy` | out | 1 | decryption in progress |

At the default point, the design holds about 5,800 flip-flops. The
encryption pipeline has 4,260: 31 stages of 133 bits (state, valid bit,
pass tag), plus the input register and a counter. The round-key registers
have 1,408, and the decryptor 135.

Blocks use FIPS-197 byte order: byte 0 of the block is bits [127:120], and
the state is filled column by column.

## Files

`rtl/`:

* `aes_pkg.sv`: types and GF(2^8), ShiftRows and MixColumns functions
* `aes_sbox.sv`, `aes_inv_sbox.sv`
* `aes_key_expansion.sv`
* `aes_round.sv`, `aes_encrypt.sv`
* `aes_inv_round.sv`, `aes_decrypt.sv`
* `aes_top.sv`

`tb/`:

* `aes_ref_pkg.sv`: an independent reference model. Its S-box comes from a
  brute-force inverse search, and it works on a byte matrix.
* `enc_config_check.sv`: drives and checks one encryption point.
* `top_driver.sv`: drives and checks one `aes_top` end to end.

| testbench | what it shows |
|-----------|---------------|
| `tb_aes_sbox`, `tb_aes_inv_sbox` | all 256 values. The inverse box is also compared with the standard table. |
| `tb_aes_key_expansion` | FIPS-197 round keys 1 and 10, plus random keys against the reference |
| `tb_aes_round` | PR = 0..3 side by side, with random tags including the last round |
| `tb_aes_encrypt` | default point plus 0_0_1, 1_1_2, 2_0_5 and 0_1_5: exact latency, blocks in flight, throughput, stalls and recirculation |
| `tb_aes_space_pr0` .. `pr3` | all 28 points, seven per file, with the same checks |
| `tb_aes_inv_round`, `tb_aes_decrypt` | decryption round and core, including 11-cycle latency and input hold-off |
| `tb_aes_top` | the top at point `1_1_2`, end to end: encrypt, then decrypt every ciphertext, under several keys. Every mechanism must occur: reload, interleaving, recirculation and both kinds of stall. |
| `tb_aes_top_full` | the top with no parameter overrides (`3_0_10`), end to end. The pipeline must hold 32 blocks at once and never stall. |

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

### Simulating

With Verilator 5, from the project root:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_top_full.sv \
        --top-module tb_aes_top_full -Mdir obj -o sim
    ./obj/sim

The two packages must be named first. Verilator finds the modules in `rtl/`
and `tb/` by name. To run another testbench, replace its file and top
module. Building a testbench with many unrolled
configurations takes a few minutes of C++ compilation.

To use another design point, override the parameters on `aes_top` or
`aes_encrypt`, e.g. `aes_top #(.PR(1), .P(1), .HR(2))`.

## Where this departs from, or adds to, the reference organisation

* **Handshake.** The valid/ready input, the one-cycle `out_valid` and the
  `busy` flags are this design's own. So is the rule that a recirculating
  block beats a new one at the chain entry.
* **Round selection.** Selecting round keys and the last round with a
  pass-number tag is this design's own mechanism. It is what lets reused
  units hold blocks at different passes.
* **Round-key registers.** Each round key has its own register, filled in
  one clock from a combinational expansion chain. A leaner build could
  derive round keys combinationally from a single key register. That saves
  1280 flip-flops, at the cost of a longer path.
* **Register placement for PR=3.** The "between all stages" placement is
  read as SubBytes|ShiftRows, ShiftRows|MixColumns and
  MixColumns|AddRoundKey. In hardware, ShiftRows is only wiring, so the
  first of these registers adds latency without shortening the critical
  path.
* **Decryption.** The reference study measures encryption only. The
  decryptor here is the simplest arrangement, a single reused unit. It is
  not one of the 28 points.
* **S-box arithmetic.** The S-box is computed rather than stored, as
  intended. The particular `a^254` chain is a plain choice. A composite-field
  (GF((2^4)^2)) inverter would be much smaller and could replace
  `aes_pkg::gf_inv` without any interface change.
* **FPGA results not reproduced.** Clock rates, LUT/FF/slice counts and
  power belong to a particular FPGA flow. The RTL reproduces the
  cycle-level behaviour (latency, blocks in flight, throughput per cycle),
  not those implementation numbers.
