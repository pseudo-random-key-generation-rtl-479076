# DES engine with pseudo random subkey generation

This is an iterative DES encryption/decryption engine whose sixteen round
subkeys do not come from the classic DES key schedule (split the key into
28-bit halves, rotate, permuted choice 2). The 64-bit user key instead seeds
a 64-stage XNOR feedback shift register. Each state the register steps
through is squeezed to 48 bits by a compression permutation and becomes the
next subkey, KEY1 to KEY16. One round datapath serves both directions. It
reads the stored subkeys forwards to encrypt and backwards to decrypt. A
block encrypted under a key therefore comes back when it is decrypted under
the same key.

The round function itself (IP, E, S1..S8, P, IP^-1) is unchanged DES. Only
the subkeys differ. So the engine does **not** produce standard DES cipher
text and cannot talk to a standard DES implementation. The round engine on
its own does compute standard DES when it is given the classic subkeys, and
its testbench checks exactly that against published test vectors.

## Where the subkeys come from

The generator (`des_prkg`) is a chain of 64 flip-flops, REG1 to REG64, all on
one clock. On every step each stage takes the value of the stage to its left.
REG1 takes the inverted XOR (the XNOR) of two tap stages:

    REG1 <= ~(REG1 ^ REG64);    REGk <= REG(k-1),  k = 2..64

REG1 is bit 63 of the `state` vector and REG64 is bit 0. So the word shifts
towards the least significant bit and the new bit enters at the top. The two
taps lie one in each 32-bit half of the key word. They are parameters
(`TAP_A`, `TAP_B`, counted from REG1).

`des_keygen` loads the key into the register: key[63:32] goes to REG1..REG32
and key[31:0] to REG33..REG64. It then steps the register once per clock.
After every `STEPS_PER_KEY` steps (default 1) it stores the compressed state:

    KEYi = PC2(PC1(state after i * STEPS_PER_KEY steps)),   i = 1..16

`des_compress` does the compression. It uses the DES permuted choice 1, which
drops bits 8, 16, ..., 64, followed by permuted choice 2 (56 to 48 bits). All
sixteen subkeys stay in a register file. The round engine needs them in
reverse order for decryption, and they are also brought out of the top for
observation.

Properties worth knowing before you trust this scheme:

* **Neighbouring subkeys are strongly related.** With one step per subkey,
  consecutive generator states share 63 of their 64 bits, shifted by one
  place. The classic schedule also derives its subkeys from rotated copies of
  one 56-bit word, so this is not unusual in kind, but nothing here has been
  analysed for strength. Raising `STEPS_PER_KEY` spreads the states further
  apart.
* **All ones is stuck.** XNOR(1,1) = 1, so a key of all ones gives sixteen
  identical subkeys. It is the only state that maps to itself; the all-zero
  state, for instance, moves on (XNOR(0,0) = 1).
* **Parity bits are dropped at the output, not at the input.** The generator
  runs on all 64 key bits. Only the compression discards every eighth bit of
  each state. As the word shifts, the discarded positions fall on different
  key bits from one subkey to the next.
* The taps (REG1, REG64) correspond to the polynomial x^64 + x^63 + 1. Its
  period has not been worked out here. Sixteen steps per key are far below
  any plausible period.

## How a block goes through the round engine

`des_core` holds the datapath of a classic iterative DES:

    din -> IP -> L, R
    each round:  TEMP <= L ^ P(S(E(R) ^ Ki))      (clock 1)
                 L <= R;  R <= TEMP               (clock 2)
    after round 16:  dout <= IP^-1({R16, L16})

TEMP is a real register, so a round takes two clocks and a block takes 32
clocks. The final swap back to {R16, L16} before IP^-1 is standard DES. It is
what makes decryption with reversed subkeys the exact inverse of encryption.

During decryption the engine reads subkey 15 - round where encryption reads
subkey round. That mux is the only difference between the two directions.

## Interface of `des_top`

Everything is synchronous to `clk`. `rst` is a synchronous, active-high
reset.

| signal | dir | width | meaning |
|---|---|---|---|
| `cs_n` | in | 1 | active-low chip select; while high, `key_load` and `start` are ignored |
| `key_load`, `key` | in | 1, 64 | generate subkeys for a new key |
| `start`, `decrypt`, `text_in` | in | 1, 1, 64 | process one block (decrypt = 1 for decryption) |
| `text_out` | out | 64 | result, valid from `done` until the next block finishes |
| `done` | out | 1 | one-clock pulse |
| `busy` | out | 1 | key generation or a block is in progress |
| `key_ready` | out | 1 | KEY1..KEY16 are valid |
| `subkeys[0:15]` | out | 16 x 48 | KEY1..KEY16 as stored |

Timing and rules:

* `key_load` is sampled on a rising edge. `key_ready` falls and rises again
  16 * STEPS_PER_KEY + 1 clocks later, which is 17 clocks by default.
  `key_load` is ignored while a block is in progress, so the subkeys never
  change under a running block. A new `key_load` during key generation
  restarts it.
* `start` is accepted only when `key_ready` is high and nothing is in
  progress. Otherwise it is dropped, not queued. `done` follows 32 clocks
  after the accepting edge.
* After reset no key is loaded, and `start` is refused until one is.

Parameters of the top: `NUM_ROUNDS` (16) and `STEPS_PER_KEY` (1). The round
count is carried through the engine and the subkey store, but only 16 has
been simulated.

## Modules

| file | what it is |
|---|---|
| `rtl/des_pkg.sv` | widths, types, the DES tables, permutation functions |
| `rtl/des_top.sv` | top: chip select and command gating, key generator plus round engine |
| `rtl/des_keygen.sv` | subkey generation: generator, compression, 16 x 48-bit store |
| `rtl/des_prkg.sv` | 64-stage XNOR feedback shift register |
| `rtl/des_compress.sv` | 64 to 48-bit compression (PC-1 then PC-2) |
| `rtl/des_core.sv` | round engine: L, R and TEMP registers, round counter, subkey order |
| `rtl/des_ip.sv`, `rtl/des_ip_inv.sv` | initial permutation and its inverse |
| `rtl/des_expand.sv` | expansion E, 32 to 48 bits |
| `rtl/des_sbox_bank.sv`, `rtl/des_sbox.sv` | S1..S8 and one S-box |
| `rtl/des_pperm.sv` | permutation P |

The tables in `des_pkg` follow the convention of the DES standard: bit 1 is
the MSB, and entry i names the input bit that lands on output bit i.

Size after generic synthesis: about 1,000 flip-flop bits (768 of them in the
subkey store), the eight S-boxes as 2 kbit of ROM, and a few hundred
word-level cells. The design is much too large for a 72-macrocell CPLD such
as the XC9572XL. Dropping the subkey store would require regenerating the
subkeys on the fly, backwards for decryption, which an XNOR register can do
by running its inverse recurrence. That is not built.

## Design choices beyond the source architecture

The block structure, the widths (64-bit text, 32-bit halves, 48-bit subkeys,
6-in/4-out S-boxes), the 16 rounds, the TEMP register, the XNOR generator
with REG1 fed back through an XOR and an inverter, and the compression to 48
bits all follow the source architecture. The following were decided here:

* The 64-bit key width. A 56-bit session key also appears in the original
  block diagram. The 64-bit form is used, with parity positions discarded
  only by the compression.
* The generator taps (REG1 and REG64), one shift per subkey, and loading the
  key into the register unpermuted.
* The compression bit selection: DES PC-1 followed by PC-2.
* The DES tables themselves (IP, E, S-boxes, P, IP^-1), taken from the DES
  standard.
* The {R16, L16} swap before IP^-1, and decryption by reversed subkey order.
* Storing all sixteen subkeys, the two-clock round, the handshake, active-low
  chip select and what it gates, and synchronous reset.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/des_ref_pkg.sv` is a
bit-serial reference model. It builds IP, IP^-1, E and PC-1 from their
row/column structure instead of copying the RTL tables, and it contains the
classic DES key schedule and the pseudo random one. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb --top-module des_top_tb \
        rtl/des_pkg.sv tb/des_ref_pkg.sv tb/des_top_tb.sv
    ./obj_dir/Vdes_top_tb

Replace `des_top` with any other module name to run its testbench.

What the testbenches establish:

* `des_core_tb` checks the round engine as plain DES using classic subkeys.
  Two published vectors pass in both directions:
  key 133457799BBCDFF1 with plain text 0123456789ABCDEF gives 85E813540F0AB405,
  and key 0E329232EA6D0D73 with 8787878787878787 gives 0000000000000000.
  80 random blocks also match the reference, with the 32-clock latency
  checked.
* The permutation and S-box testbenches check every single-bit input, or all
  64 inputs of every S-box, plus intermediate values of the published worked
  example.
* `des_keygen_tb` checks KEY1..KEY16 against the reference for 20 keys, with
  one and with three steps per subkey. It also checks the ready latency and a
  restart in the middle of a run.
* `des_top_tb` runs at the default parameters. It covers 24 random keys with
  3 blocks each, encrypted and then decrypted back. It also confirms, and
  counts, that commands are ignored under inactive chip select, during key
  generation and during a block. It fails if any of these never occurred.

Not verified: timing closure at any clock rate, behaviour on an FPGA or
CPLD, and the period and statistical quality of the generator.
