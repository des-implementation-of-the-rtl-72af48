# EDES — Extended DES encryption/decryption unit in SystemVerilog

EDES is a DES-style block cipher that is wider than DES. It uses 96-bit blocks and a 112-bit
key (128 bits with parity). The block is split into three 32-bit sub-blocks A, B and C.
Each round feeds B through two different DES-like f functions: one with S-boxes 1–8 and one
with S-boxes 9–16. Because three sub-blocks share two f functions, each sub-block goes
through a different number of f operations over the 16 rounds (11, 10 and 11, against 8 in
DES). Like DES, the round is its own inverse: the same hardware decrypts once the sub-keys
are applied in reverse order and the two S-box banks are swapped.

This RTL puts the whole cipher on one round of hardware used 16 times. A small ROM-based
controller sequences it, and a system-level controller lets the host stream blocks through
it back to back, one block every 16 clock cycles (90 Mbit/s at 15 MHz).

## The round

With sub-keys `K1,i` (for S-boxes 1–8) and `K2,i` (for S-boxes 9–16), one encryption round is

```
A_i = B_{i-1}
B_i = C_{i-1} ^ f2(B_{i-1}, K2,i)        f1: E, XOR K1,i, S-boxes 1-8,  P
C_i = A_{i-1} ^ f1(B_{i-1}, K1,i)        f2: E, XOR K2,i, S-boxes 9-16, P
```

The block is loaded as `{A0, B0, C0} = IP(plaintext)`. After round 16, A16 and B16 are
interchanged, so `ciphertext = IP^-1(B16, A16, C16)`.

Decryption works because A_i equals B_{i-1}, so both f outputs of a round can be recomputed
from A_i. If A and B are exchanged, a round with the same equations, using K1 on the C side
and K2 on the A side, recovers (B_{i-1}, A_{i-1}, C_{i-1}). In hardware:

* **Loading needs no special swap.** Loading `IP(ciphertext)` as it stands puts B16 in A and
  A16 in B.
* **The banks are swapped.** The two 2-to-1 multiplexers after the banks (`edes_round`)
  route f2 to the A-side XOR array and f1 to the C side. Each bank keeps its own key:
  S-boxes 1–8 always get K1, S-boxes 9–16 always get K2.
* **The sub-keys come in reverse order**, K16 first.
* **The end of the block is unchanged.** The final interchange and IP^-1 are the same as
  for encryption.

`edes_round_tb` checks this property on single rounds. `edes_top_tb` checks it on whole
blocks: every ciphertext it produces decrypts back to its plaintext.

## Datapath (`edes_top`)

```
data_in -> [data_in_reg] -> ip96 -> 2:1 mux -> [A | B | C]  (abc_regs)
                                       ^           |
                                       |      edes_round  <- K1,i, K2,i  (key_gen)
                                       +-----------+
                 {right XOR, B, left XOR} -> ip96_inv -> [data_out_reg] -> data_out
```

* **Round outputs.** The three round outputs feed back into A, B and C. The Data-Out
  register is loaded in the round-16 cycle, straight from the round logic. Its 96 bits are
  the right (C-side) XOR array, then the B register, then the left (A-side) XOR array. That
  ordering is exactly (B16, A16, C16), so the final interchange costs no logic.
* **S-box wiring.** Each S-box (`sbox`) is a 64×4 ROM behind a two-stage decoder. The first
  stage splits the six address pins into three pairs. Each pair is decoded with two-input
  ANDs, giving 12 AND2 gates and 6 inverters. The second stage makes 64 word lines with
  three-input ANDs. The input bits reach the address pins in a fixed scrambled order:
  x1→a, x2→f, x3→b, x4→c, x5→d, x6→e. The stored words are arranged so that x1,x6 still
  select the row and x2..x5 the column, as in DES.
* **Combinational blocks.** `e_box`, `p_box`, `pc2_box`, `ip96` and `ip96_inv` are pure
  wiring.

## Key path

* **Key register.** `load_key` stores both 64-bit keys (K1 = `key_in[127:64]`,
  K2 = `key_in[63:0]`) after parity removal and PC-1. This is `key_register`, 2×56 bits.
  It raises Key Register Full.
* **Parity check.** `key_parity_check` checks every key byte for odd parity and holds
  Key Error until the next key load.
* **Key generator.** `key_gen` holds four 28-bit shift halves (`key_shift_half`: C and D
  of each key) and two PC-2 boxes. Each bit of a shift half has a 3-to-1 multiplexer: load,
  rotate left by one or rotate left by two. A row of straight/reverse multiplexers sits in
  front of the load input, and another row at the output. In decryption both rows reverse
  the bit order. Rotating the reversed key left is the same as rotating the key right, so
  the same left-only shift logic walks the schedule backwards. The shift schedule is the
  DES one: 1,1,2,2,2,2,2,2,1,2,2,2,2,2,2,1.
* **Size.** Per key bit there is one 3-to-1 multiplexer, two straight/reverse 2-to-1
  multiplexers and one flip-flop. Over the 112 key bits that is 112, 224 and 112
  flip-flops, the same as 224 latches.
* **Sub-key timing.** Each shift half outputs the value its register will take at the next
  edge, not the value it holds now. So the sub-key used in a clock cycle is the rotation
  chosen by that cycle's controller word.

## Control and timing

`crypt_ctrl` is a 5-bit counter stepping through 7-bit ROM words:
`{ld_sel, key_op[1:0], key_clk, abc_clk, out_clk, last}`.

| counter | encryption ROM (17 words)          | decryption ROM (16 words)            |
|---------|------------------------------------|--------------------------------------|
| 0       | load A/B/C from Data-In, load key  | (same load word, read from the encryption ROM) |
| 1       | round 1, rotate 1 → K1             | round 1, reload key → K16            |
| 2..16   | rounds 2..16, rotate per schedule  | rounds 2..16, schedule backwards → K15..K1 |
| 16      | also clock Data-Out, last          | also clock Data-Out, last            |

The counter drives a word-line decoder shared by both ROMs. It has five inverters, two 2-to-4
predecoders (on bits 4:3 and 2:1, eight AND2 gates) and one AND3 per word line, 17 in all.
Each ROM bit line is the OR of that bit over the selected words.

* **A block started from idle takes 17 clock cycles**, from the load word to the Data-Out
  clock. ITERATION READY (`iteration_ready`) pulses for one cycle after each result. The
  result stays in Data-Out for at least the next 15 cycles.
* **Launching (`sys_ctrl`).** While `start` is high and a key is loaded, `sys_ctrl` launches
  a block as soon as Data-In holds one. If a block is running, the launch waits for that
  block's last word. The `encrypt` pin is sampled at launch and holds for the whole block.
* **Chaining: 16 cycles per block.** A launch on the last word can skip the load word. In
  that round-16 cycle, two things happen at once: Data-Out takes the finished block through
  IP^-1, and A/B/C take the next block through IP. The counter then restarts at word 1.
  Skipping the load word also skips its key load, so `sys_ctrl` chains only when the
  key-shift registers are already right for the next round 1:
  * the next block decrypts: its first decryption word reloads the key anyway; or
  * the next block encrypts, the previous one encrypted, and no key was loaded since the
    last load word. The 28 positions of rotation in one block bring the registers back to
    rotation 0.

  In every other case (an encryption right after a decryption, or the first encryption after
  LOAD KEY) the 17-word sequence runs. A chained stream delivers 96 bits every 16 cycles:
  90 Mbit/s at 15 MHz.
* **Input register.** INPUT REGISTER EMPTY (`input_reg_empty`) rises after the block has
  been taken into A/B/C. From then on the host may write the next block while the current
  one runs.
* **Loading a key.** Do it between blocks. A running encryption does not read the key
  register after its load word, but a running decryption reloads it in its first round
  word, so a key loaded in the first two cycles of a decryption changes that block.

### Ports of `edes_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `data_in`, `load_data` | in | 96, 1 | block and its write strobe into Data-In |
| `key_in`, `load_key` | in | 128, 1 | {K1, K2} with parity bits; LOAD KEY |
| `start` | in | 1 | START (level) |
| `encrypt` | in | 1 | 1 = encrypt, 0 = decrypt; sampled at launch |
| `input_reg_empty` | out | 1 | INPUT REGISTER EMPTY |
| `iteration_ready` | out | 1 | ITERATION READY pulse |
| `key_reg_full`, `key_error` | out | 1 | key status |
| `busy` | out | 1 | a block is in progress |
| `data_out` | out | 96 | result |

Bit order: every vector is `[N-1:0]`, and bit 1 of the classic DES tables is the MSB. A is
`[95:64]`, B is `[63:32]` and C is `[31:0]`.

## Where this RTL goes beyond its source, and how far to trust it

The structure follows the published EDES hardware description: the blocks, the multiplexers,
the ROM controllers and the key circuit. Several contents and interfaces were never
published. They were filled in as follows:

* **Tables.** E, P, PC-1, PC-2, the shift schedule and S-boxes 1–8 are the standard DES
  ones; the EDES keeps "the same P, E and S-boxes". **The contents of S-boxes 9–16 are
  not known**, so S-box n+8 reuses the DES table of S-box n. Because of this, the
  ciphertexts will not match another EDES implementation that uses different S9–S16
  tables. To change them, edit `edes_pkg::S_TAB` and how `sbox` picks its table.
* **96-bit IP.** Its table is not published either. `ip96` applies the DES IP rule to
  twelve bytes: bits 2,4,6,8 then 1,3,5,7 of every byte, last byte first. With eight bytes
  this rule gives the DES IP exactly.
* **Controller ROM depths and throughput.** The 17 encryption / 16 decryption words are kept
  by sharing the load word between the modes. A 17-word sequence cannot give the stated
  throughput of about 90 Mbit/s at 15 MHz, which needs 16 cycles per block. Chaining
  resolves this: the next block is loaded during round 16. The rule for when chaining is
  allowed is this design's own.
* **Interface.** Parallel 96-bit and 128-bit ports with write strobes replace the chip's
  32-pin interface, whose multiplexing is not described. START is a level, ITERATION READY
  is a one-cycle pulse, and a launch requires a loaded key. These are all choices of this
  design.
* **Key Error.** The source proposes the parity check but does not build it. Here it is
  built, with odd parity per byte.
* **Key register contents.** The key register holds the 112 key bits after parity removal.
  The parity bits are checked on their way in, and only Key Error is kept.
* **Not modelled.** The physical side is not modelled: the transistor-level ROM cells, the
  standard cells, the 1.2 µm layout.

### Verification

Every module has a self-checking testbench in `tb/`, each ending with a `TB_RESULT` line.

* **Reference model.** `tb/edes_ref_pkg.sv` is a behavioural model written from the round
  equations.
* **DES known answers.** The DES-derived parts are checked against published values. Key
  133457799BBCDFF1 must give PC-1 halves F0CCAAF/556678F, K1 = 1B02EFFC7072 and
  K16 = CB3D8B0E17F5. Other checks: f(F0AAF0AA, K1) = 234AA9BB and E(F0AAF0AA) =
  7A15557A1555.
* **`edes_top_tb`**, which runs the default configuration:
  * encrypts ten random plaintexts back to back, then decrypts them back to the plaintexts;
  * alternates encryption and decryption;
  * loads a new key while an encryption runs, so the next encryption must not chain;
  * reloads the key and restarts from idle;
  * injects a key parity error.

  It checks every result against the reference model. It checks the block latency: 17 cycles
  unchained, 16 chained. It checks the 16-cycle spacing of chained results, and that each
  launch chains exactly when the rule above allows it. It counts each mechanism (chained and
  unchained back-to-back blocks, mode switch, writes while busy, key reload, key reload
  while streaming, idle restart, key error) and fails if any never happened.
* **`edes_fcount_tb`** measures how often each sub-block passes through an f function. It
  flips single input bits of the round to find the wire paths (B→A plain, A→C and C→B
  through an XOR array) and follows them through 16 rounds. A0 must end in C16 after 11 f
  operations, B0 in A16 after 10, and C0 in B16 after 11.

There is no independent EDES test vector: the EDES ciphertexts are checked only against the
reference model, which shares the DES tables and the S9–S16/IP assumptions above.

## Simulating

Verilator 5 example for the full unit:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/edes_pkg.sv tb/edes_ref_pkg.sv tb/edes_top_tb.sv --top-module edes_top_tb
./obj_dir/Vedes_top_tb
```

Any other block works the same way with its `<module>_tb`. The package `rtl/edes_pkg.sv`
holds the shared widths, tables, the control-word struct and the key-operation enum. Read it
first when changing the design.
