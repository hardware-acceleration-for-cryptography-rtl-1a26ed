# Hotspot accelerators for nine cryptographic algorithms

Software implementations of ciphers and hashes spend most of their time in a
few small functions: an S-box lookup, a modular multiply, one round of a
Feistel network. Profile the program, find those *hotspot functions* (or
*hot-blocks*, a few hot lines inside a larger function), and move only them
into hardware. The processor keeps running the rest of each algorithm. Each
hotspot becomes a small finite-state machine (FSM) of one to eight states,
attached to the processor bus as a memory-mapped unit.

This RTL implements that set of accelerators for the nine algorithms of the
original study: AES, RSA, 3DES, RC5, MD5, IDEA, Blowfish, SHA-1 and ECC. SHA-1
and ECC have no unit. The study found no worthwhile hotspot in SHA-1 and did
not accelerate ECC. The remaining ten units sit behind one register slave,
`crypto_accel_top`.

| Unit | Module | Hotspot it replaces | FSM states | start→done |
|---|---|---|---|---|
| 0 | `rsa_power` | RSA `Power()`: 2^N, N ≤ 31 (32-bit barrel shifter) | 1 | 1 cycle |
| 1 | `aes_subbytes` | AES `SubBytes()`, encryption | 1 | 1 |
| 2 | `aes_subbytes` | AES `SubBytes()`, decryption (used by the key expansion) | 1 | 1 |
| 3 | `aes_inv_subbytes` | AES `InvSubBytes()` | 1 | 1 |
| 4 | `aes_inv_mixcolumns` | AES `InvMixColumns()`, one column | 6 | 6 |
| 5 | `blowfish_f` | Blowfish `F()` | 3 | 3 |
| 6 | `rc5_keyxp` | RC5 key-mixing loop (`KEYXP_RC5`) | 3 per iteration | 1 + 9·max(T,C) = 235 |
| 7 | `des_round` | one DES round of 3DES (`ROUND_3DES`) | 3 | 3 |
| 8 | `md5_p` + 4 × `md5_step` | the 64 MD5 steps of a block (`P_MD5`) | 2 per step module | 1 + 3·64 = 193 |
| 9 | `idea_mul` | IDEA multiply mod 2^16+1 (`MUL_IDEA`) | 4 | 4 |

The state counts are those of the original design. In every unit the
start-to-done latency equals its state count, except for the two units that
loop (RC5 and MD5).

## Common conventions

All modules import `crypto_pkg`, which holds the shared types, tables and
constant functions. All units use the same handshake:

* `start` is a one-cycle pulse. The edge that samples it latches the
  operands; this is the unit's first state.
* `done` is a one-cycle pulse in the first cycle the results are valid.
  The results then stay put until the next `start`.
* `busy` is high between the two. A `start` while busy is illegal, and an
  assertion in each multi-cycle unit checks this. The top drops such a start.
* `rst_n` is an asynchronous, active-low reset. It clears the state, the
  operand and result registers, and the `done` outputs. Table memories
  (Blowfish S-boxes, RC5 `S` and `L`) are not reset.

Constant tables are not stored as literal data where they can be computed:

* The AES S-box and its inverse are built during elaboration. The build
  takes the multiplicative inverse in GF(2^8), computed as a^254, then
  applies the affine map.
* The DES S-boxes, E and P, and the MD5 constants are the published values.
  They are listed in `crypto_pkg`, with the MD5 constants defined as
  T[i] = ⌊2^32·|sin(i+1)|⌋.

## The units

### `rsa_power`: barrel shifter

The RSA program spends its time computing 2^N for N ≤ 31. The unit is a
32-bit shifter of five stages, shifting by 1, 2, 4, 8 and 16. It takes a
general operand, so `value = 1` gives 2^N. The result register is the single
state.

### `aes_subbytes`, `aes_inv_subbytes`: byte substitution

Each unit looks up one byte per operation in a 256-entry ROM and takes one
cycle.

There are two `SubBytes` instances, following the original accounting: one
serves encryption, the other the key expansion inside decryption. A
processor can equally use one instance for both.

### `aes_inv_mixcolumns`: six states for one column

InvMixColumns multiplies each column by the constants 0e, 0b, 0d and 09 in
GF(2^8). The unit gets these multiples from one chain of doublings (xtime),
so the work splits into dependent steps, one per state:

1. **LOAD**: read the column into the `a` registers. This happens on the
   start edge.
2. **X2**: compute 2a.
3. **X4**: compute 4a.
4. **X8**: compute 8a.
5. **COMB**: form each output byte as
   b_i = 0e·a_i ⊕ 0b·a_{i+1} ⊕ 0d·a_{i+2} ⊕ 09·a_{i+3}, where
   09 = 8a⊕a, 0b = 8a⊕2a⊕a, 0d = 8a⊕4a⊕a and 0e = 8a⊕4a⊕2a.
6. **STORE**: write the result to `col_out` and raise `done`.

The original design gives the six-state outline: load, four dependent
multiply steps, store. Which operations go into the four middle states is
this design's reading of it. Row 0 of the column is in bits [31:24].

### `blowfish_f`: F(x) = ((S0[a] + S1[b]) ⊕ S2[c]) + S3[d]

1. Split x into four byte indices.
2. Read the four S-boxes in parallel.
3. Add, XOR, add.

Blowfish's S-boxes are produced by its key schedule, so they cannot be a
ROM. Here they are four 256 × 32-bit RAMs inside the unit, loaded by the
processor through `sb_we`/`sb_sel`/`sb_addr`/`sb_wdata`. The key schedule
itself runs in software. An assertion forbids writes while busy.

### `rc5_keyxp`: the key-mixing loop

The unit runs the whole loop

```
A = B = i = j = 0
repeat 3·max(T, C):
    A = S[i] = (S[i] + A + B) <<< 3
    B = L[j] = (L[j] + A + B) <<< (A + B)
    i = (i+1) mod T ;  j = (j+1) mod C
```

with three states per iteration: MIX_S, MIX_L and ADVANCE. The tables are
inside the unit.

* Before `start`, the processor loads `L`, the key as little-endian 32-bit
  words. It also loads `S`, initialised with the constants P32 and Q32; that
  initialisation is the cheap part and stays in software.
* After `done`, the processor reads `S` back.
* The defaults are RC5-32/12/16: `T = 26` and `C = 4`. The source gives no
  RC5 sizes. Change `T` and `C` for other round counts or key lengths.

### `des_round`: one round of (triple) DES

L' = R, R' = L ⊕ P(S(E(R) ⊕ K)), in three states:

1. Expand R and XOR the 48-bit subkey. This gives two 24-bit halves
   computed side by side; the original describes "two outputs" here.
2. Use the two halves as indices into the eight S-boxes.
3. Apply the permutation P (the eight SP columns) and XOR into L.

The original describes these states only loosely: parallel computations,
then a lookup, then eight lookups XORed together. The split above is an
interpretation, and the result is exactly one standard DES round.

The processor does the rest:

* the initial and final permutations;
* the key schedule;
* the final swap;
* the 16 (DES) or 48 (3DES) round calls.

`subkey` uses the standard 48-bit bit order, in which bit 1 is the MSB.

### `md5_p` and `md5_step`: the 64 MD5 steps

`md5_step #(ROUND)` computes one step, a' = b + ((a + fn(b,c,d) + X[k] + T[i]) <<< s),
in two states:

1. Evaluate fn (F, G, H or I, chosen by `ROUND`). In parallel, form
   a + X[k] + T[i].
2. Add, rotate, add.

`md5_p` holds four step modules, one per round. It calls module r for steps
16r … 16r+15:

* It computes the message index k for each step: i, (5i+1) mod 16,
  (3i+5) mod 16 and 7i mod 16 for the four rounds.
* After each step it rotates the working words: (a,b,c,d) ← (d,a',b,c).

Each step costs three cycles: the issue cycle (its closing edge is the step
module's first state), the module's second state, and the cycle in which the
controller takes a' while the module's done is high. With the start cycle, a
block therefore takes 1 + 3·64 = 193 cycles.

Message padding and the final addition of the chaining value stay in
software, like the rest of MD5. `chain_out` is the state after 64 steps,
before that addition.

### `idea_mul`: multiplication modulo 2^16+1

In IDEA, the 16-bit value 0 stands for 2^16. The four states are:

1. **INIT**: latch the operands and note which of them are zero.
2. **MULTIPLY**: form the 32-bit product.
3. **SHIFT**: split it into lo = p[15:0] and hi = p >> 16.
4. **ADD**: compute lo − hi + (lo < hi). If an operand is zero, compute
   1 − (the other operand) instead.

The original gives only the four-state outline. This reduction is the
standard one.

## `crypto_accel_top`: register map

In the original system the units hang off a soft processor's bus. Here a
plain single-cycle register slave stands in for that bus:

* `bus_addr` is a 16-bit word address. Bits [15:12] select the unit, with
  the numbering in `crypto_pkg::unit_e`. Bits [11:0] select the register.
* Writes take effect on the clock edge while `bus_we` is high.
* `bus_rdata` is combinational from `bus_addr`.
* The units run independently, and several can be busy at once.
* There is no interrupt; software polls.

| Offset | Unit | Access | Meaning |
|---|---|---|---|
| 0x000 | all | W | bit 0 = start (ignored while busy) |
| 0x000 | all | R | bit 0 = done (sticky, cleared by the next start), bit 1 = busy |
| 0x001 / 0x002 / 0x003 | RSA | W / W / R | value / amount[4:0] / result |
| 0x001 / 0x002 | SubBytes ×2, InvSubBytes | W / R | input byte / output byte |
| 0x001 / 0x002 | InvMixColumns | W / R | column (row 0 in [31:24]) / result |
| 0x001 / 0x002 | Blowfish | W / R | x / F(x) |
| 0x400 + 256·t + i | Blowfish | W | S-box t, entry i (ignored while busy) |
| 0x100 + i, 0x200 + j | RC5 | R/W | S[i], L[j] (writes ignored while busy) |
| 0x001–0x004 | DES | W | L, R, subkey[47:32], subkey[31:0] |
| 0x005 / 0x006 | DES | R | L' / R' |
| 0x010 + k | MD5 | W | message word X[k] |
| 0x020 + n | MD5 | W | chaining words a, b, c, d in |
| 0x030 + n | MD5 | R | a, b, c, d after 64 steps |
| 0x001 / 0x002 / 0x003 | IDEA | W / W / R | a / b / a ⊙ b |

Parameters: `RC5_T` (26) and `RC5_C` (4), passed to the RC5 unit.

## How far to trust it, and where it departs from the original

Every unit is checked against independent references and published test
vectors (next section). The open points are in how the original was read,
not in the arithmetic:

* **Bus.** The original attaches the units to a vendor processor bus. That
  bus protocol is not modelled; the register slave above replaces it. To put
  the design on a real bus, wrap `crypto_accel_top` in a bus adapter.
* **Lookup tables.** The original keeps the AES and Blowfish tables in a
  cache close to the unit. Here the AES tables are ROMs inside the unit, and
  the Blowfish S-boxes are RAMs loaded over the register port.
* **State contents.** The state counts follow the original. What each state
  of InvMixColumns, the DES round and the MD5 step does is a reasonable
  reading of a brief description.
* **Boundaries of the hardware.** Where the original does not draw the line
  between hardware and software, this design draws it as follows. RC5 runs
  the whole mixing loop but not the P/Q initialisation. MD5 runs all 64
  steps but not the padding or the feed-forward. DES runs one round per
  call.
* **MD5 pace.** The MD5 controller spends one extra cycle per step, so a
  block takes 193 cycles rather than the 129 of a tighter schedule.
* **Cost and speed figures.** The original reports FPGA slice, flip-flop and
  LUT counts, and speed-ups over software. This RTL is not tuned to
  reproduce those numbers. In particular, its 1-state units hold a full
  256-entry table each, which the original apparently placed outside the
  unit.
* **Not included.** ECC and SHA-1 have no unit, and neither does the
  processor.

## Verification

Each testbench in `tb/` is self-checking. It prints
`TB_RESULT checks=N failures=M`, and a watchdog ends it if it hangs. The
unit testbenches and `tb_crypto_accel_top` also check each operation's
start-to-done latency against the state count.

| Testbench | What it checks |
|---|---|
| `tb_rsa_power` | 2^N for all N; random shifts against a multiply by 2^N |
| `tb_aes_subbytes`, `tb_aes_inv_subbytes` | All 256 entries against an S-box built by brute-force inverse search and a bitwise affine map; published entries |
| `tb_aes_inv_mixcolumns` | Published MixColumns columns in reverse; random columns against a matrix product |
| `tb_blowfish_f` | Random S-boxes, random inputs |
| `tb_rc5_keyxp` | Table against a reference loop; RC5-32/12/16 encryption with the read-back table reproduces both published vectors |
| `tb_des_round` | Full DES (key schedule and IP/FP in the testbench, rounds in the unit) reproduces two published vectors; decrypt(encrypt(x)) = x for random keys |
| `tb_md5_step` | Each round function against a reference whose constants are computed with `$sin` |
| `tb_md5_p` | Digests of "", "abc" and "The quick brown fox jumps over the lazy dog" |
| `tb_workloads` | Complete blocks through the top, with every hotspot call going to its unit: AES-128 encryption and decryption (FIPS-197 C.1), 3DES EDE (SP 800-67 example), Blowfish (random key material, against a software model and decrypted back), RC5-32/12/16, two-block MD5, IDEA (published vector). It also counts the unit calls per block, for example 200 SubBytes calls for an AES-128 encryption. |
| `tb_crypto_accel_top` | All ten units through the register port, at default parameters, plus the top's own mechanisms (see below) |

The top's own mechanisms, each counted and required at least once:

* a start while busy is ignored;
* an S-box write while busy is dropped;
* two units run at the same time;
* the sticky done flag is cleared.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/crypto_pkg.sv \
          tb/tb_md5_p.sv --top-module tb_md5_p -Mdir obj_md5_p
./obj_md5_p/Vtb_md5_p
```

Substitute any other testbench name. `crypto_pkg.sv` must come first; the
modules are found through `-y rtl`. Every testbench finishes in well under a
second.
