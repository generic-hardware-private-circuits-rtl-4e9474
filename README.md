# Generic Hardware Private Circuits (GHPC) in SystemVerilog

Masking protects a hardware cipher against power side channels by splitting
every secret bit into random shares. Linear operations then work on each share
separately. Non-linear operations need a *gadget*: a small circuit that stays
secure when glitches briefly combine its inputs, and when its output feeds the
next gadget. Hand-made gadgets exist mainly for 2-input AND gates. A masked
S-box built from them needs one register stage per AND level, plus fresh
randomness for every AND.

The GHPC construction turns **any** Boolean function `F : F2^n -> F2^m`,
given only as a truth table, into a first-order secure gadget with two
shares. The gadget is composable under the PINI notion (probe-isolating
non-interference). The latency is fixed whatever `F` is:

| gadget  | register stages | fresh random bits per evaluation |
|---------|-----------------|----------------------------------|
| GHPC    | 2               | `m`                              |
| GHPC-LL | 1               | `m * 2^n`                        |

This repository holds:

- both gadgets, written generically;
- the LFSR mask generator used with them;
- three masked cipher cores built around the gadgets: a byte-serial AES-128,
  a nibble-serial PRESENT-80 and a round-based PRESENT-128.

The construction and the case-study architectures come from the GHPC paper,
"Generic Hardware Private Circuits: Towards Automated Generation of
Composable Secure Gadgets". Sizes, latencies and every departure from that
paper are listed below.

## The gadget: Shannon decomposition over one share

Write the input as two shares, `x = x0 ^ x1`. If share `x1` is fixed to a
value `i`, the function becomes `F(x0 ^ i)`. That is a function of share `x0`
alone: one of the 2^n Shannon cofactors of the shared function with respect
to `x1`. The gadget computes all cofactors from `x0` and uses `x1` only to
choose among them. No gate ever sees both shares of the same variable before
a register has cut the glitch path.

`rtl/ghpc.sv` (Algorithm 2 / Figure 2 of the paper):

```
stage 1 (domain 0):  t[i] <= F(x0 ^ i) ^ r             for i = 0 .. 2^n-1
stage 2 (domain 1):  m[i] <= t[i] & PRODUCT(i, x1)      PRODUCT = minterm "x1 == i"
output:              o1    = XOR of all m[i]            = F(x) ^ r
                     o0    = r delayed by two cycles
```

Each stage-1 register holds one cofactor, blinded by the same mask `r`. It is
a function of `x0` and `r` only. In stage 2 exactly one `m[i]` is non-zero.
Because every `t[i]` is blinded, seeing `x1` together with a `t[i]` reveals
nothing. The output is a fresh textbook sharing `(r, F ^ r)`.

**The output share indices are fixed.** `o1` carries information about which
`x1` was selected, so it belongs to share domain 1. `o0` belongs to domain 0.
Connecting `o0` where a domain-1 share is expected breaks the PINI argument,
even though the values still recombine correctly. All cores here keep share
0 in domain 0 throughout.

`rtl/ghpc_ll.sv` (Algorithm 3 / Figure 4): every cofactor gets its own mask
`r_i`. Once the stored cofactors are independently blinded, selecting them
combinationally by `x1` is already safe, so the second register stage goes
away. `o1 = F ^ r_x1` is combinational from the stage-1 registers. `o0` must
be the same `r_x1`: a plain multiplexer driven by `x1` selects it from the
mask bus, and it is registered. The price is `m * 2^n` random bits per
evaluation, which is 2048 bits per cycle for the AES S-box.

Both gadgets take these parameters:

| parameter  | meaning                                                        | default   |
|------------|----------------------------------------------------------------|-----------|
| `N`, `M`   | number of inputs and outputs of `F`, each at most 8            | 8, 8      |
| `TABLE`    | truth table; output `F(v)` at bits `[v*M +: M]`                | AES S-box |
| `PIPELINE` | keep the optional pipeline registers on `x1` (and `r`)         | 1         |

With `PIPELINE = 1` a gadget takes a new input every cycle. With
`PIPELINE = 0` the pipeline registers on `x1` (and, for GHPC, on `r`) are
removed. The caller must then hold `x1` for the whole evaluation, and for
GHPC also `r`. This is the non-pipelined form the paper uses for its area
figures.

`rtl/ghpc_pkg.sv` provides tables for these functions:

- `LUT_AND2` and `LUT_AND3`, the paper's AND examples;
- `LUT_PRESENT`, `LUT_PRINCE`, `LUT_SKINNY64` and `LUT_RECTANGLE` (4-bit S-boxes);
- `LUT_AES`, computed from the GF(2^8) inverse and the affine map.

For another function, pass your own `lut_t` constant. No other change is
needed.

## Randomness source

`rtl/lfsr31.sv` is a 31-bit LFSR with polynomial `x^31 + x^28 + 1`.
`rtl/prng.sv` places one LFSR per random bit, so `NBITS` LFSRs give `NBITS`
bits per cycle. Reset loads a distinct, non-zero seed into each LFSR. Seed
`k` is `((k + 1 + SEED_BASE) * 0x9E3779B1) mod 2^31`. The LFSRs are the
paper's; the seed formula is this design's. An LFSR is not a cryptographic
generator. It is what the paper measured with, and you can replace it with
any source that gives fresh bits every cycle.

## Byte-serial AES-128 (`rtl/aes_byte_serial.sv`)

State and key are each held as two 128-bit shares. Byte `k` of the usual
FIPS-197 byte string sits at bits `[8k +: 8]`. One masked AES S-box gadget
serves both the rounds and the key schedule. It receives 8 fresh bits per
cycle for GHPC, or 2048 bits for GHPC-LL. AddRoundKey, ShiftRows,
MixColumns and the XOR chain of the key schedule act on each share
separately. The round constant goes into share 0 only.

A round lasts `21 + LAT` cycles, where `LAT` is the S-box latency (2 or 1):

| cycle `t`     | S-box input                  | other work                                                    |
|---------------|------------------------------|---------------------------------------------------------------|
| 0 .. 3        | key bytes 13, 14, 15, 12 (RotWord of the last word) | MixColumns + AddRoundKey of column `t` of the previous round (rounds 2..10) |
| 4 .. 19       | state bytes 0 .. 15          | results come back `LAT` cycles later and are written in place |
| `LAT + 4`     |                              | next round key, built in one cycle from the SubWord buffer    |
| `20 + LAT`    |                              | ShiftRows on both shares                                      |

The first AddRoundKey happens while the inputs load. After round 10, four
more cycles add the last round key column by column, with no MixColumns.
From the clock edge that takes `start` to the edge that raises `done`, an
encryption takes `10*(21+LAT) + 4` edges: 234 with GHPC and 224 with
GHPC-LL. The handshake works as follows:

- `start` is taken while `busy` is low, together with `pt0/pt1/key0/key1`.
- `done` pulses for one cycle.
- `ct0/ct1` hold the result until the next start.

## Nibble-serial PRESENT-80 (`rtl/present_nibble_serial.sv`)

One masked PRESENT S-box gadget serves the state and the key schedule. It
receives 4 fresh bits per cycle for GHPC, or 64 for GHPC-LL. In round `j`
the counter `t` runs as follows:

- For `t = 0..15`, state nibble `t` is XORed with round-key nibble `t` (key
  bits `[16+4t +: 4]`) and enters the gadget in the same cycle.
- At `t = 16`, the top nibble of the key rotated left by 61 enters.
- The S-box results return `LAT` cycles later and are written in place.
- At `t = 16 + LAT`, the bit permutation is applied to the whole state, and
  the key takes its rotated value with the new top nibble. The round counter
  goes into bits `[19:15]` of key share 0.

A final cycle adds the last round key. Latency is `31*(17+LAT) + 1` edges:
590 for GHPC and 559 for GHPC-LL. The handshake is the same as for the AES
core.

## Round-based PRESENT-128 (`rtl/present_round_based.sv`)

Eighteen gadgets compute a whole round: 16 for the state and 2 for the two
top key nibbles of the PRESENT-128 key schedule. Their registers are the
only state register. At the loop input:

- the state shares are XORed with the round key and enter the 16 state
  gadgets;
- the key shares are rotated left by 61; their top byte enters the two key
  gadgets;
- the other 120 key bits travel through `LAT` plain delay registers, with
  the round counter XORed into bits `[66:62]` of share 0.

`LAT` cycles later, the permuted gadget outputs and the re-assembled key
re-enter the loop.

With GHPC the loop is two cycles deep, so it holds **two independent
encryptions** at once, in alternate cycles. Each encryption advances one
round every second cycle, and both finish after 62 cycles. With GHPC-LL the
loop holds one encryption, which takes 31 cycles.

A token (valid bit and round number) travels with each slot:

- `in_ready` is high when the slot now at the loop input is free.
- An encryption enters when `in_valid && in_ready`.
- `out_valid` is high for one cycle, `31*LAT` cycles after entry. The
  ciphertext shares are on `ct0/ct1` in that cycle only.
- A slot that finishes can take a new encryption in the same cycle.

Fresh randomness is 72 bits per cycle for GHPC and 1152 for GHPC-LL.

## Top level (`rtl/ghpc_top.sv`)

The three cores stand side by side, each fed by its own `prng` with a
disjoint seed range. Their ports are brought out with the prefixes `aes_`,
`ps_` and `pr_`. `LOW_LATENCY` (default 0) selects GHPC or GHPC-LL for all
three. Inputs and outputs are always in shared form: the caller splits
plaintext and key into two random shares and XORs the two ciphertext shares.

## Where this RTL departs from the paper

- **AES cycle count.** The paper gives two different totals: 23 cycles per
  round and 230 per encryption in the text, and 215 (GHPC) / 205 (GHPC-LL)
  in its results table. The paper does not reproduce the underlying
  architecture, so the schedule above is this design's own. It keeps 23
  cycles per round and the paper's 22-cycle S-box phase (2 latency, 16 state
  bytes, 4 key bytes). It reaches 234 / 224 cycles in total.
- **AES key update.** The paper updates the key while MixColumns runs, over
  four cycles. Here the key update takes one cycle inside the S-box phase,
  and MixColumns overlaps the key-byte S-box feeds of the next round.
- **Nibble-serial PRESENT.** The paper shifts state and key registers by one
  nibble per cycle. Here a counter addresses the nibbles in place, with the
  same work per cycle. The paper reports 607 / 576 cycles; this design takes
  590 / 559. The key length is not stated in the paper. 80 bits is used, as
  in the nibble-serial design it builds on.
- **Round-based PRESENT key length.** Not stated in the paper either.
  128 bits is inferred from the paper's randomness figures (72 = 18 x 4
  bits, which needs two key-schedule S-boxes).
- **GHPC-LL `o0` multiplexer.** The paper's algorithm selects the mask
  through the pipelined selection signals. Here the multiplexer uses the `x1`
  of the sampling cycle, so that both output shares have one cycle of
  latency.
- **Not provided:**
  - the Prost and Class-13 S-box tables (any 4-bit table can be passed in);
  - the S-boxes built from GHPC-LL AND gates, whose gate-level S-box circuits
    come from other work;
  - unprotected reference cores.
- **Pipeline switch in the cores.** The gadgets have a `PIPELINE` parameter,
  but the cipher cores always instantiate them with the pipeline registers.
  The paper's case studies were measured that way. Running a core on
  non-pipelined gadgets would need a different schedule, and that schedule
  is not provided.
- **Handshakes, reset, byte order and seeds** are this design's choices.
  The paper does not specify them.

## How far to trust it

Each block has a self-checking testbench in `tb/`. The reference models in
`tb/tb_ref_pkg.sv` are written independently of the RTL. They are themselves
checked against the published test vectors:

- AES-128: FIPS-197 C.1;
- PRESENT-80 and PRESENT-128: the all-zero key and plaintext vectors.

The testbenches check:

| testbench                  | what it checks |
|----------------------------|----------------|
| `tb_ghpc`, `tb_ghpc_ll`    | AND2, AND3, the PRESENT, PRINCE, Skinny-64 and Rectangle S-boxes, and the AES S-box, with and without pipeline registers. For each: `o0` is the right mask, `o0 ^ o1 = F(x0 ^ x1)`, and the latency is exact. All unshared input values are covered. |
| cipher-core testbenches    | Random plaintexts and keys, randomly shared, for both gadget types: the ciphertext, that share 0 alone is not the ciphertext, and the exact cycle count. |
| `tb_ghpc_top_ll`           | The full design with `LOW_LATENCY = 1`: every ciphertext and latency (224 / 559 / 31 cycles). |
| `tb_ghpc_top`              | The full design at default parameters. It counts the key-byte and state-byte S-box feeds, the MixColumns overlap, the final key addition, the key S-box and permutation cycles, two round-based encryptions in flight, back-pressure on `in_ready`, and changing randomness. |

**What simulation does not show is security.** These tests check
functional correctness only. The first-order PINI security of the gadgets
rests on the paper's proofs and on the structure of the netlist. It was not
re-verified here: no probing-model verification tool and no power
measurement were run. To keep that structure intact after synthesis:

- keep the gadget hierarchy;
- do not retime or merge registers across the two stages;
- do not share logic between the cofactor path (domain 0) and the
  selection path (domain 1);
- never feed both shares of one value into a common gate outside a gadget.

The cores follow these rules. Code you add must follow them too.

## Simulating

Any testbench builds with plain Verilator 5:

```
verilator --binary --timing --assert --top-module tb_ghpc_top \
    -y rtl -y tb +libext+.sv -Irtl \
    rtl/ghpc_pkg.sv tb/tb_ref_pkg.sv tb/tb_ghpc_top.sv
./obj_dir/Vtb_ghpc_top
```

Replace `tb_ghpc_top` with any file in `tb/`:

- `tb_ghpc`, `tb_ghpc_ll`: the gadgets;
- `tb_lfsr31`, `tb_prng`: the mask generator;
- `tb_aes_byte_serial`, `tb_present_nibble_serial`,
  `tb_present_round_based`: the cores;
- `tb_ghpc_top_ll`: the whole design with GHPC-LL gadgets.

`tb_ghpc_unit.sv` is a helper that the two gadget testbenches instantiate.
Every testbench ends with `TB_RESULT checks=<n> failures=<n>`. Each has a
watchdog, and each runs in well under a second.

## Files

| file | contents |
|------|----------|
| `rtl/ghpc_pkg.sv` | truth-table type, function tables, PRODUCT selector, AES/PRESENT linear layers |
| `rtl/ghpc.sv` | two-stage GHPC gadget |
| `rtl/ghpc_ll.sv` | one-stage GHPC-LL gadget |
| `rtl/lfsr31.sv`, `rtl/prng.sv` | fresh-mask generator |
| `rtl/aes_byte_serial.sv` | masked byte-serial AES-128 |
| `rtl/present_nibble_serial.sv` | masked nibble-serial PRESENT-80 |
| `rtl/present_round_based.sv` | masked round-based PRESENT-128 |
| `rtl/ghpc_top.sv` | the three cores with their generators |
| `tb/*.sv` | testbenches and reference models |
