# Garbled AES-128 with reusable red/blue garbling keys

This is an AES-128 encryption core whose internal state never exists as plain bits.
Every bit on every internal wire is carried as an 8-bit *label*, and which label stands
for 0 or 1 depends on a 32-bit *garbling key*. Change the garbling key and every register,
table entry and wire in the datapath takes different values, and so toggles differently.
The ciphertext stays the same. The aim is to decorrelate switching activity, and so dynamic
power, from the data and the AES key, to resist differential power analysis (DPA).

The design follows a published proposal for garbled-circuit AES on an FPGA. That proposal
has two ideas:

* **Red and blue gates.** A single short garbling key is reused across the whole circuit,
  instead of a fresh key pair for every wire as in classic Yao garbling.
* **Reuse of hardware across clock steps.** The cipher is not unrolled. A controller steps
  one set of garbled units through the rounds.

The RTL adds what that description leaves open. The section "How far this follows the
original description" lists each such choice.

## Garbled wires and the garbling key

The 32-bit garbling key `gk` is split into four 8-bit keys (`gc_pkg::gkey_t`):

| key | bits of `gk` | meaning on a wire |
|-----|--------------|-------------------|
| k1  | 31:24        | 0 on a **blue** wire |
| k2  | 23:16        | 1 on a blue wire |
| k3  | 15:8         | 0 on a **red** wire |
| k4  | 7:0          | 1 on a red wire |

One plain byte is therefore 64 bits garbled, and the 128-bit AES state is 1024 bits.
Label `i` of a garbled byte (`gc_pkg::gbyte_t`) carries bit `i`. A garbling key must have
`k1 != k2` and `k3 != k4`, or labels cannot be told apart. The core asserts this when it
accepts a block.

## Red and blue gates

A **blue** gate reads blue labels (k1/k2) and writes a red label (k3/k4). A **red** gate does
the opposite. If the gate levels of a circuit alternate blue, red, blue and so on, every
gate's output is already in the colour the next gate expects. The circuit then needs only
four keys in total, however large it is, and no conversion stages.

`gc_gate` is one garbled two-input gate (AND, OR or XOR, chosen by parameter). It holds a
four-row garbled table that is computed from the keys:

```
e[va][vb] = H(kin[va], kin[vb], IDX) ^ kout[g(va, vb)]
out       = H(in1, in2, IDX) ^ e[row]          row = (in1 == kin[1], in2 == kin[1])
```

Here `kin` are the two keys of the gate's colour and `kout` those of the other colour. For
valid input labels the hashes cancel, and `out` is the output key of `g(va, vb)`. An input
label that is neither key does not cancel. The output then comes out as a label that is
almost never a valid key, so an ungarbler downstream can detect it. `H` (`gc_pkg::gc_hash`)
is a small rotate/XOR mix. For a fixed second operand it is a bijection in the first. It is
not a cryptographic hash.

`gc_xor` is a vector of XOR gates of one colour. In the original notation these are
`G(B(xor))` and `G(R(xor))`. `gc_encode` turns plain bits into labels of a chosen colour.
`gc_decode` turns labels back into bits and raises `err` on a label that matches neither key.

## Garbled GF(2^8) arithmetic

AES Mix-Columns needs multiplication by 2 and 3 in GF(2^8). Both are built from garbled XOR
gates and rewiring:

* **`gc_m2`** computes `G(B(m2))` or `G(R(m2))`. Each output bit is one garbled XOR. The two
  operands are the shifted-in bit and bit 7, where the reduction constant 0x1b has a 1.
  Anywhere else an operand is the colour's garbled 0. The byte therefore passes one gate
  level and changes colour.
* **`gc_m3`** computes `x*3 = x*2 ^ x` in two levels. The first level, in the input colour,
  produces `gc_m2(x)` and a copy of `x` (XOR with the garbled 0). The second level, in the
  other colour, XORs the two. The result is back in the **input** colour.

`gc_mixcol` transforms one column. Output byte `r` is
`2*a[r] ^ 3*a[r+1] ^ a[r+2] ^ a[r+3]`, built from five units in three colour levels:

```
 a[r] --G(B(m2))--\                                    (blue in, red out)
                   G(R(xor)) --\                       (red in, blue out)
 a[r+2],a[r+3] --G(B(xor))--/   G(B(xor)) --> m[r]     (blue in, red out)
 a[r+1] --------G(B(m3))-------/                       (blue in, blue out)
```

Blue column in, red column out.

## The AES core (`gc_aes`)

```
            plaintext, key (plain)                         gk
                 |                                          |  latched at start
        pt_q, rk_q (plain) ---- aes_key_expand (plain, one round key per step)
                 |                                   |
      gc_encode RED (pt)      gc_encode RED (rk)  gc_encode BLUE (rk)
                 \               /                       |
   m_q (red) --> G(R(xor)) x128  <- WHITEN/ARK           |
                    |                                    |
              st_q (blue) --> 16 x gc_sbox --> row shift --> sb_q (blue)
                                                          |          |
                            column col of sb_q --> gc_mixcol        G(B(xor)) x128 <- FINAL
                                                    |              |
                                           m_q[col] (red)     gc_decode RED --> ciphertext,
                                                                               label_err
```

Colour discipline per step:

| step (phase) | operation | colours |
|---|---|---|
| `PH_WHITEN` | initial AddRoundKey: plaintext and cipher key garbled red, through the shared `G(R(xor))` array | red -> blue `st_q` |
| `PH_SUB` | 16 garbled S-boxes, then ShiftRows (pure rewiring) | blue -> blue `sb_q` |
| `PH_MIX` x4 | one column of `sb_q` per clock through the single `gc_mixcol` | blue -> red `m_q` |
| `PH_ARK` | `m_q` XOR round key garbled red, the same `G(R(xor))` array | red -> blue `st_q` |
| `PH_FINAL` | round 10: `sb_q` XOR round key garbled blue, in a `G(B(xor))` array, then ungarbled with k3/k4 | blue -> red -> plain |

The S-box (`gc_sbox`) is the simplest garbled lookup that works. It matches the input labels
against k2 to form a row index, looks up the AES S-box, and re-garbles the result with k1/k2.
The S-box table is not stored as literal data. `gc_pkg::gen_sbox` computes it at elaboration
as the multiplicative inverse in GF(2^8) followed by the affine map with constant 0x63.
Synthesis maps it to 20 ROMs of 256 bytes each: 16 in the datapath and 4 in the key
schedule.

The key schedule (`aes_key_expand`) runs on plain values and holds only the current round
key. It is stepped in `PH_WHITEN` and in each `PH_ARK`. Round keys are garbled where they
are consumed.

### Controller and timing (`gc_aes_fsm`)

A block takes 1 + 9 x 6 + 2 = **57 steps**, one per clock:

```
WHITEN | SUB MIX0 MIX1 MIX2 MIX3 ARK | ... (rounds 1-9) | SUB FINAL
```

The controller holds a 3-bit phase, a round counter and a column counter. Reusing the
Mix-Columns unit costs three extra clocks per round. In return only one quarter of the
multipliers is built.

Handshake:

* `start` is sampled only when the core is idle.
* `plaintext`, `key` and `gk` are latched on that clock and may then change.
* `busy` is high for the 57 steps.
* `done` pulses for one clock, 58 clocks after the `start` clock.
* `ciphertext` and `label_err` are valid from `done` until the next block finishes.
* A `start` held high while busy is ignored.

### Cost

Yosys coarse synthesis of `gc_top` gives about 16.6k word-level cells and 3507 flip-flop
bits, mostly three 1024-bit garbled state registers. It also gives 40,960 ROM bits.

## Sample circuit (`gc_sample_circuit`)

This is the small example used to explain the red/blue scheme:
`E = (A AND B) XOR (B OR C)`. A blue AND gate and a blue OR gate feed a red XOR gate, whose
blue output is ungarbled. It is combinational: three blue labels in, the plain bit `e` and
a label-error flag `e_err` out.

## Top level (`gc_top`)

The AES core (`aes_*` ports) and the sample circuit (`smp_*` ports) sit side by side. They
share no signals except the clock and reset. Each has its own garbling key input.

## How far this follows the original description

These parts follow it:

* garbled gates with garbled tables
* the 8-bit keys k1..k4 taken from a 32-bit garbling key
* blue gates that map k1/k2 to k3/k4, and red gates that map back
* garbled XOR, m2 and m3 units in both colours
* the structure of each Mix-Columns output byte (m2 and XOR, then red XOR, then blue XOR with m3)
* the round key garbled in red and added with `G(R(xor))`
* the plaintext garbled inside the device from the user's plain inputs
* hardware reuse across controller steps, specifically of the multipliers in Mix-Columns
* the sample circuit

These are this design's own choices, where the description is silent or inconsistent:

* **Bit order of the key split.** k1 is the top byte.
* **Row selection in the garbled table.** The row is chosen by comparing each label with the
  '1' key. Point-and-permute pointer bits do not fit 8-bit keys.
* **The hash `H`.**
* **How the S-box handles garbled bytes.** The description only says the AES S-box is used,
  blue in and blue out.
* **Key schedule in plain.** The round keys are computed in plain and garbled where they
  are used.
* **Initial key addition.** It is done in red, reusing the round-key `G(R(xor))` array. This
  keeps colours alternating. The description garbles the plaintext blue and does not
  mention this step.
* **The final round.** The description takes the round-10 Mix-Columns output as the result.
  Standard AES has no Mix-Columns in round 10 and adds a last round key. This core
  implements standard AES and verifies it against the FIPS-197 vectors. Its final key
  addition is blue, because the state is blue at that point.
* **Mix-Columns coefficients.** The formula printed for `m00` uses the coefficient order
  2, 1, 1, 3. The FIPS-197 matrix (2, 3, 1, 1 per row) is used instead.
* **The controller's step list and handshake.** The original controller is said to have
  40 states, which are not listed. This one walks 57 steps with 6 working phases.
* **Error detection.** The `label_err` and `e_err` outputs are additions.
* **Latched garbling key.** The garbling key is an input latched per block. Periodic
  automatic refresh of the key, for example by an LFSR, is left as future work in the
  original and is not built.

Security caveats:

* The S-box decodes its input labels to a plain row index. The key schedule runs in plain.
  Both points leak more than a fully garbled implementation would.
* The hash is not cryptographic.

The design shows the red/blue mechanism and reproduces its experiments in simulation. It is
not a hardened implementation.

## Verification

Each module has a self-checking testbench in `tb/`, with a watchdog. Each ends by printing
`TB_RESULT checks=N failures=M`. Reference models are in `tb/tb_ref_pkg.sv`, written
independently of the RTL. Its S-box is found by searching for the inverse, not by
exponentiation.

| testbench | what it shows |
|---|---|
| `tb_gc_gate` | all functions x colours x inputs over random keys; wrong labels give invalid outputs |
| `tb_gc_xor`, `tb_gc_m2`, `tb_gc_m3` | every byte value, both colours, random keys |
| `tb_gc_encode`, `tb_gc_decode` | label values; error flag on corrupted labels |
| `tb_gc_sbox` | all 256 inputs; entries of the published S-box table |
| `tb_gc_mixcol` | FIPS-197 example columns and random columns |
| `tb_aes_key_expand` | FIPS-197 round keys 1 and 10, random keys, round constants |
| `tb_gc_aes_fsm` | the exact 57-step sequence, done timing, start ignored while busy |
| `tb_gc_aes` | FIPS-197 vectors under several garbling keys; random blocks; 58-clock latency; the state holds only blue keys after whitening |
| `tb_gc_sample_circuit` | all 8 inputs; detection of corrupted labels |
| `tb_gc_top` | end to end at default parameters; counts whitening, S-box, each Mix-Columns column, key-add and final steps, garbling-key changes, starts ignored while busy, and caught label errors, and fails if any never happens |
| `tb_gc_dpa_set` | the power-analysis experiment set described below |

`tb_gc_dpa_set` runs the power-analysis experiment set on the core:

* ten random plaintexts
* AES keys K1, K2 (K1 with bit 108 flipped) and K3 (bits 108 and 126 flipped)
* garbling keys gk1, gk2 (LSB flipped) and gk3 (three bits flipped)

As a stand-in for dynamic power, it records per clock the number of state-register bits that
toggle. The power numbers of the original study came from an FPGA power estimator, which is
not modelled here. The testbench sorts the traces by bit 96 of the state after round 1, as
the study does. It checks that bit against the reference model and forms the differential
traces.

It also checks that:

* repeated runs give identical traces
* a one-bit change of the garbling key changes the activity of the same block, while the
  ciphertext stays the same

To run a testbench with plain Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_gc_top -y rtl -y tb +libext+.sv -Irtl \
    rtl/gc_pkg.sv tb/tb_ref_pkg.sv tb/tb_gc_top.sv
./obj_dir/Vtb_gc_top
```

Replace `tb_gc_top` with any other testbench name. Every testbench runs in seconds.

## Changing the design

* `gc_aes` and `gc_aes_fsm` take `NROUNDS` (default 10). The key schedule is AES-128's, so
  any other value no longer computes AES. The round counter is 4 bits wide.
* The label width is `gc_pkg::LABEL_W`, 8 bits by default. Wider labels make wrong keys
  harder to guess. Widening it means widening the hash and `GK_W` together.
* A different gate hash only needs `gc_pkg::gc_hash` to be changed. For a fixed second
  operand it should stay a bijection in the first, so that wrong labels are always caught.
* `gc_xor`, `gc_encode` and `gc_decode` have a `WIDTH` parameter. Every garbled unit has a
  `COLOR` parameter.
