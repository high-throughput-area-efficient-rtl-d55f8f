# Hummingbird encryption/decryption with a partially unrolled block cipher

Hummingbird is a lightweight cipher for RFID tags, smart cards and sensor
nodes. It encrypts 16-bit words under a 256-bit key and keeps an 80-bit
internal state between words. That state is four 16-bit registers RS1..RS4
plus a 16-bit LFSR. Each word passes through four small 16-bit block ciphers
E_K1..E_K4, and the state registers are mixed into the data between them.
This makes Hummingbird part block cipher and part stream cipher.

Hardware for it is usually built one of two ways. A looped design has one
round in hardware and is small but slow, at 16 cycles per word. An unrolled
design has every round in hardware and is fast but large, at 4 cycles per
word. This design sits between the two. It builds two of the four regular
rounds, runs the data through them twice and then through the final round.
One block cipher takes 2 cycles, so a word takes 8 cycles. That gives
2 bits per clock: about 140 Mbit/s at 70 MHz. One cipher engine serves all
four ciphers and the initialization.

The chip top, `hb_top`, holds three things side by side:
- an encryption core;
- a decryption core;
- a multiple-input signature register (MISR). It compacts scan-chain outputs,
  so test mode does not expose raw register contents.

## The block cipher E_K

Each E_Ki uses one 64-bit sub-key of the 256-bit key. Sub-key K1 is
`key[255:192]`, and K4 is `key[63:0]`. A sub-key holds four 16-bit round
keys k1..k4, with k1 in its top 16 bits.

A regular round is `m = L(S(m ^ k))`:
- `S` applies four 4-bit S-boxes to the nibbles of the word. Bits 15:12 go to
  S-box 1 and bits 3:0 go to S-box 4.
- `L(x) = x ^ (x <<< 6) ^ (x <<< 10)`, with rotations to the left.

E_K runs four regular rounds with k1, k2, k3 and k4. A final round follows:
XOR with `k1 ^ k3`, the S-box layer, then XOR with `k2 ^ k4`. The final round
has no linear transform.

### How the rounds are folded (`hb_encr_cipher`)

```
          din ──┐                 k1,k2 ─┐
                ├─MUX─► round ─► round ──┼──► R1            (cycle 0, load=1)
          R1 ───┘  ▲      ▲        │     │
                   │   k3,k4 ─MUX──┘     └──► final round ─► dout (cycle 1)
```

- **Cycle 0 (`load = 1`).** The round pair takes `din` with round keys k1
  and k2. Its output is stored in R1.
- **Cycle 1.** The same round pair takes R1 with round keys k3 and k4. Its
  output goes through the final round, and the result `dout` is valid
  combinationally during this cycle.

The hardware is:
- two round keys' XORs, 8 S-boxes and 2 linear transforms for the round pair;
- 4 S-boxes and 2 XORs for the final round;
- two multiplexers: data (`din` or R1) and round keys (k1,k2 or k3,k4).

That is 12 S-boxes in all. The longest path is two rounds, the final round
and, in the core, one 16-bit adder.

### Inverse cipher (`hb_decr_cipher`)

`hb_decr_cipher` undoes E_K with the same two-pass arrangement:
- **Cycle 0.** It undoes the final round, then rounds 4 and 3, and stores
  the result in R1.
- **Cycle 1.** It undoes rounds 2 and 1.

An inverse round is `S^-1(L^-1(x)) ^ k`. `L^-1(x)` is
`x ^ (x<<<2) ^ (x<<<4) ^ (x<<<12) ^ (x<<<14)`, the inverse of `1 + z^6 + z^10`
modulo `z^16 + 1`. The inverse S-box tables are computed from the forward
tables when the design is elaborated.

### S-box choice (`SINGLE_SBOX`)

The four S-box tables cost almost the same in LUTs, and S3 is the cheapest
of them. By default, `SINGLE_SBOX = 1` uses the S3 table for all four nibbles
to save area.

This changes the cipher. Its output differs from standard Hummingbird, which
uses S1..S4. Set `SINGLE_SBOX = 0` on any module that has it to get the
standard S-box assignment. Both settings are tested.

## Cores: initialization, words, state update

`hb_encryption` and `hb_decryption` each contain these parts:
- `hb_ctrl`, the sequencer;
- `hb_state_regs`, which holds RS1..RS4 and their update adders;
- `hb_lfsr`;
- the cipher engine or engines.

All additions and subtractions below are modulo 2^16.

**Initialization.** A pulse on `start` loads the 64-bit nonce into
RS1..RS4 (RS1 from bits 63:48). The core then runs four iterations:

```
V12 = E_K1(RS1 + RS3)   V23 = E_K2(V12 + RS2)
V34 = E_K3(V23 + RS3)   TV  = E_K4(V34 + RS4)
RS1 += TV;  RS2 += V12;  RS3 += V23;  RS4 += V34
```

The last TV seeds the LFSR as `TV | 0x1000`. Setting bit 12 keeps the LFSR
out of the all-zero state. `init_done` then goes high. Initialization takes
4 × 8 = 32 cycles.

**Encryption of a word PT:**

```
V12 = E_K1(PT + RS1)   V23 = E_K2(V12 + RS2)
V34 = E_K3(V23 + RS3)  CT  = E_K4(V34 + RS4)
```

**Decryption of a word CT** goes in reverse order and uses the inverse
cipher with subtraction:

```
V34 = D_K4(CT) - RS4   V23 = D_K3(V34) - RS3
V12 = D_K2(V23) - RS2  PT  = D_K1(V12) - RS1
```

**State update.** After every word, in either direction, the LFSR steps once
to LFSR'. Then the state updates in this order, each line using the new
values above it:

```
RS1' = RS1 + V34
RS3' = RS3 + V23 + LFSR'
RS4' = RS4 + V12 + RS1'
RS2' = RS2 + V12 + RS4'
```

In hardware, each register has one adder chain. `init_encr` switches its
operands between the initialization form and the word form.

**Why the decryption core has two ciphers.** Initialization always uses the
forward cipher, so the decryption core must also hold an `hb_encr_cipher`.
With the same key and nonce, both cores reach the same state. After that
they stay in step word by word.

**LFSR.** The LFSR shifts right. Its new bit 15 is the XOR of bits 0, 3, 7,
10, 12 and 15, which comes from x^16+x^15+x^12+x^10+x^7+x^3+1. The period is
65535; `tb_hb_lfsr` checks this.

## Sequencing and interface timing

`hb_ctrl` keeps these counters and flags:
- a phase bit: the first or second cycle of a cipher;
- a block counter, `blk`, for which of the four ciphers is running;
- a round counter, `rnd`, for the initialization iteration;
- `init_encr`, which is 0 during initialization and 1 afterwards.

From these it derives three selects:
- `key_sel`: K(blk+1). In decryption mode it is K(4-blk).
- `rs_sel`: RS3 for the first cipher of initialization, otherwise RS(blk+1).
  In decryption mode it is RS(4-blk).
- `data_sel`: RS1, the input word, or the previous cipher's result.

The interface of either core:

| event | cycle |
|---|---|
| `start` high (ignored while the core is busy) | 0 |
| `init_done` high | 33 |
| input word taken (`*_valid && *_ready`) | n |
| result pulse (`ct_valid` / `pt_valid`) with the result | n + 9 |
| next word can be taken | n + 8 |

`*_ready` is also high in the last busy cycle of a word. So back-to-back
words are taken every 8 cycles and results come out every 8 cycles. The
result is registered, which is why it appears one cycle after the 8 cycles
of work.

Key and nonce are plain input ports. They must be held stable while a core
uses them. Reset is asynchronous and active low. It clears every register,
the counters and the selects.

`hb_ctrl` asserts its handshake rules:
- a word is accepted only after initialization;
- a word is never accepted in the same cycle as a start.

## Scan response compaction (`hb_misr`)

Scan flip-flops let a tester shift out all internal registers. An attacker
can use the same path to read intermediate cipher values. This design adds
an 8-stage MISR. While `test_mode` is high, it folds eight scan-chain
outputs into a signature each clock:

```
sig[0] <= scan_out[0] ^ sig[7] ^ sig[0]
sig[i] <= sig[i-1] ^ scan_out[i]
```

`misr_clear` zeroes the signature. The scan chains themselves are inserted by
the test flow after synthesis and are not part of this RTL. Their outputs are
the `scan_out[7:0]` inputs of `hb_top`.

## Where this design departs from, or adds to, its source description

- **8 cycles per word, not 7.** The original description quotes both 7 and
  8 cycles. Its published throughput, 140 Mbit/s at 69.96 MHz on 16-bit
  words, works out to 8 cycles, and this design uses 8.
- **Two rounds per pass.** The original figure of the proposed cipher shows
  a 64-bit plaintext split over four parallel round units, a key multiplexer
  over "Key-5..Key-8" and an "R1/R2" loop over five rounds. That picture
  could not be matched to a 16-bit cipher. This design follows the stated
  resource count instead: 12 S-boxes, 2 linear transforms, 2 multiplexers,
  and about half the rounds unrolled.
- **Filled in from the published Hummingbird definition, not from the
  original description:**
  - the final round's keys, k1^k3 and k2^k4;
  - rotation (not shift) in L;
  - the LFSR polynomial and its `| 0x1000` seeding;
  - the use of the updated RS1 and RS4 in the state update.
- **S2 table.** S2 is the standard Hummingbird table, with entry 0xd = 0xc
  and entry 0xe = 0x4. It is used only with `SINGLE_SBOX = 0`.
- **This design's own choices:**
  - the bit layout of key and nonce;
  - the start/valid/ready handshake, and ignoring `start` while busy;
  - the MISR feedback taps (last and first stage);
  - the MISR enable and clear.
- **Not built:**
  - the nonce generator, described only as "an LFSR" with no further
    detail, so the nonce is an input;
  - the scan chains.
- **Example vector.** The original example encrypts 0x2345 under a given key
  to 0x4ce1. It cannot be reproduced because its nonce is not given.
  `tb_hb_example` runs the same key and plaintext with a fixed nonce.
- **Not checked.** No timing, area or power figures are claimed or checked
  here.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

The reference model is `tb/hb_ref_pkg.sv`. It was written independently of
the RTL: S-box arrays typed in, rotations built bit by bit, and the whole
cipher written as a class.

| testbench | what it checks |
|---|---|
| `tb_hb_sbox` | all 16 inputs of all four S-boxes and their inverses |
| `tb_hb_linear` | L on unit and random vectors; L⁻¹ undoes L |
| `tb_hb_encr_cipher`, `tb_hb_decr_cipher` | 300 random words and keys per variant; result exactly one cycle after `load`; E and D are inverses |
| `tb_hb_lfsr` | seeding, stepping, `q_next`, period 65535 |
| `tb_hb_state_regs` | both update forms against the equations |
| `tb_hb_ctrl` | every select, cycle by cycle, through initialization and streaming; 8-cycle back-to-back; start ignored while busy |
| `tb_hb_encryption`, `tb_hb_decryption` | three key/nonce sessions of 40 words each; every result against the model; 32-cycle initialization, 9-cycle latency and 8-cycle spacing |
| `tb_hb_misr` | signature against a bit-level model, with enable and clear |
| `tb_hb_top` | full chip at default parameters; see below |
| `tb_hb_example` | the example key and plaintext at default parameters, then a 65-word stream; measures 8 cycles per word |

`tb_hb_top` encrypts, checks each ciphertext against the model, decrypts,
and checks that the original plaintext comes back. It does this over three
re-keyed sessions. It also counts that each of these events happened: back-to-back
words, words offered while busy, idle gaps, ignored starts, LFSR steps, MISR
compaction and MISR clears.

## Simulating

Every testbench needs the two packages ahead of it:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/hb_pkg.sv tb/hb_ref_pkg.sv tb/tb_hb_top.sv --top-module tb_hb_top
./obj_dir/Vtb_hb_top
```

Replace `tb_hb_top` with any other testbench name. Verilator finds the
other modules through `-Irtl` and `-Itb`. Lint a module with:

```
verilator --lint-only -Wall -Irtl rtl/hb_pkg.sv rtl/hb_top.sv
```

## Files

`rtl/`:

| file | contents |
|---|---|
| `hb_pkg.sv` | word and sub-key types, S-box tables, L and L⁻¹, LFSR constants |
| `hb_sbox.sv`, `hb_sub_layer.sv` | one S-box; the 16-bit substitution layer |
| `hb_linear.sv`, `hb_round.sv` | L or L⁻¹; one forward or inverse round |
| `hb_encr_cipher.sv`, `hb_decr_cipher.sv` | two-cycle E_K and D_K |
| `hb_lfsr.sv`, `hb_state_regs.sv`, `hb_ctrl.sv` | LFSR, RS1..RS4, sequencer |
| `hb_encryption.sv`, `hb_decryption.sv` | the two cores |
| `hb_misr.sv` | scan response compactor |
| `hb_top.sv` | chip top |

`tb/` holds the reference package and one testbench per module, plus
`tb_hb_example.sv`.
