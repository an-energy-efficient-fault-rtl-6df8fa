# RandShift: storing encrypted data on worn-out nonvolatile memory

Phase-change main memory wears out: after enough writes, individual cells get *stuck* at
0 or 1 and ignore every later write. A secure memory controller already encrypts every
block it writes with a one-time pad (AES applied to the line's write counter and
address), so the bits that reach the memory look random. RandShift uses that randomness:
before writing, it rotates the encrypted block until every known stuck cell of the target
row happens to receive the value it is stuck at. The row then reads back correctly despite
its faults, and only the rotation amount has to be remembered. A barrel shifter and a
comparator are all the hardware this adds to the encryption path, which is why the method
is cheap in energy and area next to strong error-correcting codes. Rows where no rotation
fits are reported so that a stronger scheme (ECC or error-correction pointers) can take
over.

This repository holds synthesizable SystemVerilog for the whole write/read path: the
AES-256 pad generator, the encrypt/decrypt unit, the rotational barrel shifter, the
checker that searches for a fitting rotation, the row verifier that tracks where the stuck
cells are, a cache and a main-memory model with stuck-at cells. A second, smaller unit,
the MRSR (an LFSR feeding a multiple-input signature register), sits beside it and
compresses the data leaving the encrypt/decrypt unit.

## Data flow

```
             key_in ─► aes_core ─ pad ─┐
 {counter,addr} seed ───┘              ▼
 cache block ─┐                      (XOR) ─► enc_data ─► brlshftr ─► rommem row
 memory block ┴─ MUX (wr/rd) ──────────┘        dec_data ◄─ brlshftr ◄─ rommem row
                                                  (rotate right on reads)
                 fault_checker ◄─ q of brlshftr, fault map of rowverifier
                 rowverifier   ◄─ written vs. read-back row (verify)
 MUX(enc_data, dec_data) ─► mrsr (lfsr ─► misr) ─► mrsr_sig
```

`otp_unit` contains `aes_core`, the XOR and the two multiplexers; `topmodule` holds
everything and sequences it.

## Words and lanes

The 128-bit block is cut into `NW = 128 / WORD_W` words. Each word has its own *lane*:
a `brlshftr` and a `fault_checker` of `WORD_W` bits. The lanes search at the same time,
each for a rotation of its own word that fits the stuck cells under that word. The row is
written once every lane has found a fit and fails if any lane runs out of candidates.
`shift_count` and the stored rotation hold one `log2(WORD_W)`-bit field per word, word 0
in the low bits. Shorter words give each word fewer stuck cells to satisfy but also fewer
candidate rotations: (1 − 2^-k)^64 instead of (1 − 2^-k)^128 per word.

## The write-back, step by step

A write-back (`enable` with `decrpt_i = 0`) moves cache block `addressc` to memory row
`addressm`:

1. **Pad.** The row's write counter is read and incremented. The seed is the counter
   (bits 127:96) XORed with the row address (low bits). `aes_core` enciphers it under the
   256-bit key; the pad XOR the cache block is the ciphertext (`data_o`). Because the
   counter changes on every write, rewriting the same data produces new ciphertext.
2. **Search** (per lane). `fault_checker` loads rotation 0 into `brlshftr` and compares the rotated
   block `q` with the row's known faults from `rowverifier`: a candidate fits when
   `((q ^ fault_val) & fault_mask) == 0`. If it does not fit, the checker loads the next
   rotation (one candidate per clock) and stops at the first fit. When every lane has a
   fit, the row is written and `wr_enable` pulses; if a lane tries all its candidates
   without a fit, `wr_fail` pulses and the row is not written.
3. **Write and verify.** The rotated block, the rotation and the new counter are written to
   the row. The next cycle reads the row back. Stuck cells that were not known yet and
   disagree with the written bit show up as differences; `rowverifier` adds them to the
   row's fault map (position and stuck value). If the read-back differed, the search starts
   again from rotation 0 with the larger map. Each pass learns at least one new stuck cell,
   so this ends, either in a clean write or in `wr_fail`.

A stuck cell that happens to hold the written bit does no harm and is only learned when a
later write disagrees with it. This is why the fault map is learned rather than loaded.

A read (`enable` with `decrpt_i = 1`) rotates row `addressm` right by its stored rotation,
XORs it with the pad of the stored counter and shows the plaintext on `data_out`; with
`wr1 = 1` it also writes the plaintext into cache block `addressc`.

### Why it works, and when it does not

For a row with *k* stuck cells, a rotation of a random-looking block fits with probability
2^-k, and 128 rotations all fail with probability (1 − 2^-k)^128: about 4·10⁻⁸ for
k = 3, 0.017 for k = 5 and 0.13 for k = 6. At a stuck-cell rate of 10⁻², a 128-bit
word has 1.3 stuck cells on average, so failures are rare; `tb_fault_rate` runs exactly
this case. The counter must advance on every write; otherwise a failing block would fail
again with the same data.

## Interface of `topmodule`

| port | dir | width | use |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; asynchronous active-high reset of the RandShift path |
| `rst1` | in | 1 | asynchronous reset of the MRSR unit |
| `key_in`, `load_i` | in | 256, 1 | AES key; `load_i` (while idle) loads it |
| `wr`, `data_in`, `addressc` | in | 1, 128, 4 | while idle, `wr` writes `data_in` into cache block `addressc` |
| `enable`, `decrpt_i`, `wr1` | in | 1 | start a write-back (`decrpt_i=0`) or read (`decrpt_i=1`); `wr1` refills the cache on a read |
| `addressm` | in | 4 | memory row of the operation; `data_outm` shows this row while idle |
| `inj_we`, `inj_mask`, `inj_val` | in | 1, 128, 128 | while idle, make the cells in `inj_mask` of row `addressm` stuck at `inj_val` (fault injection for test) |
| `data_outc`, `data_outm` | out | 128 | cache block `addressc`, memory row `addressm` as read (stuck cells forced) |
| `data_o`, `data_out` | out | 128 | last encrypted block, last decrypted block |
| `check_result`, `wr_enable`, `wr_fail`, `shift_count` | out | 1, 1, 1, `NW`·log2(`WORD_W`) | every word has a fitting candidate, row written, some word has no fitting rotation, rotations chosen |
| `busy`, `done` | out | 1 | an operation is running; one-cycle pulse at its end |
| `doutf`, `mrsr_sig` | out | 128 | MRSR: LFSR pattern, MISR signature |

Inputs are sampled on the rising edge; the addresses only need to be valid in the cycle
`enable` is high (they are latched). One operation runs at a time.

**Timing.** Counting from the edge that samples `enable` to the edge that raises `done`: a
write-back whose search succeeds at rotation *s* on the first pass takes 19 + *s* cycles
(16 for the pad, 1 to start the search, *s* + 1 candidates, 1 to write and verify; *s* is
the largest rotation over the lanes); every repeated search adds 3 + *s'*. A read takes 17 cycles. `aes_core` alone produces a pad
14 cycles after `start` (one AES round per clock).

## The blocks

| module | role | sizes (defaults) |
|---|---|---|
| `randshift_pkg` | widths; GF(2^8) arithmetic and the AES S-box, computed from the field inverse and the affine map (no table) | 128-bit block, 256-bit key, 4-bit addresses, 32-bit counters |
| `aes_core` | AES-256 encipher, one round per clock, key schedule expanded on the fly in a 256-bit window; key register with clear and enable | 14 rounds |
| `otp_unit` | pad generation, XOR, block MUX and WR/RD DeMUX | latency 15 |
| `brlshftr` | 7 multiplexer stages rotating by 1, 2, 4 … 64, registered output; `dir` selects left (write) or right (read) | 128 bits |
| `fault_checker` | rotation search, one candidate per clock, first fit wins | 128 candidates, `STEP` = 1 bit |
| `rowverifier` | per-row fault map learned by verify-after-write | 16 rows |
| `cachemem` | cache blocks, async read | 16 × 128 |
| `rommem` | main-memory rows with stuck-at cells, plus each row's rotation and counter | 16 × 128 |
| `lfsr`, `misr`, `mrsr` | 128-bit LFSR (taps 128, 126, 101, 99, seed 1) feeding a MISR with the same polynomial; the MISR absorbs data XOR pattern every clock | 128 bits |
| `topmodule` | sequencing of the operations above; one shifter/checker lane per word; MRSR fed by the encrypt/decrypt output | `WORD_W` = 128 |

The memory arrays are written as register arrays with reset so that every bit reads as a
defined value; they are small (16 rows).

## What is this design's own choice

The overall structure follows the RandShift description: OTP unit with AES, XOR and
multiplexers; a multiplexer barrel shifter with a clock; a checker with Wr_Fail,
Wr_Enable, Shift Count and ShiftEnable; a row verifier feeding it; a cache, a main memory
and 4-bit addresses; 128-bit words and a 256-bit AES key; an MRSR built of an LFSR and a
MISR. The following are not given by the method's description and were chosen here:

- AES runs only in the encipher direction (a counter-mode pad needs no decipher).
- Seed layout (counter in the high 32 bits XOR address), 32-bit counters, and keeping the
  counter and rotation beside each row in fault-free cells.
- The row verifier *learns* faults by verify-after-write, and the top repeats the search
  when a verify finds new faults. A design that knows its fault map up front (from a
  separate test) would skip the retries.
- Rotations are tried in steps of one bit, 0 to 127, first fit wins (`STEP` can be
  raised to shorten the search at the cost of coverage).
- A row is one 128-bit block. With `WORD_W = 128` (default) it is one word, so row-level
  and word-level rotation are the same thing; `WORD_W = 64` splits it into two words
  rotated independently. Rows wider than one AES block are not built.
- If a repeated search fails after an earlier pass already wrote the row, the row keeps
  that pass's data and the advanced counter; it is not readable and is left to the
  stronger correction scheme.
- The read path rotates the row back *before* removing the pad, since the pad was
  applied before the rotation.
- The meaning of the control inputs (`load_i`, `wr`, `enable`, `decrpt_i`, `wr1`), the
  fault-injection and status ports, and all timing.
- The MRSR's polynomial, seed, and how the data enters the MISR. No rate selection is
  built; the MRSR is not used by the RandShift write decision.

Not built: the ECC/ECP stage that would handle rows reported by `wr_fail`, and the
physical PCM cells (modelled logically by `rommem`).

## Simulating

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`) that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_topmodule \
    -y rtl -y tb +libext+.sv -Irtl rtl/randshift_pkg.sv tb/tb_topmodule.sv
./obj_dir/Vtb_topmodule
```

- `tb_aes_core`: FIPS-197 C.3 and SP 800-38A AES-256 known answers, 14-cycle latency.
- `tb_otp_unit`: pads against a second AES instance, encrypt/decrypt round trip,
  counter-driven pad change, 15-cycle latency.
- `tb_brlshftr`, `tb_fault_checker`, `tb_rowverifier`, `tb_cachemem`, `tb_rommem`,
  `tb_lfsr`, `tb_misr`, `tb_mrsr`: each against a bit-level reference in the testbench.
- `tb_topmodule` (default sizes): fault-free rows, rows with a few stuck cells, a fully
  stuck row, reads with and without cache refill, key reload; it checks stored rows bit by
  bit, plaintext round trips, the 19/17-cycle timings and the MRSR outputs, and requires
  every mechanism (zero and non-zero rotation, repeated search, write failure, refill,
  key reload) to occur.
- `tb_topmodule_w64`: the same test with `WORD_W = 64`; it also requires the two words
  of a row to get different rotations at least once.
- `tb_fault_rate` (default sizes): every cell stuck with probability 10⁻², 320 writes
  and reads; failed writes must stay close to the expected (1 − 2^-k)^128 per write.

Simulations run in well under a minute. Verilator's two-state simulation starts
unreset variables at random values; all state in `rtl/` is reset.
