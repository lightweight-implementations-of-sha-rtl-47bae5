# Lightweight SHA-3 finalist cores behind one 16-bit FIFO interface

This repository holds six complete hash cores. Each one has the same narrow
port, so that area, speed and power can be compared like for like. The cores
are the five SHA-3 finalists and SHA-256 as a reference:

- BLAKE-256
- Grøstl-256
- JH-256 with 42 rounds
- Keccak-256 (r = 1088, c = 512)
- Skein-512-256
- SHA-256

Each core takes a padded message as 16-bit words from a first-word-fall-through
FIFO. It writes the 256-bit digest to a second FIFO as sixteen 16-bit words.

The design targets small FPGAs, where the budget is a few hundred slices. For
that reason each finalist is folded: a narrow datapath (a half G function, a
64-bit lane, one MIX, one Grøstl column, one 64-bit JH slice) is used many
times per round. SHA-256, the reference, computes one round per clock.

Every core produces the standard digest. The testbenches check this against
published test vectors and against reference models written in SystemVerilog.

## Files

| File | Contents |
|---|---|
| `rtl/sha_pkg.sv` | shared constants (`IO_W = 16`, `HASH_BITS = 256`), core ids, segment header type, controller states |
| `rtl/sha_io.sv` | interface and protocol controller used by every core |
| `rtl/blake256_core.sv` | BLAKE-256, one half G function per clock |
| `rtl/groestl256_core.sv` | Grøstl-256, one state column every two clocks, P and Q interleaved |
| `rtl/jh256_core.sv` | JH-256, one 64-bit slice of a round per clock |
| `rtl/keccak256_core.sv` | Keccak-256, one 64-bit lane per clock |
| `rtl/skein256_core.sv` | Skein-512-256, one MIX or one subkey word per clock |
| `rtl/sha256_core.sv` | SHA-256, one round per clock |
| `rtl/sha3_lightweight_top.sv` | all six cores side by side |
| `tb/tb_*.sv` | one self-checking testbench per module |

## The interface and protocol (`sha_io`)

### Port

Every core has the same port:

```
clk, rst                      clock; synchronous reset, active high
din[15:0], src_ready, src_read    input FIFO (first-word-fall-through)
dout[15:0], dst_ready, dst_write  output FIFO
```

`src_ready` and `dst_ready` are **active low**. They are the FIFOs' empty and
full flags:

- `src_ready = 0` means `din` holds a valid word. The core takes that word in
  the cycle in which it raises `src_read`.
- `dst_ready = 0` means the output FIFO has space. The core writes `dout` in the
  cycle in which it raises `dst_write`.

### Message format

A message is sent as one or more segments.

1. Each segment starts with a header word `{seq_len_ap[14:0], last}`:
   - `seq_len_ap` is the length of the segment after padding, in 32-bit words.
   - `last` is 1 on the final segment.
2. The final segment's header is followed by one more word, `seq_len_bp`. This
   is the number of message bits in that segment before padding.
3. Then come the segment's 16-bit data words, first word first.

The unpadded message length is computed as:

```
msg_len_bp = sum(seq_len_ap of earlier segments) * 32 + seq_len_bp
```

Two cores use this length: BLAKE for its bit counter, and Skein for the
tweak of the last block. The host pads the message to a whole number of
blocks:

| Core | Block size | Padding done by the host |
|---|---|---|
| BLAKE-256 | 512 bits | 0x80 … 0x01 and a 64-bit length |
| Grøstl-256 | 512 bits | 0x80 … and a 64-bit block count |
| JH-256 | 512 bits | 0x80 … and a 128-bit length, 512 to 1023 padding bits in all |
| Keccak-256 | 1088 bits | submission pad10\*1: 0x01 … 0x80 |
| Skein-512-256 | 512 bits | zero bytes; an empty message is one zero block |
| SHA-256 | 512 bits | 0x80 … and a 64-bit length |

Segment boundaries may fall on any 32-bit word, including inside a block.

### Controller sequence

The controller does the following for each message:

1. It reads the header words.
2. It shifts data words into a block buffer, first word at the top.
3. When the buffer holds a block, it pulses `blk_go` to start the engine.
4. It waits for the engine's `eng_done` pulse before it loads the next block.
5. After the last block it latches the digest and writes it out, most
   significant word first.
6. It returns to waiting for the next header.

Alongside `blk_go` the controller tells the engine:

- `blk_first`: this is the first block of the message.
- `blk_last`: this is the last block of the message.
- `bits_before`: the number of bits in earlier blocks.
- `len_bp`: the unpadded length.

Loading and hashing do not overlap. Hashing N blocks, from the first header
read to the last digest word, therefore takes

```
cycles = st + (l + p) * N + end
```

with:

- `st = 2`: header reads.
- `l`: load cycles per block. This is 32, or 68 for Keccak's 1088-bit block.
- `p`: the engine's time per block.
- `end`: finalisation plus the 16 output cycles.

The testbenches check this formula exactly, whenever neither FIFO stalls.

## The cores

The table compares this design's cycle counts with the published lightweight
implementations it follows. The published figures are those of the logic-only
variants, which use no block RAM.

| Core | p (this design) | end (this design) | published p | published end |
|---|---|---|---|---|
| BLAKE-256 | 250 | 16 | 258 | 17 |
| Grøstl-256 | 324 | 177 | 357 | 374 |
| JH-256 | 676 | 16 | 736 | 32 |
| Keccak-256 | 1827 | 16 | 2328 | 17 |
| Skein-512-256 | 450 | 464 | 2366 | 2319 |
| SHA-256 | 67 | 16 | 404 | 17 |

### BLAKE-256: one half G function per clock

#### State layout

The 4x4 state of 32-bit words is held in four row memories:

- A = v0..v3
- B = v4..v7
- C = v8..v11
- D = v12..v15

A column step G(i) uses word i of each row. A diagonal step uses words i, i+1,
i+2 and i+3 (mod 4) of A, B, C and D. Every G function therefore reads exactly
one word from each memory.

#### The G datapath

A G function is two halves of the same shape:

```
a = a + b + (m[sigma(x)] ^ c[sigma(y)])
d = (d ^ a) >>> R1
c = c + d
b = (b ^ c) >>> R2
```

- In the first half, (R1, R2) = (16, 12).
- In the second half, (R1, R2) = (8, 7), and the message and constant indices
  are swapped.

One half runs per clock. Sixteen halves make a round.

#### Timing per block

- Initialisation writes v one word per clock: 16 cycles.
- The rounds take 14 x 16 = 224 cycles.
- Finalisation `h ^= v[i] ^ v[i+8]` runs one word per clock: 8 cycles.
- Adding the hand-off gives 250 cycles.

#### Counter t

The counter `t` is the number of message bits hashed up to and including the
block. It is 0 for a final block that holds only padding, as BLAKE requires.
The core derives `t` from `bits_before` and `len_bp`.

### Keccak-256: one lane per clock

#### State and registers

The state is 25 lanes of 64 bits in memory A. A second 25-lane memory B
separates theta from rho and pi, so that no cycle is spent only on writing back.
Five parity registers hold the column parities C[x], and five row registers feed
chi.

#### Schedule per block

- **Absorb, 25 cycles:** `A[k] ^= block lane k` (17 lanes carry message, the
  rest are XORed with zero). The column parities are built at the same time.
- **theta, rho and pi, 25 cycles per round:**
  `B[pi(k)] = rotl(A[k] ^ D[x], rho[k])`, with
  `D[x] = C[x-1] ^ rotl(C[x+1], 1)`. The rho offsets drive one variable
  rotator.
- **chi and iota, 10 cycles per row (5 rows):** five lanes of B are loaded into
  the row registers. Then five lanes `A[x] = R[x] ^ (~R[x+1] & R[x+2])` are
  written, with the round constant XORed into lane 0. The parities for the next
  round are accumulated as these lanes are written.

This gives 25 + 24 x 75 + 2 = 1827 cycles per block.

The published logic-only design splits each lane over four 16-bit distributed
RAMs and has its own in-round schedule (58 + 39 cycles per round). The lane-wide
memories and the schedule above are this design's own.

Lanes are little-endian: byte 8i of the block is the low byte of lane i. The
digest is the first 32 bytes of the state.

### Skein-512-256: one MIX per clock

#### UBI chaining

Skein chains UBI calls. Each UBI call encrypts one block with Threefish-512:

- The cipher is keyed with the chaining value.
- The tweak is the byte position, the first and final flags, and the block type.
- The ciphertext is XORed with the block to give the next chaining value.

The first chaining value is the precomputed IV, which is stored as a constant.
After the last message block, one more UBI call of type *Out* on a zero counter
block produces the digest.

#### Threefish-512 datapath

There is one MIX unit: an adder, a rotator whose amount comes from the 8x4
rotation table, and an XOR. It computes one MIX per clock, four per round.

Its two outputs are written straight to their permuted places in a second bank
of eight words. The banks swap every round, so the word permutation costs no
cycles.

The key generator works one word per clock. Word i of subkey s is

```
k[(s+i) mod 9]
  + t[s mod 3]      for i = 5
  + t[(s+1) mod 3]  for i = 6
  + s               for i = 7
```

Here k[8] is the XOR of the key words with the constant 0x1BD11BDAA9FC1A22.

#### Timing per UBI call

| Step | Cycles |
|---|---|
| 19 subkeys x 8 words | 152 |
| 72 rounds x 4 MIX | 288 |
| feed-forward | 8 |
| hand-off | 2 |
| **Total** | **450** |

The output UBI costs the same again, which is why `end` is 464.

#### Departures from the published design

The published logic-only design also uses 64-bit words, but keeps them in
distributed RAM and runs the key generator and the MIX steps on its own
schedule. This design keeps the words in registers.

#### Length limitation

The host pads with zero bytes. The tweak position of the last block is
`len_bp / 8`, so the message must be a whole number of bytes. Skein's bit-pad
flag is not supported.

### Grøstl-256: one column every two clocks

Grøstl-256 has two steps:

- Compression: `h' = P(h ^ m) ^ Q(m) ^ h`.
- Output transform: `P(h) ^ h`. The digest is its lower 256 bits.

P and Q are 10-round permutations of an 8x8 byte matrix.

#### Column datapath

The datapath has four S-boxes and one MixBytes column unit. A new column of
P or Q takes two clocks:

1. Rows 0..3 of the column are taken from their shifted positions, the round
   constant is added, and they pass through the S-boxes into a holding register.
2. Rows 4..7 do the same. MixBytes then turns the eight bytes into the new
   column.

Columns of P and Q alternate. A round of both therefore takes
8 x 2 x 2 = 32 clocks.

ShiftBytes reads bytes from all eight columns. The new columns are therefore
written to a second pair of state registers, which replace the current pair
at the end of each round.

#### Timing

A block takes 1 + 320 + 1 + 2 = 324 cycles. The output transform runs P alone,
10 x 16 + 1 cycles.

The S-box is computed at elaboration time from the GF(2^8) inverse followed by
the affine map.

### JH-256: one 64-bit slice per clock

#### Grouped state

JH groups the 1024-bit state into 256 four-bit elements. Grouping and
de-grouping are pure wiring and take one clock each.

#### Slice datapath

An R8 round is done in 16 slices of 16 elements. Each clock, one slice passes
through:

- 16 S-boxes, S0 or S1 chosen by the round-constant bit;
- 8 L units on the element pairs.

Each result element is written straight to its place after the permutation P8
(pi, then P', then phi) in a second 1024-bit register. That register becomes the
state at the end of the round.

An R6 round updates the 256-bit round constant once per round, starting from C0.

#### Timing and initial state

A block takes 1 + 42 x 16 + 1 + 2 = 676 cycles.

The initial state `H0` is stored as a constant; `H0` is the JH compression of
`0x0100 || 0` with a zero message block. The digest is the last 256 bits of the
final state.

### SHA-256

One round per clock. The message schedule is kept in a 16-word window that is
expanded while the rounds run. The constants and IV are the standard tables.

## Size

A generic synthesis (no FPGA mapping) of each core, including its interface
controller, gives the following counts:

| Core | flip-flop bits | inferred memory bits |
|---|---|---|
| BLAKE-256 | 1015 | 2816 |
| Grøstl-256 | 3669 | 10240 |
| JH-256 | 4148 | 6144 |
| Keccak-256 | 1404 | 7360 |
| Skein-512-256 | 1147 | 2608 |
| SHA-256 | 1327 | 2560 |

About 1000 of the flip-flops in each core (about 1600 in Keccak) belong to the
interface controller, mostly the block buffer and the 256-bit digest register.

A Spartan-3 slice has two flip-flops, so the budgets these cores aim at hold
1200 flip-flops (600 slices) or 1536 flip-flops (768 slices). Grøstl and JH
exceed both budgets on flip-flops alone, because their two state banks are
registers here rather than distributed RAM. The other cores fit on
flip-flops; whether their logic fits depends on the FPGA mapping.

## Departures from the published implementations

- **Cycle counts differ for every core** (see the table above).
  - The five finalists follow the published folding: a half G function for
    BLAKE; a serial lane datapath for Keccak, with theta decoupled from rho and
    pi; a single MIX unit with a serial key generator for Skein; one column per
    two clocks for Grøstl; 16 slices per round for JH.
  - Their memories are registers or small arrays rather than block or
    distributed RAM, and their detailed schedules are this design's own.
  - Skein works on 64-bit words, like the published logic-only variant. The
    block-RAM variant splits each addition into 32-bit halves.
  - SHA-256 computes a whole round per clock. The published design uses a
    seven-cycle quasi-pipelined round around a block RAM.
  - Where a published core keeps state in RAM, this design uses flip-flops.
    Its flip-flop count is therefore higher than the published area suggests.
- **Start-up cycles.** Every core reads its two header words in `st = 2`
  cycles; the published Skein core needs 5.
- **Padding is done by the host** for every core, and the length word is used
  only where an algorithm needs the unpadded length.
- **Keccak uses the submission padding** (first pad byte 0x01), not the later
  FIPS 202 padding. It produces Keccak-256 digests, not SHA3-256 digests.
- **Message length limits.**
  - A segment holds at most 2^15 - 1 32-bit words.
  - The length word of the final segment is 16 bits.
  - Internally the message length is counted in 64 bits.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and ends with
`$finish`. A watchdog counts a failure if a run hangs. Run these commands from
the repository root with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/sha_pkg.sv rtl/sha_io.sv rtl/keccak256_core.sv tb/tb_keccak256_core.sv \
  --top-module tb_keccak256_core -Mdir obj_keccak -o sim && obj_keccak/sim
```

Replace `keccak256` with another core name to test that core. For the interface
controller alone, use `rtl/sha_pkg.sv rtl/sha_io.sv tb/tb_sha_io.sv`. That
testbench has its own small engine model and checks block hand-off, segment
handling, lengths and stalls.

### Core testbenches

Each core testbench:

- models both FIFOs with random stalls;
- splits messages into several segments;
- hashes the published empty-message vector (and other published vectors where
  they exist);
- hashes random messages of 0 to several blocks, including lengths that end in
  the last bytes of a block;
- compares every digest with a reference model of the algorithm written in the
  testbench;
- checks the cycle formula on unstalled runs.

### End-to-end testbench

The end-to-end testbench drives all six cores of `sha3_lightweight_top` at
once, with no parameter overrides:

```
verilator --binary --timing --assert -Wno-fatal rtl/sha_pkg.sv rtl/sha_io.sv \
  rtl/blake256_core.sv rtl/groestl256_core.sv rtl/jh256_core.sv \
  rtl/keccak256_core.sv rtl/skein256_core.sv rtl/sha256_core.sv \
  rtl/sha3_lightweight_top.sv tb/tb_sha3_lightweight_top.sv \
  --top-module tb_sha3_lightweight_top -Mdir obj_top -o sim && obj_top/sim
```

Its messages are the empty message, "abc", 72 zero bytes, 184 random bytes and
a long message of 1088 random bytes. For the long message it prints each core's
rate:

| Core | cycles for 1088 bytes | message bits per clock |
|---|---|---|
| BLAKE-256 | 5094 | 1.709 |
| Grøstl-256 | 6587 | 1.321 |
| JH-256 | 12762 | 0.682 |
| Keccak-256 | 17073 | 0.510 |
| Skein-512-256 | 8660 | 1.005 |
| SHA-256 | 1800 | 4.836 |

It runs in two passes:

1. An unstalled single-segment pass checks digests and exact cycle counts.
2. A second pass uses 30 % stalls on both FIFOs and three segments.

It also counts how often each mechanism happened, and fails if any of them
never happened:

- input stalls;
- output stalls;
- multi-segment messages;
- multi-block messages;
- BLAKE's counter-0 padding block;
- finalisation stages.

## Changing the design

- **Word width and digest size.** `IO_W` and `HASH_BITS` live in `sha_pkg`.
  Only the 256-bit digest versions are implemented.
- **Block size.** `sha_io` takes `BLOCK_BITS`; Keccak instantiates it with 1088.
- **Adding a core.** A new engine needs only the `blk_go`, `blk`, `blk_first`,
  `blk_last`, `bits_before` and `len_bp` inputs. It answers with `eng_done` and,
  on the last block, the digest.
