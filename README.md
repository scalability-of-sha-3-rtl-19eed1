# Five SHA-3 finalists behind one narrow interface

This is synthesizable SystemVerilog for hash units of the five SHA-3 finalists:
BLAKE-256, Grøstl-256, JH-256 (42 rounds), Keccak-256 (rate 1088) and
Skein-512-256. All five sit behind the same 16-bit streaming interface. The
idea is to compare hash algorithms for small FPGAs fairly. Every unit uses the
same I/O protocol and the same host-side conventions: the host pads the
message and sends lengths in a header. So the units differ only in their
cores, and each can be swapped for another without touching the system
around it.

The lightweight implementations this work follows were aimed at a Spartan-3
budget of about 500 slices and one Block RAM per unit. Those units keep the
state in Block RAM and use a narrow, folded datapath (32 or 64 bits). Two
cores here are folded in that spirit. BLAKE has one 32-bit half-G unit that
does one half of a G function per cycle. Keccak works on one 64-bit lane per
cycle. The Grøstl, JH and Skein cores each compute a whole round per clock
cycle. All cores keep their state in registers. All five are correct and
tested implementations of their hash functions, and they have the shared
interface. But the three round-parallel cores are far larger and far faster
than the lightweight units. The section "What differs
from the lightweight design" gives the details.

## Block diagram

```
            16-bit words                    block (512 / 1088 bits)            256-bit digest               16-bit words
 din ──────► sha_in_unit ─── blk_data, blk_info ───► <algorithm core> ──── digest ───► sha_out_unit ───► dout
 src_ready   (header parse,   blk_valid / blk_ready   blake256_core         dig_valid /     (serialiser)     dst_write
 src_read ◄─  block loading)                          groestl256_core       dig_ready                        dst_ready
                                                      jh256_core
                                                      keccak_core
                                                      skein512_core
```

`sha_hash_unit #(.ALG(...))` is one such chain. `sha3_finalists_top` places
five of them side by side: index 0 to 4 of each port array is BLAKE, Grøstl,
JH, Keccak, Skein. The units share only the clock and the synchronous,
active-high reset.

## The input protocol

The input is a stream of 16-bit words. A message is sent as one or more
*segments*. Every length field is 32 bits wide and is sent as two words,
high half first.

```
 segment header     {seq_len_ap[30:0], last}      2 words   length after padding, in 32-bit words
 (last segment only) seq_len_bp[31:0]             2 words   length before padding, in bits
 data               2 * seq_len_ap words                     the padded message bytes, big-endian
```

`last` is 1 on the final segment of a message. The message length before
padding is the sum of the earlier segments' padded lengths (times 32 bits)
plus the last segment's `seq_len_bp`. The host has already padded the
message by the rule of its algorithm. The units do no padding, which keeps
them small and makes the Keccak core serve Keccak-256 and SHA3-256 alike.
Segments must hold whole blocks; an assertion checks this.

Handshakes:

* **Source:** `src_ready` says a word is on `din`. `src_read` is high in
  every cycle in which the unit takes that word. It is `src_ready` gated by
  "not holding a full block".
* **Destination:** `dst_write` marks a word on `dout` and is only high while
  `dst_ready` is high. The digest goes out most significant word first.

The input unit shifts data words into a block register, first word at the
top, so `blk_data` is the block as a big-endian byte string. With every
block it passes `blk_info` (`sha_if_pkg::blk_info_t`):

* `first` and `last` mark the first and last block of the message.
* `bits` is the number of message bits before padding up to the end of this
  block. This is BLAKE's counter and (divided by 8) Skein's position field.
* `empty` marks a block that holds only padding. BLAKE's counter is zero for
  such a block.

Loading one block takes 32 cycles (68 for Keccak's 1088-bit block) when the
source never stalls. The block waits in the input unit's register until the
core is idle. After that the input unit starts loading the next block while
the core is still working, so loading and processing overlap.

## The cores

Each core has the same ports: `blk_data`, `blk_info`, `blk_valid` and
`blk_ready` in; `digest`, `dig_valid` and `dig_ready` out. A core takes a
block when it is idle. After the last block it holds `dig_valid` until the
digest is taken.

* **blake256_core**: keeps the 16-word state `v` as a register file (four
  columns a, b, c, d of four words each), plus the chain value `h` and the
  16 message words. The state is initialised from `h`, the constants and
  the counter (the salt is zero). Each G function is split into two halves:
  `a += b + (m ^ c)`, `d = (d ^ a) >>> 16 or 8`, `c += d`,
  `b = (b ^ c) >>> 12 or 7`. One shared 32-bit unit computes one half per
  cycle. It reads four state words, one message word and one constant,
  chosen by the round's message permutation, and writes the four words
  back. A round is G0..G7, each as two halves: 16 cycles, so 224 cycles for
  14 rounds. One more cycle forms `h ^= v[i] ^ v[i+8]`. The schedule is a
  plain counter (round, G number, half).
* **groestl256_core**: runs P(h ⊕ m) and Q(m) side by side, one round of
  each per cycle, 10 rounds. The next cycle forms the new chain value. After
  the last block, P runs again on h (the output transformation), and the
  low 256 bits of P(h) ⊕ h are the digest. The AES S-box is generated from
  its definition (inverse in GF(2^8), then the affine map) in `groestl_pkg`.
* **jh256_core**: XORs M into the upper half of the 1024-bit state, groups
  the state into 256 4-bit elements (pure wiring), and runs 42 rounds R8
  (S-box chosen by a constant bit, linear layer L, permutation P8), one per
  cycle. The 256-bit round constant is produced in the same cycle by the
  small round R6, starting from C0. De-grouping and the XOR of M into the
  lower half take one cycle. The initial value H0 = F8(H(-1), 0) is stored
  precomputed.
* **keccak_core**: XORs the 17 rate lanes into the 1600-bit state (little-
  endian lanes) in the accept cycle. It then runs the 24 rounds on one
  64-bit lane per cycle, in three passes of 25 cycles over a lane memory:
  column parities; θ, ρ and π into a second lane memory, through one
  variable rotator; χ and ι back into the state. That makes 75 cycles per
  round. Round constants and rotation offsets are computed from their
  formulas in `keccak_pkg`. The digest is the first four lanes.
* **skein512_core**: does one UBI step per block. Threefish-512 encrypts the
  block under the chain value with tweak (position, first, final, type
  "message"), one round of four MIX and the permutation per cycle, 72
  rounds. The 19 subkeys come from a rotating 9-word key register and a
  3-word tweak register; adding a subkey shares a cycle with the round
  before it. After the last block an output UBI on a zero block gives the
  digest. The IV after the configuration UBI is stored precomputed.

## Timing

The table gives cycles without stalls. "Busy" counts from the clock edge that
hands a block to the core until the core can take the next one. The
per-block period in steady state is max(busy, load) + 1, because loading
overlaps processing. For a single-block message, the cycles from the first
header word read to the last digest word written are
4 + load + 1 + busy + final + 1 + 16.

| unit       | block bits | load | busy per block | extra after last block | steady period | lightweight unit, cycles per block |
|------------|-----------:|-----:|---------------:|-----------------------:|--------------:|-------------------------:|
| BLAKE-256  | 512        | 32   | 225            | 0                      | 226           | 350  |
| Grøstl-256 | 512        | 32   | 11             | 11                     | 33            | 574  |
| JH-256     | 512        | 32   | 43             | 0                      | 44            | 1845 |
| Keccak-256 | 1088       | 68   | 1800           | 0                      | 1801          | 3764 |
| Skein-256  | 512        | 32   | 75             | 75                     | 76            | 2460 |

The last column gives the folded Block-RAM implementations these units are
modelled on, loading included. The loading times (32 and 68) are the same as
theirs. BLAKE's 224 half-G cycles compare with the lightweight unit's 294.
That unit pipelines the half-G unit for clock rate and interleaves two G
functions, at 21 cycles per round. Keccak's 1800 cycles are fewer than the
lightweight unit's because χ here reads three lanes per cycle, which a
two-port Block RAM cannot. For Grøstl, JH and Skein the gap is the price of
a wide datapath.

## What differs from the lightweight design

* **Datapath width and storage.** The lightweight units keep state, message,
  IV and constants in a dual-port Block RAM (at most 64 bits per cycle). They
  use a 32-bit datapath (BLAKE, JH) or a 64-bit one (Keccak), and are driven
  by a small state machine with stored-program control. Here the Grøstl,
  JH and Skein cores are round-parallel. The BLAKE core has the half-G
  structure, but its unit is not pipelined and does not interleave two G
  functions. The Keccak core has the lane-serial structure, with its lane
  memories as register arrays. All cores keep state, message and constants
  in registers and constant tables. No Block RAM is instantiated anywhere,
  and the control is plain counters.
* **Area.** The 500-slice budget is not met, mainly because state is held
  in flip-flops. The Keccak unit alone holds two 1600-bit lane memories,
  the parities and the 1088-bit block (about 2300 Spartan-3 slices at two
  flip-flops per slice).
* **Overlap.** The lightweight units count loading and processing in
  sequence, clk = st + (l + p)·N + end. Here the block register lets them
  overlap.
* **Own choices.** The header layout (two 16-bit words per 32-bit field,
  flag in bit 0), the handshakes, the digest word order and the synchronous
  reset are this design's own choices. So are the block-register hand-over
  and the precomputed JH H0 and Skein IV constants.
* **Algorithm constants.** These come from the algorithm specifications
  (round-3 / final versions: Grøstl with the final Q constants, JH with 42
  rounds, Skein 1.3 rotations, original Keccak padding by the host).

## Files

* `rtl/sha_if_pkg.sv`: bus widths, `blk_info_t`, the `alg_t` enum.
* `rtl/blake_pkg.sv`, `groestl_pkg.sv`, `jh_pkg.sv`, `keccak_pkg.sv`,
  `skein_pkg.sv`: algorithm constants and round functions.
* `rtl/sha_in_unit.sv`, `rtl/sha_out_unit.sv`: the shared I/O.
* `rtl/*_core.sv`: the five cores.
* `rtl/sha_hash_unit.sv`: one I/O + core chain.
* `rtl/sha3_finalists_top.sv`: the five units side by side.
* `tb/tb_hash_pkg.sv`: the test-message generator and the five padding
  rules (host side).
* `tb/tb_*.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/sha_if_pkg.sv rtl/*_pkg.sv tb/tb_hash_pkg.sv -y rtl \
  tb/tb_sha3_finalists_top.sv --top-module tb_sha3_finalists_top
./obj_dir/Vtb_sha3_finalists_top
```

Replace the testbench name for a single block, for example
`tb/tb_keccak_core.sv --top-module tb_keccak_core`. The top-level test runs
all five units concurrently at the default configuration. Each unit hashes
four messages, with source and destination stalls and with two-segment
messages. The test checks every digest and the single-block latency. It also
fails if any of these mechanisms never occurred: multi-segment and
multi-block messages, a padding-only block, stalls on either side, a block
waiting for a busy core, and the Grøstl and Skein finalisation steps.

## How far to trust it

Expected digests in the testbenches come from independent software models
of the five algorithms. Those models reproduce the published empty-message
digests of all five functions, and the Keccak core is also checked against
a standard SHA3-256 implementation. Each core is tested on 5 to 8 messages
covering block-boundary lengths (0, 55, 56, 64, 135, 136 bytes and
multi-block messages). Messages are byte-aligned; bit-granular message
lengths are carried by the protocol but have not been tested. The design
has not been synthesised for an FPGA, so no area or clock-rate figures are
given here.
