# SLotH: an SLH-DSA accelerator SoC built around one hash unit

SLH-DSA (FIPS 205, formerly SPHINCS+) is a hash-based signature scheme. A
signature costs from a hundred thousand to several million calls to small
hash primitives (PRF, F, H, T_l), and roughly 80–95 % of them are F calls
inside Winternitz chains:

    X0 = PRF(PK.seed, SK.seed, ADRS of type WOTS_PRF)
    Xj = F(PK.seed, ADRS with hash address j, X(j-1))      for j >= 1

Every call hashes a tiny input of the form `PK.seed || ADRS || message`. A
hash core finishes Keccak-f[1600] in 24 cycles, but a conventional
memory-mapped accelerator waits for the CPU to copy the seed, the 32-byte
address structure (ADRS) and the previous output into its buffer before each
call. That setup dominates. This design removes it. PK.seed, SK.seed and ADRS
live in registers inside the Keccak unit. The unit assembles each padded
SHAKE256 block itself, in the same cycle as the first round. It also runs a
whole chain, optionally starting with the PRF, from a single register write.
Each hash in a chain therefore costs exactly 24 cycles, with no CPU work in
between.

The RTL is an SoC in the SLotH style. A 32-bit interconnect joins an RV32
core's bus to a 128 kB RAM, GPIO, a UART and four hash units:

| unit | base address | what it does |
|---|---|---|
| RAM | `0x0000_0000` | 128 kB program/data memory |
| GPIO | `0x1000_0000` | 32 outputs, 32 synchronized inputs |
| UART | `0x1100_0000` | 8N1 console |
| KTI3 | `0x1400_0000` | three-share threshold Keccak with SLH-DSA formatting and chaining |
| KECC | `0x1500_0000` | the same unit without masking |
| S256 | `0x1600_0000` | SHA-256 compression (64 cycles) with SLH-DSA SHA2 formatting and chaining |
| S512 | `0x1700_0000` | SHA-512 compression, 80 cycles |

The core itself is not included. Its bus is the top-level port `cpu_req` /
`cpu_rsp`, so any RV32 core with a small adapter can drive it, and so can a
testbench. There is no DMA: the core moves every word.

Each hash unit is optional. The top parameters `EN_KTI3`, `EN_KECC`,
`EN_S256` and `EN_S512` (all 1 by default) select a build, from one unit up
to the full system. The published design lists such builds, trading area
for the parameter sets they serve:
* SHAKE sets need a Keccak unit;
* SHA2 sets with n = 16 need SHA-256;
* SHA2 sets with n = 24/32 need both SHA-2 units;
* KTI3 adds side-channel protection for the secret hashes.

A slot whose unit is left out still answers every access one cycle later.
It reads 0 and ignores writes, so firmware that polls a missing unit sees it
idle instead of hanging (`empty_slot`).

## The SLH-DSA Keccak unit (`keccak_slh_unit`)

This is the heart of the design. One module implements both KECC
(`SHARES = 1`) and KTI3 (`SHARES = 3`, the default).

### Registers

Byte offsets inside a 1 KiB window. All registers are 32-bit words. Byte
strings (state, ADRS, seeds) are stored little-endian: byte `4k+i` of a
string is bits `8i+7:8i` of word `k`. State byte `i` is byte `i mod 8` of
Keccak lane `i/8`, which is the FIPS 202 byte order.

| offset | name | size | meaning |
|---|---|---|---|
| 0x000 | MEMA | 200 B | Keccak state, share A: input and output |
| 0x0c8 | MEMB | 200 B | state share B (KTI3 only; reads 0 on KECC) |
| 0x190 | MEMC | 200 B | state share C (KTI3 only) |
| 0x260 | ADRS | 32 B | the FIPS 205 address structure, updated by the unit |
| 0x280 | SEED | 32 B | PK.seed (the first n bytes are used) |
| 0x2a0 | SKSA | 32 B | SK.seed share A (write-only) |
| 0x2c0 | SKSB | 32 B | SK.seed share B (KTI3 only, write-only) |
| 0x2e0 | SKSC | 32 B | SK.seed share C (KTI3 only, write-only) |
| 0x3c0 | CTRL | 4 | write 1: raw permutation; read: 0 ready, 1 busy |
| 0x3c4 | STOP | 4 | rounds of a raw permutation (reset 24) |
| 0x3c8 | SECN | 4 | n, one of 16, 24 or 32 (reset 16; other values ignored) |
| 0x3cc | CHNS | 4 | hashing command, see below |

While the unit is busy, writes are ignored and reads return the
intermediate state.

### Commands written to CHNS

* `s` (1..63): run `s` Winternitz steps `X <- F(PK.seed, ADRS, X)`. X is
  taken from state bytes `0..n-1`. After each step the hash address is
  incremented. That address is ADRS bytes 28..31, big-endian as in FIPS 205.
  Software sets the start index `i` of `chain(X, i, s)` as the hash address.
* `0x40 + s`: compute `X <- PRF(PK.seed, SK.seed, ADRS)` with ADRS exactly as
  written, then run the `s` steps. Software writes ADRS with type WOTS_PRF
  (5), the key-pair and chain addresses, and hash address 0. If `s > 0`, the
  unit clears the type word (bytes 16..19) to WOTS_HASH (0) before the first
  F. The result is exactly `chain(PRF(...), 0, s)` of `wots_pkGen` and
  `wots_sign`. `0x40` alone is a plain PRF, which also serves the FORS secret
  values.
* `0x80`: load `PK.seed || ADRS` followed by zeros into share A, and clear
  shares B and C. This is the start of an H or T_l input. Software then
  writes (or XORs) the message at byte `n+32`, adds the SHAKE padding and
  permutes with CTRL. A T_l longer than one 136-byte block is absorbed the
  usual way: XOR the next block into bytes 0..135, then permute.

Every result ends up in state bytes `0..n-1` (XOR of the three shares on
KTI3). After a command, ADRS holds the final hash address and type, so the
next chain only needs its chain address rewritten.

### How one hash is formed and timed

For PRF and F the whole SHAKE256 input fits in one block (rate 136 bytes):

    byte 0 .. n-1        PK.seed                 (share A only)
    byte n .. n+31       ADRS                    (share A only)
    byte n+32 .. 2n+31   SK.seed share k (PRF) or X share k (F)
    byte 2n+32           0x1F                    (share A only)
    byte 135             |= 0x80                 (share A only)
    all other bytes      0

The block is built combinationally, with one mux per n value, and fed
directly into the round logic instead of the state register. Formatting
therefore adds no cycle. Round indices 0..23 run on 24 consecutive cycles.
At round 23 the sequencer updates ADRS and, if steps remain, selects the
formatted block again for the next cycle. A command `0x40 + s` takes exactly
`24·(s+1)` cycles. A WOTS+ chain for w = 16 (`0x4F`) takes 384 cycles. A raw
permutation takes STOP cycles and runs round indices `24-STOP .. 23`: this is
Keccak-p[1600, STOP], as used by TurboSHAKE and KangarooTwelve. The SLH-DSA
commands always use 24 rounds, whatever STOP holds.

### Masking (KTI3)

With `SHARES = 3` the state and SK.seed are each held as three Boolean
shares whose XOR is the real value. The round (`keccak_ti3_round`) applies
theta, rho and pi to each share separately and adds the round constant to
share A only. Chi, the only nonlinear step, uses the classic three-share
threshold form, in which each output share depends only on the other two
input shares:

    a'[i] = b[i] ^ (~b[i+1] & b[i+2]) ^ (b[i+1] & c[i+2]) ^ (c[i+1] & b[i+2])
    b'[i] = c[i] ^ (~c[i+1] & c[i+2]) ^ (c[i+1] & a[i+2]) ^ (a[i+1] & c[i+2])
    c'[i] = a[i] ^ (~a[i+1] & a[i+2]) ^ (a[i+1] & b[i+2]) ^ (b[i+1] & a[i+2])

Software writes the SK.seed shares once. During a PRF the shares are loaded
in parallel, in one cycle, and a chain passes X from hash to hash without
ever recombining it. Only public data (seed, ADRS, padding) enters share A
unmasked. No fresh randomness is injected between rounds. This three-share
chi is not uniform, so the masking is the simple, unrefreshed variant. It
costs about twice the logic of the plain unit and no extra cycles. The
output is bit-exact with the unmasked unit.

## SHA-2 units (`sha256_unit`, `sha512_unit`)

The SHA2 parameter sets of SLH-DSA compute F and PRF with SHA-256 at every
security level:

    F   = Trunc_n(SHA-256(PK.seed || toByte(0, 64-n) || ADRSc || X))
    PRF = Trunc_n(SHA-256(PK.seed || toByte(0, 64-n) || ADRSc || SK.seed))

Here ADRSc is the 22-byte compressed address: byte 3, bytes 8..15, byte 19
and bytes 20..31 of ADRS. The first 64-byte block depends only on PK.seed.
`sha256_unit` compresses it once and keeps the resulting mid-state. It does
this the first time a command needs it after SEED or SECN was written, at a
cost of 64 cycles. After that, every PRF or F takes 65 cycles:
* one cycle loads the mid-state and builds the second block
  (`ADRSc || M || 0x80 || zeros || 64-bit length`);
* 64 rounds follow.

The unit uses the same register offsets and CHNS commands as the Keccak
unit:

| offset | name | meaning |
|---|---|---|
| 0x000 | H0..H7 | chaining value / result (big-endian words) |
| 0x020 | W0..W15 | message block for a raw compression |
| 0x260 / 0x280 / 0x2a0 | ADRS / SEED / SKS | byte strings as on the Keccak unit (SKS write-only) |
| 0x3c0 | CTRL | write 1: raw compression `H <- H + compress(H, W)`, 64 cycles; read busy |
| 0x3c8 | SECN | n (16, 24, 32) |
| 0x3cc | CHNS | `s`, `0x40+s` as on the Keccak unit; `0x80` loads the PK.seed mid-state into H |

X is the first n bytes of H, read as big-endian words, and the result is
left there. So software writes X into H0.. and reads the chain end from H0..
The `0x80` form starts an n = 16 H or T_l. Software then feeds the remaining
blocks, with the SHA-256 padding, as raw compressions.

`sha512_unit` is a plain SHA-512 compression unit with 80 cycles per block:
* H0..H7 at 0x00 and W0..W15 at 0x40, each 64-bit word as a low/high pair of
  32-bit registers;
* CTRL at 0xc0.

In FIPS 205 SHA-512 only serves H, T_l and the message hashes of the
n = 24/32 sets. Software formats those. An H call, for example, is two raw
compressions: one of `PK.seed || toByte(0, 128-n)`, then one of
`ADRSc || M2` with the SHA-512 padding (160 cycles).

In both units the message schedule is computed in place, so W must be
rewritten before every raw compression.

## Bus and the small peripherals

The bus (`sloth_pkg::bus_req_t` / `bus_rsp_t`) has one master and one
outstanding request. The master holds `valid`, `addr`, `wdata` and `wstrb`
(0 for a read) until the slave returns `ready` for one cycle, with `rdata`
valid in that cycle. Every slave answers one cycle after the request, and
the interconnect adds no delay. Assertions in the interconnect and the
Keccak unit check that a request stays stable until it is answered.
`bus_interconnect` decodes address bits 31:24. An access that hits no slave
is answered with 0 and flagged on `unmapped_o`, so a stray pointer cannot
hang the core.

* `sloth_ram`: 32768 × 32-bit words with byte strobes and a registered read.
  It is written as a plain array so synthesis maps it to block RAM. An
  optional `INIT_FILE` parameter preloads it with `$readmemh`.
* `sloth_gpio`: OUT at 0x0 (read/write) and IN at 0x4, behind a two-flop
  synchronizer.
* `sloth_uart`: DATA at 0x0, STATUS at 0x4 (bit 0 tx busy, bit 1 rx valid,
  bit 2 overrun) and DIV at 0x8 (cycles per bit, reset `UART_DIV = 217`).
  It transmits and receives 8N1.

The top also brings out `hash_busy_o` (KTI3, KECC, S256, S512) as an
observation or interrupt aid.

## Where this RTL follows the published design and where it chooses

These parts follow the published SLotH architecture:
* the set of units and the 128 kB RAM;
* the KTI3 base address and 1 KiB window;
* every Keccak register offset and size;
* the meaning of CTRL, STOP, SECN and the three CHNS command forms;
* the SLH-DSA hash formats;
* 24 / 64 / 80 cycles per Keccak / SHA-256 / SHA-512 operation;
* single-cycle parallel loading of secrets;
* a three-share threshold Keccak that stays compatible with the known-answer
  tests.

These parts are choices of this implementation:
* the bus protocol and the rest of the address map;
* the exact PRF-to-F hand-over on ADRS (type cleared to WOTS_HASH) and the
  write-back of ADRS;
* the SHA-256 unit's chaining registers and its PK.seed mid-state, which
  copy the Keccak unit's register map (published for the Keccak unit only);
* X taken from and returned in state bytes 0..n-1;
* `0x80` read as "load the prefix and clear the rest";
* STOP applying only to raw permutations;
* write-only SK.seed registers;
* the chi sharing equations and the lack of re-masking;
* the SHA-512, RAM, GPIO and UART register layouts;
* what a slot of a left-out unit returns;
* all reset values except STOP.

Not included:
* the RV32IMC core;
* SLH-DSA formatting in the SHA-512 unit (H, T_l and the message hashes of
  the SHA2 sets stay in software);
* fault-attack redundancy, which the published design names only as future
  work.

What this means for performance: the hash units deliver the cycle counts
above. Whole signatures also depend on the firmware and the core, which are
not part of this RTL. Complete key generation, with a testbench doing the
firmware's bus transfers (two to three cycles per access, no instruction
overhead), takes:

| parameter set | leaves × chains | cycles here | published prototype |
|---|---|---|---|
| SLH-DSA-SHAKE-128f | 8 × 35 | 141,960 | 176,552 |
| SLH-DSA-SHAKE-192f | 8 × 51 | 224,214 | 284,238 |
| SLH-DSA-SHAKE-256f | 16 × 67 | 635,364 | 815,609 |
| SLH-DSA-SHA2-128f | 8 × 35 | 319,812 | 358,494 |
| SLH-DSA-SHA2-192f | 8 × 51 | 477,369 | 541,583 |
| SLH-DSA-SHA2-256f | 16 × 67 | 1,284,675 | 1,454,706 |
| SLH-DSA-SHAKE-128s | 512 × 35 | 9,080,904 | 11,180,642 |
| SLH-DSA-SHAKE-192s | 512 × 51 | 14,346,294 | 18,038,904 |
| SLH-DSA-SHAKE-256s | 256 × 67 | 10,165,284 | 13,003,653 |

The published figures also include the core's own instructions around
each access, which the testbench does not spend. The published prototype reports, for example, about
4.9 million cycles for SLH-DSA-SHAKE-128f signing, about 47 cycles per hash
call on average. The memory needs of every parameter set (signatures up to
about 50 kB, plus about 16 kB of code and a 4 kB stack) fit in the 128 kB
RAM.

## Files

`rtl/`
* `sloth_pkg.sv`: bus types, address map, Keccak and SHA-2 round constants.
* `sloth_soc.sv`: the top.
* `empty_slot.sv`: the bus responder for a left-out unit.
* `bus_interconnect.sv`, `sloth_ram.sv`, `sloth_gpio.sv`, `sloth_uart.sv`:
  the bus and peripherals.
* `keccak_slh_unit.sv`, `keccak_round.sv`, `keccak_ti3_round.sv`: the Keccak
  units.
* `sha256_unit.sv`, `sha512_unit.sv`: the SHA-2 units.

`tb/`: one self-checking testbench per module, `tb_<module>.sv`, plus
`tb_bus_tasks.svh` (bus read/write tasks). Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. Expected values were
computed independently with standard SHAKE256, SHA-256 and SHA-512
implementations and embedded as constants.

* `tb_keccak_slh_unit` covers both unit variants:
  * raw 24- and 12-round permutations;
  * chains at n = 16 and 32;
  * a masked PRF and PRF + 3 steps at n = 24 with random shares;
  * the 0x80 prefix and ADRS write-back;
  * cycle counts.
* `tb_sloth_soc` runs the top with default parameters and is the end-to-end
  test:
  * a complete WOTS+ public-key generation for n = 16: 35 masked PRF+chain
    commands on KTI3, with the chain ends stored in RAM and absorbed into a
    5-block T_len on KECC;
  * an H computation;
  * a reduced-round permutation;
  * one SLH-DSA-SHA2-128 WOTS+ chain on the SHA-256 unit (PRF + 15 F,
    building the mid-state);
  * two-block SHA-256 and SHA-512;
  * writes while busy;
  * a UART loopback, GPIO and an unmapped access.

  It counts each of these mechanisms inside the design. It also checks that
  there were exactly 35 PRFs and 525 F steps on the Keccak unit, taking 24
  cycles per hash. It
  needs about 23k cycles and runs in well under a second.
* `tb_sloth_wots` covers the three security levels of the twelve parameter
  sets, n = 16, 24 and 32, on the default top. At each n it runs:
  * a WOTS+ chain (PRF + 15 F) on KTI3 with a random three-share key;
  * the same chain on KECC, and H on KECC;
  * the same chain of the SHA2 sets on the SHA-256 unit;
  * for n = 24/32, H on the SHA-512 unit with software formatting.
  * the chains split as WOTS+ signing and verification split them: stop
    after a steps, then continue from that value at hash address a (the
    `s`-only CHNS form with X written by software). The end must equal the
    full chain.

  It checks the results and the busy cycles: 24 per Keccak hash, 64 + 16 ×
  65 for a SHA-256 chain that rebuilds the mid-state, and 80 per SHA-512
  block.
* `tb_sloth_keygen` runs complete SLH-DSA key generation on the default
  top for the six fast sets (SHAKE and SHA2, n = 16/24/32) and the three
  small SHAKE sets. Key generation is the root of the top-layer XMSS tree:
  every WOTS+ leaf is folded with H by a node stack. SHAKE sets run the
  chains on KTI3 with a three-share key and T_len and H on KECC. SHA2 sets
  run the chains on the SHA-256 unit, and T_len and H either from its
  PK.seed mid-state (n = 16) or on the SHA-512 unit (n = 24/32), with the
  testbench doing the padding. It checks PK.root, the PRF count and the
  threshold unit's busy cycles, and prints the cycles of each key
  generation. About 36 M cycles, a little over a minute in Verilator.
* `tb_sloth_soc_cfg` builds the top without KTI3 and SHA-512. It checks that
  the remaining units work and that the empty slots answer without effect.

## Simulating

With Verilator 5, from the repository root (modules are found by file name):

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
        rtl/sloth_pkg.sv tb/tb_sloth_soc.sv --top-module tb_sloth_soc
    ./obj_dir/Vtb_sloth_soc

Replace `tb_sloth_soc` with any other testbench name. The simulator is
two-state, so every register that is read is reset. The RAM contents are
not reset: write memory before you read it.

To drive the SoC from a real core, connect the core's memory port to
`cpu_req` / `cpu_rsp`: hold the request until `ready`, with `wstrb = 0` for
reads. Preload the firmware with `sloth_ram`'s `INIT_FILE`, or with your own
boot path.
