# SMARTS memory protection unit

A memory protection unit (MPU) for a RISC-V SoC that keeps part of the
off-chip DRAM confidential, authentic and fresh. It sits between the L2 cache
and the DRAM memory controller. Every 64-byte cache line written into a
*trusted region* of DRAM is encrypted and tagged with AES-GCM. The GCM nonce
includes a per-line write counter, and the counters are protected by an 8-ary
Bonsai Merkle tree whose root never leaves the chip. Someone who can read or
rewrite the DRAM therefore sees only ciphertext. They cannot forge a line
(spoofing), move a line to another address (splicing), or put back an older
copy of a line together with all of its metadata (replay) without the MPU
reporting an authentication failure. Memory outside the trusted region is
passed through untouched. This is *partial memory encryption*: only what needs
protection pays for it.

All of this is synthesizable SystemVerilog (IEEE 1800-2017). The default
parameters give the reference configuration:

| quantity | value |
|---|---|
| cache line | 512 bits (64 B) |
| per-line and per-node counter | 56 bits |
| tag (MAC) | 64 bits |
| tree arity | 8 |
| trusted region | 128 MB = 2^21 lines (`LINE_AW = 21`) |
| tree | 6 levels; levels 0–4 in DRAM, level 5 (the root) in on-chip registers |
| on-chip root | 8 × 56-bit counters = 56 B |
| DRAM metadata | 2^18 tag lines + 299,592 node lines = 35.95 MB |

## Where it sits

```
 Rocket tiles ── L2 cache ──Acquire/Grant──▶ smarts_mpu ──NASTI (AXI)──▶ memory controller ── DRAM
                                              │ smrr            │                             ├ untrusted region(s)
                                              │ mpu_ctrl        │                             ├ trusted region (TR)
                                              │ aes_gcm_engine  │                             └ TR metadata
                                              └ nasti_line_port ┘
```

The range registers (`smrr`) sort each request address into one of three
classes:

* **untrusted**: forwarded to memory unchanged, in both directions;
* **trusted**: encrypted and authenticated as described below;
* **metadata**: the region that holds tags, counters and tree nodes. Requests
  from the cache side into it are refused with an error, so software can
  neither read nor rewrite the metadata.

The trusted-region base and the metadata base can be programmed, so the DRAM
can be repartitioned at run time. A lock bit then freezes the registers until
reset.

## Protecting one line: AES-GCM

`aes_gcm_engine` runs GCM over a whole line. It has one AES-128 core
(`aes128_core`), which serves both encryption and authentication, and one
GF(2^128) multiplier (`gf128_mul`).

* **Nonce (96 bits):** `IV[7:0] || line address[31:0] || counter[55:0]`. The
  IV comes from a range register. The address gives each location its own
  ciphertext and tag, which defeats splicing. The counter gives each write of
  a location its own ciphertext and tag, which defeats replay as long as the
  counter itself can be trusted.
* **Encryption:** standard counter mode. AES(nonce‖2) … AES(nonce‖5) are the
  four pads, XORed onto the four 128-bit blocks of the line. Decryption is the
  same operation.
* **Tag:** GHASH over the four ciphertext blocks and the GCM length block,
  XORed with AES(nonce‖1), then truncated to its top 64 bits.
* **Hash key:** H = AES(0) is computed once, whenever a key is loaded.
* **Block order:** block *i* of a line is `line[511-128i -: 128]`. A line
  written as a 128-digit hex literal therefore reads in GCM byte order.

With the tag left at 128 bits this is exactly NIST SP 800-38D GCM. The engine
reproduces the published 64-byte GCM test vector (key `feffe992…`, IV
`cafebabefacedbaddecaf888`): the ciphertext, and the top half of tag
`4d5c2af327cd64a6…`.

One line takes 62 cycles from `start` to `done`: five AES operations of 11
cycles each (one round per clock plus the hand-off), a GHASH step folded into
each block, and two closing cycles.

## The counter tree

A line's tag is only as good as its counter. If an attacker could roll a
counter back together with the old data and tag, the old line would verify.
The counters are therefore kept in a tree:

```
 root (on chip)         [ r7 r6 r5 r4 r3 r2 r1 r0 ]                      level 5
                                     │ r_k
 tree node              [ tag | c7 … c0 ]   × 8                          level 4
                                     ⋮
 tree node              [ tag | c7 … c0 ]   × 2^15                       level 0
                                     │ c_k
 counter block          [ tag | ctr7 … ctr0 ]  × 2^18   (one counter per data line)
 tag line               [ tag7 … tag0 ]        × 2^18   (one 64-bit tag per data line)
 data                   2^21 ciphertext lines
```

* A stored node is one 512-bit line. It holds eight 56-bit counters in bits
  `[56i+55:56i]` and a 64-bit tag in bits `[511:448]`. Eight counters and one
  tag fill exactly 512 bits.
* Each node's tag is a GCM tag over its 448 counter bits, padded with zeros to
  a line. Its nonce is `IV || the node's own DRAM address || the parent's
  counter for this node`. So every node is authenticated by one counter one
  level up. The top stored level is authenticated by the root counters, which
  an attacker cannot reach.
* The tree covers only the counters, not the data (a *Bonsai* Merkle tree).
  The data are covered by their per-line tags, and those tags already bind
  the counter.
* **Read check:** fetch the path from the top down, i.e. one node per stored
  level and then the counter block, followed by the tag line and the
  ciphertext. Each node is checked as soon as it arrives: its tag is
  recomputed from its parent's counter and compared. The parent is already
  on chip, either as the root or as the node fetched just before. So the GCM
  work overlaps the memory latency of the lines still in flight. Finally the
  line is decrypted and its tag compared.
* **Write:** check the path the same way. Then increment the line's counter
  and, on every level, the parent counter that covers the path, up to and
  including the root. Recompute every tag on the path, encrypt the line under
  its new counter, and write back the data, the tag line and the path.
* **Replay:** any stale copy of a line or of a node is now signed under a
  counter value one below the current one. Even a complete replay of every
  off-chip line on the path fails at the top stored node, whose parent counter
  is in the root registers.

### Metadata layout

All offsets count 64-byte lines from the metadata base (`LINE_AW = A`):

| section | lines | entry for data line *l* |
|---|---|---|
| tag lines | 2^(A−3) | line `l>>3`, slot `l%8` |
| level 0: counter blocks | 2^(A−3) | node `l>>3`, slot `l%8` |
| level *j* (tree) | 2^(A−3(j+1)) | node `l>>3(j+1)`; its counter in the parent is slot `(l>>3(j+1))%8` |

The node levels are stored one after another, in this order. At the default
size the levels hold 2^18, 2^15, 2^12, 2^9, 2^6 and 2^3 nodes, and the root is
the single node above them. `LINE_AW` must be a multiple of 3. With
`LINE_AW = 9` (32 KB), the tests use one stored tree level above the counter
blocks.

### Initialisation

Until the tree exists, any access to the trusted region is refused.
Initialisation starts from bit 2 of the control register. It writes every
counter block and tree node with zero counters and a valid tag, and clears the
root. That is one GCM operation and one line write per node: about 78 cycles
per node, or 23.6 M cycles for the 299,592 nodes at the default size. A data
line that has never been written has no valid tag, so reading it reports an
authentication failure.

## Request flow and cost

`mpu_ctrl` handles one request at a time. With `NLEV = LINE_AW/3 − 1` stored
node levels (6 at the default size):

| request | line reads | GCM operations | line writes |
|---|---|---|---|
| untrusted read / write | 1 / 0 | 0 | 0 / 1 |
| trusted read | NLEV + 2 | NLEV + 1 | 0 |
| trusted write | NLEV + 1 | 2·NLEV + 1 | NLEV + 2 |
| metadata region | refused | | |

Measured in the end-to-end test, against a memory with a 3-cycle read latency
and random back-pressure, a trusted read takes about 210 cycles at
`LINE_AW = 9` and about 470 cycles at the default size. Because node checks
start while later lines are still being fetched, the cost is set mainly by
the GCM operations (62 cycles each) rather than by the sum of fetch and check
time. The data line's own decryption starts once it has arrived. On a write,
the update (counter increments, re-tagging, encryption) and the write-back
run one after the other, after the check.

A failed check returns an all-zero line with `error` set on the Grant and
pulses `auth_fail`. A write whose path fails verification is refused and
changes nothing in memory.

## Range registers (`smrr`)

| `cfg_addr` | register |
|---|---|
| 0 | trusted-region base (line aligned); the size is fixed at 2^LINE_AW lines |
| 1 | metadata-region base (line aligned); the size follows from the layout above |
| 2 | IV, 8 bits |
| 3 | bit 0 enable, bit 1 lock, bit 2 start initialisation (write-only pulse) |

With enable clear, everything is untrusted and passes through. Once lock is
set, all writes are ignored until reset. Locking also blocks re-initialisation,
which would otherwise reset every counter to zero and make old ciphertext
valid again. An address inside both regions counts as metadata.

## Bus interfaces

* **Cache side:** a simplified TileLink pair. An Acquire (`acq_t`) carries a
  write flag, a 32-bit address and a whole 512-bit line. A Grant (`gnt_t`)
  carries the line and an error flag. Both use valid/ready.
* **Memory side:** `nasti_line_port` turns each line into NASTI (AXI) bursts.
  A write is one AW plus eight 64-bit W beats (INCR, `len = 7`, `size = 3`)
  and waits for B. A read is one AR, and its eight R beats are gathered back
  into a line. Beat *i* is `line[64i +: 64]` at `addr + 8i`. Assertions check
  that AW, W and AR hold their valid and payload until accepted.

## Files

| file | content |
|---|---|
| `rtl/smarts_pkg.sv` | sizes, line/node/channel types, metadata layout functions, AES S-box table built at elaboration |
| `rtl/smarts_mpu.sv` | top level |
| `rtl/mpu_ctrl.sv` | request sequencer, tree walk, initialisation |
| `rtl/aes_gcm_engine.sv` | one-line AES-GCM |
| `rtl/aes128_core.sv` | iterative AES-128 encryptor |
| `rtl/gf128_mul.sv` | GF(2^128) multiplier |
| `rtl/smrr.sv` | range registers and address check |
| `rtl/nasti_line_port.sv` | line ↔ NASTI bursts |
| `tb/nasti_mem_model.sv` | behavioural memory controller + DRAM: sparse, random back-pressure, backdoor port for tampering |
| `tb/smarts_mpu_tests.svh` | end-to-end test body shared by the two top-level benches |
| `tb/tb_*.sv` | one self-checking bench per module |

## Simulating

Each bench prints `TB_RESULT checks=N failures=M` and stops itself. It has a
watchdog. A typical Verilator run, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert --top-module tb_smarts_mpu \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/smarts_pkg.sv tb/tb_smarts_mpu.sv
./obj_dir/Vtb_smarts_mpu
```

| bench | what it shows | run time |
|---|---|---|
| `tb_aes128_core` | FIPS-197 vectors, 10-cycle latency | instant |
| `tb_gf128_mul` | published GHASH product; 200 random products against a carry-less-multiply reference | instant |
| `tb_aes_gcm_engine` | published GCM vector, decryption, tag sensitivity, 62-cycle latency | instant |
| `tb_smrr` | region edges, line index, enable, init pulse, lock | instant |
| `tb_nasti_line_port` | beat placement, burst fields, WLAST, back-pressure | instant |
| `tb_mpu_ctrl` | initialisation size and addresses; exact line sequence and GCM count of a trusted read and write; overlap of checks with fetches; counter values; rolled-back counter caught | instant |
| `tb_smarts_mpu` | end to end at `LINE_AW = 9`: pass-through, trusted read/write against a scoreboard, ciphertext in DRAM, metadata refusal, spoofed data and tag, splicing, data replay, full-path replay, refused write on a replayed path, lock, back-pressure, overlap of checks with fetches; each mechanism is counted | < 1 s |
| `tb_smarts_mpu_full` | the same test with every parameter at its default (128 MB region), including building the whole tree | about 2.5 min, 150 MB |

The memory model stores only the words that are touched, so the full-size run
needs no 128 MB array.

## Departures and limits

* **Own choices:** the AES key size (128), the nonce split (8-bit IV, 32-bit
  address, 56-bit counter), the metadata layout, the register map with its
  lock bit, initialisation, and error signalling are choices of this design.
* **Bus interfaces:** TileLink is reduced to single-beat line transfers, and
  the NASTI data width of 64 bits is assumed.
* **Tree height:** a published drawing of the tree shows four levels. This
  design follows the stated six-level, 128 MB configuration.
* **Storage overhead:** a storage overhead of 0.43 % of RAM has been quoted
  for this MPU. It cannot be derived from the stated sizes: with one 64-bit
  tag and one 56-bit counter per 512-bit line, the metadata here take 28 % of
  the protected region. The on-chip state, 56 B of root counters, is in line
  with the 64 B quoted.
* **Performance:** there is one request at a time. GCM overlaps memory
  latency only while the tree path is checked during a fetch; the data
  line's pads are not precomputed, and write-back is not overlapped. No
  metadata cache is built, and none is described. The run
  time overhead quoted for SPEC2006 is a system-level figure that this RTL
  alone cannot reproduce.
* **Counter overflow:** overflow after 2^56 writes to one line is not handled.
* **Rest of the SoC:** the Rocket cores, caches, fabrics, peripherals, the
  secure boot / debug / IO / TEE features and the memory controller are not
  part of this RTL. The key is expected on the `key` port from secure key
  storage.
