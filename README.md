# Argon2id password-hashing core

Argon2 is a memory-hard password hash. It makes each guess expensive for an
attacker with custom hardware. It does this by filling a large memory with
1024-byte blocks. Each new block depends on the previous block and on one
earlier block that is picked pseudo-randomly, and the memory is read back
several times. An attacker who keeps less memory must recompute the missing
blocks, and that costs far more time than the memory saved.

This core computes the whole of Argon2:

1. the 64-byte seed H0, from the password, salt, key, associated data and
   the parameters;
2. the memory fill, over one or more passes;
3. the final tag.

It supports all three variants:

- Argon2id is the default (type 2).
- Argon2d (type 0) picks reference blocks from the data.
- Argon2i (type 1) picks them from the position only.

It reproduces the published Argon2 test vectors for all three. Everything is
synthesizable SystemVerilog. It uses one BLAKE2b engine, one block
compression engine and one block memory.

## What is computed

Parameters:

| Symbol | Meaning |
|---|---|
| P | password |
| S | salt (nonce) |
| K | secret key |
| X | associated data |
| p | number of lanes |
| T | tag length in bytes |
| m | memory size in KiB |
| t | number of passes |
| v | version (0x13) |
| y | type (0 = d, 1 = i, 2 = id) |

`LE32(n)` is a 32-bit little-endian number.

```
H0   = BLAKE2b-64( LE32(p) LE32(T) LE32(m) LE32(t) LE32(v) LE32(y)
                   LE32(|P|) P  LE32(|S|) S  LE32(|K|) K  LE32(|X|) X )
m'   = 4p * floor(max(m, 8p) / 4p)         blocks of 1024 bytes
q    = m' / p                              blocks per lane
B[l][0] = H'(1024, H0 || LE32(0) || LE32(l))
B[l][1] = H'(1024, H0 || LE32(1) || LE32(l))
B[l][j] = G(B[l][j-1], B[l'][j'])          (pass 0)
B[l][j] = G(B[l][j-1], B[l'][j']) ^ B[l][j] (passes 1 .. t-1)
C    = B[0][q-1] ^ B[1][q-1] ^ ... ^ B[p-1][q-1]
tag  = H'(T, C)
```

### The memory matrix

The memory is a matrix of p lanes (rows) by q columns. The columns are cut
into 4 slices, so each lane holds 4 segments of q/4 blocks.

The order is:

- pass by pass;
- inside a pass, slice by slice;
- inside a slice, lane by lane.

Blocks in one slice never reference blocks of another lane from the same
slice. So all lanes of a slice could run in parallel. This core has a single
compression engine and runs the lanes one after another. The result is the
same.

In pass 0, slice 0 starts at column 2, because columns 0 and 1 come from H'.
When a lane has only 8 blocks, this first segment is empty and is skipped.

## Choosing the reference block

This is the least obvious part of the algorithm. `argon2_index` and the
controller in `argon2id` implement it.

Every new block needs a 64-bit pseudo-random value. J1 is its low half and J2
its high half.

- **Data-dependent** (Argon2d, and Argon2id outside the first half of pass
  0): the value is word 0 of the previous block. The controller captures it
  while it loads that block into the compression engine.
- **Data-independent** (Argon2i, and Argon2id in slices 0 and 1 of pass 0):
  the value comes from an *address block*. An address block is
  `G(0, G(0, Z))`, where Z holds the pass, lane, slice, m', t, y and a
  counter, followed by zeros. One address block gives 128 values. A new one
  is made at the start of each segment and every 128 blocks after that. The
  counter starts at 1 in each segment. The compression engine computes
  address blocks too: it clears its operand register, loads Z, runs, copies
  its result back into the operand register (`chain_i`), and runs again. The
  128 words are then kept in a small buffer.

The reference lane is `J2 mod p`. In the first slice of pass 0 it is always
the current lane. The reference set W holds the blocks that are already
finished and allowed:

- **Pass 0, same lane:** every earlier block of the lane, except the
  previous one.
- **Pass 0, other lane:** the completed slices. The last block of those
  slices is excluded when the current block opens a segment.
- **Later passes:** the three slices other than the current one, plus the
  blocks of the current segment done so far (same lane only).

The previous block is never in W, since it is already the other input of G.

The position inside W is biased towards recent blocks:

```
x   = (J1 * J1) >> 32
y   = (|W| * x) >> 32
rel = |W| - 1 - y
col = (start + rel) mod q
```

`start` is the first column of the next slice in later passes, and 0 in pass
0. `J2 mod p` is computed by a 32-step serial divider, because p may be as
large as 2^24 - 1. An index lookup therefore takes 34 cycles.

## The compression function G

`argon2_compress` holds two 128-word registers, R and Q. The operands are
loaded word by word:

1. X is written into R.
2. Y is xored into R, so R = X ^ Y.

`start_i` copies R into Q and applies the permutation P to 16 words at a
time, one P per cycle:

- **Cycles 0-7:** the 8 rows, each 16 consecutive words.
- **Cycles 8-15:** the 8 columns. Column k is words 2k, 2k+1, 2k+16, 2k+17,
  and so on up to 2k+113.

The result is read as `Q ^ R`, one word at a time.

P (`argon2_perm`) is one BLAKE2b round without message words: four column
mixes, then four diagonal mixes. Each mix (`argon2_gb`) replaces every
addition `a + b` with `a + b + 2 * lo32(a) * lo32(b)`. One P uses 32
multipliers of 32 x 32 bits.

## BLAKE2b and H'

- `blake2b_mix` is the BLAKE2b G function: rotations 32, 24, 16 and 63.
- `blake2b_compress` runs the 12 rounds of the compression F. It does one
  full round (8 mixes) per cycle, and the result is ready 13 cycles after
  start.
- `blake2b_hash` takes the message one byte at a time. It packs the bytes
  into a 128-byte buffer and sets the digest length in the parameter word.
  A full buffer is compressed only when another byte arrives, so the last
  block is always the one flagged final.
- `argon2_hprime` is the variable-length hash H'. It hashes
  `LE32(T) || message`.
  - If T is at most 64, that hash is the whole output.
  - Otherwise it chains 64-byte hashes. It keeps the first 32 bytes of each
    and ends with one hash of the remaining length. A 1024-byte block is 30
    pieces of 32 bytes plus one of 64.
  - In raw mode the same unit computes H0. Raw mode skips the length
    prefix.

  Output leaves as 64-bit little-endian words, which the controller writes
  straight into the block memory.

`argon2_h0_msg` produces the H0 input one byte per cycle. It skips empty
strings.

## Interface of `argon2id`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk_i`, `rst_ni` | in | 1 | clock, asynchronous active-low reset |
| `valid_i` | in | 1 | start a hash; all inputs are sampled in this cycle |
| `pwd_i`, `pwd_len_i` | in | 8*PW_BYTES, 32 | password and its length in bytes |
| `salt_i`, `salt_len_i` | in | 8*SALT_BYTES, 32 | salt, 8 bytes or more |
| `key_i`, `key_len_i` | in | 8*KEY_BYTES, 32 | secret key (may be empty) |
| `ad_i`, `ad_len_i` | in | 8*AD_BYTES, 32 | associated data (may be empty) |
| `lanes_i` | in | 32 | p |
| `tag_len_i` | in | 32 | T, 4 .. TAG_BYTES |
| `mem_kib_i` | in | 32 | m |
| `passes_i` | in | 32 | t |
| `version_i` | in | 32 | v (only hashed into H0) |
| `type_i` | in | 32 | y |
| `valid_o` | out | 1 | one-cycle pulse: tag ready, or request rejected |
| `error_o` | out | 1 | set with `valid_o` when the request is rejected |
| `tag_o` | out | 8*TAG_BYTES | tag, held until the next request |
| `compressed_ready_o` | out | 1 | pulse for each memory block the compression function finishes |
| `busy_o` | out | 1 | high from the cycle after `valid_i` until the result |

**Byte order.** Strings are left-aligned on their ports: byte 0 is the most
significant byte, as when the port value is written out in hex. `tag_o`
holds the tag in the same way, and bytes past T are zero.

**Rejected requests.** A request is rejected, without touching the memory,
in any of these cases:

- p = 0 or t = 0;
- y > 2;
- T < 4 or T > TAG_BYTES;
- |S| < 8;
- a string longer than its port;
- m > MAX_BLOCKS;
- 8p > MAX_BLOCKS.

**Timing.** For the standard test input (p = 4, m = 32, t = 3, T = 32) a hash
takes about 62,000 cycles:

| Step | Cycles |
|---|---|
| Each of the 88 computed blocks: load the previous block (129), index lookup (35), load the reference block (129), G (17), write back with xor of the old block (129) | about 445 each, 39,000 in all |
| Eight initial blocks: 31 BLAKE2b runs each, fed byte-serially | about 21,000 |
| Final C and tag | about 1,700 |
| H0 and the four address blocks | under 1,000 |

Argon2d and Argon2i take 61,600 and 69,200 cycles.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `MAX_BLOCKS` | 32 | memory size in 1024-byte blocks (32 KiB, 256 Kbit) |
| `PW_BYTES` | 32 | password port width |
| `SALT_BYTES` | 16 | salt port width |
| `KEY_BYTES` | 32 | key port width (the Argon2 maximum key length) |
| `AD_BYTES` | 12 | associated-data port width |
| `TAG_BYTES` | 32 | tag port width |

The defaults fit the standard Argon2 test vector: 32 KiB of memory, a
32-byte password, 16-byte salt, 12-byte associated data and a 32-byte tag.
The key port takes the longest key Argon2 allows, 32 bytes. With every string
at full width the H0 input is 132 bytes, which spans two BLAKE2b blocks. The memory is a plain array with one synchronous read
port and one write port, so FPGA tools map it to block RAM. Raise
`MAX_BLOCKS` for larger memory costs. Real deployments use megabytes, which
need an external memory behind the same one-read, one-write word interface.

## How far it can be trusted

Each module has a self-checking testbench in `tb/`. Expected values come from
known answers computed with an independent software model, or from a
reference model written inside the testbench.

| Testbench | What it checks |
|---|---|
| `argon2id_tb` | The full core at its default sizes. It runs the published Argon2id, Argon2d and Argon2i test vectors (p=4, T=32, m=32, t=3; password 32 x 01, salt 16 x 02, key 8 x 03, data 12 x 04). The Argon2id tag is `0d640df58d78766c08c037a34a8b53c9d01ef0452d75b65eb52520e96b01e659`. It also checks a rejected request, the number of blocks and address blocks, and that every mechanism fired: address blocks, data-dependent indexing, cross-lane references, xor write-back, chained H'. |
| `argon2id_params_tb` | Five more parameter sets: one lane, three lanes with m raised to 8p, m' rounding down, 4-byte tag, empty and short strings, and every string at full port width. It also checks two rejected requests. |
| `argon2id_bigmem_tb` | The core built with a 1 MiB memory (`MAX_BLOCKS = 1024`), running Argon2id (p=1, t=2) and Argon2i (p=2, t=1) over all 1024 blocks. The 256-block segments need a second address block in the middle of a segment. |
| `argon2_compress_tb`, `argon2_perm_tb`, `blake2b_mix_tb` | Known answers plus thousands of random vectors against models. |
| `blake2b_compress_tb` | The "abc" digest, random blocks and the 13-cycle latency. |
| `blake2b_hash_tb` | Messages of 3, 128, 129 and 300 bytes, with random stalls. |
| `argon2_hprime_tb` | T = 32, 100 and 1024, and raw mode. |
| `argon2_index_tb` | 3000 random positions against a model, and the 34-cycle latency. |
| `argon2_h0_msg_tb`, `argon2_mem_tb` | The byte sequence and the memory behaviour. |

Not covered:

- The largest memory simulated end to end is 1024 blocks (1 MiB). A hash
  over it takes about 460,000 cycles per pass. The index unit was checked
  separately for lanes up to 40 and segments up to 300 blocks.
- Tags longer than 64 bytes cannot leave the core with the default port,
  although H' itself supports them.

To simulate with Verilator, put the package first:

```
verilator --binary --timing rtl/argon2_pkg.sv rtl/argon2_gb.sv rtl/argon2_perm.sv \
  rtl/argon2_compress.sv rtl/argon2_index.sv rtl/argon2_mem.sv rtl/blake2b_mix.sv \
  rtl/blake2b_compress.sv rtl/blake2b_hash.sv rtl/argon2_hprime.sv rtl/argon2_h0_msg.sv \
  rtl/argon2id.sv tb/argon2id_tb.sv --top-module argon2id_tb -o sim
./obj_dir/sim
```

Each testbench ends with a line `TB_RESULT checks=N failures=M`.

## Design choices and departures from the source description

The core follows a published description of an Argon2id IP core. That
description gives:

- the port list: clock, reset, valid in/out, password, nonce, key,
  associated data, the parameters, tag and a "compressed ready" flag;
- the port widths, taken from its simulation example;
- the algorithm steps, the BLAKE2b mix and IV, the structure of G and the
  indexing rules.

Where its text is incomplete or its formulas disagree with Argon2 as
specified, this RTL follows the Argon2 specification (RFC 9106, version
0x13), because that is what reproduces the example tag:

- **H0 input.** The key and associated data, each with its length, follow
  the salt.
- **H' piece count.** H' uses r = ceil(T/32) - 2 pieces of 32 bytes, then
  one hash of T - 32r bytes. A count of ceil(T/32) - 1 would give a
  different result.
- **Multiply term.** The permutation inside G uses the multiply-add form of
  the mix, not the plain BLAKE2b addition.
- **Reference lane.** The lane comes from J2, and J1 positions the block.
- **Reference set.** W and the biased position formula follow the
  specification.
- **Which half is data-independent.** Argon2id is data-independent in the
  first two slices of pass 0 and data-dependent afterwards, not the other
  way round.
- **Minimum memory.** The memory is raised to at least 8p blocks.
- **Rounds and schedule.** The number of BLAKE2b rounds (12) and the
  message schedule are the standard BLAKE2b ones.

Choices made here, with no counterpart in the description:

- the serial schedule: one G engine and one BLAKE2b engine, lanes in turn;
- one P per cycle and one BLAKE2b round per cycle;
- byte-serial message paths;
- the 64-bit memory word with one-cycle reads;
- the serial divider for `J2 mod p`;
- the valid/busy handshake;
- the `error_o` range check;
- the meaning of `compressed_ready_o` (a pulse per finished block);
- string byte order on the ports.

Version 0x10 of Argon2, which overwrites blocks instead of xoring them in
later passes, is not implemented; `version_i` only enters H0. The
description also reports a 64-cycle latency at 63.56 MHz on a Spartan-6
LX16. A whole Argon2 hash cannot fit in 64 cycles, and this core makes no
attempt at it.

## Files

| Folder | Contents |
|---|---|
| `rtl/` | One module or package per file. `argon2_pkg` holds the BLAKE2b IV, the sigma schedule and the shared sizes; `argon2id` is the top. |
| `tb/` | One testbench per module, plus `argon2id_params_tb` for the extra parameter sets. |
