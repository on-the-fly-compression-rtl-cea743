# OCDA: on-the-fly compression accelerator for a Java processor

A Java processor (JOP-style, running a pre-linked `.jop` image) fetches
bytecode, class structures and tables from external memory. Fetch time
and energy grow with the number of bytes that cross the bus. This
accelerator sits between the processor's internal RAM and the system-bus
interface. The image is kept compressed in main memory and expanded
on the fly while it is loaded.

No single code suits every part of a JOP image. So the accelerator keeps
a **map of the image's areas** and uses the code that suits each one:

| image area | content | code used |
|---|---|---|
| header word | address of the special pointers | none (raw) |
| bytecode of all methods | four 8-bit bytecodes per word, a few opcodes dominate | **table-based** |
| special pointers | neighbouring values are close | **difference** |
| string table | no structure | none |
| static fields | mostly zero words | **zero-removal** |
| class information | mostly zero words | **zero-removal** |
| method table | two words per method, neighbouring values are close | **difference** |
| constant pool | no structure | none |

The design has three parts, shown below:

```
 internal RAM side                 OCDA                        bus side
  st_* (data out) ──────────► CC ──────────────────────────► bw_*  (data write)
  st_addr / ld_req (address) ─► CAT ── scheme ──► CC, DC
                                CAT ◄── CCL ─── CC
                                CAT ── compressed address ─► bw_addr / br_req_*
  ld_* (data in)  ◄────────── DC ◄────────────────────────── br_*  (data read)
```

* **CC** (compression component, `ocda_cc`) codes and packs the words.
* **DC** (decompression component, `ocda_dc`) unpacks and restores them.
* **CAT** (compressed address table, `ocda_cat`) maps each uncompressed
  address to a scheme. It also maps each block to its place in
  main memory.

## The three codes

All codes are bit strings. The first bit goes into bit 31 of a bus word.
Every code starts with a *Head* that alone fixes the code's length.
This lets the decompressor find where the next code starts in the same
cycle. Each scheme has its own encoder and decoder module (`*_enc`,
`*_dec`). All six are combinational.

**Table-based (`tbc_enc`, `tbc_dec`).** A programmable set S holds 16
bytecodes, normally the 16 most frequent in the program. Each of the four
bytecodes in a word (the first one in bits 31:24) is coded on its own:

* in S → `1` + 4-bit index into S (5 bits)
* not in S → `0` + the 8-bit bytecode (9 bits)

So a word takes 20 to 36 bits. The encoder compares all four bytecodes
against all 16 entries in parallel. If a value appears in S twice, the
lowest index wins.

**Zero-removal (`zr_enc`, `zr_dec`).** An all-zero word becomes the
single bit `0`. Any other word becomes `1` + its 32 bits.

**Difference (`diff_enc`, `diff_dec`).** This code needs the most care.
The word is compared with a *base* word:

* `i` = position of the most significant bit where word and base differ
  (`i = 0` if they are equal)
* code = 5-bit `i`, then bits `i..0` of the word (6 to 37 bits)

The decoder takes bits 31..i+1 from the base and the rest from the
remainder. Bit `i` itself is sent, not implied, so equal words need no
special case. The base is the **previous difference-coded word of the
same block**. At the start of each block the base is zero, so the first
difference word of a block is coded as just its significant bits, and
every block can be decoded without any other block. A word that differs
from its base in bit 31 costs 37 bits. There is no escape code.

## Blocks, packing and the compressed code length

Variable-length codes cannot be addressed word by word. The image is
therefore handled in **blocks of 16 words** (`BLOCK_WORDS`). Blocks are
aligned on 16-word boundaries of the uncompressed image.

**Compression (`ocda_cc`).** A word is taken each cycle with its scheme.
It is coded and OR-ed into a 96-bit buffer, left-aligned. A full 32-bit
word leaves the buffer whenever one is available. A new word is taken
only while the buffer has room for a longest code (37 bits), which
causes an occasional stall when many long codes arrive in a row. After
the block's last word, the buffer is flushed: the final bus word is
padded with zeros. The total code length in bits, the **CCL**, is
reported together with the last bus word. Raw data passes at one word
per cycle.

**Decompression (`ocda_dc`).** Bus words are appended to a 96-bit buffer.
All three decoders look at its top 37 bits. The decoder of the current
word's scheme returns the word and its code length. The word leaves
once the buffer holds that many bits, and the buffer then shifts by that
length. Output is one word per cycle once data is in. After the 16th
word, the padding is dropped.

## The compressed address table (`ocda_cat`)

**Region map.** Eight registers of `{start address, scheme}`, written in
ascending start order. An address takes the scheme of the last region
whose start is at or below it. The map has two lookup ports, one for
the store path and one for the load path.

**Block table.** One entry per block (4096 entries at the default 64K-word
image): `{compressed word address, length in words}`, plus a valid bit.
When the CC reports the CCL, the table does three things:

* rounds the CCL up to whole words
* writes the entry at the allocation pointer `next_free`
* advances `next_free`

While a block is being compressed, the table supplies the main-memory
address `next_free + index` for each packed word. Allocation only
appends: storing a block again takes new space, and the old copy is
abandoned. `space_ok` is low once a worst-case block (19 words)
might not fit. A store that starts while `space_ok` is low is
consumed but not written, and the sticky `overflow` flag is set. Block
lookups answer one cycle later (a synchronous RAM read).

## Top level (`ocda_top`) interface

All streams use valid/ready. A transfer happens on a rising clock edge
where both are high. Reset is asynchronous and active low.

| group | signals | use |
|---|---|---|
| configuration | `tbl_we/idx/val` | write entry `idx` of the set S |
| | `rgn_we/idx/start/scheme` | write one region of the area map |
| store (RAM → memory) | `st_valid/ready/addr/data` | words of whole blocks, in address order; the first word is block-aligned; hold steady while stalled |
| load request | `ld_req_valid/ready/addr` | block-aligned word address |
| load data (memory → RAM) | `ld_valid/ready/addr/data/last` | the 16 restored words with their addresses |
| | `ld_err` | one-cycle pulse: the block was never stored (no data follows) |
| bus write | `bw_valid/ready/addr/data` | byte address `CMP_BASE + 4*word` |
| bus burst read | `br_req_valid/ready/addr/len` | one request per block, length in words |
| | `br_valid/ready/data` | the words of that burst, in order |
| status | `overflow` | the compressed area ran out; a store was dropped |

**Load sequence.** A load takes:

1. the request cycle
2. one cycle of table lookup
3. the burst request (as long as the bus takes to accept it)
4. the stream of restored words, starting the cycle after the first bus
   word arrives

The store and load paths are independent and may overlap. A load of a
block that is being stored at that moment returns the previous copy.

**Typical use.**

1. Reset.
2. Write the set S (from a bytecode histogram of the program).
3. Write the eight region starts from the image layout.
4. Store the image block by block.
5. Load blocks whenever the processor needs them.

Parameters of `ocda_top`, with their defaults:

* `UADDR_W=16`: 64K-word image
* `CADDR_W=16`: 64K-word compressed area
* `BLOCK_WORDS=16`
* `NUM_REGIONS=8`
* `CMP_BASE=32'h0010_0000`

`ocda_pkg` holds the shared widths and the `scheme_e` type:

* `SCH_NONE=0`
* `SCH_TABLE=1`
* `SCH_DIFF=2`
* `SCH_ZERO=3`

## What follows the original description, and what does not

The following come from the published design:

* the area-to-scheme assignment
* the three code formats (1-bit heads, a 16-entry set with 4-bit
  indices, a 5-bit difference head)
* the split into CAT, CC and DC, and how they connect
* the CAT assigning addresses from the CCL

Everything the description leaves open is this design's own choice:

* the block size
* the bit order and packing
* the base of the difference code
* the region registers
* the append-only allocation and overflow handling
* the valid/ready ports

The main reading to be aware of concerns the difference code's base.
The description says both "compare with a basic 32-bit word" and
"neighbouring values are correlated". This design uses the previous
word. A fixed base word would be a small change in `ocda_cc`/`ocda_dc`.

Not included, because they are existing components rather than part of
this design:

* the Java processor itself
* the vendor bus interface (IPIF)
* the OPB/PLB bus
* the DDR SDRAM

Their signals appear as the ports above.

The reported compression results cannot be reproduced bit for bit. The
benchmark binaries are not available, and the published bit counts are
not fully consistent with the code formats. For example, the table-based
bytecode sizes imply a non-integer number of table hits. The end-to-end
test uses synthetic images with the published area sizes instead.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by
printing `TB_RESULT checks=N failures=M`. The testbenches compare the
RTL with `tb/ocda_ref_pkg.sv`, a bit-serial model that builds each code
one bit at a time, straight from the code definitions above.

* `tb_tbc_*`, `tb_zr_*`, `tb_diff_*`: 4000 random and corner-case words
  each. Encoders are checked for exact code and length. Decoders are
  checked for the restored word and the consumed length, with random
  bits following the code.
* `tb_ocda_cc`, `tb_ocda_dc`: 380 blocks with mixed and single schemes,
  random input gaps and random output stalls. They check:
  * the exact packed bus words, the last flag and the CCL (CC)
  * the restored words (DC)
  * the one-word-per-cycle rate
* `tb_ocda_cat`: region lookups on both ports, allocation and rounding,
  re-allocation of a block, misses, and `space_ok` as the area fills.
* `tb_ocda_top`: a reduced 1024-word image. It loads a missing block
  (`ld_err`), stores everything (bus word count = reference), loads
  everything in random order, runs store and load at the same time, and
  fills the area until `overflow` drops stores. Every mechanism must
  occur at least once: table hit and miss, zero and non-zero words,
  difference and raw words, every kind of stall, `ld_err`, overflow and
  overlap.
* `tb_ocda_full`: default parameters, three images laid out with the
  area sizes of the Sieve, Kfl and UDP/IP benchmarks. Each image is
  stored and reloaded with a stall-free memory. The test prints per-area
  compression and cycle counts: about 1.25 cycles per word for a
  whole-image load, including per-block lookup and burst setup.
  Synthetic contents gave reductions of about 23 % on bytecode, 40 % on
  special pointers, 80 % on class data and 40 % on the method table.

`tb/ocda_mem_model.sv` is a behavioural bus-and-memory model. It can add
random stalls and is for simulation only.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ocda_pkg.sv tb/ocda_ref_pkg.sv tb/tb_ocda_top.sv --top-module tb_ocda_top
./obj_dir/Vtb_ocda_top
```

Replace `tb_ocda_top` with any other testbench name. Each one runs in
well under a second.

## Size

At the default parameters, coarse synthesis of `ocda_top` gives:

* about 4.7k flip-flops, 4096 of which are the block-table valid bits
* an 86 kbit block-table memory (4096 × 21 bits)
* a few hundred word-level cells, mostly the three 96-bit shifters and
  the 64 bytecode comparators

The upper bits of the bus address outputs are constant, fixed by
`CMP_BASE`.
