# RCEAT: reading four UHF RFID tags per read cycle

When many RFID tags answer a reader at the same time, their replies collide.
Tree-based anti-collision schemes resolve this by splitting the population step
by step until one tag is left, which takes many rounds. RCEAT (Reliable and
Cost-Effective Anti-collision Technique) shortens this. Tags are taken in groups
of four, and the whole group is resolved in one read cycle. First every reply
is checked for transmission errors with a CRC. Then the four IDs are ordered
from smallest to largest in a single step, and each is acknowledged in turn
with a *kill-tag* word that silences that tag. The tag remembers nothing between
reader commands: it only carries an address, so it can be very simple and
low-power.

This repository holds synthesizable SystemVerilog for the digital part of that
identifier, from the received tag messages to the serial ID and kill-tag
output. The radio front end and the tags themselves are not part of it.

```
              pre_rceat                         post_rceat
           +-----------------------+       +-------------------------------+
message -->| split ID | CRC  --->  |  id   | fastsearch  -->  paralleltoserial |--> tag_out
 4 x 32    |   \           CRC     |------>| (sort 4 IDs)     (1 word/clock)   |--> tag_kill
           |    +------> checker --|--> sbit, tag_err                          |--> phase
           +-----------------------+       +-------------------------------+
```

## Tag message and CRC

Each tag reply is 32 bits: the 16-bit tag ID in bits [31:16] and a 16-bit CRC
of that ID in bits [15:0]. The CRC is CRC-16 with generator polynomial
x^16 + x^12 + x^5 + 1 (0x1021). The register starts at zero, the ID is shifted
in MSB first, and there is no bit reflection and no final inversion. This is the
common "XMODEM" form. Examples: ID 0x0010 has CRC 0x1231, ID 0x0005 has CRC
0x50a5, and ID 0xea6c has CRC 0x5253.

`crcchecker` recomputes the CRC of every received ID. The function `crc_of`
in `rceat_pkg` does this as an unrolled bit-serial loop, which synthesizes to a
tree of XOR gates. The checker then compares each result with the received
CRC. `tag_err[i]` flags tag i, and `sbit` is the OR of the four flags: 0 means
the whole group arrived intact, and 1 means at least one reply is corrupt.

## The read cycle (timing)

There is no valid/ready handshake. After reset the design runs a free,
four-clock read cycle, and the four messages of a group must be held on
`message` for the whole cycle. Number the rising edges after `rst` falls
1, 2, 3, .... Then group g (g = 0, 1, ...) is handled like this:

| what | when |
|---|---|
| `message` holds group g | from before edge 4g+1 until after edge 4g+4 |
| `sbit`, `tag_err` describe group g | edge 4g+1 to edge 4g+5 |
| `tag_out` = k-th smallest ID of group g, `tag_kill` = {1, ID} | edge 4g+2+k to edge 4g+3+k, k = 0..3 |
| `phase` (serializer state) | 0 in reset, then 1, 2, 3, 4, 1, 2, ... |

So each ID is output two clocks after its group is presented. One clock goes
to the sort register and one to the output register. After that the output
is one ID per clock with no gaps. In the first clock after reset, `tag_out`
and `tag_kill` are zero.

Example: the group {00c8, 0005, 0010, ea60} (IDs only) comes out as 0005,
0010, 00c8, ea60, with kill words 10005, 10010, 100c8, 1ea60.

## Fast search

`fastsearch` compares all six pairs of the four IDs at the same time. From the
comparison bits, each ID gets its rank, which is the number of IDs that come
before it. Output slot k then takes the ID of rank k, so the rank pattern acts
as a lookup table from comparison results to output order. Equal IDs keep their
input order: an ID ranks after equal IDs on lower-numbered inputs. This keeps
all ranks distinct, so every slot is filled. The outputs are registered. The
module is written for any group size N, and the design uses N = 4.

## Serializer and kill-tag

`paralleltoserial` is a word-by-word multiplexer with a small state machine.
State 0 is idle, after reset. States 1..4 send the 1st..4th smallest ID, and
after state 4 the machine goes straight back to state 1. The kill-tag word is
the ID with a 1 prepended (17 bits). The leading 1 marks the tag as
identified, and sending the word tells that tag to stop answering.

## Where this RTL departs from, or adds to, the original description

- **Corrupt groups are not blocked.** The original text says only error-free
  messages go on to the sorting stage. Its schematic and example waveforms,
  however, feed the IDs to the sorter directly, and corrupt groups still
  appear on the output. This RTL follows the schematic: every group is sorted
  and sent. `sbit` and `tag_err` are reported alongside, and the system
  receiving the IDs must discard a group whose `sbit` is 1.
- **One-bit status.** The text gives the error value of the status as "two".
  Here it is a single bit, 1 on error, matching the single-bit `sbit` of the
  schematic.
- **CRC variant.** The original names only "CRC". The variant above was chosen
  because it reproduces all of the original's example messages that are
  meant to be error-free.
- **Added outputs:** `tag_err` (per-tag error flags) and `phase` (serializer
  state).
- **Reset:** synchronous and active high. It clears every register to zero.
- **Framing:** the four-clock free-running read cycle described above. The
  original does not say how groups are framed.
- **Size:** the original FPGA build reports 89 flip-flops. This RTL has 105
  flip-flop bits: 64 for the sort register, 33 for the output, 3 for the state
  and 5 for the status. The original's count was not used as a target.

## Files

| file | contents |
|---|---|
| `rtl/rceat_pkg.sv` | sizes (4 tags, 16-bit ID, 16-bit CRC, 32-bit message), CRC polynomial, `crc_of` |
| `rtl/prepostrceat.sv` | top level |
| `rtl/pre_rceat.sv` | message split and CRC check |
| `rtl/crcchecker.sv` | CRC recompute, compare, status register |
| `rtl/post_rceat.sv` | sorter plus serializer |
| `rtl/fastsearch.sv` | one-clock sort of four IDs |
| `rtl/paralleltoserial.sv` | state machine, serial ID and kill-tag output |
| `tb/tb_ref_pkg.sv` | reference models (CRC by polynomial long division, insertion sort) and the example messages |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_rceat_example` |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. The reference
models in `tb/tb_ref_pkg.sv` are written independently of the RTL: the CRC
there is a 32-bit polynomial long division, and the sort is an insertion sort.
For example, to run the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/rceat_pkg.sv tb/tb_ref_pkg.sv rtl/crcchecker.sv rtl/pre_rceat.sv \
  rtl/fastsearch.sv rtl/paralleltoserial.sv rtl/post_rceat.sv rtl/prepostrceat.sv \
  tb/tb_prepostrceat.sv --top-module tb_prepostrceat
./obj_dir/Vtb_prepostrceat
```

`tb_prepostrceat` runs the top at its only size. The run has 400 read cycles
in two parts, with a reset in between. The first five groups are the
original's worked example; the rest are random, and one reply in ten has a
flipped bit. The test checks every `sbit`, `tag_err`, `tag_out` and `tag_kill`
value at the exact clock given in the timing table. It also counts error-free
groups, corrupt groups, groups that needed reordering, groups with repeated
IDs, serializer wrap-arounds and the idle state in reset, and it fails if any
of these never happens.

`tb_rceat_example` replays the original's five-group example on the top and
compares the first 18 output words literally. That stream is 0000, then
0005 0010 00c8 ea60, 0006 0014 00d0 ea6c, 0007 0018 00d8 ea78,
0001 0081 0dd8 ea78, and 0003. The test also checks the kill words and the
status bit of each group.

Besides the testbenches, the RTL carries three concurrent assertions. The
sorter output is always ascending. The serializer state stays within 0..N.
The kill word is zero or {1, `tag_out`}.

The module tests are:

- `tb_crcchecker`: known CRC pairs, plus random good messages and messages
  with one flipped bit.
- `tb_fastsearch`: all 24 orders of four distinct IDs, groups with repeated
  IDs, and random groups.
- `tb_paralleltoserial`: the state sequence, the word order, and the two-clock
  alignment.
- `tb_pre_rceat` and `tb_post_rceat`: the two stages on their own.

## Changing the design

The group size, ID width and CRC width are parameters in `rceat_pkg`. The
sorter and serializer take the group size as parameter `N`. The serializer
state then has `$clog2(N+1)` bits, and a read cycle lasts N clocks. A different
CRC needs new `CRC_POLY`/`CRC_INIT` values, plus a final XOR or bit reflection
added to `crc_of` if the variant calls for one. The testbench reference models
are written for four 16-bit IDs.
