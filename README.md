# Operand-field-remapping instruction decompressor

This is a front-end decompression engine for dictionary-compressed ARM7TDMI
code. It sits between the compressed program memory and the processor. It
rebuilds the original 32-bit ARM instructions on the fly, one per clock, and
hands them to the processor.

The compression scheme targets a common pattern: many instruction sequences
have the same opcodes and differ only in their operands. A plain dictionary
stores each variant on its own. Here the dictionary is split into three:

| dictionary | holds | per instruction |
|---|---|---|
| OPD, opcode dictionary | the opcode sequence, with a bit marking the end of the sequence | 9 bits |
| ORD, operand remapping dictionary | one *mapping tag* per operand field, saying where the operand comes from | 5 × 3 bits |
| OLD, operand list dictionary | the operands that really have to be stored | 4 bits per loaded operand |

Most operands are not stored at all. Either an earlier operand of the same
sequence already holds the value, or the value is one of the program's three
most frequent operands (its *majorities*). The compressed program is then a
stream of codewords `[CC Idx_OPD Idx_ORD Idx_OLD]`. Each of the four fields is
Huffman-coded on its own. One codeword stands for a whole instruction sequence
(a piece of a basic block), and CC is the condition code that every
instruction of the sequence shares.

## Instruction format

Every ARM instruction is treated as

```
 31   28 27          20 19  16 15  12 11   8 7    4 3    0
[  CC  ][ new opcode  ][ OF2 ][ OF3 ][ OF4 ][ OF5 ][ OF6 ]
```

The 8-bit "new opcode" is instruction bits 27:20: the opcode together with
whatever fixed bits share that byte. Bits 19:0 are cut into five 4-bit operand
fields, whatever they mean in a given format (Rn, Rd, shift amount, Rm,
immediate nibbles). The condition code is not an operand field. It comes from
the codeword, once per sequence, so a sequence only ever holds instructions
with the same condition.

## Mapping tags, the mapping queue and the majority registers

This part needs the most care to get right. Each instruction has five 3-bit
tags, one for each of OF2..OF6, and they are evaluated in that order:

| tag | meaning |
|---|---|
| `000` | **load**: take the next operand from the OLD, and push it into the mapping queue |
| `001`..`100` | **map**: take position 1..4 of the mapping queue |
| `101`..`111` | **majority**: take majority register 1..3 |

The **mapping queue** (MQ) holds the last four *loaded* operands. Operands
reached through a map or majority tag are not pushed again. Position 1 is the
oldest entry held. When a push finds the queue full, the oldest entry drops
out and the others move down one position. So an operand that has dropped out
has to be loaded again. For example, if an instruction loads `1`, `0`, `A` into
an empty queue, a later tag `011` means `A` and `010` means `0`. This holds
even inside the same instruction.

The queue is emptied at the start of every sequence. The ORD and OLD entries
of a sequence are shared by all its occurrences in the program, so they may
refer only to operands of their own sequence.

The three **majority registers** hold the program's most frequent operands.
The compressor picks them and they are loaded with the tables.

The decoding of one instruction is combinational (`operand_remapper`). It
takes the five tags, the next five OLD operands, the queue contents and the
majorities, and produces the five operand fields and the number of loads. The
queue and the OLD pointer then advance by that number at the clock edge. The
remapper and `mapping_queue` compute the queue in two different ways (a
sliding window over "queue, then loads" and a shift register), and their unit
tests check both against a reference queue.

## Dictionary and code layout

All four memories are byte arrays read as bit streams, most significant bit of
each byte first (`packed_mem`).

* A sequence's first OPD, ORD and OLD entries start on a byte boundary.
  `Idx_OPD`, `Idx_ORD` and `Idx_OLD` are those byte addresses. The entries
  that follow are packed without padding: OPD every 9 bits, ORD every 15 bits,
  OLD every 4 bits.
* An OPD entry is `{last, opcode[7:0]}`, with `last` first in the stream. An
  ORD entry is the tags of OF2..OF6, OF2's first.
* Codewords are packed back to back in the code memory and may start at any
  bit. A codeword address is therefore `{byte address, bit offset[2:0]}`, which
  fits the 24-bit ARM branch offset as 21 bits of bytes plus 3 bits of bit
  offset. The compressor has to rewrite branch targets to such addresses. Every
  branch target must be the start of a codeword.

Each dictionary module (`opd_dict`, `ord_dict`, `old_dict`, `code_reader`)
owns its read pointer. A `start` input loads the pointer from an index and an
`advance` input steps it. The synchronous RAM is addressed with the pointer's
*next* value, so the data for the new pointer is on the outputs one clock
after any change, with no bubble.

## Huffman decoding

The compressor's Huffman codes are stored as canonical tables, one per field.
For each code length, the table holds the number of codes of that length,
followed by the symbols in code order. `huffman_decoder` compares the first
L bits of a 16-bit window with the first code of every length L in parallel.
The first code of length L+1 is (first(L) + count(L)) × 2. The shortest match
gives the length and the symbol's rank. The length advances the code pointer
in the same cycle, and the symbol is read from a RAM one cycle later. A window
that matches no code is an error.

## Engine timing (`ofr_decompressor`)

```
redirect  CC  OPD  ORD  OLD  START  INS INS INS(last)  CC  OPD ... 
            field decode: 1/cycle    one instruction per cycle
```

* A `redirect` (reset start or taken branch) loads the code pointer. The first
  instruction is valid 6 cycles later.
* The instructions of a sequence leave at one per cycle while `insn_ready` is
  high. An offered instruction stays, unchanged, until it is taken (checked by
  an assertion).
* After the last instruction of a sequence (`insn_last`), the next codeword is
  decoded, so there are 5 idle cycles between sequences.
* `next_cw_addr` is the address of the codeword after the current sequence.
  This is the value a branch-and-link at the end of the sequence saves as its
  return address.
* A redirect aborts whatever is in progress.
* An invalid Huffman code, or a tag that names an empty queue position,
  stops the engine with `error` high until the next redirect.

### Load bus

The tables are written through `ld` (`ofr_pkg::ld_bus_t`), one write per
clock, while the engine is idle:

| `target` | `addr` | `data` |
|---|---|---|
| `LD_CODE`, `LD_OPD`, `LD_ORD`, `LD_OLD` | byte address | byte in `[7:0]` |
| `LD_MR` | register 0..2 | operand in `[3:0]` |
| `LD_HCNT` | `{field[19:18], length[4:0]}` | number of codes of that length |
| `LD_HSYM` | `{field[19:18], rank[13:0]}` | symbol (CC value or byte index) |

The fields are numbered 0 = CC, 1 = Idx_OPD, 2 = Idx_ORD and 3 = Idx_OLD.

## Sizes

| parameter | default | why |
|---|---|---|
| `CODE_BYTES` | 128 KiB | largest compressed program of the MediaBench set reported for this scheme, about 70 KB (djpeg) |
| `OPD_BYTES` | 4 KiB | largest OPD about 2.4 KB |
| `ORD_BYTES` | 8 KiB | largest ORD about 4.1 KB (mpeg2enc) |
| `OLD_BYTES` | 16 KiB | largest OLD about 9.0 KB (mpeg2enc) |
| `MAXLEN` | 16 | longest Huffman code accepted |
| `NSYM` | 16384 | symbols per Huffman table, enough for any byte index into the OLD |

All 13 reported MediaBench programs fit these sizes. The sizes were worked out
from the published percentages of each program's size. The tag width (3),
queue depth (4) and number of majorities (3) are fixed in `ofr_pkg`. They are
the configuration that the scheme's evaluation found best.

## Where this design makes its own choices

The compression format, the meaning of the tags, the queue rules and the
dictionary layout follow the published scheme. The rest is this design's own:

* the pipeline and its rate, the valid/ready handshake, the redirect port and
  `next_cw_addr`;
* the load bus, and keeping the Huffman codes as canonical tables (the scheme
  says only that each field is Huffman-coded);
* MSB-first bit order, the boundary bit ahead of the opcode in an OPD entry,
  and OF2's tag first in an ORD entry;
* emptying the mapping queue at each sequence, and the error behaviour;
* all memory sizes and the 16-bit code-length limit;
* every instruction is assumed to be compressed: a lone instruction is a
  sequence of length one, and there is no escape for uncompressed
  instructions.

Some ARM details are outside this block. The processor must fetch from the
engine instead of from memory, and it must treat branch offsets as codeword
addresses. Indirect branches (`BX`) need register contents that the compressor
has already rewritten to codeword addresses. The processor itself is not part
of this RTL.

## Files

| file | contents |
|---|---|
| `rtl/ofr_pkg.sv` | widths, tag layout, OPD entry struct, load-bus types |
| `rtl/packed_mem.sv` | byte RAM with a bit-window synchronous read |
| `rtl/code_reader.sv` | compressed code memory and bit pointer |
| `rtl/huffman_decoder.sv` | four canonical Huffman tables, parallel decode |
| `rtl/opd_dict.sv`, `rtl/ord_dict.sv`, `rtl/old_dict.sv` | the three dictionaries with their pointers |
| `rtl/mapping_queue.sv` | mapping queue |
| `rtl/majority_regs.sv` | majority registers |
| `rtl/operand_remapper.sv` | tag resolution for one instruction |
| `rtl/ofr_decompressor.sv` | top: engine FSM and wiring |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_ofr_workload` |

`tb_ofr_decompressor` runs the top at its default sizes. It contains a small
compressor of its own. This compressor makes up instruction sequences, picks
the majorities, assigns tags, shares identical ORD and OLD entries, builds
random canonical Huffman codes and encodes a program of 160 codewords. It then
checks the rebuilt stream against the original instructions in four runs:

1. no back-pressure, which also checks the 6-cycle latency and the rate;
2. random back-pressure;
3. 60 branches to random codewords, many of them taken in the middle of a
   sequence;
4. a branch into an invalid code, which must raise `error`.

The testbench counts loads, queue maps, majority maps, queue overflows, shared
entries, multi-instruction sequences, stalls, aborted sequences, codewords that
do not start on a byte boundary, and errors. A mechanism that never occurs
counts as a failure.

`tb_ofr_workload` fills the memories as far as the largest reported programs
need: more than 70 KB of compressed code, 2.4 KB of OPD, 4.1 KB of ORD and
9 KB of OLD, with about 18,000 codewords and 48,000 instructions. The program
is generated from the dictionary side. There is a pool of opcode sequences, a
smaller pool of tag patterns that many codewords share, and many operand
lists. The expected instructions come from a reference model of the tag
rules. The test decodes the whole program with back-pressure, then takes 200
branches. It checks that codewords above 64 KB and dictionary entries above
4 KB are actually reached, so that the high address bits are used.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ofr_pkg.sv \
    rtl/ofr_decompressor.sv tb/tb_ofr_decompressor.sv --top-module tb_ofr_decompressor
./obj_dir/Vtb_ofr_decompressor
```

Replace the module and testbench names to run a unit test. Each testbench
prints `TB_RESULT checks=N failures=M` and has a cycle watchdog.

## How far to trust it

Every module has a self-checking testbench, and each testbench has been shown
to fail against a deliberately broken copy of its module. The end-to-end test
checks the rebuilt instructions against the original program. Its compressor
was written from the same reading of the format as the RTL, though. A
misreading that both share would therefore not be caught, for example the bit
order or the order of the tags. Those points are listed above as this design's
choices. The design has not been run against a real compressor's output or
against the MediaBench programs.
